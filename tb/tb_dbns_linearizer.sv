// tb_dbns_linearizer: random exponent-domain products (mant, expo, sign)
// are reverted to fixed point and compared with sign * 2^(mant/2^23) *
// 2^(expo-127) * 2^OUT_FRAC computed in real arithmetic.  The piecewise
// linear antilog may exceed the exact mantissa by less than D_MAX/N_PART of
// the leading power of two, and truncation removes less than one LSB.
// Zero, saturation of large products and flushing of tiny ones are checked
// and must each occur.  Combinational block: 1 ns settle.
module tb_dbns_linearizer;
  import dbns_pkg::*;
  localparam int N_PART = 7;
  localparam real D_MAX = 0.086;
  localparam int OUT_W = 48;
  localparam int OUT_FRAC = 24;
  localparam real S = 8388608.0;
  // exact maximum of log2(1+f)-f; D_MAX is its value rounded to 0.086,
  // so the top band reaches slightly past D_MAX
  localparam real DTRUE = 0.0860713320559342;
  logic sign, zero;
  logic [24:0] mant;
  logic signed [10:0] expo;
  logic signed [OUT_W-1:0] value;
  int checks = 0, failures = 0, sats = 0, flushes = 0;

  dbns_linearizer #(.N_PART(N_PART), .D_MAX(D_MAX), .OUT_W(OUT_W), .OUT_FRAC(OUT_FRAC)) dut (
      .sign(sign), .zero(zero), .mant(mant), .expo(expo), .value(value));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    real exact, lead, mag, d0, maxv;
    d0   = D_MAX / real'(N_PART) + (DTRUE - D_MAX);
    maxv = 2.0 ** real'(OUT_W - 1) - 1.0;
    for (int n = 0; n < 5000; n++) begin
      sign = 1'($urandom);
      zero = ($urandom % 40 == 0);
      mant = 25'($urandom % (3 * 8388608));
      expo = 11'(70 + $urandom % 90);
      #1;
      if (zero) begin
        check(value == 0, "zero");
        continue;
      end
      exact = (2.0 ** (real'(mant) / S)) * (2.0 ** real'(int'(expo) - 127 + OUT_FRAC));
      lead  = 2.0 ** real'(int'(mant[24:23]) + int'(expo) - 127 + OUT_FRAC);
      mag   = sign ? -real'(value) : real'(value);
      if (exact >= maxv) begin
        sats++;
        check(mag == maxv, $sformatf("no saturation: %f", mag));
      end else begin
        if (exact < 1.0) flushes++;
        check(mag - exact > -1.0 && mag - exact < (d0 + 2.0 / S) * lead + 1.0,
              $sformatf("mant %h expo %0d: %f, expected %f", mant, expo, mag, exact));
      end
    end
    check(sats > 0, "saturation never exercised");
    check(flushes > 0, "flush to zero never exercised");
    $display("sats=%0d flushes=%0d", sats, flushes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
