// tb_hybrid_multiplier: random single-precision coefficients times random
// double-base samples.  The product's log2, computed here in real arithmetic
// as log2(1+f) + (B-127) + b + t*log2(3), is compared with the multiplier's
// result read as mant/2^23 + expo - 127: the result may lie below the exact
// value by less than D_MAX/N_PART (the piecewise log approximation) and above
// it by no more than two LSB, each widened by the remainder of the cut
// log2(3) series (below 1.4e-8 per unit of t, either sign).  Sign and zero flags are checked, and so
// is the one-clock latency (out_valid follows in_valid by exactly one edge,
// with gaps in the input stream).  Mantissa carries (f+d+F >= 1) must occur.
module tb_hybrid_multiplier;
  import dbns_pkg::*;
  localparam int N_PART = 7;
  localparam real D_MAX = 0.086;
  localparam real S = 8388608.0;
  // exact maximum of log2(1+f)-f; D_MAX is its value rounded to 0.086,
  // so the top band reaches slightly past D_MAX
  localparam real DTRUE = 0.0860713320559342;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  fp32_t coef = '0;
  dbns_t x = '0;
  logic out_valid, sign, zero;
  logic [24:0] mant;
  logic signed [10:0] expo;
  int checks = 0, failures = 0, carries = 0, zeros = 0;

  hybrid_multiplier #(.N_PART(N_PART), .D_MAX(D_MAX)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .coef(coef), .x(x),
      .out_valid(out_valid), .sign(sign), .zero(zero), .mant(mant), .expo(expo));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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
    real exact, got, d0;
    bit exp_zero;
    d0 = D_MAX / real'(N_PART) + (DTRUE - D_MAX);
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 3) != 0;
      coef.sign = 1'($urandom);
      coef.exp  = 8'(60 + $urandom % 130);
      if ($urandom % 50 == 0) coef.exp = '0;
      coef.frac = 23'($urandom);
      x.b    = 8'(int'($urandom % 256) - 128);
      x.t    = 8'(int'($urandom % 256) - 128);
      x.zero = ($urandom % 50 == 0);
      @(posedge clk);
      #1;
      check(out_valid == in_valid, "out_valid does not follow in_valid by one clock");
      if (in_valid) begin
        exp_zero = (coef.exp == 0) || x.zero;
        check(zero == exp_zero, "zero flag");
        if (exp_zero) zeros++;
        else begin
          check(sign == coef.sign, "sign");
          exact = $ln(1.0 + real'(coef.frac) / S) / $ln(2.0) + real'(int'(coef.exp) - 127)
                + real'(x.b) + real'(x.t) * ($ln(3.0) / $ln(2.0));
          got = real'(mant) / S + real'(int'(expo) - 127);
          check(exact - got > -2.0 / S - 128.0 * 1.4e-8 && exact - got < d0 + 2.0 / S + 128.0 * 1.4e-8,
                $sformatf("exp %0d frac %h b %0d t %0d: log2 %f, expected %f",
                          coef.exp, coef.frac, x.b, x.t, got, exact));
          if (mant[24:23] != 0) carries++;
        end
      end
    end
    check(carries > 0, "no mantissa carry exercised");
    check(zeros > 0, "no zero operand exercised");
    $display("carries=%0d zeros=%0d", carries, zeros);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
