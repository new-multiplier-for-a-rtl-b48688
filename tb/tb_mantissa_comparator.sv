// tb_mantissa_comparator: checks both uses of the comparator bank against
// real arithmetic.  Log mode: for a mantissa fraction f the selected d must
// satisfy 0 <= (log2(1+f) - f) - d < D_MAX/N_PART.  Linear mode: for an
// exponent fraction x it must satisfy 0 <= (1 + x - 2^x) - d < D_MAX/N_PART.
// Two LSB of slack allow for the rounding of the constants.  Random and
// swept operands are used, and every one of the N_PART bands must be hit in
// both modes.  d must also be band*D_MAX/N_PART.
module tb_mantissa_comparator;
  import dbns_pkg::*;
  localparam int N_PART = 7;
  localparam real D_MAX = 0.086;
  localparam real S = 8388608.0;
  // exact maximum of log2(1+f)-f; D_MAX is its value rounded to 0.086,
  // so the top band reaches slightly past D_MAX
  localparam real DTRUE = 0.0860713320559342;
  logic [22:0] f, x, d_log, d_lin;
  logic [2:0] band_log, band_lin;
  int checks = 0, failures = 0;
  int hit_log[N_PART], hit_lin[N_PART];

  mantissa_comparator #(.N_PART(N_PART), .D_MAX(D_MAX), .LINEAR(1'b0)) dut_log (
      .f(f), .d(d_log), .band(band_log));
  mantissa_comparator #(.N_PART(N_PART), .D_MAX(D_MAX), .LINEAR(1'b1)) dut_lin (
      .f(x), .d(d_lin), .band(band_lin));

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
    real fr, e, dr, d0;
    d0 = D_MAX / real'(N_PART) + (DTRUE - D_MAX);
    for (int n = 0; n < 4000; n++) begin
      if (n < 2048) f = 23'(n * 4096);
      else f = 23'($urandom);
      x = f;
      #1;
      fr = real'(f) / S;
      // log mode
      e  = $ln(1.0 + fr) / $ln(2.0) - fr;
      dr = real'(d_log) / S;
      check(e - dr > -2.0 / S && e - dr < d0 + 2.0 / S,
            $sformatf("log f=%f e=%f d=%f", fr, e, dr));
      check(d_log == 23'($rtoi(D_MAX / real'(N_PART) * real'(band_log) * S + 0.5)),
            $sformatf("log band %0d d=%0d", band_log, d_log));
      hit_log[band_log]++;
      // linear mode
      e  = 1.0 + fr - 2.0 ** fr;
      dr = real'(d_lin) / S;
      check(e - dr > -2.0 / S && e - dr < d0 + 2.0 / S,
            $sformatf("lin x=%f e=%f d=%f", fr, e, dr));
      hit_lin[band_lin]++;
    end
    for (int k = 0; k < N_PART; k++) begin
      check(hit_log[k] > 0, $sformatf("log band %0d never selected", k));
      check(hit_lin[k] > 0, $sformatf("linear band %0d never selected", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
