// tb_dbns_fir_filter: loads random single-precision coefficients through the
// write port, streams random double-base samples (with gaps and zero
// samples) and compares every output with sum_k h[k]*x[n-k] computed here in
// real arithmetic.  Each product of the filter may deviate from the exact one
// by about 1.3 % (log and antilog approximations), so the bound is 3 % of
// sum_k |h[k]*x[n-k]| plus a few LSB.  Checks the three-clock latency by
// predicting the exact cycle of every out_valid, and reloads the
// coefficients once in the middle of the run, while the pipeline is empty.
module tb_dbns_fir_filter;
  import dbns_pkg::*;
  localparam int TAPS = 8;
  localparam int OUT_W = 48;
  localparam int OUT_FRAC = 24;
  localparam int Y_W = OUT_W + $clog2(TAPS);
  localparam int LAT = 3;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, coef_we = 1'b0;
  dbns_t x = '0;
  logic [2:0] coef_waddr = '0;
  fp32_t coef_wdata = '0;
  logic out_valid;
  logic signed [Y_W-1:0] y;
  int checks = 0, failures = 0, outputs = 0;

  dbns_fir_filter #(.TAPS(TAPS), .OUT_W(OUT_W), .OUT_FRAC(OUT_FRAC)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .coef_we(coef_we),
      .coef_waddr(coef_waddr), .coef_wdata(coef_wdata), .out_valid(out_valid), .y(y));

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

  real h[TAPS];
  real hist[TAPS];  // hist[k] = x[n-k]
  real exp_y[$], exp_mag[$];
  bit  vpipe[LAT];  // expected out_valid pipeline

  function automatic real fp_val(fp32_t c);
    if (c.exp == 0) return 0.0;
    return (c.sign ? -1.0 : 1.0) * (1.0 + real'(c.frac) / 8388608.0) * 2.0 ** real'(int'(c.exp) - 127);
  endfunction

  task automatic load_coefs();
    fp32_t c;
    for (int k = 0; k < TAPS; k++) begin
      @(negedge clk);
      c.sign = 1'($urandom);
      c.exp  = 8'(118 + $urandom % 9);
      c.frac = 23'($urandom);
      coef_we = 1'b1;
      coef_waddr = 3'(k);
      coef_wdata = c;
      h[k] = fp_val(c);
    end
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  // output monitor
  always @(posedge clk) begin
    if (rst_n) begin
      #1;
      check(out_valid == vpipe[LAT-1], "out_valid not three clocks after in_valid");
      if (out_valid && exp_y.size() > 0) begin
        real got, want, mag;
        got  = real'(y) / (2.0 ** OUT_FRAC);
        want = exp_y.pop_front();
        mag  = exp_mag.pop_front();
        outputs++;
        check(got - want < 0.03 * mag + 8.0 / (2.0 ** OUT_FRAC)
              && want - got < 0.03 * mag + 8.0 / (2.0 ** OUT_FRAC),
              $sformatf("y=%f expected %f", got, want));
      end
    end
  end

  task automatic push_sample(bit valid);
    real xv, sum, mag;
    @(negedge clk);
    in_valid = valid;
    x.zero = ($urandom % 10 == 0);
    x.b = 8'(int'($urandom % 13) - 6);
    x.t = 8'(int'($urandom % 9) - 4);
    for (int k = LAT - 1; k > 0; k--) vpipe[k] = vpipe[k-1];
    vpipe[0] = valid;
    if (valid) begin
      xv = x.zero ? 0.0 : (2.0 ** real'(x.b)) * (3.0 ** real'(x.t));
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = xv;
      sum = 0.0;
      mag = 0.0;
      for (int k = 0; k < TAPS; k++) begin
        sum += h[k] * hist[k];
        mag += (h[k] * hist[k] < 0.0) ? -h[k] * hist[k] : h[k] * hist[k];
      end
      exp_y.push_back(sum);
      exp_mag.push_back(mag);
    end
  endtask

  initial begin
    for (int k = 0; k < TAPS; k++) hist[k] = 0.0;
    for (int k = 0; k < LAT; k++) vpipe[k] = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    load_coefs();
    for (int n = 0; n < 400; n++) push_sample(($urandom % 4) != 0);
    for (int n = 0; n < LAT + 1; n++) push_sample(1'b0);
    load_coefs();
    for (int n = 0; n < 400; n++) push_sample(1'b1);
    for (int n = 0; n < LAT + 1; n++) push_sample(1'b0);
    check(exp_y.size() == 0, "outputs missing");
    check(outputs > 500, "too few outputs");
    $display("outputs=%0d", outputs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
