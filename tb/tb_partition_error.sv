// tb_partition_error: accuracy of the hybrid multiplier against the number of
// partitions N_PART = 5, 7 and 9 (the three settings compared for the
// original design).  Each instance multiplies coefficients whose mantissa
// fraction sweeps [0,1) in 1024 steps by the sample 3^t for t = 0 and t = 5
// (b = 0, exponent field 127).  The log2 error of every product, exact minus
// result computed in real arithmetic, must lie in [-2 LSB, D_MAX/N_PART +
// 0.0000713 + series remainder], and the largest error must shrink as N_PART
// grows.  The peak errors are printed per N_PART.
module tb_partition_error;
  import dbns_pkg::*;
  localparam real S = 8388608.0;
  localparam int NCFG = 3;
  localparam int NP[NCFG] = '{5, 7, 9};
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  fp32_t coef = '0;
  dbns_t x = '0;
  logic [NCFG-1:0] out_valid, sign, zero;
  logic [24:0] mant[NCFG];
  logic signed [10:0] expo[NCFG];
  int checks = 0, failures = 0;
  real peak[NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    hybrid_multiplier #(.N_PART(NP[c]), .D_MAX(0.086)) dut (
        .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .coef(coef), .x(x),
        .out_valid(out_valid[c]), .sign(sign[c]), .zero(zero[c]), .mant(mant[c]), .expo(expo[c]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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
    real exact, got, err;
    for (int c = 0; c < NCFG; c++) peak[c] = 0.0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int tv = 0; tv <= 5; tv += 5) begin
      for (int n = 0; n < 1024; n++) begin
        @(negedge clk);
        in_valid  = 1'b1;
        coef.sign = 1'b0;
        coef.exp  = 8'd127;
        coef.frac = 23'(n * 8192 + 4096);
        x.zero = 1'b0;
        x.b = '0;
        x.t = 8'(tv);
        @(posedge clk);
        #1;
        exact = $ln(1.0 + real'(coef.frac) / S) / $ln(2.0) + real'(tv) * ($ln(3.0) / $ln(2.0));
        for (int c = 0; c < NCFG; c++) begin
          check(out_valid[c] && !zero[c], "no result");
          got = real'(mant[c]) / S + real'(int'(expo[c]) - 127);
          err = exact - got;
          if (err > peak[c]) peak[c] = err;
          check(err > -2.0 / S && err < 0.086 / real'(NP[c]) + 0.0000713320559342 + 2.0 / S + 5.0 * 1.4e-8,
                $sformatf("N=%0d frac=%h t=%0d: error %f", NP[c], coef.frac, tv, err));
        end
      end
    end
    for (int c = 0; c < NCFG; c++) $display("N_PART=%0d: peak log2 error %f (bound %f)", NP[c], peak[c], 0.086 / real'(NP[c]));
    check(peak[0] > peak[1] && peak[1] > peak[2], "error does not shrink with N_PART");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
