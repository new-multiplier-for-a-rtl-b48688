// tb_dbns_adc_fir_top: end-to-end test of the flash-ADC back end and the
// DBNS FIR filter at the design's default sizes (6-bit ADC, 8 taps,
// N_PART = 7).
//
// A model of the flash ADC's comparator bank turns a sampled analog signal
// (a sine, clipped below zero and above full scale, plus noise) into the
// thermometer code: comparator i fires when the input exceeds (i+0.5) LSB.
// The expected output is sum_k h[k]*level[n-k] in real arithmetic, where
// level is the ideal ADC output; the bound allows half an LSB of DBNE
// encoding error and 3 % of multiplier error per tap.  The latency of four
// clocks from sample_valid to y_valid is checked cycle by cycle, and the
// DBNE output is checked on its own.  Counted mechanisms, each of which must
// occur: zero samples, full-scale samples, negative and positive ternary
// exponents, negative coefficients, each of the 7 deviation bands in the
// multipliers, mantissa carries (f+d+F >= 1), a coefficient reload, gaps in
// the sample stream and back-to-back samples.
module tb_dbns_adc_fir_top;
  import dbns_pkg::*;
  localparam int ADC_BITS = 6;
  localparam int LEVELS = 2 ** ADC_BITS;
  localparam int TAPS = 8;
  localparam int N_PART = 7;
  localparam int OUT_FRAC = 24;
  localparam int Y_W = 48 + $clog2(TAPS);
  localparam int LAT = 4;
  logic clk = 1'b0, rst_n = 1'b0, sample_valid = 1'b0, coef_we = 1'b0;
  logic [LEVELS-2:0] thermo = '0;
  logic [2:0] coef_waddr = '0;
  logic [31:0] coef_wdata = '0;
  logic dbns_valid, y_valid;
  dbns_t dbns_sample;
  logic signed [Y_W-1:0] y;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_zero = 0, n_full = 0, n_tneg = 0, n_tpos = 0, n_negcoef = 0, n_carry = 0;
  int n_reload = 0, n_gap = 0, n_b2b = 0;
  int n_band[N_PART];

  dbns_adc_fir_top dut (
      .clk(clk), .rst_n(rst_n), .sample_valid(sample_valid), .thermo(thermo),
      .coef_we(coef_we), .coef_waddr(coef_waddr), .coef_wdata(coef_wdata),
      .dbns_valid(dbns_valid), .dbns_sample(dbns_sample), .y_valid(y_valid), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
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

  // observe the multipliers' internal mechanisms
  for (genvar k = 0; k < TAPS; k++) begin : g_obs
    always @(posedge clk) begin
      if (rst_n && dut.u_fir.g_tap[k].u_mul.out_valid && !dut.u_fir.g_tap[k].u_mul.zero) begin
        if (dut.u_fir.g_tap[k].u_mul.mant[24:23] != 0) n_carry++;
      end
      if (rst_n && dut.u_fir.line_valid && !dut.u_fir.xs[k].zero)
        n_band[dut.u_fir.g_tap[k].u_mul.u_cmp.band]++;
    end
  end

  real h[TAPS];
  real hist[TAPS];
  real exp_y[$], exp_mag[$];
  int  exp_lvl[$];
  bit  vpipe[LAT];
  int  outputs = 0;

  function automatic real fp_val(logic [31:0] c);
    if (c[30:23] == 0) return 0.0;
    return (c[31] ? -1.0 : 1.0) * (1.0 + real'(c[22:0]) / 8388608.0) * 2.0 ** real'(int'(c[30:23]) - 127);
  endfunction

  task automatic load_coefs();
    logic [31:0] c;
    for (int k = 0; k < TAPS; k++) begin
      @(negedge clk);
      c[31] = 1'($urandom);
      c[30:23] = 8'(119 + $urandom % 8);  // |h| in [2^-8, 1)
      // fractions spread over [0,1) so that every deviation band is used
      c[22:0] = 23'((2 * k + n_reload) * 524288 + int'($urandom % 65536));
      coef_we = 1'b1;
      coef_waddr = 3'(k);
      coef_wdata = c;
      h[k] = fp_val(c);
      if (c[31]) n_negcoef++;
    end
    @(negedge clk);
    coef_we = 1'b0;
    n_reload++;
  endtask

  // monitors: DBNE output one clock after sampling, y four clocks after
  always @(posedge clk) begin
    if (rst_n) begin
      #1;
      check(y_valid == vpipe[LAT-1], "y_valid not four clocks after sample_valid");
      check(dbns_valid == vpipe[0], "dbns_valid not one clock after sample_valid");
      if (dbns_valid && exp_lvl.size() > 0) begin
        int lvl;
        real v;
        lvl = exp_lvl.pop_front();
        if (lvl == 0) check(dbns_sample.zero, "level 0 not flagged zero");
        else begin
          v = (2.0 ** real'(dbns_sample.b)) * (3.0 ** real'(dbns_sample.t));
          check(!dbns_sample.zero && v > real'(lvl) - 0.5 && v < real'(lvl) + 0.5,
                $sformatf("level %0d encoded as %f", lvl, v));
          if (dbns_sample.t < 0) n_tneg++;
          if (dbns_sample.t > 0) n_tpos++;
        end
      end
      if (y_valid && exp_y.size() > 0) begin
        real got, want, mag;
        got  = real'(y) / (2.0 ** OUT_FRAC);
        want = exp_y.pop_front();
        mag  = exp_mag.pop_front();
        outputs++;
        check(got - want < mag + 8.0 / (2.0 ** OUT_FRAC) && want - got < mag + 8.0 / (2.0 ** OUT_FRAC),
              $sformatf("y=%f expected %f", got, want));
      end
    end
  end

  int  phase = 0;
  bit  last_valid = 1'b0;

  task automatic step(bit valid);
    real vin, sum, mag;
    int lvl;
    @(negedge clk);
    phase++;
    vin = 36.0 * $sin(real'(phase) * 0.05) + 30.0 + real'(int'($urandom % 200) - 100) / 100.0;
    lvl = 0;
    for (int i = 0; i < LEVELS - 1; i++) begin
      thermo[i] = vin > real'(i) + 0.5;
      if (thermo[i]) lvl = i + 1;
    end
    sample_valid = valid;
    for (int k = LAT - 1; k > 0; k--) vpipe[k] = vpipe[k-1];
    vpipe[0] = valid;
    if (valid) begin
      if (lvl == 0) n_zero++;
      if (lvl == LEVELS - 1) n_full++;
      if (last_valid) n_b2b++;
      exp_lvl.push_back(lvl);
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = real'(lvl);
      sum = 0.0;
      mag = 0.0;
      for (int k = 0; k < TAPS; k++) begin
        sum += h[k] * hist[k];
        mag += (h[k] < 0.0 ? -h[k] : h[k]) * (0.5 + 0.03 * hist[k]);
      end
      exp_y.push_back(sum);
      exp_mag.push_back(mag);
    end else n_gap++;
    last_valid = valid;
  endtask

  initial begin
    for (int k = 0; k < TAPS; k++) hist[k] = 0.0;
    for (int k = 0; k < LAT; k++) vpipe[k] = 1'b0;
    for (int k = 0; k < N_PART; k++) n_band[k] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    load_coefs();
    for (int n = 0; n < 600; n++) step(($urandom % 5) != 0);
    for (int n = 0; n < LAT + 1; n++) step(1'b0);
    load_coefs();
    for (int n = 0; n < 600; n++) step(1'b1);
    for (int n = 0; n < LAT + 1; n++) step(1'b0);
    check(exp_y.size() == 0, "outputs missing");
    $display("outputs=%0d zero=%0d full=%0d t<0=%0d t>0=%0d negcoef=%0d carry=%0d reload=%0d gap=%0d b2b=%0d",
             outputs, n_zero, n_full, n_tneg, n_tpos, n_negcoef, n_carry, n_reload, n_gap, n_b2b);
    check(outputs > 1000, "too few outputs");
    check(n_zero > 0, "no zero sample");
    check(n_full > 0, "no full-scale sample");
    check(n_tneg > 0, "no negative ternary exponent");
    check(n_tpos > 0, "no positive ternary exponent");
    check(n_negcoef > 0, "no negative coefficient");
    check(n_carry > 0, "no mantissa carry");
    check(n_reload > 1, "no coefficient reload");
    check(n_gap > 0, "no gap in the sample stream");
    check(n_b2b > 0, "no back-to-back samples");
    for (int k = 0; k < N_PART; k++) begin
      $display("band %0d selected %0d times", k, n_band[k]);
      check(n_band[k] > 0, $sformatf("deviation band %0d never selected", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
