// dbns_fir_filter: direct-form FIR filter  y[n] = sum_k h[k] * x[n-k]  whose
// samples x are single-term double-base numbers (dbns_t) and whose
// coefficients h are IEEE-754 single precision numbers.
//
// A TAPS-deep delay line holds the last TAPS samples.  Each tap has its own
// hybrid_multiplier (comparators, shifters and adders only, no array
// multiplier) and a dbns_linearizer that turns the exponent-domain product
// into a signed fixed-point number with OUT_FRAC fraction bits; an adder tree
// sums the taps into y, which is wider than a product by clog2(TAPS) bits so
// it cannot overflow.  The coefficients live in a coefficient_memory with a
// write port.
//
// Timing: a sample accepted with in_valid enters the delay line at that
// edge, the multipliers' register stage takes it at the next edge and y is
// registered at the one after, so out_valid rises three clocks after the
// sample's in_valid cycle; one sample can be accepted per clock.
// Interface: clk, rst_n (active-low, synchronous), in_valid, x; coefficient
// write port coef_we, coef_waddr, coef_wdata; out_valid, y.
// The filter equation, the parallel multipliers and adder and the number
// formats follow the design this is built on.  The tap count (no number is
// given), the fixed-point accumulation format and the pipeline registers are
// this design's choices.
module dbns_fir_filter
  import dbns_pkg::*;
#(
    parameter int  TAPS     = 8,
    parameter int  N_PART   = 7,
    parameter real D_MAX    = 0.086,
    parameter int  OUT_W    = 48,
    parameter int  OUT_FRAC = 24,
    localparam int Y_W      = OUT_W + $clog2(TAPS)
) (
    input  logic                    clk,
    input  logic                    rst_n,
    input  logic                    in_valid,
    input  dbns_t                   x,
    input  logic                    coef_we,
    input  logic [$clog2(TAPS)-1:0] coef_waddr,
    input  fp32_t                   coef_wdata,
    output logic                    out_valid,
    output logic signed [Y_W-1:0]   y
);
  fp32_t coef[TAPS];

  coefficient_memory #(
      .TAPS(TAPS)
  ) u_coef (
      .clk  (clk),
      .rst_n(rst_n),
      .we   (coef_we),
      .waddr(coef_waddr),
      .wdata(coef_wdata),
      .coef (coef)
  );

  // delay line: xs[k] = x[n-k]
  dbns_t xs[TAPS];
  logic  line_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      line_valid <= 1'b0;
      for (int k = 0; k < TAPS; k++) xs[k] <= '{zero: 1'b1, b: '0, t: '0};
    end else begin
      line_valid <= in_valid;
      if (in_valid) begin
        xs[0] <= x;
        for (int k = 1; k < TAPS; k++) xs[k] <= xs[k-1];
      end
    end
  end

  logic [TAPS-1:0]           prod_valid;
  logic signed [OUT_W-1:0]   prod[TAPS];

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    logic                    p_sign, p_zero;
    logic [MANT_W+1:0]       p_mant;
    logic signed [EXP_W+2:0] p_expo;

    hybrid_multiplier #(
        .N_PART(N_PART),
        .D_MAX (D_MAX)
    ) u_mul (
        .clk      (clk),
        .rst_n    (rst_n),
        .in_valid (line_valid),
        .coef     (coef[k]),
        .x        (xs[k]),
        .out_valid(prod_valid[k]),
        .sign     (p_sign),
        .zero     (p_zero),
        .mant     (p_mant),
        .expo     (p_expo)
    );

    dbns_linearizer #(
        .N_PART  (N_PART),
        .D_MAX   (D_MAX),
        .OUT_W   (OUT_W),
        .OUT_FRAC(OUT_FRAC)
    ) u_lin (
        .sign (p_sign),
        .zero (p_zero),
        .mant (p_mant),
        .expo (p_expo),
        .value(prod[k])
    );
  end

  // all taps run in lock step
  a_lockstep : assert property (@(posedge clk) disable iff (!rst_n)
    prod_valid == {TAPS{prod_valid[0]}});

  logic signed [Y_W-1:0] sum;
  always_comb begin
    sum = '0;
    for (int k = 0; k < TAPS; k++) sum += Y_W'(prod[k]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= prod_valid[0];
      if (prod_valid[0]) y <= sum;
    end
  end
endmodule
