// dbns_adc_fir_top: digital part of a flash ADC that delivers double-base
// samples straight into a DBNS FIR filter.
//
// The analog comparator bank of the flash ADC (not part of this RTL) drives
// the thermometer code `thermo`, sampled when sample_valid is high.  The
// 0-1 generator turns it into a one-hot level code, the double-base number
// encoder (DBNE) maps the level to a single term 2^b * 3^t and registers it,
// and the FIR filter multiplies the last TAPS samples by their
// single-precision coefficients with hybrid multipliers and sums them.
//
// Timing: thermo sampled in cycle c appears in y, with y_valid, in cycle
// c+4 (one clock in the DBNE buffer, three in the filter).  One sample per
// clock.  Coefficients are written through coef_we / coef_waddr /
// coef_wdata (IEEE-754 bit pattern) and take effect the following cycle.
// dbns_sample / dbns_valid expose the DBNE output.
// The chain ADC -> 0-1 generator -> DBNE -> DBNS FIR with single-precision
// coefficients follows the design this is built on; the port set and clocking
// are this design's choices.
module dbns_adc_fir_top
  import dbns_pkg::*;
#(
    parameter int  ADC_BITS = 6,
    parameter int  TAPS     = 8,
    parameter int  N_PART   = 7,
    parameter real D_MAX    = 0.086,
    parameter int  OUT_W    = 48,
    parameter int  OUT_FRAC = 24,
    localparam int Y_W      = OUT_W + $clog2(TAPS)
) (
    input  logic                    clk,
    input  logic                    rst_n,
    input  logic                    sample_valid,
    input  logic [2**ADC_BITS-2:0]  thermo,
    input  logic                    coef_we,
    input  logic [$clog2(TAPS)-1:0] coef_waddr,
    input  logic [31:0]             coef_wdata,
    output logic                    dbns_valid,
    output dbns_t                   dbns_sample,
    output logic                    y_valid,
    output logic signed [Y_W-1:0]   y
);
  logic [2**ADC_BITS-1:0] onehot;

  zero_one_generator #(
      .ADC_BITS(ADC_BITS)
  ) u_zog (
      .thermo(thermo),
      .onehot(onehot)
  );

  dbns_encoder #(
      .ADC_BITS(ADC_BITS)
  ) u_dbne (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (sample_valid),
      .onehot   (onehot),
      .out_valid(dbns_valid),
      .out      (dbns_sample)
  );

  dbns_fir_filter #(
      .TAPS    (TAPS),
      .N_PART  (N_PART),
      .D_MAX   (D_MAX),
      .OUT_W   (OUT_W),
      .OUT_FRAC(OUT_FRAC)
  ) u_fir (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (dbns_valid),
      .x         (dbns_sample),
      .coef_we   (coef_we),
      .coef_waddr(coef_waddr),
      .coef_wdata(fp32_t'(coef_wdata)),
      .out_valid (y_valid),
      .y         (y)
  );
endmodule
