// dbns_linearizer: reverts a product held as 2^mant * 2^(expo-127) to a
// linear signed fixed-point value.
//
// mant = xi + xf (xi integer, xf 23-bit fraction).  2^xf is approximated
// piecewise linearly by 1 + xf - d, where d is chosen by the same equal
// error bands as the multiplier's mantissa comparators, mapped to the
// exponent domain (mantissa_comparator with LINEAR set).  The 24-bit linear
// mantissa is then shifted by xi + expo - 127 and placed in an OUT_W-bit two's
// complement number with OUT_FRAC fraction bits.  Bits shifted out below the
// LSB are dropped (truncation toward zero of the magnitude); magnitudes too
// large for the format saturate.
//
// Interface: sign, zero, mant, expo in; value out.  Timing: combinational.
// Reverting with a piecewise polynomial of N_PART pieces follows the design
// this is built on; the band rule, the fixed-point output format and the
// saturation are this design's choices.
module dbns_linearizer
  import dbns_pkg::*;
#(
    parameter int  N_PART   = 7,
    parameter real D_MAX    = 0.086,
    parameter int  OUT_W    = 48,
    parameter int  OUT_FRAC = 24
) (
    input  logic                    sign,
    input  logic                    zero,
    input  logic [MANT_W+1:0]       mant,
    input  logic signed [EXP_W+2:0] expo,
    output logic signed [OUT_W-1:0] value
);
  localparam int LW = MANT_W + 2;  // linear mantissa width, value < 2
  localparam int WW = OUT_W + LW + 2;

  logic [MANT_W-1:0]         d;
  logic [$clog2(N_PART)-1:0] band;

  mantissa_comparator #(
      .N_PART(N_PART),
      .D_MAX (D_MAX),
      .LINEAR(1'b1)
  ) u_cmp (
      .f   (mant[MANT_W-1:0]),
      .d   (d),
      .band(band)
  );

  logic [LW-1:0]        lin;  // 1 + xf - d, 23 fraction bits
  logic signed [15:0]   sh;  // weight of lin's LSB relative to the output LSB
  logic [WW-1:0]        wide;
  logic [OUT_W-2:0]     mag;

  always_comb begin
    lin  = {2'b01, mant[MANT_W-1:0]} - {2'b00, d};
    sh   = 16'(signed'({1'b0, mant[MANT_W+1:MANT_W]})) + 16'(expo) - 16'sd127 - 16'(MANT_W)
         + 16'(OUT_FRAC);
    wide = '0;
    if (sh >= 0) begin
      if (sh > 16'(OUT_W)) wide = '1;
      else wide = WW'(lin) << sh;
    end else if (-sh < 16'(LW)) begin
      wide = WW'(lin >> (-sh));
    end
    if (wide[WW-1:OUT_W-1] != '0) mag = '1;
    else mag = wide[OUT_W-2:0];
    if (zero) value = '0;
    else if (sign) value = -$signed({1'b0, mag});
    else value = $signed({1'b0, mag});
  end

  logic unused_band;
  assign unused_band = ^band;
endmodule
