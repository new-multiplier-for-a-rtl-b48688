// mantissa_comparator: bank of 23-bit comparators C1..Cn that selects the
// deviation constant d for a mantissa fraction.
//
// The fraction f of a coefficient mantissa m = 1+f is compared in parallel
// with 2*(N_PART-1) constants y_j (ascending).  The number of constants at or
// below f tells which segment of [0,1) f lies in; the segment's error band k
// (0..N_PART-1, rising then falling with f) selects d = k*D_MAX/N_PART, so
// that f + d approximates log2(1+f) from below within D_MAX/N_PART.
// When LINEAR is set the same bands are used on an exponent fraction x
// instead (thresholds log2(1+y_j)), for reverting 2^x ~= 1 + x - d.
//
// Interface: f in; d and band out.  Timing: combinational.
// The comparator bank, the 23-bit width, N_PART = 7 and D_MAX = 0.086 follow
// the design this is built on; the band rule that places the constants
// (equal error bands, d at the lower band edge) is this design's reading.
module mantissa_comparator
  import dbns_pkg::*;
#(
    parameter int  N_PART = 7,
    parameter real D_MAX  = 0.086,
    parameter bit  LINEAR = 1'b0
) (
    input  logic [MANT_W-1:0]         f,
    output logic [MANT_W-1:0]         d,
    output logic [$clog2(N_PART)-1:0] band
);
  localparam int NCMP = 2 * (N_PART - 1);

  logic [MANT_W-1:0] y[NCMP];
  logic [MANT_W-1:0] d_tab[N_PART];
  logic [NCMP-1:0]   ge;

  for (genvar j = 0; j < NCMP; j++) begin : g_cmp
    localparam logic [MANT_W-1:0] Y =
        LINEAR ? lin_threshold(N_PART, D_MAX, j) : log_threshold(N_PART, D_MAX, j);
    assign y[j]  = Y;
    assign ge[j] = (f >= y[j]);
  end

  for (genvar k = 0; k < N_PART; k++) begin : g_d
    localparam logic [MANT_W-1:0] DK = band_d(N_PART, D_MAX, k);
    assign d_tab[k] = DK;
  end

  always_comb begin
    int count;
    count = 0;
    for (int j = 0; j < NCMP; j++) count += int'(ge[j]);
    band = $clog2(N_PART)'(band_of_count(N_PART, count));
    d    = d_tab[band];
  end
endmodule
