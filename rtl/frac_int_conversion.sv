// frac_int_conversion: splits t*log2(3) into an integer I and a fraction F.
//
// 3^t = 2^(t*log2 3), and log2 3 = 2^0+2^-1+2^-4+2^-6+2^-8+2^-9+2^-10+2^-20
// +2^-21+2^-23+...  The block forms the ten shifted copies t*2^-i for
// i in {0,1,4,6,8,9,10,20,21,23} with 23 fraction bits (exact, since t is an
// integer) and adds them in a tree of adders.  The integer part of the sum
// (rounded toward minus infinity) is I and its 23-bit fraction is F, so
// 3^t ~= 2^I * 2^F with F in [0,1); fraction carries are passed into I.  The
// series is cut after the 2^-23 term; the remainder is about 1.35e-8 (the
// next binary digit of log2 3 is 2^-27), so I+F differs from t*log2 3 by
// at most 1.7e-6 (about 15 LSB of F) at |t| = 128.
//
// Interface: t (8-bit two's complement) in; I (9-bit two's complement, since
// |t*log2 3| reaches 203) and F (23 bits) out.  Timing: combinational.
// The series, its index set and the shift-and-add structure follow the
// design this is built on; the single combined sum (instead of separate
// integer and fraction sums) and the floor convention for negative t are
// this design's choices.
module frac_int_conversion
  import dbns_pkg::*;
(
    input  logic signed [EXP_W-1:0] t,
    output logic signed [EXP_W:0]   i_part,
    output logic [MANT_W-1:0]       f_part
);
  localparam int W = EXP_W + MANT_W + 3;
  localparam int NTERM = 10;
  localparam int SHIFT[NTERM] = '{0, 1, 4, 6, 8, 9, 10, 20, 21, 23};

  logic signed [W-1:0] term[NTERM];
  logic signed [W-1:0] sum;

  for (genvar n = 0; n < NTERM; n++) begin : g_term
    // t * 2^(23-i): the shift right by i of t placed at the units position
    assign term[n] = W'(t) <<< (MANT_W - SHIFT[n]);
  end

  // adder tree: 10 -> 5 -> 3 -> 2 -> 1
  logic signed [W-1:0] s1[5];
  logic signed [W-1:0] s2[3];
  always_comb begin
    for (int n = 0; n < 5; n++) s1[n] = term[2*n] + term[2*n+1];
    s2[0] = s1[0] + s1[1];
    s2[1] = s1[2] + s1[3];
    s2[2] = s1[4];
    sum   = s2[0] + s2[1] + s2[2];
  end

  assign i_part = (EXP_W + 1)'(sum >>> MANT_W);
  assign f_part = sum[MANT_W-1:0];
endmodule
