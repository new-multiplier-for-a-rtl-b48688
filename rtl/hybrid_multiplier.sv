// hybrid_multiplier: multiplies an IEEE-754 single-precision coefficient
// h = (1+f)*2^(B-127) by a double-base sample x = 2^b * 3^t.
//
// The product is formed entirely in the exponent domain:
//   (1+f)  ~= 2^(f+d)       d from the comparator bank (mantissa_comparator)
//   3^t     = 2^(I+F)       I, F from frac_int_conversion (shifts and adds)
//   h*x    ~= 2^(f+d+F) * 2^(B+b+I-127)
// so the multiplier only needs two 23-bit additions for the mantissa path
// (m+d, then +F) and two 8-bit-class additions for the exponent path (B+b,
// then +I).  The outputs are that pair: mant = f+d+F as an unsigned fixed
// point number with 2 integer and 23 fraction bits (it may reach 2.09, the
// carry is kept rather than normalised), and expo = B+b+I, still biased by
// 127, as an 11-bit two's complement number.  The result is read as
// (2^mant) * 2^(expo-127); dbns_linearizer turns it back into a linear value.
// The sign is the coefficient's sign (samples are non-negative); zero is set
// when the coefficient's exponent field is 0 or the sample is zero.
//
// Timing: one register stage (the "Acc" holding m and the "Buffer" holding d,
// plus the aligned F, I, B+b and flags), then the final adders.  Operands
// presented with in_valid give out_valid and the result one clock later.
// Interface: clk, rst_n (active-low, synchronous), in_valid, coef (fp32_t),
// x (dbns_t); out_valid, sign, zero, mant, expo.
// The comparator/shifter/adder structure, the 23-bit and 8-bit widths and
// N_PART = 7 follow the design this is built on.  Registering F, I and B+b
// beside Acc and Buffer, the 9-bit I and 11-bit exponent (8 bits cannot hold
// t*log2 3 or the sum), and the sign and zero handling are this design's
// choices.
module hybrid_multiplier
  import dbns_pkg::*;
#(
    parameter int  N_PART = 7,
    parameter real D_MAX  = 0.086
) (
    input  logic                  clk,
    input  logic                  rst_n,
    input  logic                  in_valid,
    input  fp32_t                 coef,
    input  dbns_t                 x,
    output logic                  out_valid,
    output logic                  sign,
    output logic                  zero,
    output logic [MANT_W+1:0]     mant,
    output logic signed [EXP_W+2:0] expo
);
  logic [MANT_W-1:0]       d;
  logic [$clog2(N_PART)-1:0] band;
  logic signed [EXP_W:0]   i_part;
  logic [MANT_W-1:0]       f_part;

  mantissa_comparator #(
      .N_PART(N_PART),
      .D_MAX (D_MAX),
      .LINEAR(1'b0)
  ) u_cmp (
      .f   (coef.frac),
      .d   (d),
      .band(band)
  );

  frac_int_conversion u_conv (
      .t     (x.t),
      .i_part(i_part),
      .f_part(f_part)
  );

  // register stage
  logic [MANT_W-1:0]         acc_q;  // m
  logic [MANT_W-1:0]         buf_q;  // d
  logic [MANT_W-1:0]         fr_q;  // F
  logic signed [EXP_W:0]     int_q;  // I
  logic signed [EXP_W+2:0]   bb_q;  // B+b
  logic                      sign_q, zero_q, valid_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      acc_q   <= '0;
      buf_q   <= '0;
      fr_q    <= '0;
      int_q   <= '0;
      bb_q    <= '0;
      sign_q  <= 1'b0;
      zero_q  <= 1'b1;
    end else begin
      valid_q <= in_valid;
      if (in_valid) begin
        acc_q  <= coef.frac;
        buf_q  <= d;
        fr_q   <= f_part;
        int_q  <= i_part;
        bb_q   <= $signed({3'b000, coef.exp}) + (EXP_W + 3)'(x.b);
        sign_q <= coef.sign;
        zero_q <= (coef.exp == '0) || x.zero;
      end
    end
  end

  // adders
  logic [MANT_W:0] md;
  assign md        = {1'b0, acc_q} + {1'b0, buf_q};
  assign mant      = {1'b0, md} + {2'b00, fr_q};
  assign expo      = bb_q + (EXP_W + 3)'(int_q);
  assign sign      = sign_q;
  assign zero      = zero_q;
  assign out_valid = valid_q;

  // band is informative only inside this block
  logic unused_band;
  assign unused_band = ^band;
endmodule
