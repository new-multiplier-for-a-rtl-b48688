// dbns_encoder: double-base number encoder (DBNE) and buffer stage.
//
// Converts the one-hot level code of a flash ADC directly into a single
// double-base term  X ~= 2^b * 3^t  (8-bit two's complement b and t), the
// sample format consumed by the hybrid multiplier.  Like a ROM encoder, every
// output bit is the OR of the one-hot lines whose table entry has that bit
// set; the table is computed while the design elaborates by
// dbns_pkg::dbne_pair (smallest |t| whose term is within DBNE_EPS LSB of
// the level).  Line 0 (input below the first reference) sets the zero flag.
// The buffer stage is a register, so the sample appears one clock after
// onehot is presented with in_valid.
//
// Interface: clk, rst_n (active-low, synchronous), in_valid, onehot;
//            out_valid, out (dbns_t).
// The encoder's purpose and its position in the ADC follow the design this
// is built on; the table search rule, the zero flag, the register and the
// reset are this design's own choices.
module dbns_encoder
  import dbns_pkg::*;
#(
    parameter int  ADC_BITS = 6,
    parameter int  T_MAX    = 127,
    parameter real DBNE_EPS = 0.5
) (
    input  logic                  clk,
    input  logic                  rst_n,
    input  logic                  in_valid,
    input  logic [2**ADC_BITS-1:0] onehot,
    output logic                  out_valid,
    output dbns_t                 out
);
  localparam int LEVELS = 2 ** ADC_BITS;

  // pair table, one entry per nonzero level
  logic [2*EXP_W-1:0] table_q[LEVELS];
  assign table_q[0] = '0;
  for (genvar x = 1; x < LEVELS; x++) begin : g_tab
    localparam logic [2*EXP_W-1:0] PAIR = dbne_pair(x, T_MAX, DBNE_EPS);
    assign table_q[x] = PAIR;
  end

  // OR plane
  logic [2*EXP_W-1:0] pair;
  always_comb begin
    pair = '0;
    for (int x = 1; x < LEVELS; x++) if (onehot[x]) pair |= table_q[x];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out       <= '{zero: 1'b1, b: '0, t: '0};
    end else begin
      out_valid <= in_valid;
      if (in_valid) out <= '{zero: onehot[0], b: pair[2*EXP_W-1:EXP_W], t: pair[EXP_W-1:0]};
    end
  end
endmodule
