// coefficient_memory: register file holding the FIR filter coefficients.
//
// TAPS words of IEEE-754 single precision (fp32_t).  One write port
// (we, waddr, wdata) updates a word at the clock edge; all words are read in
// parallel (coef) because every tap's multiplier needs its coefficient in
// every cycle.  Reset clears every word to +0.0.
//
// Interface: clk, rst_n (active-low, synchronous), we, waddr, wdata; coef.
// Timing: a write is visible on coef from the cycle after the edge.
// That the filter holds single-precision coefficients follows the design
// this is built on; the register-file organisation, write port and reset are
// this design's choices.
module coefficient_memory
  import dbns_pkg::*;
#(
    parameter int TAPS = 8
) (
    input  logic                    clk,
    input  logic                    rst_n,
    input  logic                    we,
    input  logic [$clog2(TAPS)-1:0] waddr,
    input  fp32_t                   wdata,
    output fp32_t                   coef [TAPS]
);
  fp32_t mem[TAPS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) mem[k] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign coef = mem;
endmodule
