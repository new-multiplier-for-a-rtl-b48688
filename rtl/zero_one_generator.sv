// zero_one_generator: 0-1 generator stage of a flash ADC.
//
// The comparator bank of a flash ADC delivers a thermometer code: bit i is
// 1 when the input is above the (i+1)-th reference level, so a level-k input
// sets bits 0..k-1.  This stage marks the single position where the code
// changes from 1 to 0, giving a one-hot code with one line per ADC level
// (line 0 for an input below the first reference, line 2^ADC_BITS-1 for an
// input above the last).  Each line is  thermo[k-1] AND NOT thermo[k],  with
// constant 1 below bit 0 and constant 0 above the top bit.
//
// The top line, onehot[2^ADC_BITS-1], is thermo's top bit itself: nothing
// lies above full scale.
//
// Interface: thermo[2^ADC_BITS-2:0] in, onehot[2^ADC_BITS-1:0] out.
// Timing: purely combinational.
// The stage and its place between the comparators and the encoder follow the
// flash-ADC structure this design is built on; the exact gate form and the
// absence of bubble correction are this design's choices.
module zero_one_generator #(
    parameter int ADC_BITS = 6
) (
    input  logic [2**ADC_BITS-2:0] thermo,
    output logic [2**ADC_BITS-1:0] onehot
);
  localparam int LEVELS = 2 ** ADC_BITS;

  // thermometer code padded with 1 below and 0 above
  logic [LEVELS:0] padded;
  assign padded = {1'b0, thermo, 1'b1};

  always_comb begin
    for (int k = 0; k < LEVELS; k++) onehot[k] = padded[k] & ~padded[k+1];
  end
endmodule
