// tb_zero_one_generator: drives every thermometer code of a 6-bit flash ADC
// (levels 0..63) and checks that exactly the level's one-hot line is set.
// Combinational block: each code is checked after a 1 ns settle.
module tb_zero_one_generator;
  localparam int ADC_BITS = 6;
  localparam int LEVELS = 2 ** ADC_BITS;
  logic [LEVELS-2:0] thermo;
  logic [LEVELS-1:0] onehot;
  int checks = 0, failures = 0;

  zero_one_generator #(.ADC_BITS(ADC_BITS)) dut (.thermo(thermo), .onehot(onehot));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int lvl = 0; lvl < LEVELS; lvl++) begin
      thermo = '0;
      for (int i = 0; i < lvl; i++) thermo[i] = 1'b1;
      #1;
      checks++;
      if (onehot !== (LEVELS'(1) << lvl)) begin
        failures++;
        $display("level %0d: onehot=%h", lvl, onehot);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
