// tb_dbns_encoder: presents every one-hot level of a 6-bit ADC and checks
// that the registered double-base term 2^b*3^t lies within half an LSB of
// the level (computed here in real arithmetic), that level 0 sets the zero
// flag, and that the result arrives exactly one clock after in_valid.
module tb_dbns_encoder;
  import dbns_pkg::*;
  localparam int ADC_BITS = 6;
  localparam int LEVELS = 2 ** ADC_BITS;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [LEVELS-1:0] onehot = '0;
  logic out_valid;
  dbns_t out;
  int checks = 0, failures = 0;

  dbns_encoder #(.ADC_BITS(ADC_BITS)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .onehot(onehot),
      .out_valid(out_valid), .out(out));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    real v;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int lvl = 0; lvl < LEVELS; lvl++) begin
      onehot   <= LEVELS'(1) << lvl;
      in_valid <= 1'b1;
      @(posedge clk);
      in_valid <= 1'b0;
      onehot   <= '0;
      #1;
      check(out_valid == 1'b1, $sformatf("level %0d: no out_valid after one clock", lvl));
      if (lvl == 0) begin
        check(out.zero == 1'b1, "level 0: zero flag not set");
      end else begin
        v = (2.0 ** real'(out.b)) * (3.0 ** real'(out.t));
        check(out.zero == 1'b0 && v > real'(lvl) - 0.5 && v < real'(lvl) + 0.5,
              $sformatf("level %0d: b=%0d t=%0d gives %f", lvl, out.b, out.t, v));
      end
      @(posedge clk);
      #1;
      check(out_valid == 1'b0, "out_valid held longer than one clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
