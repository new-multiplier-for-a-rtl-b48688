// tb_coefficient_memory: checks reset to +0.0, random writes against a
// shadow copy, that a disabled write changes nothing, and that a written
// word is visible in the cycle after the write edge.
module tb_coefficient_memory;
  import dbns_pkg::*;
  localparam int TAPS = 8;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [2:0] waddr = '0;
  fp32_t wdata = '0;
  fp32_t coef[TAPS];
  fp32_t shadow[TAPS];
  int checks = 0, failures = 0;

  coefficient_memory #(.TAPS(TAPS)) dut (
      .clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata), .coef(coef));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all(string when);
    for (int k = 0; k < TAPS; k++) begin
      checks++;
      if (coef[k] !== shadow[k]) begin
        failures++;
        $display("FAIL %s: word %0d = %h, expected %h", when, k, coef[k], shadow[k]);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < TAPS; k++) shadow[k] = '0;
    repeat (2) @(posedge clk);
    #1;
    compare_all("reset");
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      we    = ($urandom % 4) != 0;
      waddr = 3'($urandom);
      wdata = fp32_t'($urandom);
      @(posedge clk);
      #1;
      if (we) shadow[waddr] = wdata;
      compare_all("after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
