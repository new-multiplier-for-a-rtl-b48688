// tb_frac_int_conversion: for every t in [-128,127] compares I + F/2^23 with
// t * (2^0+2^-1+2^-4+2^-6+2^-8+2^-9+2^-10+2^-20+2^-21+2^-23), the series for
// log2(3) cut after the 23rd fraction bit, computed in real arithmetic
// (at most one LSB apart), and with t*log2(3) itself (apart by at most the
// series remainder, below 1.4e-8 per unit of t, plus one LSB).
// Combinational block: 1 ns settle per value.
module tb_frac_int_conversion;
  import dbns_pkg::*;
  logic signed [7:0] t;
  logic signed [8:0] i_part;
  logic [22:0] f_part;
  int checks = 0, failures = 0;
  localparam int SHIFTS[10] = '{0, 1, 4, 6, 8, 9, 10, 20, 21, 23};

  frac_int_conversion dut (.t(t), .i_part(i_part), .f_part(f_part));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real exact, series, ser_sum, got;
    ser_sum = 0.0;
    foreach (SHIFTS[n]) ser_sum += 2.0 ** real'(-SHIFTS[n]);
    for (int v = -128; v < 128; v++) begin
      t = 8'(v);
      #1;
      exact  = real'(v) * ($ln(3.0) / $ln(2.0));
      series = real'(v) * ser_sum;
      got    = real'(i_part) + real'(f_part) / 8388608.0;
      checks++;
      if ((got - series) * 8388608.0 > 1.0 || (series - got) * 8388608.0 > 1.0) begin
        failures++;
        $display("t=%0d: I=%0d F=%0d -> %f, series gives %f", v, i_part, f_part, got, series);
      end
      checks++;
      if ((got - exact) > 1.4e-8 * 128.0 + 1.0 / 8388608.0
          || (exact - got) > 1.4e-8 * 128.0 + 1.0 / 8388608.0) begin
        failures++;
        $display("t=%0d: %f, log2(3)*t = %f", v, got, exact);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
