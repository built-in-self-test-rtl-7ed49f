// tb_clk_div - self-checking test of the programmable clock divider.
// For every divisor from 2 to 16 it programs the LUT truth table, then
// measures the TCK cycles between rising edges of the divided clock
// (must equal the divisor) and its high time (one TCK cycle). It also
// checks the SDR/DDR divisor rule for the eight SERDES widths.
module tb_clk_div;
  import bist_pkg::*;
  logic tck = 0, rst = 1, clkdiv;
  logic [15:0] lut;
  int checks = 0, failures = 0;

  clk_div dut (.*);

  always #5 tck = ~tck;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // SDR widths 2..8 divide by the width, DDR width 10 divides by 5
    check(serdes_divisor(6, 1'b0) == 6, "SDR divisor");
    check(serdes_divisor(10, 1'b1) == 5, "DDR divisor");
    check(serdes_divisor(4, 1'b1) == 2, "DDR divisor 4");
    for (int d = 2; d <= 16; d++) begin
      int t_rise, t_prev, highs, total;
      lut = div_lut_for(d);
      rst = 1;
      repeat (2) @(posedge tck);
      #1 rst = 0;
      t_prev = -1; highs = 0; total = 0;
      // sample just after each TCK edge over 5 periods
      for (int c = 0; c < 5 * d + 1; c++) begin
        @(posedge tck); #1;
        total++;
        if (clkdiv) begin
          highs++;
          if (t_prev >= 0) check(total - t_prev == d, $sformatf("period %0d for divisor %0d", total - t_prev, d));
          t_prev = total;
        end
      end
      check(highs >= 4 && highs <= 6, $sformatf("one high cycle per period, divisor %0d (%0d)", d, highs));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
