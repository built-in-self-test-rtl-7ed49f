// clk_div - programmable clock divider of the SERDES BIST configurations.
//
// The ISERDES/OSERDES run on the test clock TCK while the TPGs and ORAs run
// on a divided clock. As in the text, the divider is a 4-bit counter with a
// synchronous reset whose four bits address a 4-input LUT. The LUT is
// programmed so that its output is 1 at one counter value, D-1; on the next
// TCK edge the counter is reset to zero. The LUT output itself is the
// divided clock: it is high for one TCK period out of every D, so its rising
// edges come once every D TCK cycles. The divisor is changed by changing
// the LUT truth table `lut` (bist_pkg::div_lut_for), which in the FPGA is a
// reprogrammed LUT equation; SDR configurations divide by the data width,
// DDR configurations by half of it. `rst` is the configuration-time
// initialisation of the counter (asynchronous, like the rest of the BIST
// flip-flops), this design's addition.
//
// Timing: clkdiv is a decode of the counter, not a register; in the FPGA it
// is routed through a global clock buffer before use.
module clk_div (
  input  logic        tck,
  input  logic        rst,
  input  logic [15:0] lut,        // LUT truth table, one 1 at index D-1
  output logic        clkdiv
);

  logic [3:0] cnt;

  assign clkdiv = lut[cnt];

  always_ff @(posedge tck or posedge rst) begin
    if (rst)         cnt <= 4'd0;
    else if (clkdiv) cnt <= 4'd0;      // synchronous reset at the count D-1
    else             cnt <= cnt + 4'd1;
  end

endmodule
