// tpg_counter - address counter of a test pattern generator.
//
// In the FPGA each TPG's address comes from a DSP slice configured as a
// counter; this module is that counter. While `en` is low it holds the
// address at zero, so the RAM keeps presenting its first word (the
// training pattern of a SERDES configuration). While `en` is high it counts
// up once per clock until it reaches `last`, then holds there and raises
// `done`. `last` is 1023 for a 1K x 18 RAM and 511 for a 512 x 36 RAM.
// Holding at zero while disabled and stopping at the last word are this
// design's choices; the text says only that the DSPs act as counters and
// are disabled until the BIST sequence starts.
//
// Timing: `count` is a register; it changes on the rising clock edge.
module tpg_counter #(
  parameter int unsigned W = 10          // address width, 1K words
) (
  input  logic         clk,
  input  logic         rst,              // asynchronous, configuration init
  input  logic         en,               // BIST sequence running
  input  logic [W-1:0] last,             // last address of the sequence
  output logic [W-1:0] count,
  output logic         done
);

  assign done = (count == last);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)           count <= '0;
    else if (!en)      count <= '0;
    else if (!done) count <= count + 1'b1;
  end

endmodule
