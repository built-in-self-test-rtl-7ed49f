// ora - comparison-based output response analyser (one ORA).
//
// Compares the same output of two blocks under test (the "left" and
// "right" neighbours of a circular comparison) on every enabled clock.
// A mismatch sets the pass/fail flip-flop, and the flip-flop's own output
// is fed back so that once set it stays set until the next configuration
// initialisation (`rst`). In the FPGA two such ORAs share one slice, one per
// LUT/flip-flop pair. The enable is held low during BITSLIP training.
//
// Timing: fail is registered; a mismatch on cycle k shows on cycle k+1.
module ora (
  input  logic clk,
  input  logic rst,     // configuration initialisation (asynchronous): pass
  input  logic en,      // BIST sequence running
  input  logic but_l,   // output i of the left block under test
  input  logic but_r,   // output i of the right block under test
  output logic fail     // 1 = mismatch seen
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) fail <= 1'b0;
    else     fail <= fail | (en & (but_l ^ but_r));
  end

endmodule
