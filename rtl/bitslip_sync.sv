// bitslip_sync - BITSLIP synchronizer of one ISERDES/OSERDES pair.
//
// Before a SERDES BIST run the TPG holds its first word, a training
// pattern with five ones and a single zero on D1..D6, and asserts the
// synchronizer enable line. Every deserialiser must present that zero on
// its Q2 output before the comparison-based ORAs can be enabled. This
// circuit samples Q2 through three flip-flops X, Y and Z clocked by the
// divided clock and raises BITSLIP for a single cycle when X=1, Y=1 and
// Z=0 (the pattern in the timing example of the text). When Z becomes 1,
// all three flip-flops are cleared, so while Q2 stays 1 the pulse repeats
// every four cycles: one shift of the deserialised word per four cycles,
// which gives the 4(N-1)-cycle worst case of the text for N-1 shifts. Once
// Q2 is 0 the pattern X=1,Y=1 never forms and no more pulses occur. The
// clear on Z is this design's reading of the timing example, which shows
// X, Y and Z returning to 0 the cycle after Z is set. The TPG bitslip test
// line is OR-ed in so that the TPG can pulse BITSLIP during the BIST
// sequence itself.
//
// Timing: bitslip is combinational from the X/Y/Z registers, the enable
// and the TPG line, all of which change on clkdiv edges.
module bitslip_sync (
  input  logic clkdiv,
  input  logic rst,          // configuration initialisation, asynchronous
  input  logic sync_en,      // from the TPG RAM, high only in the training word
  input  logic q2,           // ISERDES Q2 output
  input  logic tpg_bitslip,  // TPG bitslip test pattern line
  output logic bitslip       // to ISERDES BITSLIP
);

  logic x, y, z;

  always_ff @(posedge clkdiv or posedge rst) begin
    if (rst) begin
      x <= 1'b0;
      y <= 1'b0;
      z <= 1'b0;
    end else if (z) begin
      x <= 1'b0;
      y <= 1'b0;
      z <= 1'b0;
    end else begin
      x <= q2;
      y <= x;
      z <= y;
    end
  end

  assign bitslip = (sync_en & x & y & ~z) | tpg_bitslip;

endmodule
