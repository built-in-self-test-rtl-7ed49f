// tpg_bram - 18 Kbit block RAM holding a TPG's test vectors.
//
// The RAM is read with one of the two aspect ratios the text names: 512
// words of 36 bits (`wide` = 1, SERDES configurations) or 1024 words of 18
// bits (`wide` = 0, ILOGIC/OLOGIC and I/O-standard configurations). It is
// stored as 512 x 36; in the narrow mode address bit 0 picks the low (0) or
// high (1) half of a row and the 18-bit word appears on dout[17:0] with
// dout[35:18] at zero. That packing is this design's choice.
//
// The load port stands for the configuration download that fills the RAM
// (the text stresses that changing the vectors needs no change to the BIST
// circuit): it always writes a full 36-bit row.
//
// Timing: synchronous read, dout is valid one clock after raddr.
module tpg_bram
  import bist_pkg::*;
#(
  parameter int unsigned DEPTH = WIDE_DEPTH,   // rows of 36 bits
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              wide,
  input  logic [AW:0]       raddr,             // word address, narrow mode uses all bits
  output logic [WIDE_W-1:0] dout,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [WIDE_W-1:0] wdata
);

  logic [WIDE_W-1:0] mem [DEPTH];
  logic [WIDE_W-1:0] row_q;
  logic              wide_q, half_q;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    row_q  <= wide ? mem[raddr[AW-1:0]] : mem[raddr[AW:1]];
    wide_q <= wide;
    half_q <= raddr[0];
  end

  always_comb begin
    if (wide_q)      dout = row_q;
    else if (half_q) dout = {{(WIDE_W-NARROW_W){1'b0}}, row_q[WIDE_W-1:NARROW_W]};
    else             dout = {{(WIDE_W-NARROW_W){1'b0}}, row_q[NARROW_W-1:0]};
  end

endmodule
