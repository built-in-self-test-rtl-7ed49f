// tpg - test pattern generator: address counter plus test-vector RAM.
//
// One TPG is a counter (a DSP slice in the FPGA) addressing one 18 Kbit block
// RAM. In the SERDES configurations the RAM is read as 512 x 36 and the
// counter runs to 511; otherwise it is read as 1K x 18 and the counter runs
// to 1023. Until `en` rises the counter sits at zero, so `vec` shows the
// first RAM word; for SERDES runs that word is the BITSLIP training
// pattern. Once enabled the TPG presents the remaining words one per clock
// and raises `done` when the last word has been read. All TPGs in a design
// get the same load port so that they hold identical contents, as the
// comparison-based response analysis needs.
//
// Timing: vec follows the counter by one clock (synchronous RAM read); the
// first new word appears two clocks after en is sampled high.
module tpg
  import bist_pkg::*;
#(
  parameter int unsigned DEPTH = WIDE_DEPTH,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic              wide,
  output logic [WIDE_W-1:0] vec,
  output logic              done,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [WIDE_W-1:0] wdata
);

  logic [AW:0] addr, last;
  logic        cnt_done, done_q;

  assign last = wide ? (AW+1)'(DEPTH - 1) : (AW+1)'(2*DEPTH - 1);

  tpg_counter #(.W(AW+1)) u_cnt (
    .clk, .rst, .en, .last, .count(addr), .done(cnt_done)
  );

  tpg_bram #(.DEPTH(DEPTH), .AW(AW)) u_ram (
    .clk, .wide, .raddr(addr), .dout(vec), .we, .waddr, .wdata
  );

  // done marks that the last word is on vec (one clock after its address).
  always_ff @(posedge clk or posedge rst) begin
    if (rst)       done_q <= 1'b0;
    else if (!en)  done_q <= 1'b0;
    else            done_q <= cnt_done;
  end
  assign done = done_q;

endmodule
