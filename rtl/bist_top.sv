// bist_top - built-in self-test circuitry for the programmable I/O tiles of
// one I/O column.
//
// Every I/O tile under test is configured identically with bidirectional
// buffers, so a test vector sent out through the output logic and pad
// comes back through the input buffer and input logic. This module holds
// everything around the tiles:
//   * TPGs: two per group of four tile rows, each a counter plus an 18 Kbit
//     RAM of test vectors; tile row r is driven by TPG 2*(r/4) + (r%2), so
//     the two TPGs of a group drive alternating rows. All TPGs are loaded
//     with the same vectors through one load port.
//   * a clock divider: in the SERDES configurations (cfg.use_div = 1) the
//     TPGs, ORAs and synchronizers run on TCK divided by the divisor coded
//     in cfg.div_lut; otherwise they run on TCK.
//   * two BITSLIP synchronizers per tile, one per ISERDES/OSERDES pair,
//     each watching its cell's Q2 response bit.
//   * a ring of comparison ORAs, tile k against tile k+1 and the last
//     against the first, for each response bit selected by cfg.ora_mask.
//     Cells marked in cell_excl (pads reserved for a reference voltage or
//     the DCI reference resistors in the configuration under test) are
//     left out, and the ring closes over them.
// The tiles themselves (ILOGIC/OLOGIC or ISERDES/OSERDES, I/O buffers and
// pads) are the vendor's silicon and sit outside: tile_vec goes to them and
// tile_resp comes back. A run is: configuration initialisation (rst), an
// optional BITSLIP training phase while tdi is 0 (the TPG shows its first
// word, whose sync-enable bit lets the synchronizers align every
// deserialiser), then tdi = 1 starts the counters and enables the ORAs.
// bist_done rises when every TPG has presented its last word; ora_fail is
// what the configuration readback returns.
//
// Follows the text: two TPGs per four rows on alternating rows, 18 Kbit RAM
// in 1K x 18 or 512 x 36, divider and synchronizer structure, circular
// comparison, TDI as the start signal. This design's choices: the response
// layout of 12 bits per tile (Q1..Q6 of each cell, Q2 of cell c at bit
// 6c+1), the test-vector bit map in bist_pkg, registering TDI once in the
// BIST clock domain, and exposing the configuration as the cfg input.
//
// rst stands for the initialisation a configuration download performs. It
// is asynchronous for every BIST flip-flop, because the divided clock is
// stopped while the divider counter is held in reset.
//
// Timing: the ORAs start comparing one BIST clock after tdi is sampled
// high; the counters start on the same edge. With the RAM read latency,
// bist_done rises 2 + (words - 1) BIST clocks after tdi is first sampled.
module bist_top
  import bist_pkg::*;
#(
  parameter int unsigned NUM_TILES = 32,                       // one bank of 64 I/O buffers
  parameter int unsigned NUM_TPG   = 2 * ((NUM_TILES + 3) / 4),
  parameter int unsigned DEPTH     = WIDE_DEPTH,
  parameter int unsigned AW        = $clog2(DEPTH)
) (
  input  logic              tck,
  input  logic              rst,
  input  logic              tdi,            // BIST start (TPG and ORA enable)
  input  bist_cfg_t         cfg,
  // TPG RAM load port, shared by all TPGs
  input  logic              ld_we,
  input  logic [AW-1:0]     ld_addr,
  input  logic [WIDE_W-1:0] ld_data,
  // to and from the I/O tiles under test
  output logic              clk_bist,       // CLKDIV of the SERDES, TCK otherwise
  output logic [WIDE_W-1:0] tile_vec     [NUM_TILES],
  input  logic [RESP_W-1:0] tile_resp    [NUM_TILES],
  input  logic [CELLS_PER_TILE-1:0] cell_excl [NUM_TILES],  // reference pads left out
  output logic [CELLS_PER_TILE-1:0] tile_bitslip [NUM_TILES],
  // results
  output logic [RESP_W-1:0] ora_fail     [NUM_TILES],
  output logic              any_fail,
  output logic              bist_done
);

  logic clkdiv;
  logic bist_en;
  logic [WIDE_W-1:0]  tpg_vec  [NUM_TPG];
  logic [NUM_TPG-1:0] tpg_done;

  clk_div u_div (.tck, .rst, .lut(cfg.div_lut), .clkdiv);

  assign clk_bist = cfg.use_div ? clkdiv : tck;

  always_ff @(posedge clk_bist or posedge rst) begin
    if (rst) bist_en <= 1'b0;
    else     bist_en <= tdi;
  end

  for (genvar t = 0; t < NUM_TPG; t++) begin : g_tpg
    tpg #(.DEPTH(DEPTH), .AW(AW)) u_tpg (
      .clk  (clk_bist),
      .rst,
      .en   (bist_en),
      .wide (cfg.wide),
      .vec  (tpg_vec[t]),
      .done (tpg_done[t]),
      .we   (ld_we),
      .waddr(ld_addr),
      .wdata(ld_data)
    );
  end

  for (genvar r = 0; r < NUM_TILES; r++) begin : g_row
    assign tile_vec[r] = tpg_vec[2 * (r / 4) + (r % 2)];
    for (genvar c = 0; c < CELLS_PER_TILE; c++) begin : g_cell
      bitslip_sync u_sync (
        .clkdiv     (clk_bist),
        .rst,
        .sync_en    (tile_vec[r][V_SYNC_EN]),
        .q2         (tile_resp[r][c * Q_PER_CELL + 1]),
        .tpg_bitslip(tile_vec[r][V_BITSLIP]),
        .bitslip    (tile_bitslip[r][c])
      );
    end
  end

  // an excluded cell takes all six of its response bits out of the ring
  logic [RESP_W-1:0] skip [NUM_TILES];
  always_comb begin
    for (int r = 0; r < int'(NUM_TILES); r++)
      for (int c = 0; c < int'(CELLS_PER_TILE); c++)
        skip[r][c * Q_PER_CELL +: Q_PER_CELL] = {Q_PER_CELL{cell_excl[r][c]}};
  end

  ora_ring #(.N(NUM_TILES), .W(RESP_W)) u_oras (
    .clk (clk_bist),
    .rst,
    .en  (bist_en),
    .mask(cfg.ora_mask),
    .skip,
    .resp(tile_resp),
    .fail(ora_fail),
    .any_fail
  );

  assign bist_done = &tpg_done;

endmodule
