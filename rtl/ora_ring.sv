// ora_ring - circular comparison of identically configured I/O tiles.
//
// Each of the N tiles under test returns W response bits. ORA (k, j)
// compares bit j of tile k with bit j of tile k+1, and the last tile is
// compared with the first, closing the ring, so every tile is compared
// with two neighbours and one faulty tile shows in two ORAs. `mask`
// selects which of the W response bits have ORAs in the current
// configuration (for example one per tile for the differential
// configurations), standing for ORAs that a configuration leaves out.
//
// `skip` leaves response bits of single tiles out of the ring: the I/O
// buffers that serve as voltage-reference or DCI-resistor pads in a
// configuration are not connected to the BIST. A skipped bit has no active
// ORA of its own, and the ORA before it compares with the next tile that is
// not skipped, so the ring stays closed around the gap. The search for that
// tile is combinational.
//
// Timing: fail[k][j] is registered and sticky until rst.
module ora_ring #(
  parameter int unsigned N = 32,   // tiles in the ring
  parameter int unsigned W = 12    // compared outputs per tile
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] mask,
  input  logic [W-1:0] skip [N],   // response bits left out of the ring
  input  logic [W-1:0] resp [N],
  output logic [W-1:0] fail [N],
  output logic         any_fail
);

  for (genvar k = 0; k < N; k++) begin : g_tile
    for (genvar j = 0; j < W; j++) begin : g_out
      // right-hand neighbour: the next tile, cyclically, whose bit is not
      // skipped (the tile itself if no other tile takes part)
      logic right;

      always_comb begin
        logic found;
        found = 1'b0;
        right = resp[k][j];
        for (int d = 1; d < int'(N); d++) begin
          if (!found && !skip[(k + d) % N][j]) begin
            right = resp[(k + d) % N][j];
            found = 1'b1;
          end
        end
      end

      ora u_ora (
        .clk,
        .rst,
        .en   (en & mask[j] & ~skip[k][j]),
        .but_l(resp[k][j]),
        .but_r(right),
        .fail (fail[k][j])
      );
    end
  end

  always_comb begin
    any_fail = 1'b0;
    for (int k = 0; k < N; k++) any_fail |= |fail[k];
  end

endmodule
