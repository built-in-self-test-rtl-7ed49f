// io_tile_model - behavioural stand-in for one I/O tile under test (two I/O
// cells with output logic, bidirectional buffer, pad and input logic). It
// exists only so that the BIST circuitry can be simulated end to end; the
// real tile is fixed silicon. Three modes, matching the three BIST
// architectures:
//   mode 0  ILOGIC/OLOGIC: per cell an output flip-flop driven by the TPG,
//           a tristate flip-flop (pad pulled up while tristated), two input
//           flip-flops (the second with clock enable) and the unregistered
//           input path. Responses per cell: Q1, Q2, O at bits 6c+0..2.
//   mode 1  SERDES: per cell an OSERDES of width N (D1 sent first) looped
//           through the pad into an ISERDES with a BITSLIP rotator; two
//           bits per TCK in DDR. Widths above six cascade both cells as
//           master and slave: Q1..Q6 on bits 0..5, Q7..Q10 on bits 6..9.
//           Parallel words load and capture on the TCK edge at which the
//           divided clock is high. `d_inv` turns on the data-input
//           inverters (active-low D1..DN).
//   mode 2  complementary differential: cell 1 drives the inverted data,
//           the master cell's differential receiver feeds a flip-flop whose
//           output is response bit 0.
// `stuck` forces a cell's pad to `stuck_val`: the fault the BIST must find.
module io_tile_model
  import bist_pkg::*;
(
  input  logic              tck,
  input  logic              clk_bist,
  input  logic              rst,
  input  logic [1:0]        mode,
  input  int unsigned       width,
  input  logic              ddr,
  input  logic              d_inv,     // OSERDES D1..D10 input inverters on
  input  int unsigned       init_slip [CELLS_PER_TILE],
  input  logic [WIDE_W-1:0] vec,
  input  logic [CELLS_PER_TILE-1:0] bitslip,
  input  logic [CELLS_PER_TILE-1:0] stuck,
  input  logic              stuck_val,
  output logic [RESP_W-1:0] resp,
  output int unsigned       slips [CELLS_PER_TILE]
);

  // ---------------- SERDES (mode 1), TCK domain ----------------
  logic [15:0] sh   [CELLS_PER_TILE];
  logic [31:0] hist [CELLS_PER_TILE];
  logic [9:0]  q    [CELLS_PER_TILE];
  int unsigned slip [CELLS_PER_TILE];
  logic [9:0]  dword;
  logic        cascade;

  assign cascade = width > 6;

  always_comb begin
    dword = '0;
    for (int k = 0; k < 10; k++) if (k < int'(width)) dword[k] = vec[V_D1 + k] ^ d_inv;
  end

  always @(posedge tck) begin
    for (int c = 0; c < int'(CELLS_PER_TILE); c++) begin
      logic b0, b1;
      logic [31:0] hn;
      if (rst) begin
        slip[c]  <= init_slip[c] % width;
        slips[c] <= 0;
        sh[c] <= '0; hist[c] <= '0; q[c] <= '0;
      end else if (mode == 2'd1) begin
        b0 = stuck[c] ? stuck_val : sh[c][0];
        b1 = stuck[c] ? stuck_val : sh[c][1];
        hn = ddr ? {hist[c][29:0], b0, b1} : {hist[c][30:0], b0};
        hist[c] <= hn;
        if (clk_bist) sh[c] <= 16'(dword);
        else          sh[c] <= ddr ? sh[c] >> 2 : sh[c] >> 1;
        if (clk_bist) begin
          for (int i = 0; i < 10; i++)
            q[c][i] <= (i < int'(width)) ? hn[int'(width) - 1 - i + int'(slip[c])] : 1'b0;
          if (bitslip[c] && !(cascade && c == 1)) begin
            slip[c]  <= (slip[c] + 1) % width;
            slips[c] <= slips[c] + 1;
          end
        end
      end
    end
  end

  // ---------------- ILOGIC/OLOGIC and differential (modes 0, 2) --------
  logic [CELLS_PER_TILE-1:0] off, tff, iff1, iff2, pad, keep;
  logic rx, rx_q;

  always_comb begin
    for (int c = 0; c < int'(CELLS_PER_TILE); c++) begin
      if (stuck[c])    pad[c] = stuck_val;
      else if (tff[c]) pad[c] = (mode == 2'd2) ? keep[c] : 1'b1;  // keeper / pull-up
      else             pad[c] = off[c];
    end
    if (pad[0] != pad[1]) rx = pad[0];
    else                  rx = rx_q;
  end

  always @(posedge clk_bist) begin
    if (rst) begin
      off <= '0; tff <= '0; iff1 <= '0; iff2 <= '0; keep <= '0; rx_q <= 1'b0;
    end else if (mode == 2'd0) begin
      off  <= {vec[L_O2], vec[L_O1]};
      tff  <= {vec[L_T2], vec[L_T1]};
      iff1 <= pad;
      if (vec[L_ICE]) iff2 <= iff1;
      keep <= pad;
    end else if (mode == 2'd2) begin
      off  <= {~vec[L_O1], vec[L_O1]};       // slave drives the complement
      tff  <= {vec[L_T1], vec[L_T1]};
      keep <= pad;
      rx_q <= rx;
    end
  end

  always_comb begin
    resp = '0;
    case (mode)
      2'd0: for (int c = 0; c < int'(CELLS_PER_TILE); c++) begin
              resp[c * Q_PER_CELL + 0] = iff1[c];
              resp[c * Q_PER_CELL + 1] = iff2[c];
              resp[c * Q_PER_CELL + 2] = pad[c];
            end
      2'd1: if (cascade) resp[9:0] = q[0];
            else for (int c = 0; c < int'(CELLS_PER_TILE); c++)
              resp[c * Q_PER_CELL +: Q_PER_CELL] = q[c][Q_PER_CELL-1:0];
      2'd2: resp[0] = rx_q;
      default: resp = '0;
    endcase
  end

endmodule
