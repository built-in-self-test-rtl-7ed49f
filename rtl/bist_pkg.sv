// bist_pkg - shared constants and types of the I/O-cell BIST circuitry.
//
// The BIST drives every I/O tile under test from a test pattern generator
// (TPG) whose block RAM holds one test vector per word. The word is 18 bits
// wide in the ILOGIC/OLOGIC configurations (1K x 18) and 36 bits wide in the
// SERDES configurations (512 x 36, of which 20 lines are used); both
// widths and depths follow the text. Which bit of the vector drives which
// tile input is not published, so the map below is this design's own
// choice. It keeps the two lines the BIST logic itself consumes (the
// BITSLIP synchronizer enable and the TPG bitslip test line) at fixed
// positions.
package bist_pkg;

  // Block RAM geometry: one 18 Kbit RAM per TPG.
  localparam int unsigned BRAM_BITS   = 18432;
  localparam int unsigned WIDE_W      = 36;     // 512 x 36 aspect ratio
  localparam int unsigned NARROW_W    = 18;     // 1K x 18 aspect ratio
  localparam int unsigned WIDE_DEPTH  = BRAM_BITS / WIDE_W;    // 512
  localparam int unsigned NARROW_DEPTH= BRAM_BITS / NARROW_W;  // 1024

  // I/O tile geometry: two I/O cells per tile, ISERDES outputs Q1..Q6 per cell.
  localparam int unsigned CELLS_PER_TILE = 2;
  localparam int unsigned Q_PER_CELL     = 6;
  localparam int unsigned RESP_W         = CELLS_PER_TILE * Q_PER_CELL; // 12

  // Test-vector bit map of the SERDES configurations (512 x 36 words, the
  // 20 lines the text counts): ten data lines (master D1..D6, slave D3..D6
  // standing as D7..D10 in master/slave widths), four tristate lines, clock
  // enables, set/reset, the TPG bitslip test line and the synchronizer
  // enable.
  localparam int unsigned V_D1        = 0;   // D1..D10 at bits 0..9
  localparam int unsigned V_T1        = 10;  // T1..T4 at bits 10..13
  localparam int unsigned V_OCE       = 14;
  localparam int unsigned V_TCE       = 15;
  localparam int unsigned V_SR        = 16;
  localparam int unsigned V_REV       = 17;
  localparam int unsigned V_BITSLIP   = 18;  // TPG bitslip test line
  localparam int unsigned V_SYNC_EN   = 19;  // set only in the training word
  localparam int unsigned SERDES_LINES = 20;

  // Bit map of the 1K x 18 words of the ILOGIC/OLOGIC configurations. Bits
  // 18 and 19 do not exist in these words, so the BITSLIP synchronizers
  // stay disabled.
  localparam int unsigned L_O1        = 0;   // output data, cell 0 and 1
  localparam int unsigned L_O2        = 1;
  localparam int unsigned L_T1        = 2;   // tristate control, cell 0 and 1
  localparam int unsigned L_T2        = 3;
  localparam int unsigned L_ICE       = 4;   // input clock enable (CE1)
  localparam int unsigned L_SR        = 5;
  localparam int unsigned L_REV       = 6;
  localparam int unsigned L_DLY_INC   = 7;   // IDELAY increment/decrement
  localparam int unsigned L_DLY_CE    = 8;   // IDELAY step enable

  // Static BIST configuration: the settings that a configuration download
  // fixes for the duration of one BIST run.
  typedef struct packed {
    logic                 wide;      // 1: TPG RAM read as 512 x 36, 0: 1K x 18
    logic                 use_div;   // 1: TPG/ORA clock is the divided TCK
    logic [15:0]          div_lut;   // truth table of the clock-divider LUT
    logic [RESP_W-1:0]    ora_mask;  // ORAs present in this configuration
  } bist_cfg_t;

  // LUT truth table that makes the clock divider divide by `div`
  // (2..16): the LUT output is 1 only at counter value div-1.
  function automatic logic [15:0] div_lut_for(input int unsigned div);
    logic [15:0] t;
    t = '0;
    t[(div - 1) & 15] = 1'b1;
    return t;
  endfunction

  // Divisor for a SERDES data width: the width itself in SDR, half of it in DDR.
  function automatic int unsigned serdes_divisor(input int unsigned width, input logic ddr);
    return ddr ? width / 2 : width;
  endfunction

endpackage
