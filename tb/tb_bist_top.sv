// tb_bist_top - end-to-end test of the I/O BIST at full size (32 tiles,
// 16 TPGs, 384 ORAs), with behavioural I/O tiles under test.
// Runs, in the order of the published configuration sequence:
//   * the eight SERDES configurations (SDR widths 2..8, DDR width 10) with
//     the divided clock, BITSLIP training and 512 x 36 vectors; width 6 with
//     active-low data inputs and hence an inverted training word;
//   * an ILOGIC/OLOGIC configuration with 1K x 18 vectors on TCK, also with
//     the voltage-reference pads and with the DCI reference pads left out of
//     the ring (those pads are held by the outside and must not fail);
//   * a complementary differential configuration with eight clocks of
//     alternating data.
// Each configuration runs once fault-free (no ORA may fail) and selected
// ones again with one stuck pad (exactly the two ORAs next to that tile
// must fail). It checks the divided clock period, that every deserialiser
// is aligned within 4(N-1) divided-clock cycles after the training word
// reaches it, the number of clocks from start to done, and counts each
// mechanism: clock division, synchronizer one-shots, TPG bitslip pulses,
// narrow and wide RAM runs, differential runs and detected faults.
module tb_bist_top;
  import bist_pkg::*;
  localparam int unsigned NT = 32;
  localparam int unsigned AW = $clog2(WIDE_DEPTH);

  logic tck = 0, rst = 1, tdi = 0;
  bist_cfg_t cfg;
  logic ld_we = 0;
  logic [AW-1:0] ld_addr = '0;
  logic [WIDE_W-1:0] ld_data = '0;
  logic clk_bist, any_fail, bist_done;
  logic [WIDE_W-1:0] tile_vec [NT];
  logic [RESP_W-1:0] tile_resp [NT];
  logic [CELLS_PER_TILE-1:0] cell_excl [NT];
  logic [CELLS_PER_TILE-1:0] tile_bitslip [NT];
  logic [RESP_W-1:0] ora_fail [NT];

  // tile model controls
  logic [1:0] mode = 0;
  int unsigned width = 2;
  logic ddr = 0;
  logic d_inv = 0;
  logic stuck_val = 0;
  logic [CELLS_PER_TILE-1:0] stuck [NT];
  int unsigned init_slip [NT][CELLS_PER_TILE];
  int unsigned slips [NT][CELLS_PER_TILE];

  int checks = 0, failures = 0;
  int n_div = 0, n_sync_pulse = 0, n_tpg_slip = 0, n_aligned = 0, n_wide = 0,
      n_narrow = 0, n_diff = 0, n_detect = 0, n_done = 0, n_excl = 0, n_inv = 0;

  bist_top dut (.*);

  for (genvar r = 0; r < NT; r++) begin : g_tile
    io_tile_model u_tile (
      .tck, .clk_bist, .rst, .mode, .width, .ddr, .d_inv,
      .init_slip(init_slip[r]), .vec(tile_vec[r]), .bitslip(tile_bitslip[r]),
      .stuck(stuck[r]), .stuck_val, .resp(tile_resp[r]), .slips(slips[r])
    );
  end

  always #5 tck = ~tck;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3000000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one-shot pulses from the synchronizers vs. TPG bitslip test pulses
  logic training = 0;
  always @(posedge clk_bist) if (!rst) begin
    for (int r = 0; r < int'(NT); r++)
      if (|tile_bitslip[r]) begin
        if (tile_vec[r][V_BITSLIP])  n_tpg_slip++;
        else if (training)           n_sync_pulse++;
      end
  end

  function automatic logic [WIDE_W-1:0] rand_word(input logic wide);
    logic [WIDE_W-1:0] w;
    w = WIDE_W'({$urandom, $urandom});
    w[V_SYNC_EN] = 1'b0;
    w[V_BITSLIP] = 1'b0;
    if (!wide) w[WIDE_W-1:NARROW_W] = '0;
    return w;
  endfunction

  // Configuration download: reset, fill the TPG RAMs, reset again so that
  // the BIST starts from its initial state with the new contents.
  task automatic download(input logic [WIDE_W-1:0] words [WIDE_DEPTH]);
    tdi = 0;
    rst = 1;
    repeat (4) @(posedge tck);
    rst = 0;
    for (int i = 0; i < int'(WIDE_DEPTH); i++) begin
      @(posedge clk_bist); #1;
      ld_we = 1; ld_addr = AW'(i); ld_data = words[i];
    end
    @(posedge clk_bist); #1 ld_we = 0;
    rst = 1;
    repeat (4) @(posedge tck);
    #1 rst = 0;
  endtask

  task automatic set_faults(input int ft, input int fc);
    for (int r = 0; r < int'(NT); r++) stuck[r] = '0;
    if (ft >= 0) stuck[ft][fc] = 1'b1;
  endtask

  // ORA result check: with no fault nothing fails; with a fault on tile ft
  // exactly ORAs ft-1 and ft (mod NT) see it.
  task automatic check_oras(input int ft, input string name, input int left = -1);
    if (left < 0) left = (ft + int'(NT) - 1) % int'(NT);
    for (int r = 0; r < int'(NT); r++) begin
      logic exp;
      exp = (ft >= 0) && (r == ft || r == left);
      check((|ora_fail[r]) == exp, $sformatf("%s: ORA column %0d fail=%b expected %b", name, r, |ora_fail[r], exp));
    end
    check(any_fail == (ft >= 0), $sformatf("%s: any_fail", name));
    if (ft >= 0 && any_fail) n_detect++;
  endtask

  // Count clocks from starting the BIST until done.
  task automatic run_to_done(input int expect_cycles, input string name);
    int cycles;
    @(negedge clk_bist);
    tdi = 1;
    cycles = 0;
    while (!bist_done && cycles < 5000) begin
      @(negedge clk_bist); cycles++;
    end
    check(cycles == expect_cycles, $sformatf("%s: %0d clocks to done, expected %0d", name, cycles, expect_cycles));
    if (bist_done) n_done++;
    repeat (4) @(negedge clk_bist);
  endtask

  task automatic run_serdes(input int n, input logic is_ddr, input int ft, input int fc, input logic inv = 1'b0);
    logic [WIDE_W-1:0] words [WIDE_DEPTH];
    logic [RESP_W-1:0] mask;
    int div, zero, t_first, t_aligned;
    string name;
    name = $sformatf("SERDES N=%0d%s%s%s", n, is_ddr ? " DDR" : "", inv ? " inverted" : "", ft >= 0 ? " faulty" : "");
    div  = int'(serdes_divisor(n, is_ddr));
    mask = '0;
    for (int i = 0; i < n; i++) begin
      if (n > 6) mask[i] = 1'b1;
      else begin mask[i] = 1'b1; mask[Q_PER_CELL + i] = 1'b1; end
    end
    cfg = '{wide: 1'b1, use_div: 1'b1, div_lut: div_lut_for(div), ora_mask: mask};
    mode = 2'd1; width = n; ddr = is_ddr;
    // training word: ones on D1..DN except a single zero (D3, or D1 at N=2)
    zero = (n == 2) ? 0 : 2;
    words[0] = '0;
    // with the data-input inverters on (active-low inputs) the stored
    // training word is inverted so that the tile still sees it unchanged
    for (int i = 0; i < n; i++) words[0][V_D1 + i] = (i != zero) ^ inv;
    d_inv = inv;
    if (inv) n_inv++;
    words[0][V_SYNC_EN] = 1'b1;
    for (int i = 1; i < int'(WIDE_DEPTH); i++) words[i] = rand_word(1'b1);
    words[100][V_BITSLIP] = 1'b1;        // TPG bitslip test pulses
    words[300][V_BITSLIP] = 1'b1;
    for (int r = 0; r < int'(NT); r++)
      for (int c = 0; c < int'(CELLS_PER_TILE); c++) init_slip[r][c] = $urandom % n;
    // worst case for one cell: it needs N-1 slips
    init_slip[3][0] = (2 - zero + n) % n;
    set_faults(-1, 0);
    download(words);
    // training: wait for the training word to arrive, then for alignment
    t_first = -1; t_aligned = -1;
    training = 1;
    for (int k = 0; k < 4 * n + 40; k++) begin
      logic all0, seen;
      @(negedge clk_bist);
      seen = 1'b1; all0 = 1'b1;
      for (int r = 0; r < int'(NT); r++) begin
        if (tile_resp[r][Q_PER_CELL-1:0] == '0) seen = 1'b0;   // nothing captured yet
        if (tile_resp[r][1] != 1'b0) all0 = 1'b0;
        if (n <= 6 && tile_resp[r][Q_PER_CELL + 1] != 1'b0) all0 = 1'b0;
      end
      if (seen && t_first < 0) t_first = k;
      if (all0 && seen && t_aligned < 0) t_aligned = k;
    end
    training = 0;
    check(t_aligned >= 0, $sformatf("%s: aligned", name));
    check(t_aligned - t_first <= 4 * (n - 1),
          $sformatf("%s: aligned %0d cycles after training word, bound %0d", name, t_aligned - t_first, 4 * (n - 1)));
    for (int r = 0; r < int'(NT); r++) begin
      check(tile_resp[r] == tile_resp[0], $sformatf("%s: tile %0d aligned like tile 0", name, r));
      check(slips[r][0] <= n - 1, $sformatf("%s: tile %0d slips %0d", name, r, slips[r][0]));
    end
    check(slips[3][0] == n - 1, $sformatf("%s: worst-case cell needs N-1 slips (%0d)", name, slips[3][0]));
    if (t_aligned >= 0) n_aligned++;
    // fault appears after training, as a defect would during the run
    set_faults(ft, fc);
    stuck_val = 1'b0;
    run_to_done(int'(WIDE_DEPTH) + 1, name);
    check_oras(ft, name);
    n_wide++;
  endtask

  // excl: 0 none, 1 voltage-reference pads (fifth buffer of every sixteen),
  // 2 DCI reference pads (both buffers of the tenth row of every 32 buffers)
  task automatic run_logic(input int ft, input int excl = 0, input int fc = 1, input int left = -1);
    logic [WIDE_W-1:0] words [WIDE_DEPTH];
    string name;
    name = $sformatf("ILOGIC/OLOGIC%s%s", excl == 1 ? " VREF" : excl == 2 ? " DCI" : "", ft >= 0 ? " faulty" : "");
    cfg = '{wide: 1'b0, use_div: 1'b0, div_lut: '0, ora_mask: RESP_W'(12'b000111_000111)};
    mode = 2'd0;
    for (int i = 0; i < int'(WIDE_DEPTH); i++) words[i] = rand_word(1'b1) & {{18{1'b0}}, {18{1'b1}}}
                                                        | (rand_word(1'b1) << 18);
    for (int i = 0; i < int'(WIDE_DEPTH); i++) begin
      words[i][V_SYNC_EN] = 1'b0;  // bits 18/19 are beyond the 18-bit words anyway
    end
    set_faults(ft, fc);
    stuck_val = 1'b1;
    // reserved pads: out of the BIST, held by the external reference
    for (int r = 0; r < int'(NT); r++) begin
      cell_excl[r] = '0;
      if (excl == 1 && r % 8 == 2) cell_excl[r][0] = 1'b1;
      if (excl == 2 && r % 16 == 9) cell_excl[r] = '1;
      if (excl != 0) stuck[r] = stuck[r] | cell_excl[r];
    end
    download(words);
    run_to_done(2 * int'(WIDE_DEPTH) + 1, name);
    check_oras(ft, name, left);
    n_narrow++;
    if (excl != 0) n_excl++;
    for (int r = 0; r < int'(NT); r++) cell_excl[r] = '0;
  endtask

  task automatic run_diff(input int ft);
    logic [WIDE_W-1:0] words [WIDE_DEPTH];
    string name;
    name = $sformatf("differential%s", ft >= 0 ? " faulty" : "");
    cfg = '{wide: 1'b0, use_div: 1'b0, div_lut: '0, ora_mask: RESP_W'(1)};
    mode = 2'd2;
    // alternating ones and zeros on the data line, outputs enabled
    for (int i = 0; i < int'(WIDE_DEPTH); i++) begin
      words[i] = '0;
      words[i][L_O1] = 1'b1;              // even 18-bit word: 1
      words[i][NARROW_W + L_O1] = 1'b0;   // odd 18-bit word: 0
    end
    set_faults(ft, 1);
    stuck_val = 1'b0;
    download(words);
    @(negedge clk_bist) tdi = 1;
    repeat (8 + 3) @(negedge clk_bist);
    tdi = 0;
    check_oras(ft, name);
    n_diff++;
  endtask

  // divided clock: count TCK cycles between rising edges
  int tck_since = 0, last_period = 0;
  always @(posedge tck) tck_since++;
  always @(posedge clk_bist) if (cfg.use_div && !rst) begin
    last_period = tck_since;
    tck_since = 0;
  end

  initial begin
    automatic int serdes_w [8] = '{2, 3, 4, 5, 6, 7, 8, 10};
    for (int r = 0; r < int'(NT); r++) begin stuck[r] = '0; cell_excl[r] = '0; end
    for (int r = 0; r < int'(NT); r++) for (int c = 0; c < 2; c++) init_slip[r][c] = 0;
    cfg = '{wide: 1'b1, use_div: 1'b0, div_lut: '0, ora_mask: '0};
    for (int i = 0; i < 8; i++) begin
      int n;
      logic d;
      n = serdes_w[i];
      d = (n == 10);
      run_serdes(n, d, -1, 0, n == 6);   // width 6: active-low data inputs
      check(last_period == int'(serdes_divisor(n, d)),
            $sformatf("divided clock period %0d for width %0d", last_period, n));
      if (last_period == int'(serdes_divisor(n, d))) n_div++;
    end
    run_serdes(4, 1'b0, 5, 1);
    run_serdes(10, 1'b1, 0, 0);      // fault next to the ring's wrap-around
    run_logic(-1);
    run_logic(17);
    run_logic(-1, 1);                 // voltage-reference pads left out
    run_logic(19, 1, 0, 17);          // ring closes over tile 18's reference pad
    run_logic(-1, 2);                 // DCI reference pads left out
    run_logic(10, 2, 1, 8);           // ring closes over tile 9
    run_diff(-1);
    run_diff(31);
    $display("mechanisms: divided clocks %0d, sync one-shots %0d, TPG bitslips %0d, alignments %0d, wide runs %0d, narrow runs %0d, differential runs %0d, faults detected %0d, done %0d, runs with reference pads left out %0d",
             n_div, n_sync_pulse, n_tpg_slip, n_aligned, n_wide, n_narrow, n_diff, n_detect, n_done, n_excl);
    check(n_excl == 4, "reference pads left out of the ring");
    check(n_inv == 1, "inverted training word used");
    check(n_div == 8, "clock division at all eight widths");
    check(n_sync_pulse > 0, "synchronizer one-shots happened");
    check(n_tpg_slip > 0, "TPG bitslip test line used");
    check(n_aligned == 10, "every SERDES run aligned");
    check(n_wide > 0 && n_narrow > 0, "both RAM aspect ratios used");
    check(n_diff > 0, "differential architecture run");
    check(n_detect == 6, "every injected fault detected");
    check(n_done == 16, "every counted run reached done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
