// tb_bitslip_sync - self-checking test of the BITSLIP synchronizer.
// 1. Replays the timing example: Q2 high from cycle 1, and compares the
//    X, Y, Z and BITSLIP values of cycles 1..5 with the published ones.
// 2. Q2 held high: one BITSLIP pulse every four clocks.
// 3. Synchronizer enable low or Q2 low: no pulses; the TPG bitslip test line
//    passes straight through.
// 4. Closed loop with a rotating deserialiser stand-in for every width N
//    and every starting position of the training zero: alignment is
//    reached with exactly the needed number of slips and within 4(N-1)
//    clocks.
module tb_bitslip_sync;
  logic clkdiv = 0, rst = 1, sync_en = 0, q2 = 0, tpg_bitslip = 0, bitslip;
  int checks = 0, failures = 0;

  bitslip_sync dut (.*);

  always #5 clkdiv = ~clkdiv;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clkdiv);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Published timing example, cycles 1..5.
  localparam logic [4:0] EX_X = 5'b01110;  // bit k-1 = cycle k, LSB = cycle 1
  localparam logic [4:0] EX_Y = 5'b01100;
  localparam logic [4:0] EX_Z = 5'b01000;
  localparam logic [4:0] EX_B = 5'b00100;

  initial begin
    // 1. timing example
    sync_en = 1; q2 = 0;
    repeat (2) @(negedge clkdiv);
    rst = 0;
    @(negedge clkdiv);             // cycle 1 state, Q2 = 1 during cycle 1
    q2 = 1;
    for (int c = 1; c <= 5; c++) begin
      check({dut.x, dut.y, dut.z, bitslip} == {EX_X[c-1], EX_Y[c-1], EX_Z[c-1], EX_B[c-1]},
            $sformatf("timing example cycle %0d", c));
      @(negedge clkdiv);
    end
    // 2. Q2 held high: pulse period four
    begin
      int pulses, last_t, t;
      pulses = 0; last_t = -1;
      for (t = 0; t < 40; t++) begin
        if (bitslip) begin
          if (last_t >= 0) check(t - last_t == 4, "pulse spacing four");
          last_t = t; pulses++;
        end
        @(negedge clkdiv);
      end
      check(pulses == 10, $sformatf("%0d pulses in 40 cycles", pulses));
    end
    // 3. no pulses when disabled or aligned; test line passes
    sync_en = 0;
    for (int t = 0; t < 12; t++) begin
      check(!bitslip, "disabled"); @(negedge clkdiv);
    end
    sync_en = 1; q2 = 0;
    repeat (4) @(negedge clkdiv);
    for (int t = 0; t < 12; t++) begin
      check(!bitslip, "aligned, Q2 low"); @(negedge clkdiv);
    end
    tpg_bitslip = 1; #1 check(bitslip, "TPG bitslip line"); 
    @(negedge clkdiv) tpg_bitslip = 0; #1 check(!bitslip, "TPG bitslip line low");
    // 4. closed loop
    for (int n = 2; n <= 10; n++) begin
      for (int start = 0; start < n; start++) begin
        int pos, slips, need, cycles;
        rst = 1; @(negedge clkdiv); rst = 0;
        pos = start; slips = 0; cycles = 0;
        need = (1 - start + n) % n;   // Q2 is position 1
        q2 = (pos != 1);
        while (q2 && cycles < 100) begin
          @(posedge clkdiv);
          if (bitslip) begin pos = (pos + 1) % n; slips++; end
          @(negedge clkdiv);
          cycles++;
          q2 = (pos != 1);
        end
        check(slips == need, $sformatf("N=%0d start=%0d slips %0d need %0d", n, start, slips, need));
        check(cycles <= 4 * (n - 1), $sformatf("N=%0d start=%0d took %0d cycles", n, start, cycles));
        repeat (8) begin @(negedge clkdiv); check(!bitslip, "no pulse after alignment"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
