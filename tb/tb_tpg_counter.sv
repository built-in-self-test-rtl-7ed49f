// tb_tpg_counter - self-checking test of the TPG address counter.
// Holds en low (count must stay 0), then runs to a programmed last address
// and checks every count against a reference, that the counter stops at
// `last`, that done rises exactly there and the number of clocks taken.
module tb_tpg_counter;
  localparam int unsigned W = 10;
  logic clk = 0, rst = 1, en = 0, done;
  logic [W-1:0] last, count;
  int checks = 0, failures = 0;
  int unsigned ref_cnt;

  tpg_counter #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned int_lasts [3] = '{1023, 511, 7};

  initial begin
    last = 10'd1023;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    #1 check(count == 0 && !done, "idle count held at zero");
    for (int t = 0; t < 3; t++) begin
      int cycles;
      last = W'(int_lasts[t]);
      en <= 1;
      ref_cnt = 0;
      cycles = 0;
      @(posedge clk);
      while (ref_cnt < int_lasts[t]) begin
        #1;
        ref_cnt++;
        cycles++;
        check(count == W'(ref_cnt), $sformatf("count %0d expected %0d", count, ref_cnt));
        check(done == (ref_cnt == int_lasts[t]), "done flag");
        @(posedge clk);
      end
      check(cycles == int'(int_lasts[t]), "clocks from enable to last address");
      repeat (3) @(posedge clk);
      #1 check(count == W'(int_lasts[t]) && done, "counter holds at last");
      en <= 0;
      @(posedge clk); #1 check(count == 0 && !done, "disable returns to zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
