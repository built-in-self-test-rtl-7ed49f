// tb_ora - self-checking test of one comparison ORA.
// Drives random equal and unequal input pairs with the enable on and off
// and checks the sticky pass/fail bit against a reference each clock,
// including that rst clears it.
module tb_ora;
  logic clk = 0, rst = 1, en = 0, but_l = 0, but_r = 0, fail;
  logic ref_fail;
  int checks = 0, failures = 0;

  ora dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_fail = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int run = 0; run < 20; run++) begin
      rst = 1; @(negedge clk); rst = 0; ref_fail = 0;
      check(fail == 0, "cleared by rst");
      for (int i = 0; i < 100; i++) begin
        en    = ($urandom % 4) != 0;
        but_l = 1'($urandom);
        // mismatches are rare so that both outcomes occur
        but_r = (($urandom % (20 + 10 * run)) == 0) ? ~but_l : but_l;
        @(negedge clk);
        ref_fail = ref_fail | (en & (but_l ^ but_r));
        check(fail == ref_fail, $sformatf("run %0d cycle %0d", run, i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
