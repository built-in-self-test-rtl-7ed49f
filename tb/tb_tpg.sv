// tb_tpg - self-checking test of a test pattern generator.
// Loads 512 random 36-bit rows, then for both RAM aspect ratios checks that
// the idle TPG shows word 0, that after enable it presents every further
// word in order one per clock, that done rises with the last word (511 or
// 1023) and the number of clocks from enable to done.
module tb_tpg;
  import bist_pkg::*;
  localparam int unsigned DEPTH = WIDE_DEPTH;
  localparam int unsigned AW = $clog2(DEPTH);
  logic clk = 0, rst = 1, en = 0, wide = 1, we = 0, done;
  logic [AW-1:0] waddr = '0;
  logic [WIDE_W-1:0] wdata = '0, vec;
  logic [WIDE_W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  tpg #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic logic [WIDE_W-1:0] word(input int i, input logic w);
    logic [WIDE_W-1:0] r;
    if (w) return model[i];
    r = '0;
    r[NARROW_W-1:0] = i[0] ? model[i/2][WIDE_W-1:NARROW_W] : model[i/2][NARROW_W-1:0];
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) begin
      model[i] = WIDE_W'({$urandom, $urandom});
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = model[i];
    end
    @(negedge clk) we = 0;
    for (int m = 0; m < 2; m++) begin
      int words, idx, cycles;
      wide  = (m == 0);
      words = wide ? int'(DEPTH) : 2 * int'(DEPTH);
      rst = 1; en = 0;
      repeat (2) @(negedge clk);
      rst = 0;
      repeat (3) @(negedge clk);
      check(vec == word(0, wide) && !done, "idle TPG shows word 0");
      en = 1;
      idx = 0; cycles = 0;
      // one clock to register the address, one for the RAM read
      @(negedge clk); cycles++;
      check(vec == word(0, wide), "word 0 still present one clock after enable");
      while (!done && cycles < 3000) begin
        @(negedge clk); cycles++;
        idx++;
        check(vec == word(idx, wide), $sformatf("word %0d", idx));
      end
      check(idx == words - 1, $sformatf("last word %0d", idx));
      check(cycles == words, $sformatf("enable to done %0d clocks, expected %0d", cycles, words));
      repeat (3) @(negedge clk);
      check(done && vec == word(words - 1, wide), "holds on last word");
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
