// tb_tpg_bram - self-checking test of the 18 Kbit test-vector RAM.
// Fills every 36-bit row with random data through the load port, keeping a
// reference copy, then reads all 512 words in the 512 x 36 mode and all
// 1024 words in the 1K x 18 mode and compares each with the reference,
// including the one-clock read latency.
module tb_tpg_bram;
  import bist_pkg::*;
  localparam int unsigned DEPTH = WIDE_DEPTH;
  localparam int unsigned AW = $clog2(DEPTH);
  logic clk = 0, wide = 1, we = 0;
  logic [AW:0] raddr = '0;
  logic [AW-1:0] waddr = '0;
  logic [WIDE_W-1:0] wdata = '0, dout;
  logic [WIDE_W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  tpg_bram #(.DEPTH(DEPTH)) dut (.*);

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
    for (int i = 0; i < int'(DEPTH); i++) begin
      model[i] = WIDE_W'({$urandom, $urandom});
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = model[i];
    end
    @(negedge clk) we = 0;
    // 512 x 36
    wide = 1;
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge clk) raddr = (AW+1)'(i);
      @(negedge clk) check(dout == model[i], $sformatf("wide word %0d", i));
    end
    // 1K x 18, back-to-back reads: data of address i appears one clock later
    wide = 0;
    @(negedge clk) raddr = '0;
    for (int i = 1; i <= 2 * int'(DEPTH); i++) begin
      logic [WIDE_W-1:0] exp;
      int p;
      p = i - 1;
      exp = '0;
      exp[NARROW_W-1:0] = p[0] ? model[p/2][WIDE_W-1:NARROW_W] : model[p/2][NARROW_W-1:0];
      @(negedge clk);
      check(dout == exp, $sformatf("narrow word %0d", p));
      raddr = (AW+1)'(i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
