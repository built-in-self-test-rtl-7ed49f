// tb_ora_ring - self-checking test of the circular ORA array.
// Eight tiles return identical random responses except that one chosen
// tile has one response bit flipped for one cycle. Only the two ORAs that
// compare that tile with its neighbours (including the wrap-around from
// the last tile to the first) may fail, and only if that bit is in the
// mask. In half of the trials random tiles are skipped (left out of the
// ring): a skipped tile must not fail and its left neighbour must compare
// with the next tile that takes part. Every fail bit is compared with a
// reference computed here.
module tb_ora_ring;
  localparam int unsigned N = 8, W = 6;
  logic clk = 0, rst = 1, en = 0, any_fail;
  logic [W-1:0] mask;
  logic [W-1:0] skip [N];
  logic [W-1:0] resp [N];
  logic [W-1:0] fail [N];
  int checks = 0, failures = 0;

  ora_ring #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < int'(N); k++) begin resp[k] = '0; skip[k] = '0; end
    mask = '1;
    repeat (2) @(negedge clk);
    for (int trial = 0; trial < 64; trial++) begin
      int bad_tile, bad_bit, when;
      bad_tile = trial % N;
      bad_bit  = (trial / N) % W;
      mask     = (trial % 3 == 2) ? W'($urandom) : '1;
      when     = 5 + $urandom % 10;
      for (int k = 0; k < int'(N); k++) skip[k] = (trial % 2 == 1) ? W'($urandom & $urandom) : '0;
      rst = 1; en = 0;
      @(negedge clk);
      rst = 0; en = 1;
      for (int c = 0; c < 20; c++) begin
        logic [W-1:0] v;
        v = W'($urandom);
        for (int k = 0; k < int'(N); k++) resp[k] = v;
        if (c == when) resp[bad_tile][bad_bit] = ~v[bad_bit];
        @(negedge clk);
      end
      for (int k = 0; k < int'(N); k++)
        for (int j = 0; j < int'(W); j++) begin
          logic exp;
          int nxt;
          nxt = k;
          for (int d = int'(N) - 1; d >= 1; d--)
            if (!skip[(k + d) % int'(N)][j]) nxt = (k + d) % int'(N);
          exp = mask[j] && j == bad_bit && !skip[k][j] && !skip[bad_tile][j] &&
                ((k == bad_tile) != (nxt == bad_tile));
          check(fail[k][j] == exp, $sformatf("trial %0d ora %0d.%0d", trial, k, j));
        end
      begin
        int others;
        others = 0;
        for (int k = 0; k < int'(N); k++) if (k != bad_tile && !skip[k][bad_bit]) others++;
        check(any_fail == (mask[bad_bit] && !skip[bad_tile][bad_bit] && others > 0), "any_fail");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
