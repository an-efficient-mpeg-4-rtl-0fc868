// tb_me_coarse: self-checking test of the 8-PE coarse full search. The
// testbench holds a random 24x24 reference window and an 8x8 current block
// copied from the window at a chosen offset (plus a little noise), answers the
// engine's memory reads, and compares the returned vector and SAD with an
// exhaustive search it computes itself (same tie rule: first minimum with dy
// rising, then dx rising). It also checks the 2080-cycle search time.
module tb_me_coarse;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done;
  logic [2:0] cur_row, cur_col; logic [7:0] cur_px;
  logic [4:0] ref_row, ref_col; logic [7:0][7:0] ref_pix;
  logic signed [3:0] mv_x, mv_y; logic [13:0] sad;
  int checks = 0, failures = 0, cyc = 0;

  logic [7:0] win [24][24];
  logic [7:0] blk [8][8];

  me_coarse dut (.*);

  assign cur_px = blk[cur_row][cur_col];
  always_comb for (int k = 0; k < 8; k++) ref_pix[k] = win[ref_row][int'(ref_col) + k];
  always @(posedge clk) cyc++;

  task automatic trial(input int ox, input int oy, input int noise);
    int best, bx, by, s, t0;
    for (int y = 0; y < 24; y++) for (int x = 0; x < 24; x++) win[y][x] = 8'($urandom);
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++)
      blk[y][x] = 8'(int'(win[y + 8 + oy][x + 8 + ox]) + ((noise > 0) ? int'($urandom % noise) : 0));
    best = 1 << 30; bx = 0; by = 0;
    for (int dy = -8; dy < 8; dy++) for (int dx = -8; dx < 8; dx++) begin
      s = 0;
      for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) begin
        int d; d = int'(blk[y][x]) - int'(win[y + 8 + dy][x + 8 + dx]); s += (d < 0) ? -d : d;
      end
      if (s < best) begin best = s; bx = dx; by = dy; end
    end
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (int'(mv_x) != bx || int'(mv_y) != by || int'(sad) != best) begin
      failures++; $display("offset (%0d,%0d): got (%0d,%0d) sad %0d, want (%0d,%0d) sad %0d", ox, oy, mv_x, mv_y, sad, bx, by, best);
    end
    checks++;
    if (cyc - t0 != 2081) begin failures++; $display("search took %0d cycles", cyc - t0); end
  endtask

  initial begin
    start = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    trial(0, 0, 0); trial(-8, -8, 0); trial(7, 7, 0); trial(-3, 5, 3); trial(6, -2, 2);
    for (int i = 0; i < 5; i++) trial(int'($urandom % 16) - 8, int'($urandom % 16) - 8, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
