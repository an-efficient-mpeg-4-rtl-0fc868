// tb_me_mixed: self-checking test of the mixed-mode motion estimator through
// its bus port. For each trial it loads a random 24x24 reference window and
// an 8x8 current block cut from it at a known offset, sets the predicted
// vector and the skip threshold, starts an estimation and reads the results
// back over the bus. Expected values come from the testbench's own SAD at the
// predicted vector and its own exhaustive search. Both modes are exercised:
// skip mode (SAD at the prediction below the threshold: result = prediction,
// short run time) and normal mode (full search). It checks the run times and
// the skip and block counters.
module tb_me_mixed;
  import codec_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic s_sel, start, busy, done, skipped;
  bus_req_t s_req; logic [15:0] s_rdata;
  logic signed [3:0] mv_x, mv_y; logic [13:0] sad;
  int checks = 0, failures = 0, cyc = 0, n_skip_exp = 0, n_blk_exp = 0;
  logic [7:0] win [24][24];
  logic [7:0] blk [8][8];

  me_mixed dut (.*);
  always @(posedge clk) cyc++;

  task automatic wr(input logic [9:0] off, input logic [15:0] d);
    @(negedge clk); s_sel = 1; s_req = '{valid: 1, write: 1, addr: MAP_ME_BASE | 16'(off), wdata: d};
    @(negedge clk); s_sel = 0; s_req = '0;
  endtask
  task automatic rd(input logic [9:0] off, output logic [15:0] d);
    @(negedge clk); s_sel = 1; s_req = '{valid: 1, write: 0, addr: MAP_ME_BASE | 16'(off), wdata: 0};
    @(negedge clk); s_sel = 0; s_req = '0; d = s_rdata;
  endtask

  function automatic int sad_at(int dx, int dy);
    int s = 0;
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) begin
      int d; d = int'(blk[y][x]) - int'(win[y + 8 + dy][x + 8 + dx]); s += (d < 0) ? -d : d;
    end
    return s;
  endfunction

  task automatic trial(input int ox, input int oy, input int px, input int py, input int thr);
    int best, bx, by, s, ps, t0, ex, ey, es; bit exp_skip; logic [15:0] d;
    for (int y = 0; y < 24; y++) for (int x = 0; x < 24; x++) win[y][x] = 8'($urandom);
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) blk[y][x] = win[y + 8 + oy][x + 8 + ox] ^ 8'($urandom % 2);
    for (int y = 0; y < 24; y++) for (int w = 0; w < 12; w++) wr(10'h200 + 10'(y * 16 + w), {win[y][2*w+1], win[y][2*w]});
    for (int y = 0; y < 8; y++) for (int w = 0; w < 4; w++) wr(10'(y * 4 + w), {blk[y][2*w+1], blk[y][2*w]});
    wr(ME_R_PMV, {8'b0, 4'(py), 4'(px)});
    wr(ME_R_THR, 16'(thr));
    best = 1 << 30; bx = 0; by = 0;
    for (int dy = -8; dy < 8; dy++) for (int dx = -8; dx < 8; dx++) begin
      s = sad_at(dx, dy); if (s < best) begin best = s; bx = dx; by = dy; end
    end
    ps = sad_at(px, py);
    exp_skip = ps < thr;
    if (exp_skip) begin ex = px; ey = py; es = ps; n_skip_exp++; end
    else begin ex = bx; ey = by; es = best; end
    n_blk_exp++;
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (skipped !== exp_skip || int'(mv_x) != ex || int'(mv_y) != ey || int'(sad) != es) begin
      failures++; $display("got skip%0d (%0d,%0d) sad %0d, want skip%0d (%0d,%0d) sad %0d",
                           skipped, mv_x, mv_y, sad, exp_skip, ex, ey, es);
    end
    checks++;
    if ((cyc - t0) != (exp_skip ? 12 : 12 + 2081)) begin failures++; $display("run took %0d cycles (skip %0d)", cyc - t0, exp_skip); end
    rd(ME_R_MV, d);
    checks++; if (d[8] !== exp_skip || int'(signed'(d[3:0])) != ex || int'(signed'(d[7:4])) != ey) begin failures++; $display("MV reg %h", d); end
    rd(ME_R_SAD, d);
    checks++; if (int'(d) != es) begin failures++; $display("SAD reg %0d", d); end
  endtask

  initial begin
    logic [15:0] d;
    s_sel = 0; s_req = '0; start = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    trial(3, -2, 3, -2, 200);     // good prediction, threshold above its SAD: skip
    trial(3, -2, -5, 4, 200);     // bad prediction: full search
    trial(-7, 6, -7, 6, 10);      // good prediction, but threshold below its SAD: full search
    trial(0, 0, 0, 0, 100);       // skip at the zero vector
    trial(7, 7, 1, 1, 500);       // bad prediction: full search finds the corner
    rd(ME_R_NSKIP, d);
    checks++; if (int'(d) != n_skip_exp) begin failures++; $display("skip count %0d want %0d", d, n_skip_exp); end
    rd(ME_R_NBLK, d);
    checks++; if (int'(d) != n_blk_exp) begin failures++; $display("block count %0d want %0d", d, n_blk_exp); end
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
