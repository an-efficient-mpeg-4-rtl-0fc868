// tb_me_skip: self-checking test of the ME skip engine: for random windows,
// blocks and predicted vectors (including the corners of the -8..+7 range) it
// compares the returned SAD with one computed in the testbench, and checks
// that the result arrives 9 cycles after start.
module tb_me_skip;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done;
  logic signed [3:0] pmv_x, pmv_y;
  logic [2:0] cur_row; logic [7:0][7:0] cur_pix;
  logic [4:0] ref_row, ref_col; logic [7:0][7:0] ref_pix;
  logic [13:0] sad;
  int checks = 0, failures = 0, cyc = 0;
  logic [7:0] win [24][24];
  logic [7:0] blk [8][8];

  me_skip dut (.*);
  always_comb for (int k = 0; k < 8; k++) begin
    ref_pix[k] = win[ref_row][int'(ref_col) + k];
    cur_pix[k] = blk[cur_row][k];
  end
  always @(posedge clk) cyc++;

  task automatic trial(input int px, input int py);
    int s, t0;
    for (int y = 0; y < 24; y++) for (int x = 0; x < 24; x++) win[y][x] = 8'($urandom);
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) blk[y][x] = 8'($urandom);
    s = 0;
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) begin
      int d; d = int'(blk[y][x]) - int'(win[y + 8 + py][x + 8 + px]); s += (d < 0) ? -d : d;
    end
    @(negedge clk); pmv_x = 4'(px); pmv_y = 4'(py); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++; if (int'(sad) != s) begin failures++; $display("pmv (%0d,%0d): sad %0d want %0d", px, py, sad, s); end
    checks++; if (cyc - t0 != 9) begin failures++; $display("took %0d cycles", cyc - t0); end
  endtask

  initial begin
    start = 0; pmv_x = 0; pmv_y = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    trial(0, 0); trial(-8, -8); trial(7, 7); trial(-8, 7); trial(7, -8);
    for (int i = 0; i < 20; i++) trial(int'($urandom % 16) - 8, int'($urandom % 16) - 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
