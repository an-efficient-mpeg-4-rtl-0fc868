// tb_mef_mc: self-checking test of the fine motion estimation and motion
// compensation engine. Each trial loads a reference patch and a current MB
// over the bus, runs the engine and compares the vector, the SAD, every
// prediction pixel and every half-resolution pixel with a model of the same
// two-step search written in the testbench. Current MBs are cut from the
// patch at a known half-pel offset (with and without noise); for smooth,
// noiseless pictures and whole-pixel offsets the search must land on that
// offset (half-pel offsets are reachable only next to the best whole-pixel
// one, so for them only the agreement with the model is checked). Compensation-only
// runs with given offsets are checked the same way, and so are the cycle
// counts (298 for a search, 26 for compensation only).
module tb_mef_mc;
  import codec_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic s_sel; bus_req_t s_req; logic [15:0] s_rdata;
  logic start, mc_start, busy, done;
  logic signed [6:0] mv_hx, mv_hy;
  logic [15:0] sad;
  int checks = 0, failures = 0, cyc = 0;
  logic [7:0] pat [20][20];
  logic [7:0] cur [16][16];

  mef_mc dut (.*);
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  task automatic bwrite(input int a, input logic [15:0] d);
    @(negedge clk); s_sel = 1; s_req = '{valid: 1'b1, write: 1'b1, addr: 16'(a), wdata: d};
    @(negedge clk); s_sel = 0; s_req = '0;
  endtask
  task automatic bread(input int a, output logic [15:0] d);
    @(negedge clk); s_sel = 1; s_req = '{valid: 1'b1, write: 1'b0, addr: 16'(a), wdata: '0};
    @(negedge clk); s_sel = 0; s_req = '0; d = s_rdata;
  endtask

  // model interpolation at half-pel offset (hx, hy) around the patch centre
  function automatic int mpix(int x, int y, int hx, int hy);
    int px2 = 2 * (x + 2) + hx, py2 = 2 * (y + 2) + hy;
    int ix = px2 >>> 1, iy = py2 >>> 1, fx = px2 & 1, fy = py2 & 1;
    int a = pat[iy][ix], b = pat[iy][ix + 1], c = pat[iy + 1][ix], d = pat[iy + 1][ix + 1];
    if (!fx && !fy) return a;
    if (fx && !fy) return (a + b + 1) >> 1;
    if (!fx && fy) return (a + c + 1) >> 1;
    return (a + b + c + d + 2) >> 2;
  endfunction
  function automatic int msad(int hx, int hy);
    int s = 0;
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) begin
      int d = int'(cur[y][x]) - mpix(x, y, hx, hy); s += (d < 0) ? -d : d;
    end
    return s;
  endfunction

  task automatic load();
    for (int y = 0; y < 20; y++) for (int w = 0; w < 10; w++)
      bwrite(y * 16 + w, {pat[y][2*w+1], pat[y][2*w]});
    for (int y = 0; y < 16; y++) for (int w = 0; w < 8; w++)
      bwrite(16'h180 + y * 8 + w, {cur[y][2*w+1], cur[y][2*w]});
  endtask

  task automatic check_outputs(input int hx, input int hy, input int cx, input int cy);
    logic [15:0] d;
    check(int'(mv_hx) == 4 * cx + hx && int'(mv_hy) == 4 * cy + hy,
          $sformatf("vector (%0d,%0d) want (%0d,%0d)", mv_hx, mv_hy, 4 * cx + hx, 4 * cy + hy));
    check(int'(sad) == msad(hx, hy), $sformatf("sad %0d want %0d", sad, msad(hx, hy)));
    bread(16'h203, d); check(d == 16'(4 * cx + hx), "vector x register");
    bread(16'h205, d); check(d == sad, "sad register");
    for (int y = 0; y < 16; y++) for (int w = 0; w < 8; w++) begin
      bread(16'h300 + y * 8 + w, d);
      check(d == {8'(mpix(2*w+1, y, hx, hy)), 8'(mpix(2*w, y, hx, hy))},
            $sformatf("pred row %0d word %0d = %h", y, w, d));
    end
    for (int y = 0; y < 8; y++) for (int w = 0; w < 4; w++) begin
      int p0 = (cur[2*y][4*w] + cur[2*y][4*w+1] + cur[2*y+1][4*w] + cur[2*y+1][4*w+1] + 2) >> 2;
      int p1 = (cur[2*y][4*w+2] + cur[2*y][4*w+3] + cur[2*y+1][4*w+2] + cur[2*y+1][4*w+3] + 2) >> 2;
      bread(16'h380 + y * 4 + w, d);
      check(d == {8'(p1), 8'(p0)}, $sformatf("half-res row %0d word %0d = %h", y, w, d));
    end
  endtask

  // picture: smooth (ramps) or rough (random)
  task automatic make_patch(input bit smooth);
    int ax = $urandom % 7, ay = $urandom % 5, b = $urandom % 40;
    for (int y = 0; y < 20; y++) for (int x = 0; x < 20; x++)
      pat[y][x] = smooth ? 8'(b + ax * x + ay * y + (x * y) % 7) : 8'($urandom);
  endtask

  task automatic search_trial(input bit smooth, input int th, input int tv, input int noise);
    int cx = int'($urandom % 16) - 8, cy = int'($urandom % 16) - 8;
    int best, bhx, bhy, ihx, ihy, t0;
    make_patch(smooth);
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) begin
      int v = mpix(x, y, th, tv) + (noise ? int'($urandom % (2 * noise + 1)) - noise : 0);
      cur[y][x] = 8'((v < 0) ? 0 : (v > 255) ? 255 : v);
    end
    load();
    bwrite(16'h201, {8'b0, 4'(cy), 4'(cx)});
    // model: integer step then half-pel step
    best = -1;
    for (int k = 0; k < 9; k++) begin
      int s = msad(2 * (k % 3) - 2, 2 * (k / 3) - 2);
      if (best < 0 || s < best) begin best = s; bhx = 2 * (k % 3) - 2; bhy = 2 * (k / 3) - 2; end
    end
    ihx = bhx; ihy = bhy;
    for (int j = 0; j < 9; j++) if (j != 4) begin
      int s = msad(ihx + j % 3 - 1, ihy + j / 3 - 1);
      if (s < best) begin best = s; bhx = ihx + j % 3 - 1; bhy = ihy + j / 3 - 1; end
    end
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    check(cyc - t0 == 298, $sformatf("search took %0d cycles", cyc - t0));
    check(int'(sad) == best, $sformatf("model best sad %0d, dut %0d", best, sad));
    check_outputs(bhx, bhy, cx, cy);
    if (smooth && noise == 0 && th % 2 == 0 && tv % 2 == 0)
      check(bhx == th && bhy == tv, $sformatf("search missed true offset (%0d,%0d), got (%0d,%0d)", th, tv, bhx, bhy));
  endtask

  task automatic mc_trial(input int hx, input int hy);
    int t0;
    make_patch(0);
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) cur[y][x] = 8'($urandom);
    load();
    bwrite(16'h201, 16'h0000);
    bwrite(16'h202, {8'b0, 4'(hy), 4'(hx)});
    @(negedge clk); mc_start = 1; t0 = cyc;
    @(negedge clk); mc_start = 0;
    while (!done) @(negedge clk);
    check(cyc - t0 == 26, $sformatf("compensation took %0d cycles", cyc - t0));
    check_outputs(hx, hy, 0, 0);
  endtask

  initial begin
    s_sel = 0; s_req = '0; start = 0; mc_start = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    search_trial(1, 0, 0, 0);
    search_trial(1, 3, 3, 0);
    search_trial(1, -3, -3, 0);
    search_trial(1, 1, -2, 0);
    search_trial(1, 2, -2, 0);
    search_trial(1, -1, 2, 0);
    for (int i = 0; i < 4; i++) search_trial(1, int'($urandom % 7) - 3, int'($urandom % 7) - 3, 2);
    for (int i = 0; i < 3; i++) search_trial(0, 0, 0, 0);
    mc_trial(0, 0); mc_trial(1, 0); mc_trial(0, 1); mc_trial(1, 1); mc_trial(-3, -3); mc_trial(3, 3);
    // register start (bit0) with compensation-only (bit1)
    bwrite(16'h202, 16'h0011);
    bwrite(16'h200, 16'h0003);
    while (!done) @(negedge clk);
    check(mv_hx == 7'sd1 && mv_hy == 7'sd1, "register-started compensation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
