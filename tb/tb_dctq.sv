// tb_dctq: self-checking test of the transform and quantisation engine.
// For random intra blocks (pixels) and inter blocks (prediction errors,
// including flat, extreme and sparse ones) at several QP values it:
//  - runs an encoding block and compares every level and every reconstructed
//    sample with an integer model written here from the same rules (basis
//    from cos(), H.263 quantiser with a plain division);
//  - checks the fixed-point transforms against floating-point DCT and IDCT:
//    the model's coefficients within 1 of the exact DCT, and the
//    reconstruction within 1 of the exact IDCT of the dequantised levels;
//  - runs a decoding block from levels written over the bus and compares the
//    reconstruction;
//  - checks the cycle counts (258 for encoding, 194 for decoding).
module tb_dctq;
  import codec_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic s_sel; bus_req_t s_req; logic [15:0] s_rdata;
  logic start, dec_start, busy, done;
  int checks = 0, failures = 0, cyc = 0;

  dctq dut (.*);
  always @(posedge clk) cyc++;

  localparam real PI = 3.14159265358979323846;
  int blk [64], lv [64], dq [64], rc [64];
  real coef_exact [64];
  int  coef_model [64];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask
  task automatic bwrite(input int a, input int d);
    @(negedge clk); s_sel = 1; s_req = '{valid: 1'b1, write: 1'b1, addr: 16'(a), wdata: 16'(d)};
    @(negedge clk); s_sel = 0; s_req = '0;
  endtask
  task automatic bread(input int a, output int d);
    @(negedge clk); s_sel = 1; s_req = '{valid: 1'b1, write: 1'b0, addr: 16'(a), wdata: '0};
    @(negedge clk); s_sel = 0; s_req = '0; d = int'(signed'(s_rdata));
  endtask

  function automatic int basis(int k, int n);
    real ck = (k == 0) ? 1.0 / $sqrt(8.0) : 0.5;
    real v = 4096.0 * ck * $cos((2 * n + 1) * k * PI / 16.0);
    return (k == 0) ? 1448 : ((k == 4) ? ((v < 0) ? -1448 : 1448) : int'(v));
  endfunction
  function automatic int rshift_round(longint v, int s);
    return int'((v + (longint'(1) << (s - 1))) >>> s);
  endfunction
  function automatic int q_model(int c, bit dc, bit intra, int qp);
    int m, l;
    if (intra && dc) begin l = (c + 4) >>> 3; return (l < 1) ? 1 : (l > 254) ? 254 : l; end
    m = (c < 0) ? -c : c;
    l = intra ? m / (2 * qp) : ((m > qp / 2) ? (m - qp / 2) / (2 * qp) : 0);
    if (l > 127) l = 127;
    return (c < 0) ? -l : l;
  endfunction
  function automatic int iq_model(int l, bit dc, bit intra, int qp);
    int m, r;
    if (l == 0) return 0;
    if (intra && dc) begin r = 8 * l; return (r > 2047) ? 2047 : (r < -2048) ? -2048 : r; end
    m = (l < 0) ? -l : l;
    r = qp * (2 * m + 1) - ((qp % 2 == 0) ? 1 : 0);
    if (l < 0) return (r > 2048) ? -2048 : -r;
    return (r > 2047) ? 2047 : r;
  endfunction

  // model: levels, dequantised values and reconstruction of blk
  task automatic model_encode(input bit intra, input int qp);
    int t [64];
    for (int r = 0; r < 8; r++) for (int k = 0; k < 8; k++) begin
      longint s = 0; for (int n = 0; n < 8; n++) s += longint'(blk[r*8+n]) * basis(k, n);
      t[r*8+k] = rshift_round(s, 9);
    end
    for (int k = 0; k < 8; k++) for (int c = 0; c < 8; c++) begin
      longint s = 0; real e = 0.0;
      for (int r = 0; r < 8; r++) s += longint'(basis(k, r)) * t[r*8+c];
      coef_model[k*8+c] = rshift_round(s, 15);
      for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++)
        e += blk[y*8+x] * ((k == 0) ? 1.0 / $sqrt(8.0) : 0.5) * $cos((2*y+1)*k*PI/16.0)
                        * ((c == 0) ? 1.0 / $sqrt(8.0) : 0.5) * $cos((2*x+1)*c*PI/16.0);
      coef_exact[k*8+c] = e;
      lv[k*8+c] = q_model(coef_model[k*8+c], k == 0 && c == 0, intra, qp);
      dq[k*8+c] = iq_model(lv[k*8+c], k == 0 && c == 0, intra, qp);
    end
  endtask
  task automatic model_idct();
    int t [64];
    for (int k = 0; k < 8; k++) for (int m = 0; m < 8; m++) begin
      longint s = 0; for (int l = 0; l < 8; l++) s += longint'(dq[k*8+l]) * basis(l, m);
      t[k*8+m] = rshift_round(s, 9);
    end
    for (int n = 0; n < 8; n++) for (int m = 0; m < 8; m++) begin
      longint s = 0; for (int k = 0; k < 8; k++) s += longint'(basis(k, n)) * t[k*8+m];
      rc[n*8+m] = rshift_round(s, 15);
    end
  endtask
  function automatic real idct_exact(int n, int m);
    real e = 0.0;
    for (int k = 0; k < 8; k++) for (int l = 0; l < 8; l++)
      e += dq[k*8+l] * ((k == 0) ? 1.0 / $sqrt(8.0) : 0.5) * $cos((2*n+1)*k*PI/16.0)
                     * ((l == 0) ? 1.0 / $sqrt(8.0) : 0.5) * $cos((2*m+1)*l*PI/16.0);
    return e;
  endfunction

  task automatic run(input bit decode, input bit intra, output int cycles);
    int t0;
    @(negedge clk); s_sel = 1;
    s_req = '{valid: 1'b1, write: 1'b1, addr: 16'h0C0, wdata: {13'b0, decode, intra, 1'b1}};
    t0 = cyc;
    @(negedge clk); s_sel = 0; s_req = '0;
    while (!done) @(negedge clk);
    cycles = cyc - t0;
  endtask

  task automatic enc_trial(input bit intra, input int qp, input int kind);
    int d, c;
    for (int p = 0; p < 64; p++) begin
      unique case (kind)
        0: blk[p] = intra ? int'($urandom % 256) : int'($urandom % 511) - 255;
        1: blk[p] = intra ? 255 : ((p % 2) ? 255 : -255);
        2: blk[p] = intra ? 128 : 0;
        default: blk[p] = ($urandom % 8 == 0) ? int'($urandom % 101) - 50 : 0;
      endcase
      bwrite(p, blk[p]);
    end
    bwrite(16'h0C1, qp);
    model_encode(intra, qp);
    model_idct();
    run(1'b0, intra, c);
    check(c == 258, $sformatf("encoding run took %0d cycles", c));
    for (int p = 0; p < 64; p++) begin
      real diff = coef_model[p] - coef_exact[p];
      check(diff <= 1.0 && diff >= -1.0, $sformatf("model DCT coef %0d: %0d vs %f", p, coef_model[p], coef_exact[p]));
      bread(16'h040 + p, d);
      check(d == lv[p], $sformatf("intra%0d qp%0d level %0d: %0d want %0d", intra, qp, p, d, lv[p]));
      bread(16'h080 + p, d);
      check(d == rc[p], $sformatf("intra%0d qp%0d rec %0d: %0d want %0d", intra, qp, p, d, rc[p]));
      diff = rc[p] - idct_exact(p / 8, p % 8);
      check(diff <= 1.0 && diff >= -1.0, $sformatf("model IDCT %0d: %0d vs %f", p, rc[p], idct_exact(p / 8, p % 8)));
    end
  endtask

  task automatic dec_trial(input bit intra, input int qp);
    int d, c;
    for (int p = 0; p < 64; p++) begin
      lv[p] = (p == 0 && intra) ? int'($urandom % 254) + 1
            : ($urandom % 4 == 0) ? int'($urandom % 41) - 20 : 0;
      dq[p] = iq_model(lv[p], p == 0, intra, qp);
      bwrite(16'h040 + p, lv[p]);
    end
    bwrite(16'h0C1, qp);
    model_idct();
    run(1'b1, intra, c);
    check(c == 194, $sformatf("decoding run took %0d cycles", c));
    for (int p = 0; p < 64; p++) begin
      bread(16'h080 + p, d);
      check(d == rc[p], $sformatf("decode intra%0d qp%0d rec %0d: %0d want %0d", intra, qp, p, d, rc[p]));
    end
  endtask

  initial begin
    int qps [6] = '{1, 2, 5, 8, 16, 31};
    s_sel = 0; s_req = '0; start = 0; dec_start = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    foreach (qps[j]) begin
      enc_trial(1'b1, qps[j], 0);
      enc_trial(1'b0, qps[j], 0);
    end
    for (int kind = 1; kind < 4; kind++) begin
      enc_trial(1'b1, 4, kind); enc_trial(1'b0, 4, kind); enc_trial(1'b0, 1, kind);
    end
    foreach (qps[j]) begin
      dec_trial(1'b1, qps[j]);
      dec_trial(1'b0, qps[j]);
    end
    // start through the port: encoding then decoding of the last block
    begin
      int d;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      @(negedge clk); dec_start = 1; @(negedge clk); dec_start = 0;
      while (!done) @(negedge clk);
      bread(16'h0C2, d); check(d == 0, "idle after runs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
