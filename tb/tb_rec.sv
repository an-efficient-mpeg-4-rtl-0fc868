// tb_rec: self-checking test of the reconstruction engine. Random inter
// blocks (prediction plus residual, with residuals large enough to clip at
// both ends) and intra blocks (residual alone) are loaded over the bus; every
// reconstructed pixel is compared with prediction + residual clipped to
// 0..255 worked out here, the clipped-pixel count is compared, the memories
// are read back, and the time from start to `done` is checked (9 cycles).
module tb_rec;
  import codec_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic s_sel; bus_req_t s_req; logic [15:0] s_rdata;
  logic start, busy, done;
  int checks = 0, failures = 0, cyc = 0;
  int pr [64], rs [64];

  rec dut (.*);
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask
  task automatic bwrite(input int a, input int d);
    @(negedge clk); s_sel = 1; s_req = '{valid: 1'b1, write: 1'b1, addr: 16'(a), wdata: 16'(d)};
    @(negedge clk); s_sel = 0; s_req = '0;
  endtask
  task automatic bread(input int a, output logic [15:0] d);
    @(negedge clk); s_sel = 1; s_req = '{valid: 1'b1, write: 1'b0, addr: 16'(a), wdata: '0};
    @(negedge clk); s_sel = 0; s_req = '0; d = s_rdata;
  endtask

  task automatic trial(input bit intra, input int span, input bit by_port);
    logic [15:0] d;
    int want [64], nclip = 0, t0;
    for (int p = 0; p < 64; p++) begin
      pr[p] = $urandom % 256;
      rs[p] = intra ? int'($urandom % (256 + 2 * span)) - span : int'($urandom % (2 * span + 1)) - span;
      want[p] = rs[p] + (intra ? 0 : pr[p]);
      if (want[p] < 0 || want[p] > 255) nclip++;
      want[p] = (want[p] < 0) ? 0 : (want[p] > 255) ? 255 : want[p];
      bwrite(16'h040 + p, rs[p]);
    end
    for (int p = 0; p < 64; p += 2) bwrite(p / 2, {8'(pr[p + 1]), 8'(pr[p])});
    if (by_port) begin
      bwrite(16'h0C0, {14'b0, intra, 1'b0});
      @(negedge clk); start = 1; t0 = cyc;
      @(negedge clk); start = 0;
    end else begin
      @(negedge clk); s_sel = 1; s_req = '{valid: 1'b1, write: 1'b1, addr: 16'h0C0, wdata: {14'b0, intra, 1'b1}};
      t0 = cyc;
      @(negedge clk); s_sel = 0; s_req = '0;
    end
    while (!done) @(negedge clk);
    check(cyc - t0 == 9, $sformatf("took %0d cycles", cyc - t0));
    for (int p = 0; p < 64; p += 2) begin
      bread(16'h080 + p / 2, d);
      check(d == {8'(want[p + 1]), 8'(want[p])}, $sformatf("intra%0d pixels %0d,%0d = %h want %0d,%0d", intra, p, p + 1, d, want[p], want[p + 1]));
      bread(p / 2, d);
      check(d == {8'(pr[p + 1]), 8'(pr[p])}, "prediction read back");
    end
    bread(16'h040 + 5, d); check(int'(signed'(d)) == rs[5], "residual read back");
    bread(16'h0C1, d);
    check(int'(d[15:8]) == nclip && d[0] == 1'b0, $sformatf("clip count %0d want %0d", d[15:8], nclip));
  endtask

  initial begin
    s_sel = 0; s_req = '0; start = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 6; i++) begin
      trial(1'b0, 40, i % 2);
      trial(1'b0, 300, i % 2);
      trial(1'b1, 20, i % 2);
    end
    trial(1'b0, 0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
