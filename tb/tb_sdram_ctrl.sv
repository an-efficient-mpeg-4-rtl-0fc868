// tb_sdram_ctrl: self-checking test of the SDRAM controller against the
// behavioural SDRAM model. After the power-up sequence it writes random words
// to random addresses (row hits, row misses in both banks), reads them all
// back and compares with a scoreboard; it also streams 64 words inside one
// row and checks that they take one cycle each, checks that refreshes keep
// happening at the programmed interval, and that the model saw no protocol
// error.
module tb_sdram_ctrl;
  import codec_pkg::*;
  localparam int unsigned REF_INTERVAL = 60;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_we, req_ready, rd_valid, init_done, refresh_tick;
  logic [SD_AW-1:0] req_addr;
  logic [15:0] req_wdata, rd_data;
  logic sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe;
  logic [0:0] sd_ba; logic [10:0] sd_addr; logic [15:0] sd_dq_out, sd_dq_in;
  int errors, n_act, n_pre, n_ref, n_rd, n_wr;
  int checks = 0, failures = 0, cyc = 0;

  sdram_ctrl #(.INIT_WAIT(20), .REF_INTERVAL(REF_INTERVAL)) dut (.*);
  sdram_model mdl (.clk, .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n), .we_n(sd_we_n),
    .ba(sd_ba), .addr(sd_addr), .dq_in(sd_dq_out), .dq_oe(sd_dq_oe), .dq_out(sd_dq_in),
    .errors, .n_act, .n_pre, .n_ref, .n_rd, .n_wr);

  always @(posedge clk) cyc++;

  logic [15:0] sb [int];
  logic [SD_AW-1:0] rd_addr_q [$];
  int ticks = 0;
  always @(posedge clk) if (refresh_tick) ticks++;

  always @(posedge clk) if (rst_n && rd_valid) begin
    logic [SD_AW-1:0] a;
    a = rd_addr_q.pop_front();
    checks++;
    if (rd_data !== sb[a]) begin
      failures++; $display("read %h: got %h want %h", a, rd_data, sb[a]);
    end
  end

  task automatic issue(input logic we, input logic [SD_AW-1:0] a, input logic [15:0] d);
    req_valid <= 1; req_we <= we; req_addr <= a; req_wdata <= d;
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    @(posedge clk);
    if (we) sb[a] = d; else rd_addr_q.push_back(a);
  endtask

  initial begin
    logic [SD_AW-1:0] addrs [64];
    int t0, t1, ref_before;
    req_valid = 0; req_we = 0; req_addr = '0; req_wdata = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    wait (init_done); @(posedge clk);
    checks++; if (n_ref < 2) begin failures++; $display("init: %0d refreshes", n_ref); end
    // random writes and reads
    for (int i = 0; i < 64; i++) begin
      addrs[i] = SD_AW'($urandom);
      if (i % 4 == 1) addrs[i] = addrs[i-1] + 1;   // some row hits
      issue(1, addrs[i], 16'($urandom));
    end
    for (int i = 0; i < 64; i++) issue(0, addrs[i], 16'h0);
    req_valid <= 0;
    repeat (10) @(posedge clk);
    // streaming inside one row: 64 writes then 64 reads, one per cycle
    @(posedge clk);
    for (int i = 0; i < 64; i++) sb[SD_AW'('h4_1200 + i)] = 16'(i * 7 + 3);
    ref_before = ticks;
    t0 = cyc;
    for (int i = 0; i < 64; i++) begin
      req_valid <= 1; req_we <= 1; req_addr <= SD_AW'('h4_1200 + i); req_wdata <= 16'(i * 7 + 3);
      @(negedge clk);
      while (!req_ready) @(negedge clk);
      @(posedge clk);
    end
    req_valid <= 0;
    t1 = cyc;
    // one activate at most (plus a refresh with its precharge/activate) on top of 64 cycles
    checks++;
    if (t1 - t0 > 64 + 4 + (ticks - ref_before) * 10) begin failures++; $display("stream took %0d cycles", t1 - t0); end
    for (int i = 0; i < 64; i++) issue(0, SD_AW'('h4_1200 + i), 0);
    req_valid <= 0;
    repeat (20) @(posedge clk);
    checks++; if (rd_addr_q.size() != 0) begin failures++; $display("%0d reads lost", rd_addr_q.size()); end
    // refresh keeps running while idle
    ref_before = ticks;
    repeat (REF_INTERVAL * 5) @(posedge clk);
    checks++; if (ticks - ref_before < 4 || ticks - ref_before > 6) begin failures++; $display("refreshes %0d", ticks - ref_before); end
    checks++; if (errors != 0) begin failures++; $display("SDRAM protocol errors %0d", errors); end
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
