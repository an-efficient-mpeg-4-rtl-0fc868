// tb_fmi: self-checking test of the frame memory interface (DMA controller +
// SDRAM controller) against the behavioural SDRAM model. The testbench plays
// the RISC (register writes), grants the bus one cycle after AREQ, and keeps a
// local memory with a one-cycle read latency. It copies a local block to
// SDRAM across a row boundary, copies it back elsewhere, cuts a 2-D block out
// of a "frame" in packet mode in both directions, and compares every word.
// The refresh interval is shortened so that refreshes land inside transfers.
// It also checks that a 200-word transfer inside one open row takes about
// one cycle per word, and that the SDRAM model saw no protocol error.
module tb_fmi;
  import codec_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic s_sel; bus_req_t s_req; logic [15:0] s_rdata;
  logic areq, grant, lock, dma_busy, dma_irq, sd_init_done, sd_refresh_tick;
  bus_req_t m_req; logic [15:0] m_rdata;
  logic sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe;
  logic [0:0] sd_ba; logic [10:0] sd_addr; logic [15:0] sd_dq_out, sd_dq_in;
  int errors, n_act, n_pre, n_ref, n_rd, n_wr;
  int checks = 0, failures = 0, cyc = 0, refs_in_xfer = 0;

  fmi #(.INIT_WAIT(50), .REF_INTERVAL(150)) dut (.*);
  sdram_model mdl (.clk, .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n), .we_n(sd_we_n),
    .ba(sd_ba), .addr(sd_addr), .dq_in(sd_dq_out), .dq_oe(sd_dq_oe), .dq_out(sd_dq_in),
    .errors, .n_act, .n_pre, .n_ref, .n_rd, .n_wr);

  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n && sd_refresh_tick && dma_busy) refs_in_xfer++;
  always @(posedge clk) begin
    if (!rst_n) grant <= 0;
    else if (!grant && areq) grant <= 1;
    else if (grant && !areq && !lock) grant <= 0;
  end

  logic [15:0] lmem [int];
  function automatic logic [15:0] lget(int a); return lmem.exists(a) ? lmem[a] : 16'hDEAD; endfunction
  always @(posedge clk) if (rst_n && m_req.valid) begin
    if (m_req.write) lmem[int'(m_req.addr)] = m_req.wdata;
    else m_rdata <= lget(int'(m_req.addr));
  end

  task automatic wreg(input logic [3:0] r, input logic [15:0] d);
    @(negedge clk); s_sel = 1; s_req = '{valid: 1, write: 1, addr: MAP_DMA_BASE | 16'(r), wdata: d};
    @(negedge clk); s_sel = 0; s_req = '0;
  endtask

  task automatic run(input bit dir, input bit pkt, input int sd, input int loc,
                     input int len, input int cnt, input int sstr, input int lstr, output int cycles);
    int t0;
    wreg(DMA_R_SDLO, 16'(sd)); wreg(DMA_R_SDHI, 16'(sd >> 16)); wreg(DMA_R_LOCAL, 16'(loc));
    wreg(DMA_R_LEN, 16'(len)); wreg(DMA_R_PCOUNT, 16'(cnt)); wreg(DMA_R_STRIDE, 16'(sstr));
    wreg(DMA_R_LSTRIDE, 16'(lstr));
    wreg(DMA_R_CTRL, {13'b0, pkt, dir, 1'b1});
    while (!lock) @(posedge clk);
    t0 = cyc;
    while (dma_busy) @(posedge clk);
    cycles = cyc - t0;
  endtask

  initial begin
    int c;
    s_sel = 0; s_req = '0; m_rdata = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    wait (sd_init_done);
    for (int i = 0; i < 300; i++) lmem[16'h1000 + i] = 16'($urandom);
    // 300 words local -> SDRAM, crossing from bank 0 to bank 1 and to the next row
    run(1, 0, 'h0_0180, 'h1000, 300, 1, 0, 0, c);
    $display("block local->SDRAM 300 words: %0d cycles", c);
    // back into another local area
    run(0, 0, 'h0_0180, 'h2000, 300, 1, 0, 0, c);
    $display("block SDRAM->local 300 words: %0d cycles", c);
    for (int i = 0; i < 300; i++) begin
      checks++; if (lget('h2000 + i) !== lget('h1000 + i)) begin failures++; $display("block word %0d", i); end
    end
    // packet mode: 8 lines of 8 words, 22 words apart in SDRAM, 16 apart locally
    run(0, 1, 'h0_0180, 'h3000, 8, 8, 22, 16, c);
    $display("packet SDRAM->local 8x8: %0d cycles", c);
    for (int p = 0; p < 8; p++) for (int w = 0; w < 8; w++) begin
      checks++;
      if (lget('h3000 + p * 16 + w) !== lget('h1000 + p * 22 + w)) begin failures++; $display("pkt p%0d w%0d", p, w); end
    end
    run(1, 1, 'h5_0000, 'h3000, 8, 8, 176, 16, c);
    run(0, 0, 'h5_0000 + 176 * 3, 'h4000, 8, 1, 0, 0, c);
    for (int w = 0; w < 8; w++) begin
      checks++; if (lget('h4000 + w) !== lget('h3000 + 3 * 16 + w)) begin failures++; $display("pkt back w%0d", w); end
    end
    // one open row, no refresh due: about one cycle per word
    repeat (200) @(posedge clk);
    run(1, 0, 'h7_0000, 'h1000, 200, 1, 0, 0, c);
    $display("block local->SDRAM 200 words in one row: %0d cycles", c);
    checks++; if (c > 200 + 20) begin failures++; $display("too slow: %0d", c); end
    checks++; if (refs_in_xfer == 0) begin failures++; $display("no refresh during a transfer"); end
    checks++; if (errors != 0) begin failures++; $display("SDRAM protocol errors %0d", errors); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
