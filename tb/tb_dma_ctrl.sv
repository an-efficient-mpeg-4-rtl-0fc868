// tb_dma_ctrl: self-checking test of the DMA controller on its own. The
// testbench plays the RISC (register writes), the bus arbiter (grant after a
// random delay, held while AREQ or LOCK is high), a local memory with a
// one-cycle read latency, and the SDRAM controller's word port with random
// ready stalls and a fixed read latency. It runs block and packet transfers
// in both directions, compares every word with the source, checks the done
// flag and interrupt, and checks that with no stalls a block moves one word
// per cycle.
module tb_dma_ctrl;
  import codec_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic s_sel; bus_req_t s_req; logic [15:0] s_rdata;
  logic areq, grant, lock, busy, irq;
  bus_req_t m_req; logic [15:0] m_rdata;
  logic sd_req_valid, sd_req_we, sd_req_ready, sd_rd_valid;
  logic [SD_AW-1:0] sd_req_addr; logic [15:0] sd_req_wdata, sd_rd_data;
  int checks = 0, failures = 0, cyc = 0, irqs = 0;
  int stall_pct = 30;

  dma_ctrl dut (.*);

  logic [15:0] lmem [int];
  logic [15:0] smem [int];
  function automatic logic [15:0] lget(int a); return lmem.exists(a) ? lmem[a] : 16'(a * 3); endfunction
  function automatic logic [15:0] sget(int a); return smem.exists(a) ? smem[a] : 16'(a ^ 'h5a5a); endfunction

  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n && irq) irqs++;

  // arbiter
  always @(posedge clk) begin
    if (!rst_n) grant <= 0;
    else if (!grant && areq && ($urandom % 3 == 0)) grant <= 1;
    else if (grant && !areq && !lock) grant <= 0;
  end

  // local memory on the bus
  always @(posedge clk) if (rst_n && m_req.valid) begin
    if (m_req.write) lmem[int'(m_req.addr)] = m_req.wdata;
    else m_rdata <= lget(int'(m_req.addr));
  end

  // SDRAM word port: random stalls, 4-cycle read latency
  logic [15:0] rq_d [$]; int rq_t [$];
  always @(negedge clk) sd_req_ready <= ($urandom % 100) >= stall_pct;
  always @(posedge clk) begin
    sd_rd_valid <= 0;
    if (rst_n && sd_req_valid && sd_req_ready) begin
      if (sd_req_we) smem[int'(sd_req_addr)] = sd_req_wdata;
      else begin rq_d.push_back(sget(int'(sd_req_addr))); rq_t.push_back(cyc + 4); end
    end
    if (rq_t.size() > 0 && rq_t[0] <= cyc) begin
      sd_rd_valid <= 1; sd_rd_data <= rq_d.pop_front(); void'(rq_t.pop_front());
    end
  end

  task automatic wreg(input logic [3:0] r, input logic [15:0] d);
    @(negedge clk); s_sel = 1; s_req = '{valid: 1, write: 1, addr: MAP_DMA_BASE | 16'(r), wdata: d};
    @(negedge clk); s_sel = 0; s_req = '0;
  endtask

  task automatic rreg(input logic [3:0] r, output logic [15:0] d);
    @(negedge clk); s_sel = 1; s_req = '{valid: 1, write: 0, addr: MAP_DMA_BASE | 16'(r), wdata: 0};
    @(negedge clk); s_sel = 0; s_req = '0; d = s_rdata;
  endtask

  // run one transfer and compare
  task automatic xfer(input bit dir, input bit pkt, input int sd, input int loc,
                      input int len, input int cnt, input int sstr, input int lstr, output int cycles);
    logic [15:0] st; int t0, irq0;
    irq0 = irqs;
    wreg(DMA_R_SDLO, 16'(sd)); wreg(DMA_R_SDHI, 16'(sd >> 16)); wreg(DMA_R_LOCAL, 16'(loc));
    wreg(DMA_R_LEN, 16'(len)); wreg(DMA_R_PCOUNT, 16'(cnt)); wreg(DMA_R_STRIDE, 16'(sstr));
    wreg(DMA_R_LSTRIDE, 16'(lstr));
    wreg(DMA_R_CTRL, {13'b0, pkt, dir, 1'b1});
    t0 = cyc;
    while (!lock) @(posedge clk);
    t0 = cyc;
    while (busy) @(posedge clk);
    cycles = cyc - t0;
    rreg(DMA_R_CTRL, st);
    checks++; if (st[3] !== 1'b1 || st[0] !== 1'b0) begin failures++; $display("status %h", st); end
    checks++; if (irqs != irq0 + 1) begin failures++; $display("irq count %0d", irqs - irq0); end
    for (int p = 0; p < (pkt ? cnt : 1); p++)
      for (int w = 0; w < len; w++) begin
        int sa, la;
        sa = pkt ? sd + p * sstr + w : sd + w;
        la = pkt ? loc + p * lstr + w : loc + w;
        checks++;
        if (sget(sa) !== lget(la)) begin
          failures++; $display("dir%0d pkt%0d word p%0d w%0d: sdram %h local %h", dir, pkt, p, w, sget(sa), lget(la));
        end
      end
  endtask

  initial begin
    int c;
    s_sel = 0; s_req = '0; m_rdata = 0; sd_rd_data = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 64; i++) lmem[16'h100 + i] = 16'($urandom);
    xfer(1, 0, 'h12345, 'h100, 40, 1, 0, 0, c);            // local -> SDRAM, block
    xfer(0, 0, 'h12345, 'h800, 40, 1, 0, 0, c);            // SDRAM -> local, block
    xfer(0, 1, 'h20000, 'h900, 6, 5, 100, 8, c);           // SDRAM -> local, packets
    xfer(1, 1, 'h30000, 'h900, 6, 5, 176, 8, c);           // local -> SDRAM, packets
    // no stalls: one word per cycle plus a few cycles of latency
    stall_pct = 0;
    xfer(1, 0, 'h40000, 'h100, 64, 1, 0, 0, c);
    checks++; if (c > 64 + 3) begin failures++; $display("local->SDRAM 64 words took %0d cycles", c); end
    xfer(0, 0, 'h40000, 'hA00, 64, 1, 0, 0, c);
    checks++; if (c > 64 + 8) begin failures++; $display("SDRAM->local 64 words took %0d cycles", c); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
