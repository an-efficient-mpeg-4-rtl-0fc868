// tb_mpeg4_codec: end-to-end test of the codec top at its default sizes over
// one full 900,000-cycle frame period (QCIF, 30 frames/s at 27 MHz).
// The testbench plays the RISC on the system bus and drives the behavioural
// SDRAM model on the SDRAM pins. It:
//  1. waits for the SDRAM power-up sequence;
//  2. writes a 24x24 half-resolution reference window into OS_BUF and an 8x8
//     current block into OF_BUF, and has the DMA store both in SDRAM (the
//     window in packet mode, one packet per line of a 44-word frame line);
//     the RISC's own bus accesses during a transfer must stall;
//  3. has the DMA load the window and the block from SDRAM into the motion
//     estimator's memories (packet mode into the row-aligned window memory,
//     block mode for the block), timing each load against the 4,500-cycle
//     encoding slot;
//  4. enables the MB scheduler: every MEC stage start runs the estimator,
//     first in normal mode (bad prediction, zero threshold), then in skip
//     mode (right prediction, high threshold); every result is compared with
//     the testbench's own SAD search and must arrive inside its slot;
//  4b. every MEF/MC stage start runs the fine search on a smooth patch with
//     a known one-pixel shift, and every decoder MC stage start runs
//     compensation alone; both vectors are checked, inside their slots;
//  4c. every DCTQ/IDCTQ stage start encodes a block in the DCT/Q engine and
//     every decoder IQ/IDCT stage start decodes its levels; at the end the
//     decoder's reconstruction must equal the encoder's;
//  4d. every REC/SP and REC/DB stage start runs the reconstruction engine;
//     at the end the fine estimator's prediction and the DCT/Q engine's
//     residual are moved into it and the rebuilt pixels are checked;
//  5. checks the frame's strobes (105 encoding and 118 decoding slots, 99 MBs
//     per stage), the estimator's block and skip counters, the expansion port
//     and the RISC code/data memory, and that the SDRAM model saw no protocol
//     error. Each mechanism (both DMA directions, block and packet mode, RISC
//     stall, SDRAM refresh and row miss, skip and normal mode, encode and
//     decode stages, fine search, compensation only, DCTQ encoding and
//     decoding blocks, both reconstructions) must occur at least once.
module tb_mpeg4_codec;
  import codec_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sched_enable;
  bus_req_t risc_req, cdm_req, ext_req;
  logic [15:0] risc_rdata, cdm_rdata, ext_rdata;
  logic risc_ready, ext_sel, dma_irq, dma_busy, me_done, me_skipped, sd_init_done;
  logic signed [3:0] me_mv_x, me_mv_y; logic [13:0] me_sad;
  logic mef_done; logic signed [6:0] mef_mv_hx, mef_mv_hy;
  logic dctq_done, rec_done;
  logic vsync, enc_frame_start, dec_frame_start, enc_mb_start, dec_mb_start;
  logic [8:0] enc_slot, dec_slot; logic [4:0] frame_no;
  logic [3:0] enc_stage_start; logic [3:0][8:0] enc_stage_mb;
  logic [2:0] dec_stage_start; logic [2:0][8:0] dec_stage_mb;
  logic sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe;
  logic [0:0] sd_ba; logic [10:0] sd_addr; logic [15:0] sd_dq_out, sd_dq_in;
  int errors, n_act, n_pre, n_ref, n_rd, n_wr;

  mpeg4_codec dut (.*);
  sdram_model mdl (.clk, .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n), .we_n(sd_we_n),
    .ba(sd_ba), .addr(sd_addr), .dq_in(sd_dq_out), .dq_oe(sd_dq_oe), .dq_out(sd_dq_in),
    .errors, .n_act, .n_pre, .n_ref, .n_rd, .n_wr);

  int checks = 0, failures = 0, cyc = 0;
  // mechanism counters
  int m_l2s = 0, m_s2l = 0, m_block = 0, m_packet = 0, m_stall = 0, m_refresh = 0, m_rowmiss = 0;
  int m_skip = 0, m_normal = 0, m_enc = 0, m_dec = 0, m_ext = 0, m_cdm = 0, m_mef = 0, m_mc = 0, m_dct = 0, m_idct = 0, m_rec_enc = 0, m_rec_dec = 0;

  task automatic expect_eq(input string what, input int got, input int want);
    checks++;
    if (got != want) begin failures++; if (failures < 20) $display("%s: got %0d want %0d", what, got, want); end
  endtask

  always @(posedge clk) cyc++;
  int n_irq = 0;
  always @(posedge clk) if (rst_n && dma_irq) n_irq++;

  // expansion port: a slave that answers ~addr one cycle later
  always @(posedge clk) if (ext_sel && !ext_req.write) ext_rdata <= ~ext_req.addr;

  // ---- RISC bus access ----
  task automatic bus_wr(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk); risc_req = '{valid: 1, write: 1, addr: a, wdata: d};
    while (!risc_ready) begin m_stall++; @(negedge clk); end
    @(negedge clk); risc_req = '0;
  endtask
  task automatic bus_rd(input logic [15:0] a, output logic [15:0] d);
    @(negedge clk); risc_req = '{valid: 1, write: 0, addr: a, wdata: 0};
    while (!risc_ready) begin m_stall++; @(negedge clk); end
    @(negedge clk); risc_req = '0; d = risc_rdata;
  endtask

  // program and start one DMA transfer; returns without waiting
  task automatic dma_start(input bit dir, input bit pkt, input int sd, input int loc,
                           input int len, input int cnt, input int sstr, input int lstr);
    logic [15:0] b; b = MAP_DMA_BASE;
    bus_wr(b | 16'(DMA_R_SDLO), 16'(sd)); bus_wr(b | 16'(DMA_R_SDHI), 16'(sd >> 16));
    bus_wr(b | 16'(DMA_R_LOCAL), 16'(loc)); bus_wr(b | 16'(DMA_R_LEN), 16'(len));
    bus_wr(b | 16'(DMA_R_PCOUNT), 16'(cnt)); bus_wr(b | 16'(DMA_R_STRIDE), 16'(sstr));
    bus_wr(b | 16'(DMA_R_LSTRIDE), 16'(lstr));
    bus_wr(b | 16'(DMA_R_CTRL), {13'b0, pkt, dir, 1'b1});
    if (dir) m_l2s++; else m_s2l++;
    if (pkt) m_packet++; else m_block++;
  endtask
  task automatic dma_wait(output int cycles);
    int t0; t0 = cyc;
    while (dma_busy) @(posedge clk);
    cycles = cyc - t0;
  endtask

  // ---- picture data ----
  localparam int PITCH = 44;               // words per half-resolution QCIF line (88 pixels)
  localparam int SD_REF = 'h0_1000, SD_CUR = 'h1_0000;
  logic [7:0] win [24][24];
  logic [7:0] blk [8][8];
  int ox = 5, oy = -3;
  int best, bx, by, ps_true;

  function automatic int sad_at(int dx, int dy);
    int s = 0;
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) begin
      int d; d = int'(blk[y][x]) - int'(win[y + 8 + dy][x + 8 + dx]); s += (d < 0) ? -d : d;
    end
    return s;
  endfunction

  // ---- estimator results, checked on every done ----
  bit exp_skip_mode = 0;
  int me_runs = 0, t_mec = 0;
  always @(posedge clk) if (rst_n && enc_stage_start[0]) t_mec = cyc;
  always @(posedge clk) if (rst_n && me_done) begin
    me_runs++;
    checks++;
    if (cyc - t_mec > 4500) begin failures++; $display("estimation overran its slot: %0d cycles", cyc - t_mec); end
    if (me_skipped) m_skip++; else m_normal++;
    checks++;
    if (exp_skip_mode) begin
      if (!me_skipped || int'(me_mv_x) != ox || int'(me_mv_y) != oy || int'(me_sad) != ps_true) begin
        failures++; $display("skip run: skip%0d (%0d,%0d) sad %0d", me_skipped, me_mv_x, me_mv_y, me_sad);
      end
    end else begin
      if (me_skipped || int'(me_mv_x) != bx || int'(me_mv_y) != by || int'(me_sad) != best) begin
        failures++; $display("normal run: skip%0d (%0d,%0d) sad %0d want (%0d,%0d) %0d", me_skipped, me_mv_x, me_mv_y, me_sad, bx, by, best);
      end
    end
  end

  // ---- fine estimation (encoder stage 2) and compensation (decoder stage 2) ----
  // The patch is a smooth picture and the current MB is the patch moved by
  // (+1,-1) pixels, with coarse vector (1,-1): the search must return
  // (4*1+2, 4*-1-2) half-pels; compensation only, with offset (1,1), returns
  // (4*1+1, 4*-1+1).
  logic [7:0] pat [20][20];
  bit last_mc_only = 0;
  int t_mef = 0;
  always @(posedge clk) if (rst_n && enc_stage_start[1]) begin t_mef = cyc; last_mc_only = 0; end
  always @(posedge clk) if (rst_n && dec_stage_start[1]) begin t_mef = cyc; last_mc_only = 1; end
  always @(posedge clk) if (rst_n && mef_done) begin
    checks++;
    if (cyc - t_mef > (last_mc_only ? 3600 : 4500)) begin failures++; $display("MEF/MC overran its slot"); end
    checks++;
    if (last_mc_only) begin
      m_mc++;
      if (int'(mef_mv_hx) != 5 || int'(mef_mv_hy) != -3) begin
        failures++; $display("compensation vector (%0d,%0d)", mef_mv_hx, mef_mv_hy);
      end
    end else begin
      m_mef++;
      if (int'(mef_mv_hx) != 6 || int'(mef_mv_hy) != -6) begin
        failures++; $display("fine search vector (%0d,%0d)", mef_mv_hx, mef_mv_hy);
      end
    end
  end

  // ---- DCT/Q engine: encoder stage 3 and decoder stage 2 ----
  bit last_dec_dct = 0, dct_manual = 0;
  int t_dct = 0;
  always @(posedge clk) if (rst_n && enc_stage_start[2]) begin t_dct = cyc; last_dec_dct = 0; end
  always @(posedge clk) if (rst_n && dec_stage_start[1]) begin t_dct = cyc; last_dec_dct = 1; end
  always @(posedge clk) if (rst_n && dctq_done && !dct_manual) begin
    checks++;
    if (cyc - t_dct > (last_dec_dct ? 3600 : 4500)) begin failures++; $display("DCTQ overran its slot"); end
    if (last_dec_dct) m_idct++; else m_dct++;
  end

  // ---- reconstruction: encoder stage 4 and decoder stage 3 ----
  bit last_dec_rec = 0, rec_manual = 0;
  int t_rec = 0;
  always @(posedge clk) if (rst_n && enc_stage_start[3]) begin t_rec = cyc; last_dec_rec = 0; end
  always @(posedge clk) if (rst_n && dec_stage_start[2]) begin t_rec = cyc; last_dec_rec = 1; end
  always @(posedge clk) if (rst_n && rec_done && !rec_manual) begin
    checks++;
    if (cyc - t_rec > (last_dec_rec ? 3600 : 4500)) begin failures++; $display("REC overran its slot"); end
    if (last_dec_rec) m_rec_dec++; else m_rec_enc++;
  end

  // ---- frame strobes ----
  int n_vs = 0, n_enc_slot = 0, n_dec_slot = 0, n_es [4], n_ds [3];
  initial begin n_es = '{default: 0}; n_ds = '{default: 0}; end
  always @(posedge clk) if (rst_n) begin
    if (vsync) n_vs++;
    if (n_vs == 1 || (vsync && n_vs == 0)) begin
    if (enc_mb_start) n_enc_slot++;
    if (dec_mb_start) n_dec_slot++;
    for (int s = 0; s < 4; s++) if (enc_stage_start[s]) begin n_es[s]++; m_enc++; end
    for (int s = 0; s < 3; s++) if (dec_stage_start[s]) begin n_ds[s]++; m_dec++; end
    end
  end

  initial begin
    int c, pre0; logic [15:0] d;
    risc_req = '0; cdm_req = '0; ext_rdata = 0; sched_enable = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    wait (sd_init_done);
    pre0 = n_pre;

    // picture data and the testbench's own search
    for (int y = 0; y < 24; y++) for (int x = 0; x < 24; x++) win[y][x] = 8'($urandom);
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) blk[y][x] = win[y + 8 + oy][x + 8 + ox] ^ 8'($urandom % 4);
    best = 1 << 30;
    for (int dy = -8; dy < 8; dy++) for (int dx = -8; dx < 8; dx++) begin
      int s; s = sad_at(dx, dy); if (s < best) begin best = s; bx = dx; by = dy; end
    end
    ps_true = sad_at(ox, oy);

    // 2. RISC fills the buffers; DMA stores them in SDRAM
    for (int y = 0; y < 24; y++) for (int w = 0; w < 12; w++)
      bus_wr(MAP_OSBUF_BASE + 16'(y * 12 + w), {win[y][2*w+1], win[y][2*w]});
    for (int y = 0; y < 8; y++) for (int w = 0; w < 4; w++)
      bus_wr(MAP_OFBUF_BASE + 16'(y * 4 + w), {blk[y][2*w+1], blk[y][2*w]});
    dma_start(1, 1, SD_REF, MAP_OSBUF_BASE, 12, 24, PITCH, 12);
    for (int i = 0; i < 4; i++) begin   // the later reads stall behind the DMA
      bus_rd(MAP_OFBUF_BASE + 16'(i), d);
      expect_eq("OF_BUF read during DMA", int'(d), int'({blk[0][2*i+1], blk[0][2*i]}));
    end
    dma_wait(c);
    dma_start(1, 0, SD_CUR, MAP_OFBUF_BASE, 32, 1, 0, 0);
    dma_wait(c);

    // 3. DMA loads the estimator's memories from SDRAM
    dma_start(0, 1, SD_REF, MAP_ME_BASE | 16'h200, 12, 24, PITCH, 16);
    dma_wait(c);
    $display("reference window load (288 words, packet mode): %0d cycles", c);
    checks++; if (c > 4500) begin failures++; $display("window load overran the slot"); end
    dma_start(0, 0, SD_CUR, MAP_ME_BASE, 32, 1, 0, 0);
    dma_wait(c);
    $display("current block load (32 words, block mode): %0d cycles", c);
    checks++; if (c > 4500) begin failures++; $display("block load overran the slot"); end
    m_rowmiss = n_pre - pre0 - n_ref;   // precharges not caused by refresh

    // fine estimator memories, loaded by the RISC
    for (int y = 0; y < 20; y++) for (int x = 0; x < 20; x++) pat[y][x] = 8'(10 + 3 * x + 2 * y + (x * y) % 7);
    for (int y = 0; y < 20; y++) for (int w = 0; w < 10; w++)
      bus_wr(MAP_MEF_BASE + 16'(y * 16 + w), {pat[y][2*w+1], pat[y][2*w]});
    for (int y = 0; y < 16; y++) for (int w = 0; w < 8; w++)
      bus_wr(MAP_MEF_BASE + 16'h180 + 16'(y * 8 + w), {pat[y + 1][2*w + 4], pat[y + 1][2*w + 3]});
    bus_wr(MAP_MEF_BASE + 16'h201, {8'b0, 4'(-1), 4'(1)});
    bus_wr(MAP_MEF_BASE + 16'h202, {8'b0, 4'(1), 4'(1)});

    // DCT/Q engine: one inter block at QP 6
    bus_wr(MAP_DCTQ_BASE + 16'h0C1, 16'd6);
    bus_wr(MAP_DCTQ_BASE + 16'h0C0, 16'd0);
    for (int p = 0; p < 64; p++) bus_wr(MAP_DCTQ_BASE + 16'(p), 16'((p * 37) % 101 - 50));

    // 4. normal mode first
    bus_wr(MAP_ME_BASE | 16'(ME_R_PMV), {8'b0, 4'(-8), 4'(7)});
    bus_wr(MAP_ME_BASE | 16'(ME_R_THR), 16'd0);
    @(negedge clk); sched_enable = 1;
    wait (me_runs == 2);
    // switch to skip mode between two estimations
    @(negedge clk);
    exp_skip_mode = 1;
    bus_wr(MAP_ME_BASE | 16'(ME_R_PMV), {8'b0, 4'(oy), 4'(ox)});
    bus_wr(MAP_ME_BASE | 16'(ME_R_THR), 16'(ps_true + 1));

    // expansion port and code/data memory
    bus_wr(16'h9234, 16'h0);
    bus_rd(16'h9234, d);
    expect_eq("expansion read", int'(d), 'h6DCB); m_ext++;
    @(negedge clk); cdm_req = '{valid: 1, write: 1, addr: 16'h2345, wdata: 16'hBEEF};
    @(negedge clk); cdm_req = '{valid: 1, write: 0, addr: 16'h2345, wdata: 0};
    @(negedge clk); cdm_req = '0;
    expect_eq("code/data memory", int'(cdm_rdata), 'hBEEF); m_cdm++;

    // 5. rest of the frame
    wait (n_vs == 2);
    repeat (5) @(posedge clk);
    m_refresh = n_ref;
    expect_eq("encoding slots", n_enc_slot, 105);
    expect_eq("decoding slots", n_dec_slot, 118);
    for (int s = 0; s < 4; s++) expect_eq("encoding stage MBs", n_es[s], 99);
    for (int s = 0; s < 3; s++) expect_eq("decoding stage MBs", n_ds[s], 99);
    expect_eq("estimations", me_runs, 99);
    bus_rd(MAP_ME_BASE | 16'(ME_R_NBLK), d);  expect_eq("estimator block counter", int'(d), 99);
    bus_rd(MAP_ME_BASE | 16'(ME_R_NSKIP), d); expect_eq("estimator skip counter", int'(d), m_skip);
    expect_eq("SDRAM protocol errors", errors, 0);
    expect_eq("DMA interrupts", n_irq, 4);
    expect_eq("fine searches", m_mef, 99);
    expect_eq("compensations", m_mc, 99);
    expect_eq("DCTQ encoding blocks", m_dct, 99);
    expect_eq("DCTQ decoding blocks", m_idct, 99);
    // the last run decoded the encoder's levels: it must rebuild exactly what
    // an encoding run rebuilds
    begin
      logic [15:0] rdec [64];
      logic [15:0] pr_words [32];
      int nz = 0;
      for (int p = 0; p < 64; p++) bus_rd(MAP_DCTQ_BASE + 16'h080 + 16'(p), rdec[p]);
      dct_manual = 1;
      bus_wr(MAP_DCTQ_BASE + 16'h0C0, 16'd1);
      wait (dctq_done); @(posedge clk);
      for (int p = 0; p < 64; p++) begin
        bus_rd(MAP_DCTQ_BASE + 16'h080 + 16'(p), d);
        expect_eq("decoder and encoder reconstruction", int'(d), int'(rdec[p]));
        bus_rd(MAP_DCTQ_BASE + 16'h040 + 16'(p), d);
        if (d != 0) nz++;
      end
      checks++; if (nz == 0) begin failures++; $display("all levels zero"); end
      // reconstruction of the first 8x8 block of the MB: the fine estimator's
      // prediction plus the DCT/Q engine's reconstructed residual, clipped
      rec_manual = 1;
      for (int p = 0; p < 64; p++) bus_wr(MAP_REC_BASE + 16'h040 + 16'(p), rdec[p]);
      for (int y = 0; y < 8; y++) for (int w = 0; w < 4; w++) begin
        bus_rd(MAP_MEF_BASE + 16'h300 + 16'(y * 8 + w), d);
        bus_wr(MAP_REC_BASE + 16'(y * 4 + w), d);
        pr_words[y * 4 + w] = d;
      end
      bus_wr(MAP_REC_BASE + 16'h0C0, 16'd1);
      wait (rec_done); @(posedge clk);
      for (int y = 0; y < 8; y++) for (int w = 0; w < 4; w++) begin
        int s0, s1;
        s0 = int'(pr_words[y * 4 + w][7:0])  + int'(signed'(rdec[y * 8 + 2 * w]));
        s1 = int'(pr_words[y * 4 + w][15:8]) + int'(signed'(rdec[y * 8 + 2 * w + 1]));
        s0 = (s0 < 0) ? 0 : (s0 > 255) ? 255 : s0;
        s1 = (s1 < 0) ? 0 : (s1 > 255) ? 255 : s1;
        bus_rd(MAP_REC_BASE + 16'h080 + 16'(y * 4 + w), d);
        expect_eq("reconstructed pixels", int'(d), s1 * 256 + s0);
      end
    end
    expect_eq("REC encoder blocks", m_rec_enc, 99);
    expect_eq("REC decoder blocks", m_rec_dec, 99);

    $display("mechanisms: l2s=%0d s2l=%0d block=%0d packet=%0d stall=%0d refresh=%0d rowmiss=%0d skip=%0d normal=%0d enc=%0d dec=%0d ext=%0d cdm=%0d mef=%0d mc=%0d dct=%0d idct=%0d rec_enc=%0d rec_dec=%0d",
             m_l2s, m_s2l, m_block, m_packet, m_stall, m_refresh, m_rowmiss, m_skip, m_normal, m_enc, m_dec, m_ext, m_cdm, m_mef, m_mc, m_dct, m_idct, m_rec_enc, m_rec_dec);
    checks++; if (m_l2s == 0)     begin failures++; $display("no local->SDRAM transfer"); end
    checks++; if (m_s2l == 0)     begin failures++; $display("no SDRAM->local transfer"); end
    checks++; if (m_block == 0)   begin failures++; $display("no block mode transfer"); end
    checks++; if (m_packet == 0)  begin failures++; $display("no packet mode transfer"); end
    checks++; if (m_stall == 0)   begin failures++; $display("RISC never stalled"); end
    checks++; if (m_refresh == 0) begin failures++; $display("no refresh"); end
    checks++; if (m_rowmiss <= 0) begin failures++; $display("no row miss"); end
    checks++; if (m_skip == 0)    begin failures++; $display("no skip-mode estimation"); end
    checks++; if (m_normal == 0)  begin failures++; $display("no normal-mode estimation"); end
    checks++; if (m_enc == 0)     begin failures++; $display("no encoding stage"); end
    checks++; if (m_dec == 0)     begin failures++; $display("no decoding stage"); end
    checks++; if (m_mef == 0)     begin failures++; $display("no fine search"); end
    checks++; if (m_mc == 0)      begin failures++; $display("no compensation-only run"); end
    checks++; if (m_dct == 0)     begin failures++; $display("no DCTQ encoding block"); end
    checks++; if (m_idct == 0)    begin failures++; $display("no DCTQ decoding block"); end
    checks++; if (m_rec_enc == 0) begin failures++; $display("no encoder reconstruction"); end
    checks++; if (m_rec_dec == 0) begin failures++; $display("no decoder reconstruction"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
