// mpeg4_codec: top level of the low-power MPEG-4 video codec (QCIF at
// 30 frames/s or CIF at 7.5 frames/s, encoding and decoding, at 27 MHz).
//
// A RISC processor (outside this module) and dedicated engines, each with its
// own local memory, share one 16-bit system bus. Only the frame memory
// interface (FMI) moves data between the local memories and the external
// 16 Mbit SDRAM; its DMA controller takes the bus from the RISC through the
// bus arbiter (AREQ/GRANT/LOCK) and moves one word per clock without a
// buffer. The macroblock (MB) scheduler cuts each 900,000-cycle frame into
// fixed 4,500-cycle encoding and 3,600-cycle decoding slots; its first
// encoding stage (MEC) starts the mixed motion estimator on every MB slot,
// its second (MEF/MC) starts the fine search and motion compensation, its
// third (DCTQ/IDCTQ) one transform/quantisation block, and the decoder's
// second stage (MC, IQ/IDCT) starts motion compensation alone and one
// IQ/IDCT block; the last stage of each pipeline (REC/SP, REC/DB) starts
// one reconstruction block. The firmware restarts the DCTQ and REC engines
// through their control registers for the remaining blocks of the MB.
//
// Contents: mb_scheduler; bus_arbiter; bus_decoder; fmi (dma_ctrl +
// sdram_ctrl); me_mixed (the coarse/skip motion estimator); mef_mc (fine
// motion estimation, compensation and half-resolution data); dctq (8x8
// DCT, quantisation, inverse quantisation and IDCT); rec (prediction plus
// residual, clipped); two local
// buffers (OF_BUF 1024x16 and OS_BUF 4096x16); and the RISC's 32 kB code and
// data memory (16K x 16), reached through its own port, not the system bus.
// Ports: the RISC's bus master port (risc_req, risc_rdata, risc_ready: a
// request is taken only while risc_ready is high), the RISC's memory port,
// an expansion slave port (ext_*) at 0x8000-0xFFFF for the local buffers of
// the engines that are not part of this RTL (VLC, VLD, AC/DC
// prediction, de-blocking, VIM, VOM, ISC, SP, HIF), the scheduler's frame,
// slot and stage strobes, the interrupts and the SDRAM pins (with a split
// data bus: sd_dq_out/sd_dq_oe/sd_dq_in for an external tri-state pad).
// Bus map: OF_BUF 0x4000, OS_BUF 0x5000, motion estimator 0x6000, fine
// estimator / compensation 0x6400, DCT/Q engine 0x6800, reconstruction
// 0x6C00, DMA registers 0x7000, expansion 0x8000. The block set follows the document's
// block diagram; the bus map, the buffer sizes and the port split are this
// design's own choices.
module mpeg4_codec
  import codec_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sched_enable,
  // RISC bus master port
  input  bus_req_t    risc_req,
  output logic [15:0] risc_rdata,
  output logic        risc_ready,
  // RISC code and data memory port
  input  bus_req_t    cdm_req,
  output logic [15:0] cdm_rdata,
  // expansion slave port
  output logic        ext_sel,
  output bus_req_t    ext_req,
  input  logic [15:0] ext_rdata,
  // interrupts and status
  output logic        dma_irq,
  output logic        dma_busy,
  output logic        me_done,
  output logic        me_skipped,
  output logic signed [3:0] me_mv_x,
  output logic signed [3:0] me_mv_y,
  output logic [13:0] me_sad,
  output logic        mef_done,
  output logic signed [6:0] mef_mv_hx,
  output logic signed [6:0] mef_mv_hy,
  output logic        dctq_done,
  output logic        rec_done,
  output logic        sd_init_done,
  // MB scheduler strobes
  output logic        vsync,
  output logic        enc_frame_start,
  output logic        dec_frame_start,
  output logic        enc_mb_start,
  output logic        dec_mb_start,
  output logic [8:0]  enc_slot,
  output logic [8:0]  dec_slot,
  output logic [4:0]  frame_no,
  output logic [3:0]  enc_stage_start,
  output logic [3:0][8:0] enc_stage_mb,
  output logic [2:0]  dec_stage_start,
  output logic [2:0][8:0] dec_stage_mb,
  // SDRAM pins
  output logic        sd_cs_n,
  output logic        sd_ras_n,
  output logic        sd_cas_n,
  output logic        sd_we_n,
  output logic [SD_BANK_W-1:0] sd_ba,
  output logic [SD_ROW_W-1:0]  sd_addr,
  output logic [15:0] sd_dq_out,
  output logic        sd_dq_oe,
  input  logic [15:0] sd_dq_in
);
  localparam int unsigned NS = 8;
  localparam int unsigned S_OF = 0, S_OS = 1, S_ME = 2, S_DMA = 3, S_EXT = 4, S_MEF = 5, S_DCTQ = 6,
                          S_REC = 7;
  localparam logic [NS-1:0][15:0] MAP_BASE =
    {MAP_REC_BASE, MAP_DCTQ_BASE, MAP_MEF_BASE, MAP_EXT_BASE, MAP_DMA_BASE, MAP_ME_BASE, MAP_OSBUF_BASE, MAP_OFBUF_BASE};
  localparam logic [NS-1:0][15:0] MAP_MASK =
    {MAP_REC_MASK, MAP_DCTQ_MASK, MAP_MEF_MASK, MAP_EXT_MASK, MAP_DMA_MASK, MAP_ME_MASK, MAP_OSBUF_MASK, MAP_OFBUF_MASK};

  bus_req_t            bus_req, dma_req;
  logic [NS-1:0]       sel;
  logic [NS-1:0][15:0] srd;
  logic [15:0]         bus_rdata;
  logic                areq, grant, lock;

  // MB scheduler
  mb_scheduler u_sched (
    .clk, .rst_n, .enable(sched_enable), .vsync, .enc_frame_start, .dec_frame_start,
    .enc_mb_start, .enc_slot, .dec_mb_start, .dec_slot,
    .enc_stage_start, .enc_stage_mb, .dec_stage_start, .dec_stage_mb, .frame_no
  );

  // system bus
  bus_arbiter u_arb (
    .clk, .rst_n, .areq, .lock, .grant, .risc_req, .risc_ready, .dma_req, .bus_req
  );
  bus_decoder #(.NS(NS), .BASE(MAP_BASE), .MASK(MAP_MASK)) u_dec (
    .clk, .rst_n, .bus_req, .sel, .slave_rdata(srd), .rdata(bus_rdata)
  );
  assign risc_rdata = bus_rdata;

  // frame memory interface
  fmi u_fmi (
    .clk, .rst_n, .s_sel(sel[S_DMA]), .s_req(bus_req), .s_rdata(srd[S_DMA]),
    .areq, .grant, .lock, .m_req(dma_req), .m_rdata(bus_rdata),
    .dma_busy, .dma_irq, .sd_init_done, .sd_refresh_tick(),
    .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_addr, .sd_dq_out, .sd_dq_oe, .sd_dq_in
  );

  // mixed motion estimator, started by the MEC stage of each encoding slot
  me_mixed u_me (
    .clk, .rst_n, .s_sel(sel[S_ME]), .s_req(bus_req), .s_rdata(srd[S_ME]),
    .start(enc_stage_start[0]), .busy(), .done(me_done),
    .mv_x(me_mv_x), .mv_y(me_mv_y), .sad(me_sad), .skipped(me_skipped)
  );

  // fine motion estimation and compensation: encoder stage 2 searches,
  // decoder stage 2 only compensates
  mef_mc u_mef (
    .clk, .rst_n, .s_sel(sel[S_MEF]), .s_req(bus_req), .s_rdata(srd[S_MEF]),
    .start(enc_stage_start[1]), .mc_start(dec_stage_start[1]), .busy(), .done(mef_done),
    .mv_hx(mef_mv_hx), .mv_hy(mef_mv_hy), .sad()
  );

  // DCT/Q engine: encoder stage 3 runs DCT-Q-IQ-IDCT, decoder stage 2 IQ-IDCT
  dctq u_dctq (
    .clk, .rst_n, .s_sel(sel[S_DCTQ]), .s_req(bus_req), .s_rdata(srd[S_DCTQ]),
    .start(enc_stage_start[2]), .dec_start(dec_stage_start[1]), .busy(), .done(dctq_done)
  );

  // reconstruction: last stage of the encoder (REC/SP) and of the decoder (REC/DB)
  rec u_rec (
    .clk, .rst_n, .s_sel(sel[S_REC]), .s_req(bus_req), .s_rdata(srd[S_REC]),
    .start(enc_stage_start[3] || dec_stage_start[2]), .busy(), .done(rec_done)
  );

  // local buffers
  local_mem #(.DEPTH(1024)) u_of_buf (.clk, .sel(sel[S_OF]), .bus_req, .rdata(srd[S_OF]));
  local_mem #(.DEPTH(4096)) u_os_buf (.clk, .sel(sel[S_OS]), .bus_req, .rdata(srd[S_OS]));

  // expansion port for the other engines' buffers
  assign ext_sel    = sel[S_EXT] && bus_req.valid;
  assign ext_req    = bus_req;
  assign srd[S_EXT] = ext_rdata;

  // RISC code and data memory (32 kB)
  local_mem #(.DEPTH(16384)) u_cdm (.clk, .sel(1'b1), .bus_req(cdm_req), .rdata(cdm_rdata));

endmodule
