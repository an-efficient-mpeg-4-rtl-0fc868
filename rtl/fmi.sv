// fmi: frame memory interface. It joins the DMA controller (register file,
// SM controller, SASM/DASM address state machines) to the SDRAM controller
// (SYS_INI, refresh control, SDRAM_SM, SDRAM_SG, address mux, data path) and
// brings out the bus-side signals (slave port, master port, AREQ/GRANT/LOCK)
// and the SDRAM pins. The DMA hands words to the SDRAM controller with no
// buffer in between, so the SDRAM streams one word per clock inside open rows.
// The split into these two halves follows the document; the timing values are
// parameters of the SDRAM controller.
module fmi
  import codec_pkg::*;
#(
  parameter int unsigned CL           = 2,
  parameter int unsigned T_RCD        = 2,
  parameter int unsigned T_RP         = 2,
  parameter int unsigned T_RFC        = 3,
  parameter int unsigned INIT_WAIT    = 5400,
  parameter int unsigned REF_INTERVAL = 420
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        s_sel,
  input  bus_req_t    s_req,
  output logic [15:0] s_rdata,
  output logic        areq,
  input  logic        grant,
  output logic        lock,
  output bus_req_t    m_req,
  input  logic [15:0] m_rdata,
  output logic        dma_busy,
  output logic        dma_irq,
  output logic        sd_init_done,
  output logic        sd_refresh_tick,
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
  logic             req_valid, req_we, req_ready, rd_valid;
  logic [SD_AW-1:0] req_addr;
  logic [15:0]      req_wdata, rd_data;

  dma_ctrl u_dma (
    .clk, .rst_n, .s_sel, .s_req, .s_rdata, .areq, .grant, .lock, .m_req, .m_rdata,
    .sd_req_valid(req_valid), .sd_req_we(req_we), .sd_req_addr(req_addr),
    .sd_req_wdata(req_wdata), .sd_req_ready(req_ready), .sd_rd_valid(rd_valid),
    .sd_rd_data(rd_data), .busy(dma_busy), .irq(dma_irq)
  );

  sdram_ctrl #(.CL(CL), .T_RCD(T_RCD), .T_RP(T_RP), .T_RFC(T_RFC),
               .INIT_WAIT(INIT_WAIT), .REF_INTERVAL(REF_INTERVAL)) u_sdc (
    .clk, .rst_n, .req_valid, .req_we, .req_addr, .req_wdata, .req_ready,
    .rd_valid, .rd_data, .init_done(sd_init_done), .refresh_tick(sd_refresh_tick),
    .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_addr, .sd_dq_out, .sd_dq_oe, .sd_dq_in
  );
endmodule
