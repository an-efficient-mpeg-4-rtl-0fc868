// dma_ctrl: DMA controller of the frame memory interface (FMI). It is the only
// path between the local memories on the system bus and the external SDRAM.
//
// Slave mode: the RISC writes the registers (DMA register + register decoder)
// with the SDRAM address, the local bus address, the length, the direction and
// the mode, then writes the start bit. Master mode: the SM controller raises
// AREQ, waits for GRANT from the bus arbiter, raises LOCK and moves words until
// the count runs out, then drops LOCK and AREQ, flags done and raises `irq` for
// one cycle, and goes back to slave mode (the sequence of the document's
// write/read flow). SASM walks the source addresses and DASM the destination
// addresses; the MUX routes them to the SDRAM side or to the bus according to
// the direction.
//
// No data buffer: each word crosses in one bus transaction.
//  - SDRAM -> local: read commands stream to the SDRAM controller; every word
//    that comes back (rd_valid) is written on the bus in that same cycle.
//  - local -> SDRAM: the bus read of word n+1 is presented in the same cycle
//    that word n, sitting in the local memory's output register, is handed to
//    the SDRAM controller. If the controller is not ready, the same address is
//    presented again, so the memory's output register is the only storage.
// Either way a transfer inside open rows moves one word per clock, half the
// bus cycles of a buffered two-transaction DMA.
// Block mode moves `len` contiguous words. Packet mode moves `pcount` packets
// of `len` words; the SDRAM address of each packet starts `stride` words after
// the previous one and the local address `lstride` words after the previous
// one (e.g. a block cut out of a frame line by line into a row-aligned local
// memory). The register layout, the stride reading of packet mode
// and the one-word-per-clock flyby scheme are this design's own choices.
module dma_ctrl
  import codec_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // slave port (register access)
  input  logic             s_sel,
  input  bus_req_t         s_req,
  output logic [15:0]      s_rdata,
  // master port and arbitration
  output logic             areq,
  input  logic             grant,
  output logic             lock,
  output bus_req_t         m_req,
  input  logic [15:0]      m_rdata,
  // SDRAM controller word interface
  output logic             sd_req_valid,
  output logic             sd_req_we,
  output logic [SD_AW-1:0] sd_req_addr,
  output logic [15:0]      sd_req_wdata,
  input  logic             sd_req_ready,
  input  logic             sd_rd_valid,
  input  logic [15:0]      sd_rd_data,
  output logic             busy,
  output logic             irq
);
  typedef enum logic [2:0] {ST_IDLE, ST_LOAD, ST_REQ, ST_XFER, ST_DONE} state_e;
  state_e state;

  // DMA registers
  logic [SD_AW-1:0] r_sdaddr;
  logic [15:0]      r_local, r_len, r_pcount, r_stride, r_lstride;
  dma_dir_e         r_dir;
  logic             r_pkt, r_done;

  logic wr_reg, start;
  assign wr_reg = s_sel && s_req.valid && s_req.write;
  assign start  = wr_reg && (s_req.addr[3:0] == DMA_R_CTRL) && s_req.wdata[0] && (state == ST_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_sdaddr <= '0; r_local <= '0; r_len <= 16'd1; r_pcount <= 16'd1; r_stride <= '0; r_lstride <= '0;
      r_dir <= DIR_SD2LOC; r_pkt <= 1'b0; s_rdata <= '0;
    end else begin
      if (wr_reg && state == ST_IDLE) begin
        unique case (s_req.addr[3:0])
          DMA_R_CTRL:   begin r_dir <= dma_dir_e'(s_req.wdata[1]); r_pkt <= s_req.wdata[2]; end
          DMA_R_SDLO:   r_sdaddr[15:0] <= s_req.wdata;
          DMA_R_SDHI:   r_sdaddr[SD_AW-1:16] <= s_req.wdata[SD_AW-17:0];
          DMA_R_LOCAL:  r_local  <= s_req.wdata;
          DMA_R_LEN:    r_len    <= s_req.wdata;
          DMA_R_PCOUNT: r_pcount <= s_req.wdata;
          DMA_R_STRIDE: r_stride <= s_req.wdata;
          DMA_R_LSTRIDE: r_lstride <= s_req.wdata;
          default: ;
        endcase
      end
      if (s_sel && s_req.valid && !s_req.write) begin
        unique case (s_req.addr[3:0])
          DMA_R_CTRL:   s_rdata <= {12'b0, r_done, r_pkt, r_dir, state != ST_IDLE};
          DMA_R_SDLO:   s_rdata <= r_sdaddr[15:0];
          DMA_R_SDHI:   s_rdata <= 16'(r_sdaddr[SD_AW-1:16]);
          DMA_R_LOCAL:  s_rdata <= r_local;
          DMA_R_LEN:    s_rdata <= r_len;
          DMA_R_PCOUNT: s_rdata <= r_pcount;
          DMA_R_STRIDE: s_rdata <= r_stride;
          DMA_R_LSTRIDE: s_rdata <= r_lstride;
          default:      s_rdata <= '0;
        endcase
      end
    end
  end

  // start values of the two address state machines (the MUX of the source/destination roles)
  logic [15:0]      count_eff;
  logic [SD_AW-1:0] sd_stride, loc_stride;
  assign count_eff  = r_pkt ? r_pcount : 16'd1;
  assign sd_stride  = r_pkt ? SD_AW'(r_stride) : SD_AW'(r_len);
  assign loc_stride = r_pkt ? SD_AW'(r_lstride) : SD_AW'(r_len);

  // SASM: source side; DASM: destination side. One walks SDRAM addresses, the
  // other local addresses, depending on the direction.
  logic [SD_AW-1:0] sasm_addr, sasm_next, dasm_addr, dasm_next, sd_base, sd_stride_src, sd_stride_dst;
  logic             sasm_last, dasm_last, sasm_step, dasm_step;

  assign sd_base       = r_sdaddr;
  assign sd_stride_src = (r_dir == DIR_SD2LOC) ? sd_stride : loc_stride;
  assign sd_stride_dst = (r_dir == DIR_SD2LOC) ? loc_stride : sd_stride;

  dma_agen #(.AW(SD_AW), .LW(16)) u_sasm (
    .clk, .rst_n, .load(state == ST_LOAD),
    .base((r_dir == DIR_SD2LOC) ? sd_base : SD_AW'(r_local)),
    .len(r_len), .count(count_eff), .stride(sd_stride_src),
    .step(sasm_step), .addr(sasm_addr), .addr_next(sasm_next), .last(sasm_last)
  );
  dma_agen #(.AW(SD_AW), .LW(16)) u_dasm (
    .clk, .rst_n, .load(state == ST_LOAD),
    .base((r_dir == DIR_SD2LOC) ? SD_AW'(r_local) : sd_base),
    .len(r_len), .count(count_eff), .stride(sd_stride_dst),
    .step(dasm_step), .addr(dasm_addr), .addr_next(dasm_next), .last(dasm_last)
  );

  // transfer datapath
  logic issuing;     // SDRAM -> local: read commands still to issue
  logic data_valid;  // local -> SDRAM: a bus read was presented last cycle
  logic fire_w;      // local -> SDRAM: a word handed to the SDRAM controller

  assign fire_w = (state == ST_XFER) && (r_dir == DIR_LOC2SD) && data_valid && sd_req_ready;

  always_comb begin
    sd_req_valid = 1'b0;
    sd_req_we    = 1'b0;
    sd_req_addr  = sasm_addr;
    sd_req_wdata = m_rdata;
    m_req        = '0;
    sasm_step    = 1'b0;
    dasm_step    = 1'b0;
    if (state == ST_XFER) begin
      if (r_dir == DIR_SD2LOC) begin
        sd_req_valid = issuing;
        sd_req_addr  = sasm_addr;
        sasm_step    = issuing && sd_req_ready;
        if (sd_rd_valid) begin
          m_req.valid = 1'b1;
          m_req.write = 1'b1;
          m_req.addr  = dasm_addr[15:0];
          m_req.wdata = sd_rd_data;
          dasm_step   = 1'b1;
        end
      end else begin
        sd_req_valid = data_valid;
        sd_req_we    = 1'b1;
        sd_req_addr  = dasm_addr;
        dasm_step    = fire_w;
        sasm_step    = fire_w;
        m_req.valid  = !(fire_w && sasm_last);
        m_req.write  = 1'b0;
        m_req.addr   = fire_w ? sasm_next[15:0] : sasm_addr[15:0];
      end
    end
  end

  // SM controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE; issuing <= 1'b0; data_valid <= 1'b0; r_done <= 1'b0; irq <= 1'b0;
    end else begin
      irq <= 1'b0;
      if (wr_reg && s_req.addr[3:0] == DMA_R_CLEAR) r_done <= 1'b0;
      unique case (state)
        ST_IDLE: if (start) begin
          state <= ST_LOAD; r_done <= 1'b0;
        end
        ST_LOAD: state <= ST_REQ;
        ST_REQ: if (grant) begin
          state <= ST_XFER; issuing <= 1'b1; data_valid <= 1'b0;
        end
        ST_XFER: begin
          if (r_dir == DIR_SD2LOC) begin
            if (issuing && sd_req_ready && sasm_last) issuing <= 1'b0;
            if (sd_rd_valid && dasm_last) state <= ST_DONE;
          end else begin
            data_valid <= m_req.valid;
            if (fire_w && dasm_last) state <= ST_DONE;
          end
        end
        ST_DONE: begin
          state <= ST_IDLE; r_done <= 1'b1; irq <= 1'b1; issuing <= 1'b0; data_valid <= 1'b0;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign areq = (state == ST_REQ) || (state == ST_XFER);
  assign lock = (state == ST_XFER);
  assign busy = (state != ST_IDLE);

  // the DMA drives the bus only while it holds the grant
  a_master_granted: assert property (@(posedge clk) disable iff (!rst_n) m_req.valid |-> grant);
  // no new SDRAM request while the previous one is still being handled
  a_sd_dir: assert property (@(posedge clk) disable iff (!rst_n) sd_req_valid |-> (state == ST_XFER));

endmodule
