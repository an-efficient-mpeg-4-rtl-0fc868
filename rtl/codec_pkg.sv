// codec_pkg: types and constants shared by the codec's blocks.
//
// The on-chip system bus is a 16-bit single-channel bus in the spirit of the
// AMBA ASB: one master at a time (the RISC or the DMA controller, chosen by
// the bus arbiter) drives a request; a slave selected by the bus decoder
// writes in the same cycle or returns read data on the following cycle, with
// no wait states. The 16-bit data width follows the chip's 16-bit ASB; the
// word addressing, the one-cycle read latency and the address map below are
// this design's own choices.
package codec_pkg;

  localparam int unsigned BUS_AW = 16;   // word address width of the system bus
  localparam int unsigned BUS_DW = 16;   // data width of the system bus (16-bit ASB)

  // One bus request, driven by the current master.
  typedef struct packed {
    logic              valid;
    logic              write;
    logic [BUS_AW-1:0] addr;
    logic [BUS_DW-1:0] wdata;
  } bus_req_t;

  // External SDRAM: 16 Mbit organised as 2 banks x 2048 rows x 256 columns x 16 bit.
  localparam int unsigned SD_ROW_W  = 11;
  localparam int unsigned SD_COL_W  = 8;
  localparam int unsigned SD_BANK_W = 1;
  localparam int unsigned SD_AW     = SD_ROW_W + SD_BANK_W + SD_COL_W;  // 20-bit word address

  // Address map of the system bus (word addresses).
  localparam logic [15:0] MAP_OFBUF_BASE = 16'h4000, MAP_OFBUF_MASK = 16'hFC00; // 1024 words
  localparam logic [15:0] MAP_OSBUF_BASE = 16'h5000, MAP_OSBUF_MASK = 16'hF000; // 4096 words
  localparam logic [15:0] MAP_ME_BASE    = 16'h6000, MAP_ME_MASK    = 16'hFC00; // motion estimator
  localparam logic [15:0] MAP_MEF_BASE   = 16'h6400, MAP_MEF_MASK   = 16'hFC00; // fine ME / MC
  localparam logic [15:0] MAP_DCTQ_BASE  = 16'h6800, MAP_DCTQ_MASK  = 16'hFC00; // DCT/Q engine
  localparam logic [15:0] MAP_REC_BASE   = 16'h6C00, MAP_REC_MASK   = 16'hFC00; // reconstruction
  localparam logic [15:0] MAP_DMA_BASE   = 16'h7000, MAP_DMA_MASK   = 16'hFFF0; // DMA registers
  localparam logic [15:0] MAP_EXT_BASE   = 16'h8000, MAP_EXT_MASK   = 16'h8000; // other modules' buffers

  // DMA register offsets (word offsets inside the DMA window).
  localparam logic [3:0] DMA_R_CTRL   = 4'h0; // w: bit0 start, bit1 dir, bit2 packet mode; r: bit0 busy, bit1 dir, bit2 pkt, bit3 done
  localparam logic [3:0] DMA_R_SDLO   = 4'h1; // SDRAM word address [15:0]
  localparam logic [3:0] DMA_R_SDHI   = 4'h2; // SDRAM word address [19:16]
  localparam logic [3:0] DMA_R_LOCAL  = 4'h3; // local (bus) word address
  localparam logic [3:0] DMA_R_LEN    = 4'h4; // words per block / per packet
  localparam logic [3:0] DMA_R_PCOUNT = 4'h5; // number of packets (packet mode)
  localparam logic [3:0] DMA_R_STRIDE = 4'h6; // SDRAM distance between packet starts
  localparam logic [3:0] DMA_R_CLEAR  = 4'h7; // w: clear done flag
  localparam logic [3:0] DMA_R_LSTRIDE = 4'h8; // local distance between packet starts

  // Transfer direction of the DMA controller.
  typedef enum logic {
    DIR_SD2LOC = 1'b0,   // SDRAM -> local memory
    DIR_LOC2SD = 1'b1    // local memory -> SDRAM
  } dma_dir_e;

  // Motion estimator register offsets (word offsets inside the ME window).
  localparam logic [9:0] ME_R_CTRL   = 10'h040; // w: bit0 start
  localparam logic [9:0] ME_R_PMV    = 10'h041; // [3:0] predicted mv x, [7:4] predicted mv y (coarse units)
  localparam logic [9:0] ME_R_THR    = 10'h042; // skip threshold on the SAD
  localparam logic [9:0] ME_R_MV     = 10'h043; // r: [3:0] mv x, [7:4] mv y, [8] skipped
  localparam logic [9:0] ME_R_SAD    = 10'h044; // r: SAD of the chosen vector
  localparam logic [9:0] ME_R_STAT   = 10'h045; // r: bit0 busy, bit1 done
  localparam logic [9:0] ME_R_NSKIP  = 10'h046; // r: blocks decided by the skip path
  localparam logic [9:0] ME_R_NBLK   = 10'h047; // r: blocks estimated

endpackage
