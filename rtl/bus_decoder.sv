// bus_decoder: address decoder and read-data multiplexer of the system bus.
// Slave i is selected when (addr & MASK[i]) == BASE[i]; the first match wins.
// Writes complete in the request cycle. Slaves return read data one cycle
// after the request, so the decoder registers which slave was read and
// multiplexes that slave's data in the following cycle; an address that
// matches no slave reads as zero. The address map itself is this design's
// own (see codec_pkg).
module bus_decoder
  import codec_pkg::*;
#(
  parameter int unsigned NS = 5,
  parameter logic [NS-1:0][15:0] BASE = {MAP_EXT_BASE, MAP_DMA_BASE, MAP_ME_BASE, MAP_OSBUF_BASE, MAP_OFBUF_BASE},
  parameter logic [NS-1:0][15:0] MASK = {MAP_EXT_MASK, MAP_DMA_MASK, MAP_ME_MASK, MAP_OSBUF_MASK, MAP_OFBUF_MASK}
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  bus_req_t             bus_req,
  output logic [NS-1:0]        sel,
  input  logic [NS-1:0][15:0]  slave_rdata,
  output logic [15:0]          rdata
);
  logic [NS-1:0] rd_sel_q;

  always_comb begin
    sel = '0;
    for (int i = 0; i < NS; i++) begin
      if (sel == '0 && (bus_req.addr & MASK[i]) == BASE[i]) sel[i] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_sel_q <= '0;
    else        rd_sel_q <= (bus_req.valid && !bus_req.write) ? sel : '0;
  end

  always_comb begin
    rdata = '0;
    for (int i = 0; i < NS; i++) if (rd_sel_q[i]) rdata = slave_rdata[i];
  end

  a_onehot_sel: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel));
endmodule
