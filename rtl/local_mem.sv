// local_mem: a local buffer on the system bus, such as the BUF each hardware
// module owns or the larger OF/OS buffers. It is a single-port synchronous
// RAM of DEPTH 16-bit words: a selected write stores in the request cycle; a
// selected read returns its word in rdata on the next cycle, and rdata holds
// that word until the next read. The memory is an array that synthesis maps
// to a RAM. The per-module local memories follow the document; their depth,
// width and timing here are this design's own choices.
module local_mem
  import codec_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        sel,
  input  bus_req_t    bus_req,
  output logic [15:0] rdata
);
  logic [15:0] mem [DEPTH];
  logic [AW-1:0] a;
  assign a = bus_req.addr[AW-1:0];

  always_ff @(posedge clk) begin
    if (sel && bus_req.valid) begin
      if (bus_req.write) mem[a] <= bus_req.wdata;
      else               rdata  <= mem[a];
    end
  end
endmodule
