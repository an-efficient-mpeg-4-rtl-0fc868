// bus_arbiter: arbiter of the system bus between its two masters, the RISC
// (default owner) and the DMA controller of the frame memory interface.
// When the DMA raises AREQ, GRANT rises on the next clock edge and the RISC's
// bus requests are stalled (risc_ready low) for as long as GRANT is high.
// GRANT is held while the DMA keeps LOCK or AREQ high, and falls on the edge
// after both are low. The AREQ/GRANT/LOCK names follow the document; the
// one-cycle grant latency and the stall of the RISC are this design's own
// choices. Because the pipeline time slots fix when each transfer runs, no
// fairness scheme is needed.
module bus_arbiter
  import codec_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     areq,
  input  logic     lock,
  output logic     grant,
  input  bus_req_t risc_req,
  output logic     risc_ready,
  input  bus_req_t dma_req,
  output bus_req_t bus_req
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  grant <= 1'b0;
    else if (!grant && areq)     grant <= 1'b1;
    else if (grant && !areq && !lock) grant <= 1'b0;
  end

  assign risc_ready = !grant;
  assign bus_req    = grant ? dma_req : (risc_req.valid ? risc_req : '0);

  a_lock_needs_grant: assert property (@(posedge clk) disable iff (!rst_n) lock |-> grant);
endmodule
