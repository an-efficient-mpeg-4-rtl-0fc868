// dma_agen: address state machine of the DMA controller. One instance walks
// the source addresses (SASM) and one the destination addresses (DASM).
// It walks `count` packets of `len` words; inside a packet the address rises
// by one, and each new packet starts `stride` words after the previous
// packet's start. In burst block mode count is 1, which gives one contiguous
// block. `load` copies the start address; each `step` moves to the next word.
// `addr` is the current word, `addr_next` the word after it (so a caller can
// present the next address in the same cycle it steps), `last` marks the
// final word. Walking packets with a stride is this design's reading of the
// document's packet mode.
module dma_agen #(
  parameter int unsigned AW = 16,
  parameter int unsigned LW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [AW-1:0] base,
  input  logic [LW-1:0] len,
  input  logic [LW-1:0] count,
  input  logic [AW-1:0] stride,
  input  logic          step,
  output logic [AW-1:0] addr,
  output logic [AW-1:0] addr_next,
  output logic          last
);
  logic [AW-1:0] pkt_start;
  logic [LW-1:0] word_left, pkt_left;   // words after the current one in this packet, packets after this one
  logic [LW-1:0] len_q;
  logic [AW-1:0] stride_q;

  assign last      = (word_left == 0) && (pkt_left == 0);
  assign addr_next = (word_left == 0) ? pkt_start + stride_q : addr + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr <= '0; pkt_start <= '0; word_left <= '0; pkt_left <= '0; len_q <= '0; stride_q <= '0;
    end else if (load) begin
      addr      <= base;
      pkt_start <= base;
      word_left <= len - 1'b1;
      pkt_left  <= count - 1'b1;
      len_q     <= len;
      stride_q  <= stride;
    end else if (step && !last) begin
      addr <= addr_next;
      if (word_left == 0) begin
        pkt_start <= pkt_start + stride_q;
        word_left <= len_q - 1'b1;
        pkt_left  <= pkt_left - 1'b1;
      end else begin
        word_left <= word_left - 1'b1;
      end
    end
  end
endmodule
