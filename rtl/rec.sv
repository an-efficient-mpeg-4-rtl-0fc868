// rec: reconstruction engine for one 8x8 block, used in the encoder's last
// stage (REC/SP: rebuilding the reference picture) and in the decoder's last
// stage (REC/DB: rebuilding the output picture).
//
// It adds the decoded residual to the motion-compensated prediction and
// clips the sum to the pixel range 0..255. For intra blocks the prediction
// is ignored and the decoded samples are clipped alone.
// Memories and registers on the system bus (word offsets):
//  - 0x000 + row*4 + word: prediction, 2 pixels per word (low byte = left
//    pixel), e.g. copied from the compensation engine's prediction memory;
//  - 0x040 + row*8 + col: residual, signed 16-bit, e.g. copied from the
//    DCT/Q engine's reconstructed block;
//  - 0x080 + row*4 + word: reconstructed pixels (read only);
//  - 0x0C0 control: bit0 start, bit1 intra; 0x0C1 status: bit0 busy, and
//    bits [15:8] the number of pixels that were clipped in the last block.
// One row of eight pixels per cycle: `done` pulses 9 cycles after start
// (from the port or the control register).
// The reconstruction stage and its place in both pipelines follow the
// document; the clipping count, the memory layout and the timing are this
// design's own choices. The de-blocking filter of the decoder's stage is not
// part of this engine.
module rec
  import codec_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        s_sel,
  input  bus_req_t    s_req,
  output logic [15:0] s_rdata,
  input  logic        start,
  output logic        busy,
  output logic        done
);
  logic [7:0][7:0]    pred [8];
  logic signed [15:0] res  [64];
  logic [7:0][7:0]    out  [8];
  logic       intra, r_intra, run;
  logic [2:0] row;
  logic [7:0] nclip;

  logic [7:0] off;
  logic wr, rd;
  assign off = s_req.addr[7:0];
  assign wr  = s_sel && s_req.valid && s_req.write && s_req.addr[9:8] == 2'b00;
  assign rd  = s_sel && s_req.valid && !s_req.write;

  // one row: sum, clip, count clipped pixels
  logic [7:0][7:0] row_out;
  logic [3:0]      row_clips;
  always_comb begin
    row_clips = '0;
    for (int x = 0; x < 8; x++) begin
      automatic logic signed [17:0] s;
      s = 18'(res[{row, 3'(x)}]) + (r_intra ? 18'sd0 : 18'(pred[row][x]));
      if (s < 0)        begin row_out[x] = 8'd0;   row_clips += 1'b1; end
      else if (s > 255) begin row_out[x] = 8'd255; row_clips += 1'b1; end
      else                    row_out[x] = 8'(s);
    end
  end

  always_ff @(posedge clk) begin
    if (wr && off[7:5] == 3'b000) pred[off[4:2]][{off[1:0], 1'b0} +: 2] <= s_req.wdata;
    if (wr && off[7:6] == 2'b01)  res[off[5:0]] <= s_req.wdata;
    if (run) out[row] <= row_out;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; row <= '0; intra <= 1'b0; r_intra <= 1'b0; nclip <= '0;
      done <= 1'b0; s_rdata <= '0;
    end else begin
      done <= 1'b0;
      if (wr && off == 8'hC0) intra <= s_req.wdata[1];
      if (rd) begin
        unique casez (off)
          8'b000?????: s_rdata <= pred[off[4:2]][{off[1:0], 1'b0} +: 2];
          8'b01??????: s_rdata <= res[off[5:0]];
          8'b100?????: s_rdata <= out[off[4:2]][{off[1:0], 1'b0} +: 2];
          8'hC0:       s_rdata <= {14'b0, intra, 1'b0};
          8'hC1:       s_rdata <= {nclip, 7'b0, busy};
          default:     s_rdata <= '0;
        endcase
      end
      if (!run) begin
        if (start || (wr && off == 8'hC0 && s_req.wdata[0])) begin
          run <= 1'b1; row <= '0; nclip <= '0;
          r_intra <= (wr && off == 8'hC0) ? s_req.wdata[1] : intra;
        end
      end else begin
        row   <= row + 1'b1;
        nclip <= nclip + 8'(row_clips);
        if (row == 3'd7) begin run <= 1'b0; done <= 1'b1; end
      end
    end
  end

  assign busy = run;
endmodule
