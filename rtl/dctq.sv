// dctq: transform and quantisation engine for one 8x8 block, used in the
// encoder's DCTQ/IDCTQ stage (forward DCT, quantisation, inverse
// quantisation, inverse DCT, so the encoder reconstructs exactly what the
// decoder will) and in the decoder's IQ/IDCT stage.
//
// Memories and registers on the system bus (word offsets):
//  - 0x000 + row*8 + col: input block, signed 16-bit samples (pixels for
//    intra blocks, prediction errors for inter blocks);
//  - 0x040 + row*8 + col: quantised levels, written by an encoding run or by
//    the firmware before a decoding run;
//  - 0x080 + row*8 + col: reconstructed block (read only);
//  - 0x0C0 control: bit0 start, bit1 intra, bit2 decoding run (IQ/IDCT only);
//  - 0x0C1 quantiser QP (1..31); 0x0C2 status (bit0 busy).
// How it works: one 8-point transform output per cycle from eight
// multipliers, row pass then column pass, so each 2-D transform takes
// 2 x 64 cycles. The basis is C[k][n] = round(4096 * c(k) * cos((2n+1)k*pi/16))
// with c(0) = 1/sqrt(8) and c(k) = 1/2 otherwise; the row pass keeps 3
// fraction bits (sum >> 9, rounded) and the column pass drops them
// (sum >> 15, rounded). Quantisation follows the H.263 rule: intra DC
// level = (coef + 4) / 8 clipped to 1..254; other intra levels |coef| / 2QP;
// inter levels (|coef| - QP/2) / 2QP; all with the sign restored and clipped
// to -127..127. The division uses a reciprocal table and one correction step,
// so it is exact. Inverse quantisation: intra DC = 8 x level; otherwise
// |rec| = QP x (2|level| + 1), minus 1 when QP is even, clipped to
// -2048..2047. The encoding run does DCT, then Q and IQ in the column pass,
// then IDCT: 258 cycles from start to the `done` pulse. The decoding run does
// IQ (64 cycles) then IDCT: 194 cycles.
// The DCT/IDCT and Q/IQ functions follow the document; the quantiser rule
// (taken from H.263, which the codec supports), the fixed-point precision,
// the one-block-per-start protocol, the memory layout and the timing are
// this design's own choices.
module dctq
  import codec_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        s_sel,
  input  bus_req_t    s_req,
  output logic [15:0] s_rdata,
  input  logic        start,      // encoding run with the registered mode
  input  logic        dec_start,  // decoding run (IQ/IDCT only)
  output logic        busy,
  output logic        done
);
  typedef logic signed [12:0] coef_t;
  typedef coef_t [7:0][7:0] basis_t;
  typedef logic [16:0] recip_t [32];

  // cos(m*pi/16) * 2048 for m = 0..8
  function automatic int cos16(input int m);
    int t [9] = '{2048, 2009, 1892, 1703, 1448, 1138, 784, 400, 0};
    int mm = m % 32;
    if (mm <= 8)  return t[mm];
    if (mm <= 16) return -t[16 - mm];
    if (mm <= 24) return -t[mm - 16];
    return t[32 - mm];
  endfunction
  function automatic basis_t make_basis();
    basis_t c;
    for (int k = 0; k < 8; k++)
      for (int n = 0; n < 8; n++)
        c[k][n] = (k == 0) ? 13'sd1448 : 13'(cos16((2 * n + 1) * k));
    return c;
  endfunction
  // ceil(2^17 / (2 QP))
  function automatic recip_t make_recip();
    recip_t r;
    r[0] = '0;
    for (int q = 1; q < 32; q++) r[q] = 17'((131072 + 2 * q - 1) / (2 * q));
    return r;
  endfunction
  localparam basis_t C     = make_basis();
  localparam recip_t RECIP = make_recip();

  typedef enum logic [2:0] {D_IDLE, D_DCT1, D_DCT2, D_IQ, D_IDCT1, D_IDCT2, D_DONE} dstate_e;
  dstate_e state;

  logic signed [15:0] xin [64];
  logic signed [17:0] tmp [64];
  logic signed [15:0] lvl [64];
  logic signed [12:0] deq [64];
  logic signed [15:0] rec [64];
  logic [4:0] qp;
  logic       intra, r_intra;
  logic [5:0] i;

  logic [7:0] off;
  logic wr, rd;
  assign off = s_req.addr[7:0];
  assign wr  = s_sel && s_req.valid && s_req.write && s_req.addr[9:8] == 2'b00;
  assign rd  = s_sel && s_req.valid && !s_req.write;

  // ---- eight multipliers: one transform output per cycle ----
  logic [2:0] a, b;
  assign a = i[5:3];
  assign b = i[2:0];
  logic signed [17:0] opd [8];
  logic signed [12:0] opc [8];
  logic signed [35:0] acc;
  logic signed [17:0] pass_out;
  always_comb begin
    for (int n = 0; n < 8; n++) begin
      unique case (state)
        D_DCT1:  begin opd[n] = 18'(xin[{a, 3'(n)}]);  opc[n] = C[b][n]; end
        D_DCT2:  begin opd[n] = tmp[{3'(n), b}];       opc[n] = C[a][n]; end
        D_IDCT1: begin opd[n] = 18'(deq[{a, 3'(n)}]);  opc[n] = C[n][b]; end
        D_IDCT2: begin opd[n] = tmp[{3'(n), b}];       opc[n] = C[n][a]; end
        default: begin opd[n] = '0;                    opc[n] = '0;      end
      endcase
    end
    acc = '0;
    for (int n = 0; n < 8; n++) acc += 36'(opd[n]) * 36'(opc[n]);
    if (state == D_DCT1 || state == D_IDCT1) pass_out = 18'((acc + 36'sd256) >>> 9);
    else                                      pass_out = 18'((acc + 36'sd16384) >>> 15);
  end

  // ---- quantiser and inverse quantiser ----
  function automatic logic signed [15:0] quant(input logic signed [17:0] c, input logic is_dc,
                                               input logic is_intra, input logic [4:0] q);
    logic [17:0] mag, num, quo, d;
    logic [34:0] prod;
    if (is_intra && is_dc) begin
      automatic logic signed [17:0] v = (c + 18'sd4) >>> 3;
      return (v < 1) ? 16'sd1 : (v > 254) ? 16'sd254 : 16'(v);
    end
    mag = (c < 0) ? 18'(-c) : 18'(c);
    num = is_intra ? mag : ((mag > 18'(q >> 1)) ? mag - 18'(q >> 1) : 18'd0);
    d   = 18'({q, 1'b0});
    prod = 35'(num) * 35'(RECIP[q]);
    quo  = 18'(prod >> 17);
    if (quo * d > num) quo = quo - 1'b1;
    if (quo > 127) quo = 18'd127;
    return (c < 0) ? -16'(quo) : 16'(quo);
  endfunction
  function automatic logic signed [12:0] dequant(input logic signed [15:0] l, input logic is_dc,
                                                 input logic is_intra, input logic [4:0] q);
    logic [15:0] mag;
    logic [21:0] r;
    if (l == 0) return '0;
    if (is_intra && is_dc) begin
      automatic logic signed [21:0] v = 22'(l) * 22'sd8;
      return (v > 2047) ? 13'sd2047 : (v < -2048) ? -13'sd2048 : 13'(v);
    end
    mag = (l < 0) ? 16'(-l) : 16'(l);
    r = 22'(q) * (22'({mag, 1'b0}) + 22'd1) - (q[0] ? 22'd0 : 22'd1);
    if (l < 0) return (r > 2048) ? -13'sd2048 : -13'(r);
    return (r > 2047) ? 13'sd2047 : 13'(r);
  endfunction

  logic signed [15:0] q_out;
  logic signed [12:0] iq_out;
  logic signed [15:0] iq_in;
  assign q_out  = quant(pass_out, i == 6'd0, r_intra, qp);
  assign iq_in  = (state == D_IQ) ? lvl[i] : q_out;
  assign iq_out = dequant(iq_in, i == 6'd0, r_intra, qp);

  always_ff @(posedge clk) begin
    if (wr && off[7:6] == 2'b00) xin[off[5:0]] <= s_req.wdata;
    if (state == D_DCT2) lvl[i] <= q_out;
    else if (wr && off[7:6] == 2'b01) lvl[off[5:0]] <= s_req.wdata;
    if (state == D_DCT1 || state == D_IDCT1) tmp[i] <= pass_out;
    if (state == D_DCT2 || state == D_IQ) deq[i] <= iq_out;
    if (state == D_IDCT2) rec[i] <= 16'(pass_out);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= D_IDLE; i <= '0; qp <= 5'd1; intra <= 1'b0; r_intra <= 1'b0;
      done <= 1'b0; s_rdata <= '0;
    end else begin
      done <= 1'b0;
      if (wr && off == 8'hC1) qp <= (s_req.wdata[4:0] == 0) ? 5'd1 : s_req.wdata[4:0];
      if (wr && off == 8'hC0) intra <= s_req.wdata[1];
      if (rd) begin
        unique casez (off)
          8'b00??????: s_rdata <= xin[off[5:0]];
          8'b01??????: s_rdata <= lvl[off[5:0]];
          8'b10??????: s_rdata <= rec[off[5:0]];
          8'hC0:       s_rdata <= {14'b0, intra, 1'b0};
          8'hC1:       s_rdata <= {11'b0, qp};
          8'hC2:       s_rdata <= {15'b0, busy};
          default:     s_rdata <= '0;
        endcase
      end
      unique case (state)
        D_IDLE: begin
          i <= '0;
          if (dec_start || (wr && off == 8'hC0 && s_req.wdata[0] && s_req.wdata[2])) begin
            state <= D_IQ;
            r_intra <= (wr && off == 8'hC0) ? s_req.wdata[1] : intra;
          end else if (start || (wr && off == 8'hC0 && s_req.wdata[0])) begin
            state <= D_DCT1;
            r_intra <= (wr && off == 8'hC0) ? s_req.wdata[1] : intra;
          end
        end
        D_DCT1:  begin i <= i + 1'b1; if (i == 6'd63) state <= D_DCT2;  end
        D_DCT2:  begin i <= i + 1'b1; if (i == 6'd63) state <= D_IDCT1; end
        D_IQ:    begin i <= i + 1'b1; if (i == 6'd63) state <= D_IDCT1; end
        D_IDCT1: begin i <= i + 1'b1; if (i == 6'd63) state <= D_IDCT2; end
        D_IDCT2: begin i <= i + 1'b1; if (i == 6'd63) state <= D_DONE;  end
        D_DONE:  begin done <= 1'b1; state <= D_IDLE; end
        default: state <= D_IDLE;
      endcase
    end
  end

  assign busy = (state != D_IDLE);
endmodule
