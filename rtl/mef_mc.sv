// mef_mc: fine motion estimation and motion compensation for one 16x16
// luminance macroblock: the second and third levels of the hierarchical
// search after the coarse estimator, then the prediction, then the
// half-resolution block the coarse estimator uses.
//
// Memories, filled over the system bus:
//  - reference patch 20x20 at word offset 0x000 + row*16 + word (10 words
//    per row, 2 pixels per word, low byte = left pixel). The
//    firmware cuts it from the reference frame so that the patch pixel (2,2)
//    sits at the MB position moved by twice the coarse vector; the patch then
//    covers every pixel needed for integer offsets of +-1 and half-pel
//    offsets of +-1/2 around them;
//  - current MB 16x16 at 0x180 + row*8 + word;
//  - prediction 16x16 (read only) at 0x300 + row*8 + word;
//  - half-resolution current block 8x8 (read only) at 0x380 + row*4 + word.
// Registers: 0x200 control (bit0 start; bit1 compensation only), 0x201 the
// coarse vector (x [3:0], y [7:4], half-resolution pixels), 0x202 the
// half-pel offset for compensation-only runs (x [3:0], y [7:4], -3..+3),
// 0x203 result vector x, 0x204 result vector y (half-pel units, full
// resolution, = 4 x coarse + offset), 0x205 SAD, 0x206 status (bit0 busy).
//
// Operation (start, or a write of 1 to bit 0 of the control register):
//  1. integer-pel step: the 9 offsets {-1,0,+1}^2 pixels around the coarse
//     vector, one 16-pixel row per cycle (16 cycles each);
//  2. half-pel step: the 8 half-pel neighbours of the best integer offset,
//     with bilinear interpolation rounded up ((a+b+1)/2, (a+b+c+d+2)/4);
//     a neighbour replaces the integer result only if its SAD is smaller;
//  3. motion compensation: the prediction MB at the chosen offset;
//  4. data creation for the coarse estimator: the current MB decimated 2:1
//     by rounded 2x2 averages.
// In compensation-only mode (for decoding, started by `mc_start`) steps 1-2
// are skipped and the offset register is used. `done` pulses when all is
// finished: 298 cycles after start for a full run, 26 for compensation only.
// The three-level hierarchy (coarse on half-resolution pictures, then
// integer-pel, then half-pel) and the decimation duty of MC follow the
// document; the +-1 search steps, the interpolation rounding (MPEG-4 with
// rounding control 0), the memory layout, the row-per-cycle datapath and
// the timing are this design's own choices. Only luminance is handled.
module mef_mc
  import codec_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              s_sel,
  input  bus_req_t          s_req,
  output logic [15:0]       s_rdata,
  input  logic              start,      // fine search + compensation (encoding)
  input  logic              mc_start,   // compensation only (decoding)
  output logic              busy,
  output logic              done,
  output logic signed [6:0] mv_hx,
  output logic signed [6:0] mv_hy,
  output logic [15:0]       sad
);
  typedef enum logic [2:0] {F_IDLE, F_INT, F_HALF, F_MC, F_DEC, F_DONE} fstate_e;
  fstate_e state;

  logic [15:0][7:0] cur  [16];
  logic [19:0][7:0] pat  [20];
  logic [15:0][7:0] pred [16];
  logic [7:0][7:0]  dec  [8];

  logic signed [3:0] r_cx, r_cy, r_ox, r_oy;

  logic [9:0] off;
  logic wr, rd, reg_start, reg_mc;
  assign off = s_req.addr[9:0];
  assign wr  = s_sel && s_req.valid && s_req.write;
  assign rd  = s_sel && s_req.valid && !s_req.write;
  assign reg_start = wr && off == 10'h200 && s_req.wdata[0];
  assign reg_mc    = reg_start && s_req.wdata[1];

  always_ff @(posedge clk) begin
    if (wr && off[9:7] == 3'b011)
      cur[off[6:3]][{off[2:0], 1'b0} +: 2] <= s_req.wdata;
    if (wr && off < 10'h140 && off[3:0] < 4'd10)
      pat[off[8:4]][{off[3:0], 1'b0} +: 2] <= s_req.wdata;
  end

  // ---- candidate being evaluated, in half-pel units around the patch centre ----
  logic signed [3:0] hx, hy;      // -3..+3
  logic [3:0] row;                // MB row 0..15
  logic [3:0] cand;               // candidate index inside a step
  logic signed [3:0] bx, by;      // best offset so far
  logic [15:0] best, acc;

  // interpolated prediction row for (hx, hy) and MB row `row`
  logic [4:0] iy, ix0;
  logic       fx, fy;
  logic [15:0][7:0] prow;
  logic [12:0] row_sad;
  always_comb begin
    automatic logic signed [6:0] px2, py2;
    px2 = 7'sd4 + 7'(hx);                 // 2*(0+2) + hx for column 0
    py2 = 7'(2 * (int'(row) + 2)) + 7'(hy);
    ix0 = 5'(px2 >>> 1); fx = px2[0];
    iy  = 5'(py2 >>> 1); fy = py2[0];
    row_sad = '0;
    for (int x = 0; x < 16; x++) begin
      automatic logic [9:0] a, b, c, d;
      a = 10'(pat[iy][int'(ix0) + x]);
      b = 10'(pat[iy][int'(ix0) + x + 1]);
      c = 10'(pat[iy + 5'd1][int'(ix0) + x]);
      d = 10'(pat[iy + 5'd1][int'(ix0) + x + 1]);
      unique case ({fy, fx})
        2'b00: prow[x] = 8'(a);
        2'b01: prow[x] = 8'((a + b + 10'd1) >> 1);
        2'b10: prow[x] = 8'((a + c + 10'd1) >> 1);
        default: prow[x] = 8'((a + b + c + d + 10'd2) >> 2);
      endcase
      row_sad += 13'((cur[row][x] > prow[x]) ? 8'(cur[row][x] - prow[x]) : 8'(prow[x] - cur[row][x]));
    end
  end

  // candidate tables
  function automatic logic signed [3:0] int_dx(input logic [3:0] k);
    return 4'(2 * (int'(k) % 3) - 2);
  endfunction
  function automatic logic signed [3:0] int_dy(input logic [3:0] k);
    return 4'(2 * (int'(k) / 3) - 2);
  endfunction
  // the 8 half-pel neighbours: index 0..7 over {-1,0,1}^2 without (0,0)
  function automatic logic signed [3:0] half_d(input logic [3:0] k, input bit y);
    automatic int j = (int'(k) >= 4) ? int'(k) + 1 : int'(k);
    return y ? 4'(j / 3 - 1) : 4'(j % 3 - 1);
  endfunction

  logic [15:0] sum_now;
  assign sum_now = acc + 16'(row_sad);

  logic [2:0] drow;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= F_IDLE; hx <= '0; hy <= '0; row <= '0; cand <= '0; bx <= '0; by <= '0;
      best <= '0; acc <= '0; drow <= '0; done <= 1'b0; sad <= '0; mv_hx <= '0; mv_hy <= '0;
      r_cx <= '0; r_cy <= '0; r_ox <= '0; r_oy <= '0; s_rdata <= '0;
    end else begin
      done <= 1'b0;
      if (wr && off == 10'h201) begin r_cx <= s_req.wdata[3:0]; r_cy <= s_req.wdata[7:4]; end
      if (wr && off == 10'h202) begin r_ox <= s_req.wdata[3:0]; r_oy <= s_req.wdata[7:4]; end
      if (rd) begin
        if (off[9:7] == 3'b110)      s_rdata <= pred[off[6:3]][{off[2:0], 1'b0} +: 2];
        else if (off[9:5] == 5'b11100) s_rdata <= dec[off[4:2]][{off[1:0], 1'b0} +: 2];
        else unique case (off)
          10'h201: s_rdata <= {8'b0, r_cy, r_cx};
          10'h202: s_rdata <= {8'b0, r_oy, r_ox};
          10'h203: s_rdata <= 16'(signed'(mv_hx));
          10'h204: s_rdata <= 16'(signed'(mv_hy));
          10'h205: s_rdata <= sad;
          10'h206: s_rdata <= {15'b0, busy};
          default: s_rdata <= '0;
        endcase
      end
      unique case (state)
        F_IDLE: begin
          if (mc_start || reg_mc) begin
            state <= F_MC; hx <= r_ox; hy <= r_oy; bx <= r_ox; by <= r_oy; row <= '0;
          end else if (start || reg_start) begin
            state <= F_INT; cand <= '0; row <= '0; acc <= '0;
            hx <= int_dx(4'd0); hy <= int_dy(4'd0);
          end
        end
        F_INT, F_HALF: begin
          row <= row + 1'b1;
          acc <= sum_now;
          if (row == 4'd15) begin
            automatic logic [3:0] nc = cand + 1'b1;
            acc <= '0;
            if ((state == F_INT && cand == 0) || sum_now < best) begin
              best <= sum_now; bx <= hx; by <= hy;
            end
            if (state == F_INT && cand == 4'd8) begin
              // best integer offset known: go to its half-pel neighbours
              automatic logic signed [3:0] cbx, cby;
              cbx = (sum_now < best) ? hx : bx;
              cby = (sum_now < best) ? hy : by;
              state <= F_HALF; cand <= '0;
              hx <= cbx + half_d(4'd0, 1'b0); hy <= cby + half_d(4'd0, 1'b1);
            end else if (state == F_HALF && cand == 4'd7) begin
              state <= F_MC;
              hx <= (sum_now < best) ? hx : bx;
              hy <= (sum_now < best) ? hy : by;
            end else begin
              cand <= nc;
              if (state == F_INT) begin
                hx <= int_dx(nc); hy <= int_dy(nc);
              end else begin
                // neighbours of the best integer offset, kept in (ix_c, iy_c)
                hx <= hx - half_d(cand, 1'b0) + half_d(nc, 1'b0);
                hy <= hy - half_d(cand, 1'b1) + half_d(nc, 1'b1);
              end
            end
          end
        end
        F_MC: begin
          pred[row] <= prow;
          if (row == 4'd0) acc <= 16'(row_sad); else acc <= sum_now;
          row <= row + 1'b1;
          if (row == 4'd15) begin
            state <= F_DEC; drow <= '0;
            bx <= hx; by <= hy;
            best <= sum_now;
          end
        end
        F_DEC: begin
          for (int x = 0; x < 8; x++)
            dec[drow][x] <= 8'((10'(cur[2*drow][2*x]) + 10'(cur[2*drow][2*x+1]) +
                                10'(cur[2*drow+1][2*x]) + 10'(cur[2*drow+1][2*x+1]) + 10'd2) >> 2);
          drow <= drow + 1'b1;
          if (drow == 3'd7) state <= F_DONE;
        end
        F_DONE: begin
          done  <= 1'b1;
          sad   <= best;
          mv_hx <= 7'(4 * int'(r_cx) + int'(bx));
          mv_hy <= 7'(4 * int'(r_cy) + int'(by));
          state <= F_IDLE;
        end
        default: state <= F_IDLE;
      endcase
    end
  end

  assign busy = (state != F_IDLE);
endmodule
