// me_mixed: mixed-mode motion estimator for one 8x8 half-resolution block.
//
// Parts, after the estimator's block diagram:
//  - Current mem. 8x8: the current block, 8 rows of 8 pixels;
//  - Ref_mem (24x12x2): the reference window, 24 rows of 12 16-bit words of
//    2 pixels each (24x24 pixels), enough for the -8/+7 search area around
//    an 8x8 block (vector (0,0) is window position (8,8));
//  - ME skip: SAD at the predicted vector (me_skip);
//  - SKIP DECISION: skip mode when that SAD is below the threshold register;
//  - ME coarse with Compare: the 8-PE full search (me_coarse), run only in
//    normal mode, so in skip mode its 2080 cycles and PE activity are saved;
//  - Mux: routes the memory read addresses of whichever engine runs, and
//    picks the result (predicted vector in skip mode, search result otherwise);
//  - ADDRESS GENERATOR: turns engine (row, column) requests into memory reads;
//  - Control: IDLE -> SKIP -> DECIDE -> (COARSE) -> DONE.
// The RISC or the DMA fills the memories and registers over the system bus
// (word offsets in codec_pkg: current block at 0x000 + row*4 + word, window
// at 0x200 + row*16 + word, low byte = left pixel). `start` (or a write of 1
// to the control register) runs one estimation; `done` pulses 12 cycles
// after start in skip mode and 2093 cycles after start in normal mode, with
// mv_x/mv_y (half-resolution pixels, -8..+7), sad and `skipped`. Counters of blocks and of skip decisions
// give the share of searches that were disabled. Register reads return data
// on the next cycle; the memories are write-only from the bus.
// The parts, memory sizes, eight PEs and search range follow the document;
// the SAD skip criterion, the register map and the timing are this design's
// own choices.
module me_mixed
  import codec_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              s_sel,
  input  bus_req_t          s_req,
  output logic [15:0]       s_rdata,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic signed [3:0] mv_x,
  output logic signed [3:0] mv_y,
  output logic [13:0]       sad,
  output logic              skipped
);
  typedef enum logic [2:0] {M_IDLE, M_SKIP, M_DECIDE, M_COARSE, M_DONE} mstate_e;
  mstate_e state;

  logic [7:0][7:0]  cur_mem [8];
  logic [23:0][7:0] ref_mem [24];

  logic signed [3:0] r_pmv_x, r_pmv_y;
  logic [13:0]       r_thr;
  logic [15:0]       n_skip, n_blk;

  logic [9:0] off;
  logic       wr, rd, reg_start;
  assign off = s_req.addr[9:0];
  assign wr  = s_sel && s_req.valid && s_req.write;
  assign rd  = s_sel && s_req.valid && !s_req.write;
  assign reg_start = wr && (off == ME_R_CTRL) && s_req.wdata[0];

  // memory and register writes
  always_ff @(posedge clk) begin
    if (wr && off[9:5] == 5'b00000)
      cur_mem[off[4:2]][{off[1:0], 1'b0} +: 2] <= s_req.wdata;
    if (wr && off[9] && off[3:0] < 4'd12 && off[8:4] < 5'd24)
      ref_mem[off[8:4]][{off[3:0], 1'b0} +: 2] <= s_req.wdata;
  end

  // engines
  logic       skip_start, skip_busy, skip_done, crs_start, crs_busy, crs_done;
  logic [2:0] sk_cur_row, cr_cur_row, cr_cur_col;
  logic [4:0] sk_ref_row, sk_ref_col, cr_ref_row, cr_ref_col;
  logic [13:0] skip_sad, crs_sad;
  logic signed [3:0] crs_mv_x, crs_mv_y;

  // address generator and mux: one reference read port shared by the engines
  logic [4:0]       ref_row, ref_col;
  logic [7:0][7:0]  ref_pix, cur_row_pix;
  assign ref_row     = (state == M_COARSE) ? cr_ref_row : sk_ref_row;
  assign ref_col     = (state == M_COARSE) ? cr_ref_col : sk_ref_col;
  assign ref_pix     = ref_mem[ref_row][ref_col +: 8];
  assign cur_row_pix = cur_mem[(state == M_COARSE) ? cr_cur_row : sk_cur_row];

  me_skip u_skip (
    .clk, .rst_n, .start(skip_start), .pmv_x(r_pmv_x), .pmv_y(r_pmv_y),
    .cur_row(sk_cur_row), .cur_pix(cur_row_pix), .ref_row(sk_ref_row), .ref_col(sk_ref_col),
    .ref_pix, .busy(skip_busy), .done(skip_done), .sad(skip_sad)
  );

  me_coarse u_coarse (
    .clk, .rst_n, .start(crs_start),
    .cur_row(cr_cur_row), .cur_col(cr_cur_col), .cur_px(cur_row_pix[cr_cur_col]),
    .ref_row(cr_ref_row), .ref_col(cr_ref_col), .ref_pix,
    .busy(crs_busy), .done(crs_done), .mv_x(crs_mv_x), .mv_y(crs_mv_y), .sad(crs_sad)
  );

  // skip decision
  logic skip_mode;
  assign skip_mode = skip_sad < r_thr;

  assign skip_start = (state == M_IDLE) && (start || reg_start);
  assign crs_start  = (state == M_DECIDE) && !skip_mode;
  assign busy       = (state != M_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= M_IDLE; r_pmv_x <= '0; r_pmv_y <= '0; r_thr <= '0; n_skip <= '0; n_blk <= '0;
      mv_x <= '0; mv_y <= '0; sad <= '0; skipped <= 1'b0; done <= 1'b0; s_rdata <= '0;
    end else begin
      done <= 1'b0;
      if (wr && off == ME_R_PMV) begin r_pmv_x <= s_req.wdata[3:0]; r_pmv_y <= s_req.wdata[7:4]; end
      if (wr && off == ME_R_THR) r_thr <= s_req.wdata[13:0];
      if (rd) begin
        unique case (off)
          ME_R_PMV:   s_rdata <= {8'b0, r_pmv_y, r_pmv_x};
          ME_R_THR:   s_rdata <= {2'b0, r_thr};
          ME_R_MV:    s_rdata <= {7'b0, skipped, mv_y, mv_x};
          ME_R_SAD:   s_rdata <= {2'b0, sad};
          ME_R_STAT:  s_rdata <= {14'b0, done, busy};
          ME_R_NSKIP: s_rdata <= n_skip;
          ME_R_NBLK:  s_rdata <= n_blk;
          default:    s_rdata <= '0;
        endcase
      end
      unique case (state)
        M_IDLE:   if (skip_start) state <= M_SKIP;
        M_SKIP:   if (skip_done) state <= M_DECIDE;
        M_DECIDE: begin
          if (skip_mode) begin
            mv_x <= r_pmv_x; mv_y <= r_pmv_y; sad <= skip_sad; skipped <= 1'b1;
            n_skip <= n_skip + 1'b1;
            state <= M_DONE;
          end else begin
            state <= M_COARSE;
          end
        end
        M_COARSE: if (crs_done) begin
          mv_x <= crs_mv_x; mv_y <= crs_mv_y; sad <= crs_sad; skipped <= 1'b0;
          state <= M_DONE;
        end
        M_DONE: begin
          done <= 1'b1; n_blk <= n_blk + 1'b1; state <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  a_coarse_only_normal: assert property (@(posedge clk) disable iff (!rst_n) crs_busy |-> state == M_COARSE);
  a_one_engine: assert property (@(posedge clk) disable iff (!rst_n) !(skip_busy && crs_busy));
endmodule
