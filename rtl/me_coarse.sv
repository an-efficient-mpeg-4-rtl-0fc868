// me_coarse: the "ME coarse" full search of the mixed motion estimator, with
// its "Compare" unit. On the half-resolution pictures it evaluates all 256
// candidate vectors of the fixed -8..+7 search area for an 8x8 current block
// held against a 24x24 reference window (vector (0,0) is window position
// (8,8)). Eight processing elements examine eight candidates concurrently:
// for one vertical offset dy and a group of eight horizontal offsets
// dx0..dx0+7, the block is scanned pixel by pixel in 64 cycles; each cycle
// the current pixel (y,x) is broadcast and PE k gets window pixel
// (y+8+dy, x+8+dx0+k), so the reference port reads 8 neighbouring pixels of
// one window row. After each group the compare step keeps the smallest SAD
// (the first in scan order on a tie: dy rising, then dx rising).
// Timing: 32 groups x (64 + 1) cycles = 2080 cycles from `start` to `done`.
// The eight PEs and the -8/+7 range follow the document; the scan order and
// the tie rule are this design's own choices.
module me_coarse (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic [2:0]        cur_row,
  output logic [2:0]        cur_col,
  input  logic [7:0]        cur_px,
  output logic [4:0]        ref_row,
  output logic [4:0]        ref_col,
  input  logic [7:0][7:0]   ref_pix,
  output logic              busy,
  output logic              done,
  output logic signed [3:0] mv_x,
  output logic signed [3:0] mv_y,
  output logic [13:0]       sad
);
  localparam int unsigned NPE = 8;

  logic [3:0] dy_i;     // dy + 8
  logic       grp;      // dx0 = grp ? 0 : -8
  logic [5:0] pix;      // y*8 + x
  logic       cmp;      // compare cycle after the 64 accumulate cycles
  logic       first;
  logic [NPE-1:0][13:0] acc;

  assign cur_row = pix[5:3];
  assign cur_col = pix[2:0];
  assign ref_row = 5'(pix[5:3]) + 5'(dy_i);             // y + 8 + dy
  assign ref_col = 5'(pix[2:0]) + (grp ? 5'd8 : 5'd0);   // x + 8 + dx0

  for (genvar k = 0; k < NPE; k++) begin : g_pe
    me_pe u_pe (
      .clk, .rst_n,
      .clr(start && !busy || cmp),
      .en(busy && !cmp),
      .cur(cur_px), .ref_px(ref_pix[k]), .acc(acc[k])
    );
  end

  // compare: best of the eight PEs against the best so far
  logic [13:0] best_sad;
  logic [2:0]  best_k;
  always_comb begin
    best_sad = acc[0];
    best_k   = '0;
    for (int k = 1; k < NPE; k++)
      if (acc[k] < best_sad) begin best_sad = acc[k]; best_k = 3'(k); end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dy_i <= '0; grp <= 1'b0; pix <= '0; cmp <= 1'b0; busy <= 1'b0; done <= 1'b0;
      first <= 1'b0; mv_x <= '0; mv_y <= '0; sad <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; dy_i <= '0; grp <= 1'b0; pix <= '0; cmp <= 1'b0; first <= 1'b1;
      end else if (busy) begin
        if (!cmp) begin
          pix <= pix + 1'b1;
          if (pix == 6'd63) cmp <= 1'b1;
        end else begin
          cmp <= 1'b0;
          if (first || best_sad < sad) begin
            sad  <= best_sad;
            mv_x <= 4'({grp, best_k}) ^ 4'b1000;   // grp*8 + k - 8
            mv_y <= 4'(dy_i) ^ 4'b1000;            // dy_i - 8
          end
          first <= 1'b0;
          grp   <= !grp;
          if (grp) begin
            dy_i <= dy_i + 1'b1;
            if (dy_i == 4'd15) begin busy <= 1'b0; done <= 1'b1; end
          end
        end
      end
    end
  end
endmodule
