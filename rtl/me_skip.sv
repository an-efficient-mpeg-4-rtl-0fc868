// me_skip: the "ME skip" engine of the mixed motion estimator. Before any
// search it evaluates one candidate, the predicted motion vector
// (pmv_x, pmv_y), and returns its sum of absolute differences (SAD) against
// the 8x8 half-resolution current block. It walks the block one row per
// cycle: it asks for current row y and for the 8 reference pixels of window
// row y+8+pmv_y starting at column 8+pmv_x, and adds their 8 absolute
// differences. Pixel data arrive combinationally in the same cycle. `done`
// pulses 8 cycles after `start` with `sad` valid. Vectors are in
// half-resolution pixels, in the fixed range -8..+7. The row-per-cycle
// organisation is this design's own choice.
module me_skip (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic signed [3:0] pmv_x,
  input  logic signed [3:0] pmv_y,
  // memory read ports
  output logic [2:0]        cur_row,
  input  logic [7:0][7:0]   cur_pix,
  output logic [4:0]        ref_row,
  output logic [4:0]        ref_col,
  input  logic [7:0][7:0]   ref_pix,
  output logic              busy,
  output logic              done,
  output logic [13:0]       sad
);
  logic [2:0] y;
  logic [10:0] row_sum;

  assign cur_row = y;
  assign ref_row = 5'(5'(y) + 5'd8 + 5'(pmv_y));
  assign ref_col = 5'(5'd8 + 5'(pmv_x));

  always_comb begin
    row_sum = '0;
    for (int k = 0; k < 8; k++)
      row_sum += 11'(8'((cur_pix[k] > ref_pix[k]) ? cur_pix[k] - ref_pix[k] : ref_pix[k] - cur_pix[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y <= '0; busy <= 1'b0; done <= 1'b0; sad <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; y <= '0; sad <= '0;
      end else if (busy) begin
        sad <= sad + 14'(row_sum);
        y   <= y + 1'b1;
        if (y == 3'd7) begin busy <= 1'b0; done <= 1'b1; end
      end
    end
  end
endmodule
