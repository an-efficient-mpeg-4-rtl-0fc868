// me_pe: one processing element of the coarse motion estimator. Each enabled
// cycle it adds |cur - ref| to its accumulator; `clr` restarts the sum. Eight
// of them in me_coarse evaluate eight candidate vectors at once.
module me_pe (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        en,
  input  logic [7:0]  cur,
  input  logic [7:0]  ref_px,
  output logic [13:0] acc
);
  logic [7:0] absdiff;
  assign absdiff = (cur > ref_px) ? cur - ref_px : ref_px - cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (clr) acc <= '0;
    else if (en)  acc <= acc + 14'(absdiff);
  end
endmodule
