// GrxDsp: the multiply-add unit of the pipeline, R = A + (B - C) * D in
// 10Q8, one result per clock, registered (one cycle of latency). This is
// the function the DSP48A1 slices of the FPGA are configured for: the
// pre-adder forms B - C, the 18x18 multiplier the product, the post-adder
// adds A. With C = 0 it is the vertex unit's R = A + B * D. The 36-bit
// product is shifted right arithmetically by 8 (truncation) and the sum
// wraps to 18 bits; rounding and saturation are not part of it.
module GrxDsp
  import grx_pkg::*;
(
  input  logic clk,
  input  logic en,
  input  fxp_t a,
  input  fxp_t b,
  input  fxp_t c,
  input  fxp_t d,
  output fxp_t r
);
  logic signed [FXP_W:0]       pre;
  logic signed [2*FXP_W+1:0]   prod;
  assign pre  = (FXP_W+1)'(b) - (FXP_W+1)'(c);
  assign prod = (2*FXP_W+2)'(pre) * (2*FXP_W+2)'(d);
  always_ff @(posedge clk) begin
    if (en) r <= a + fxp_t'(prod >>> FXP_F);
  end
endmodule
