// GAccumulator: W-bit accumulator register. clr loads init (synchronous
// reset to a value), en adds addend; ovf is the carry out of that
// addition, registered with the sum, so it flags an unsigned overflow in
// the same cycle the wrapped sum appears.
module GAccumulator #(
  parameter int W = 24
) (
  input  logic         clk,
  input  logic         clr,
  input  logic [W-1:0] init,
  input  logic         en,
  input  logic [W-1:0] addend,
  output logic [W-1:0] sum,
  output logic         ovf
);
  logic [W:0] nxt;
  assign nxt = {1'b0, sum} + {1'b0, addend};
  always_ff @(posedge clk) begin
    if (clr) begin
      sum <= init;
      ovf <= 1'b0;
    end else if (en) begin
      sum <= nxt[W-1:0];
      ovf <= nxt[W];
    end
  end
endmodule
