// GNonOverflowCounter: bidirectional counter that stops at MIN and MAX
// instead of wrapping. A pre-divider lets it move one step every
// PRESCALE cycles while up or down is held (down wins if both are). Used
// for the viewing angle. rst loads RST_VAL.
module GNonOverflowCounter #(
  parameter int W        = 10,
  parameter int MIN      = 0,
  parameter int MAX      = 511,
  parameter int RST_VAL  = 256,
  parameter int PRESCALE = 500000
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         up,
  input  logic         down,
  output logic [W-1:0] value
);
  localparam int PW = $clog2(PRESCALE + 1);
  logic [PW-1:0] pre;
  logic tick;
  assign tick = (pre == PW'(PRESCALE - 1));
  always_ff @(posedge clk) begin
    if (rst || !(up || down) || tick) pre <= '0;
    else                              pre <= pre + 1'b1;
  end
  always_ff @(posedge clk) begin
    if (rst) value <= W'(RST_VAL);
    else if (tick) begin
      if (down) begin
        if (value > W'(MIN)) value <= value - 1'b1;
      end else if (up) begin
        if (value < W'(MAX)) value <= value + 1'b1;
      end
    end
  end
endmodule
