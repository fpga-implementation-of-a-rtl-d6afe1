// GEdgeDetector: one-cycle pulse on an edge of d. MODE 0 = rising,
// 1 = falling, 2 = both. The pulse comes in the cycle after the edge is
// sampled (d is compared with its registered copy).
module GEdgeDetector #(
  parameter int MODE = 0
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic pulse
);
  logic d_q;
  always_ff @(posedge clk) begin
    if (rst) d_q <= 1'b0;
    else     d_q <= d;
  end
  always_comb begin
    unique case (MODE)
      0:       pulse =  d & ~d_q;
      1:       pulse = ~d &  d_q;
      default: pulse =  d ^  d_q;
    endcase
  end
endmodule
