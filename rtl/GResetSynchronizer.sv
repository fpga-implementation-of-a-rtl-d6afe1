// GResetSynchronizer: turns an asynchronous reset into one for the clk
// domain. The reset output asserts at once when rst_async is active and
// releases STAGES clock edges after it goes away, so every flip-flop
// leaves reset on the same edge. Active-high output.
module GResetSynchronizer #(
  parameter int STAGES = 2
) (
  input  logic clk,
  input  logic rst_async,
  output logic rst
);
  logic [STAGES-1:0] sync;
  always_ff @(posedge clk or posedge rst_async) begin
    if (rst_async) sync <= '1;
    else           sync <= {sync[STAGES-2:0], 1'b0};
  end
  assign rst = sync[STAGES-1];
endmodule
