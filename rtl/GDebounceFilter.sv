// GDebounceFilter: debounces a (synchronised) button. A counter restarts
// whenever the input differs from the current output; once the input has
// stayed different for COUNT consecutive cycles the output takes its
// value. The counter scheme and COUNT (10 ms at 100 MHz) are this
// design's choice.
module GDebounceFilter #(
  parameter int COUNT = 1000000
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  localparam int CNT_W = $clog2(COUNT + 1);
  logic [CNT_W-1:0] cnt;
  always_ff @(posedge clk) begin
    if (rst) begin
      q   <= 1'b0;
      cnt <= '0;
    end else if (d == q) begin
      cnt <= '0;
    end else if (cnt == CNT_W'(COUNT - 1)) begin
      q   <= d;
      cnt <= '0;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
