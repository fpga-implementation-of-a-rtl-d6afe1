// GResynchronizer: brings a one-bit asynchronous signal into the clock
// domain of clk through a chain of STAGES flip-flops (two by default).
// Output lags the input by STAGES rising edges. The stage count is a
// choice of this design.
module GResynchronizer #(
  parameter int  STAGES = 2,
  parameter bit  INIT   = 1'b0
) (
  input  logic clk,
  input  logic rst,      // synchronous, loads INIT
  input  logic d,
  output logic q
);
  logic [STAGES-1:0] sync;
  always_ff @(posedge clk) begin
    if (rst) sync <= {STAGES{INIT}};
    else     sync <= {sync[STAGES-2:0], d};
  end
  assign q = sync[STAGES-1];
endmodule
