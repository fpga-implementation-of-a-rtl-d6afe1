// GBlockRAM: two-port block RAM on one clock. Port A reads and writes
// (read-first: a read in the cycle of a write returns the old word),
// port B only reads. Both reads are registered, one cycle of latency.
// Contents are cleared at start-up so simulation reads no undefined data.
module GBlockRAM #(
  parameter int W     = 32,
  parameter int DEPTH = 9600,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  output logic [W-1:0]  a_rdata,
  input  logic [AW-1:0] b_addr,
  output logic [W-1:0]  b_rdata
);
  logic [W-1:0] mem [DEPTH];
  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end
endmodule
