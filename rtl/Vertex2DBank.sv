// Vertex2DBank: small two-port cache of projected vertices in screen
// coordinates (x and y, 10 bits each). Port A is written by the graphics
// unit as vertices are projected; port B is read by the wireframe drawer
// with one cycle of latency (registered read). Depth (64) is this
// design's choice; it bounds the vertex count of a model.
module Vertex2DBank
  import grx_pkg::*;
#(
  parameter int DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  vertex2d_t                a_data,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  output vertex2d_t                b_data
);
  vertex2d_t mem [DEPTH];
  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_data;
    b_data <= mem[b_addr];
  end
endmodule
