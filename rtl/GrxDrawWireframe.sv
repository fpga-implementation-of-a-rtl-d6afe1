// GrxDrawWireframe: draws every edge of the selected model.
//
// For each edge index 0..n_edges-1 it reads the edge (two vertex indices)
// from the model memory's connection table, reads both end points from
// the 2D vertex bank through its single read port (one after the other),
// and lets its GrxDrawLine2D draw the segment; it waits for the line to
// finish before the next edge. It drives the table and bank addresses
// itself. Pixel writes and hold pass between the line unit and the video
// memory.
//
// Interface: start (pulse) with n_edges; edge_index/edge_i to the model
// memory and bank_addr/bank_data to the vertex bank (both one cycle
// latency); done pulses when the last edge is drawn. Each edge costs
// about 8 cycles here plus the line. Edges drawn in sequence is this
// design's choice.
module GrxDrawWireframe
  import grx_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [EIDX_W-1:0] n_edges,
  output logic [EIDX_W-1:0] edge_index,
  input  edge_t             edge_i,
  output vidx_t             bank_addr,
  input  vertex2d_t         bank_data,
  input  logic              hold,
  output coord_t            px_x,
  output coord_t            px_y,
  output logic              px_we,
  output logic              busy,
  output logic              done
);
  typedef enum logic [3:0] {
    S_IDLE, S_EDGE, S_LATCH, S_RD1, S_RD2, S_CAP2, S_LINE, S_WAIT, S_DONE
  } state_t;
  state_t state;

  edge_t     e;
  vertex2d_t p1, p2;
  logic      line_start, line_done;

  assign line_start = (state == S_LINE);
  assign busy       = (state != S_IDLE);

  always_comb begin
    bank_addr = e.v1;
    if (state == S_RD2) bank_addr = e.v2;
  end

  GrxDrawLine2D u_line (
    .clk, .rst, .start(line_start),
    .x0(p1.x), .y0(p1.y), .x1(p2.x), .y1(p2.y),
    .hold, .px_x, .px_y, .px_we, .busy(), .done(line_done)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      done  <= 1'b0;
      edge_index <= '0;
      e <= '0; p1 <= '0; p2 <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          edge_index <= '0;
          state <= (n_edges == '0) ? S_DONE : S_EDGE;
        end
        S_EDGE: state <= S_LATCH;   // table read in flight
        S_LATCH: begin              // edge arrives
          e     <= edge_i;
          state <= S_RD1;
        end
        S_RD1: state <= S_RD2;      // first end point read
        S_RD2: begin                // second end point read
          p1    <= bank_data;
          state <= S_CAP2;
        end
        S_CAP2: begin
          p2    <= bank_data;
          state <= S_LINE;
        end
        S_LINE: state <= S_WAIT;    // line unit samples p1, p2
        S_WAIT: if (line_done) begin
          if (edge_index == n_edges - 1'b1) state <= S_DONE;
          else begin
            edge_index <= edge_index + 1'b1;
            state <= S_EDGE;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
