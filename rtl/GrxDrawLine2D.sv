// GrxDrawLine2D: rasterises the segment between two integer points into
// a stream of pixel writes, one pixel every two clock cycles.
//
// The end points may come in any order and direction. The unit first
// folds the segment into the octant with slope 0..1: it swaps the axes
// when |dy| > |dx| (steep), orders the points so that the major
// coordinate u grows, and remembers whether the minor coordinate v falls.
// The slope dv/du is computed by the serial divider as a fixed-point
// number with F = bitlength(du) + 1 fraction bits; F is chosen per line so
// that the accumulated error stays below half a pixel and the last point
// lands exactly on the end vertex. Then a counter steps u, an accumulator
// (started at one half, so the minor coordinate is rounded) adds the
// slope, and each point is unfolded back to its octant. Each point takes
// a compute cycle and a write cycle.
//
// Interface: start (pulse, ignored while busy) samples x0,y0,x1,y1. Pixels
// come out on px_x/px_y with px_we; a write counts as taken in a cycle
// where px_we is high and hold is low, otherwise px_we stays high and the
// point waits (hold is the video memory's busy). done pulses after the
// last point. Fixed cost: 7 cycles plus the divider's 2*21+2, then 2 per
// point, against roughly 40 + 2n for the original unit. The state
// sequence is this design's own.
module GrxDrawLine2D
  import grx_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  coord_t x0,
  input  coord_t y0,
  input  coord_t x1,
  input  coord_t y1,
  input  logic   hold,
  output coord_t px_x,
  output coord_t px_y,
  output logic   px_we,
  output logic   busy,
  output logic   done
);
  localparam int DW = 21;            // divider width: 10-bit dv << up to 11
  localparam int AW = 22;            // accumulator width

  typedef enum logic [3:0] {
    S_IDLE, S_FOLD, S_ORDER, S_SLOPE, S_DIV, S_INIT, S_GEN_A, S_GEN_B, S_DONE
  } state_t;
  state_t state;

  coord_t ax, ay, bx, by;            // captured end points
  coord_t u0, v0, u1, v1;            // folded end points
  coord_t u, du;
  logic   steep, vneg;
  logic [3:0] frac;                  // F

  function automatic logic [3:0] bitlen(input coord_t n);
    logic [3:0] r;
    r = '0;
    for (int i = 0; i < CW; i++) if (n[i]) r = 4'(i + 1);
    return r;
  endfunction

  coord_t adx, ady, dv_abs, du_n;
  assign du_n   = (u1 < u0) ? u0 - u1 : u1 - u0;
  assign adx    = (bx >= ax) ? bx - ax : ax - bx;
  assign ady    = (by >= ay) ? by - ay : ay - by;
  assign dv_abs = (v1 >= v0) ? v1 - v0 : v0 - v1;

  // divider for the slope
  logic          div_start, div_done;
  logic [DW-1:0] div_q, dividend;
  assign dividend  = DW'(dv_abs) << frac;
  assign div_start = (state == S_SLOPE);
  GSerialDivider #(.WIDTH(DW)) u_div (
    .clk, .rst, .start(div_start), .dividend(dividend), .divisor(DW'(du)),
    .quotient(div_q), .remainder(), .busy(), .done(div_done)
  );

  // minor-coordinate accumulator
  logic          acc_clr, acc_en;
  logic [AW-1:0] acc, acc_init, slope;
  assign acc_init = AW'(1) << (frac - 4'd1);
  assign acc_clr  = (state == S_INIT);
  assign acc_en   = (state == S_GEN_B) && !hold && (u != u1);
  GAccumulator #(.W(AW)) u_acc (
    .clk, .clr(acc_clr), .init(acc_init), .en(acc_en), .addend(slope),
    .sum(acc), .ovf()
  );

  coord_t vstep, vv;
  assign vstep = coord_t'(acc >> frac);
  assign vv    = vneg ? v0 - vstep : v0 + vstep;

  assign busy  = (state != S_IDLE);
  assign px_we = (state == S_GEN_B);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      done  <= 1'b0;
      {ax, ay, bx, by, u0, v0, u1, v1, u, du, px_x, px_y} <= '0;
      {steep, vneg} <= '0;
      frac  <= 4'd1;
      slope <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          ax <= x0; ay <= y0; bx <= x1; by <= y1;
          state <= S_FOLD;
        end
        S_FOLD: begin               // swap axes for steep lines
          steep <= (ady > adx);
          if (ady > adx) begin
            u0 <= ay; v0 <= ax; u1 <= by; v1 <= bx;
          end else begin
            u0 <= ax; v0 <= ay; u1 <= bx; v1 <= by;
          end
          state <= S_ORDER;
        end
        S_ORDER: begin              // make u grow
          if (u1 < u0) begin
            u0 <= u1; v0 <= v1; u1 <= u0; v1 <= v0;
          end
          du   <= du_n;
          frac <= bitlen(du_n) + 4'd1;
          state <= S_SLOPE;
        end
        S_SLOPE: begin              // divider starts in this cycle
          vneg  <= (v1 < v0);
          state <= S_DIV;
        end
        S_DIV: if (div_done) begin
          slope <= AW'(div_q);
          state <= S_INIT;
        end
        S_INIT: begin
          u     <= u0;
          state <= S_GEN_A;
        end
        S_GEN_A: if (!hold) begin
          px_x  <= steep ? vv : u;
          px_y  <= steep ? u  : vv;
          state <= S_GEN_B;
        end
        S_GEN_B: if (!hold) begin
          if (u == u1) state <= S_DONE;
          else begin
            u     <= u + 1'b1;
            state <= S_GEN_A;
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
