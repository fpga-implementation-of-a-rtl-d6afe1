// GrxVertexProjection: projects one 3D model vertex to the view plane.
//
// It forms P' = A * [x y z 1]^T with two multiply-add units (R = A + B*D,
// three accumulating steps per row), divides 1 by the homogeneous
// coordinate D = P'3 with the serial divider, and multiplies the two
// plane coordinates by M = 1/D: Q0 = P'0 * M, Q1 = P'1 * M. Row 3 is
// formed first so that the division overlaps the rows 0 and 1, the order
// of the original unit's computation. All values are 10Q8; M is the
// 10Q8 quotient 2^16 / D. D below one LSB (a vertex on or in front of the
// eye, which a normalised model never produces) is clamped to one LSB.
//
// Interface: start (pulse, ignored while busy) samples matrix and vertex;
// q0/q1 are valid with the done pulse, about 60 cycles later (the
// divider's 2*24+2 cycles dominate), and hold until the next start.
module GrxVertexProjection
  import grx_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      start,
  input  matrix_t   matrix,
  input  vertex3d_t vertex,
  output fxp_t      q0,
  output fxp_t      q1,
  output logic      busy,
  output logic      done
);
  typedef enum logic [3:0] {
    S_IDLE, S_R3X, S_R3Y, S_R3Z, S_PX, S_PY, S_PZ, S_WAIT_DIV, S_SCALE, S_DONE
  } state_t;
  state_t state;

  matrix_t   m;
  vertex3d_t v;
  fxp_t      r0, r1, mrec;
  logic      div_ready;

  logic        div_start, div_done;
  logic [23:0] div_q;
  logic [23:0] div_den;
  assign div_den = (r0 < fxp_t'(1)) ? 24'd1 : 24'(r0);
  GSerialDivider #(.WIDTH(24)) u_div (
    .clk, .rst, .start(div_start), .dividend(24'd65536), .divisor(div_den),
    .quotient(div_q), .remainder(), .busy(), .done(div_done)
  );

  // operand selection of both units
  logic en;
  fxp_t a0, b0, d0, a1, b1, d1;
  always_comb begin
    en = 1'b1;
    a0 = r0; b0 = '0; d0 = '0;
    a1 = r1; b1 = '0; d1 = '0;
    div_start = 1'b0;
    unique case (state)
      S_R3X: begin a0 = m[15]; b0 = m[12]; d0 = v.x; end
      S_R3Y: begin             b0 = m[13]; d0 = v.y; end
      S_R3Z: begin             b0 = m[14]; d0 = v.z; end
      S_PX: begin
        div_start = 1'b1;      // r0 now holds D
        a0 = m[3]; b0 = m[0]; d0 = v.x;
        a1 = m[7]; b1 = m[4]; d1 = v.x;
      end
      S_PY: begin b0 = m[1]; d0 = v.y; b1 = m[5]; d1 = v.y; end
      S_PZ: begin b0 = m[2]; d0 = v.z; b1 = m[6]; d1 = v.z; end
      S_SCALE: begin
        a0 = '0; b0 = r0; d0 = mrec;
        a1 = '0; b1 = r1; d1 = mrec;
      end
      default: en = 1'b0;
    endcase
  end

  GrxDsp u_dsp0 (.clk, .en, .a(a0), .b(b0), .c('0), .d(d0), .r(r0));
  GrxDsp u_dsp1 (.clk, .en, .a(a1), .b(b1), .c('0), .d(d1), .r(r1));

  assign busy = (state != S_IDLE);
  assign q0   = r0;
  assign q1   = r1;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      done  <= 1'b0;
      m <= '0; v <= '0; mrec <= '0; div_ready <= 1'b0;
    end else begin
      done <= 1'b0;
      if (div_done) begin
        mrec      <= (div_q > 24'd131071) ? fxp_t'(131071) : fxp_t'(div_q);
        div_ready <= 1'b1;
      end
      unique case (state)
        S_IDLE: if (start) begin
          m <= matrix;
          v <= vertex;
          div_ready <= 1'b0;
          state <= S_R3X;
        end
        S_R3X: state <= S_R3Y;
        S_R3Y: state <= S_R3Z;
        S_R3Z: state <= S_PX;
        S_PX:  state <= S_PY;
        S_PY:  state <= S_PZ;
        S_PZ:  state <= S_WAIT_DIV;
        S_WAIT_DIV: if (div_ready || div_done) state <= S_SCALE;
        S_SCALE: state <= S_DONE;
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
