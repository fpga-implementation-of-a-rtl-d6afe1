// GrxGenerateProjectionMatrix: builds the 4x4 perspective projection
// matrix A = P * T * R (10Q8) from azimuth, elevation and viewing angle.
//
// Mathematics. R = Rx(el - pi/2) * Rz(-az) gives
//   row0 = [ cos az,          sin az,          0      ]
//   row1 = [-sin el sin az,   sin el cos az,   cos el ]
//   row2 = [ cos el sin az,  -cos el cos az,   sin el ]
// T moves the projection plane to the point where it touches the sphere
// (radius sqrt(3)/2) around the unit-cube model, on the viewing axis; in
// the rotated frame its column is t = -0.5 * R*[1,1,1] - [0,0,0.8660].
// P with f = d adds row3 = -X * row2 + [0,0,0,1], X = 1/f =
// sqrt(2) * tan(phi/2); phi = 0 gives X = 0, an orthographic view.
// Reading T's translation as the touching point, and the identity
// diagonals of T and P, is this design's interpretation of the formulas.
//
// Hardware. As in the original unit, one CORDIC core supplies sin/cos,
// tan(phi/2) comes from a serial divider that is started right after the
// first CORDIC run and works while the rest is computed, and the other
// arithmetic goes through two multiply-add units R = A + (B - C) * D
// working side by side. The state machine runs three CORDIC jobs (phi/2,
// el, az) and then walks a table of 10 steps; each step gives both units
// an operation (destination and A, B, C, D selects) over a small register
// file holding the trig values, constants 0, 1, 0.5, -0.8660, 1.4142 and
// the matrix itself. Sources SRC_RA/SRC_RB are the two unit outputs, a
// bypass that lets a result feed the next step before it is written back,
// so sums such as the translation column are built over several steps.
// Steps 0..6 form the rotation products and the translation column; steps
// 7..9 need tan(phi/2) and wait for the divider. The order of the CORDIC
// jobs and the two-unit arrangement follow the original schedule; the
// step table itself is this design's. Under 100 cycles from start to done.
//
// Interface: start (pulse, ignored while busy); inputs sampled at start.
// matrix is valid from the done pulse until the next start.
module GrxGenerateProjectionMatrix
  import grx_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    start,
  input  fxp_t    azimuth,
  input  fxp_t    elevation,
  input  fxp_t    view_angle,
  output matrix_t matrix,
  output logic    busy,
  output logic    done
);
  // ---- operand sources of the multiply-add units ----
  typedef enum logic [4:0] {
    SRC_ZERO, SRC_ONE, SRC_HALF, SRC_NSQ3, SRC_SQ2,
    SRC_SA, SRC_CA, SRC_SE, SRC_CE, SRC_W, SRC_X, SRC_RA, SRC_RB,
    SRC_M0  = 5'd16, SRC_M1, SRC_M2, SRC_M3, SRC_M4, SRC_M5, SRC_M6, SRC_M7,
    SRC_M8, SRC_M9, SRC_M10, SRC_M11, SRC_M12, SRC_M13, SRC_M14, SRC_M15
  } src_t;

  typedef struct packed {
    logic [4:0] dst;     // 0..15 matrix element, 16 = X, 17 = none
    src_t a, b, c, d;
  } op_t;

  localparam int N_STEPS    = 10;
  localparam int STEP_SPLIT = 7;     // steps from here on need tan(phi/2)
  localparam logic [4:0] DST_X    = 5'd16;
  localparam logic [4:0] DST_NONE = 5'd17;
  localparam op_t NOP = '{DST_NONE, SRC_ZERO, SRC_ZERO, SRC_ZERO, SRC_ZERO};

  // one step = one operation on each unit; RA/RB are the two unit outputs
  function automatic op_t op_a(input int i);
    unique case (i)
      // rotation products
      0: return '{5'd4,  SRC_ZERO, SRC_ZERO, SRC_SE,   SRC_SA};  // -se*sa
      1: return '{5'd8,  SRC_ZERO, SRC_CE,   SRC_ZERO, SRC_SA};  //  ce*sa
      // translation column t = -0.5*rowsum - [0,0,0.866]
      2: return '{5'd3,  SRC_ZERO, SRC_ZERO, SRC_M0,   SRC_HALF};
      3: return '{5'd3,  SRC_RA,   SRC_ZERO, SRC_M1,   SRC_HALF};
      4: return '{5'd11, SRC_NSQ3, SRC_ZERO, SRC_M8,   SRC_HALF};
      5: return '{5'd11, SRC_RA,   SRC_ZERO, SRC_M9,   SRC_HALF};
      6: return '{5'd11, SRC_RA,   SRC_ZERO, SRC_M10,  SRC_HALF};
      // perspective row: X = sqrt2*tan(phi/2), row3 = -X*row2 + [0,0,0,1]
      7: return '{DST_X, SRC_ZERO, SRC_W,    SRC_ZERO, SRC_SQ2};
      8: return '{5'd12, SRC_ZERO, SRC_ZERO, SRC_RA,   SRC_M8};
      default: return '{5'd14, SRC_ZERO, SRC_ZERO, SRC_X, SRC_M10};
    endcase
  endfunction
  function automatic op_t op_b(input int i);
    unique case (i)
      0: return '{5'd5,  SRC_ZERO, SRC_SE,   SRC_ZERO, SRC_CA};  //  se*ca
      1: return '{5'd9,  SRC_ZERO, SRC_ZERO, SRC_CE,   SRC_CA};  // -ce*ca
      2: return '{5'd7,  SRC_ZERO, SRC_ZERO, SRC_M4,   SRC_HALF};
      3: return '{5'd7,  SRC_RB,   SRC_ZERO, SRC_M5,   SRC_HALF};
      4: return '{5'd7,  SRC_RB,   SRC_ZERO, SRC_M6,   SRC_HALF};
      8: return '{5'd13, SRC_ZERO, SRC_ZERO, SRC_RA,   SRC_M9};
      9: return '{5'd15, SRC_ONE,  SRC_ZERO, SRC_X,    SRC_M11};
      default: return NOP;
    endcase
  endfunction

  typedef enum logic [2:0] {
    S_IDLE, S_PHI, S_EL, S_AZ, S_OPS, S_WAIT_DIV, S_WB, S_DONE
  } state_t;
  state_t state;

  fxp_t sa, ca, se, ce, w, x_reg, ra, rb;
  fxp_t az_q, el_q;
  logic div_ready;
  logic [3:0] step;
  op_t  opa, opb;
  logic wb_valid;
  logic [4:0] wb_dst_a, wb_dst_b;

  // CORDIC
  logic cor_start, cor_done;
  fxp_t cor_angle, cor_sin, cor_cos;
  CordicSinCos u_cordic (
    .clk, .rst, .start(cor_start), .angle(cor_angle),
    .sin_o(cor_sin), .cos_o(cor_cos), .busy(), .done(cor_done)
  );

  // tan(phi/2) = sin/cos, 10Q8 quotient of (sin << 8) / cos
  logic        div_start, div_done;
  logic [23:0] div_q;
  GSerialDivider #(.WIDTH(24)) u_div (
    .clk, .rst, .start(div_start),
    .dividend({cor_sin[15:0], 8'd0}), .divisor({6'd0, cor_cos}),
    .quotient(div_q), .remainder(), .busy(), .done(div_done)
  );

  // multiply-add units
  function automatic fxp_t src_val(input src_t s, input matrix_t m,
                                   input fxp_t sa_i, ca_i, se_i, ce_i, w_i, x_i, ra_i, rb_i);
    unique case (s)
      SRC_ZERO: return '0;
      SRC_ONE:  return FXP_ONE;
      SRC_HALF: return FXP_HALF;
      SRC_NSQ3: return -FXP_SQRT3_2;
      SRC_SQ2:  return FXP_SQRT2;
      SRC_SA:   return sa_i;
      SRC_CA:   return ca_i;
      SRC_SE:   return se_i;
      SRC_CE:   return ce_i;
      SRC_W:    return w_i;
      SRC_X:    return x_i;
      SRC_RA:   return ra_i;
      SRC_RB:   return rb_i;
      default:  return m[s[3:0]];
    endcase
  endfunction

  logic dsp_en;
  assign opa    = op_a(int'(step));
  assign opb    = op_b(int'(step));
  assign dsp_en = (state == S_OPS);
  GrxDsp u_dsp_a (.clk, .en(dsp_en),
    .a(src_val(opa.a, matrix, sa, ca, se, ce, w, x_reg, ra, rb)),
    .b(src_val(opa.b, matrix, sa, ca, se, ce, w, x_reg, ra, rb)),
    .c(src_val(opa.c, matrix, sa, ca, se, ce, w, x_reg, ra, rb)),
    .d(src_val(opa.d, matrix, sa, ca, se, ce, w, x_reg, ra, rb)), .r(ra));
  GrxDsp u_dsp_b (.clk, .en(dsp_en),
    .a(src_val(opb.a, matrix, sa, ca, se, ce, w, x_reg, ra, rb)),
    .b(src_val(opb.b, matrix, sa, ca, se, ce, w, x_reg, ra, rb)),
    .c(src_val(opb.c, matrix, sa, ca, se, ce, w, x_reg, ra, rb)),
    .d(src_val(opb.d, matrix, sa, ca, se, ce, w, x_reg, ra, rb)), .r(rb));

  assign busy = (state != S_IDLE);

  always_comb begin
    cor_start = 1'b0;
    cor_angle = '0;
    div_start = 1'b0;
    unique case (state)
      S_IDLE: begin
        cor_start = start;
        cor_angle = view_angle >>> 1;
      end
      S_PHI: begin
        cor_start = cor_done;
        cor_angle = el_q;
        div_start = cor_done;
      end
      S_EL: begin
        cor_start = cor_done;
        cor_angle = az_q;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      done  <= 1'b0;
      matrix <= '0;
      {sa, ca, se, ce, w, x_reg, az_q, el_q} <= '0;
      div_ready <= 1'b0;
      step      <= '0;
      wb_valid  <= 1'b0;
      wb_dst_a  <= DST_NONE;
      wb_dst_b  <= DST_NONE;
    end else begin
      done <= 1'b0;
      // write-back of the previous multiply-add results
      if (wb_valid) begin
        if (wb_dst_a == DST_X)      x_reg <= ra;
        else if (wb_dst_a < 5'd16)  matrix[wb_dst_a[3:0]] <= ra;
        if (wb_dst_b < 5'd16)       matrix[wb_dst_b[3:0]] <= rb;
      end
      wb_valid <= dsp_en;
      wb_dst_a <= opa.dst;
      wb_dst_b <= opb.dst;
      if (div_done) begin
        w         <= (div_q > 24'd131071) ? fxp_t'(131071) : fxp_t'(div_q);
        div_ready <= 1'b1;
      end

      unique case (state)
        S_IDLE: if (start) begin
          az_q      <= azimuth;
          el_q      <= elevation;
          div_ready <= 1'b0;
          state     <= S_PHI;
        end
        S_PHI: if (cor_done) state <= S_EL;
        S_EL: if (cor_done) begin
          se    <= cor_sin;
          ce    <= cor_cos;
          state <= S_AZ;
        end
        S_AZ: if (cor_done) begin
          sa <= cor_sin;
          ca <= cor_cos;
          matrix[0]  <= cor_cos;
          matrix[1]  <= cor_sin;
          matrix[2]  <= '0;
          matrix[6]  <= ce;
          matrix[10] <= se;
          step  <= '0;
          state <= S_OPS;
        end
        S_OPS: begin
          if (step == 4'(N_STEPS - 1))         state <= S_WB;
          else if (step == 4'(STEP_SPLIT - 1)) state <= S_WAIT_DIV;
          step <= step + 1'b1;
        end
        S_WAIT_DIV: if (div_ready) state <= S_OPS;
        S_WB:   state <= S_DONE;
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
