// CordicSinCos: sine and cosine of one angle, computed together by an
// iterative CORDIC in rotation mode, one micro-rotation per clock.
//
// The angle is 10Q8 radians (1.0 = 256) anywhere in [-2*pi, 2*pi). On
// start it is folded into [-pi/2, pi/2] (subtracting a full turn, then a
// half turn that negates both results), widened to 16 fraction bits and
// rotated ITER times starting from (K, 0), K = prod 1/sqrt(1+2^-2i), so
// that no gain correction is needed. The atan(2^-i) table below is
// round(atan(2^-i) * 65536). sin and cos come out rounded to 10Q8 with a
// done pulse ITER+2 cycles after start (start cycle counted as the first).
// start is ignored while busy.
//
// The pipeline only names its CORDIC core and says that it gives sine and
// cosine of the entered angle in parallel; iteration count, internal
// precision and the folding scheme are this design's own.
module CordicSinCos
  import grx_pkg::*;
#(
  parameter int ITER = 16
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  fxp_t angle,
  output fxp_t sin_o,
  output fxp_t cos_o,
  output logic busy,
  output logic done
);
  localparam int IW = 24;                       // internal width, Q16
  localparam logic signed [IW-1:0] K_Q16   = 24'sd39797;
  localparam logic signed [IW-1:0] PI_Q16  = 24'sd205887;
  localparam logic signed [IW-1:0] PI2_Q16 = 24'sd102944;

  function automatic logic signed [IW-1:0] atan_q16(input int i);
    unique case (i)
      0: return 24'sd51472;  1: return 24'sd30386;  2: return 24'sd16055;
      3: return 24'sd8150;   4: return 24'sd4091;   5: return 24'sd2047;
      6: return 24'sd1024;   7: return 24'sd512;    8: return 24'sd256;
      9: return 24'sd128;   10: return 24'sd64;    11: return 24'sd32;
     12: return 24'sd16;    13: return 24'sd8;     14: return 24'sd4;
     15: return 24'sd2;
      default: return 24'sd0;   // below 2^-16 rad
    endcase
  endfunction

  logic signed [IW-1:0] x, y, z;
  logic                 neg;
  logic [$clog2(ITER+1)-1:0] it;
  logic                 run;

  // angle folding, combinational on the input
  logic signed [IW-1:0] a0, a1, a2;
  logic                 fold_neg;
  always_comb begin
    a0 = IW'(angle) <<< 8;
    if (a0 > PI_Q16)       a1 = a0 - (PI_Q16 <<< 1);
    else if (a0 < -PI_Q16) a1 = a0 + (PI_Q16 <<< 1);
    else                   a1 = a0;
    fold_neg = 1'b0;
    a2 = a1;
    if (a1 > PI2_Q16) begin
      a2 = a1 - PI_Q16;
      fold_neg = 1'b1;
    end else if (a1 < -PI2_Q16) begin
      a2 = a1 + PI_Q16;
      fold_neg = 1'b1;
    end
  end

  // rounding of a Q16 value to 10Q8
  function automatic fxp_t to_q8(input logic signed [IW-1:0] v, input logic n);
    logic signed [IW-1:0] r;
    r = (v + 24'sd128) >>> 8;
    return n ? -fxp_t'(r) : fxp_t'(r);
  endfunction

  assign busy = run;

  always_ff @(posedge clk) begin
    if (rst) begin
      run <= 1'b0; done <= 1'b0; it <= '0;
      x <= '0; y <= '0; z <= '0; neg <= 1'b0;
      sin_o <= '0; cos_o <= '0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          x   <= K_Q16;
          y   <= '0;
          z   <= a2;
          neg <= fold_neg;
          it  <= '0;
          run <= 1'b1;
        end
      end else if (it == ($clog2(ITER+1))'(ITER)) begin
        sin_o <= to_q8(y, neg);
        cos_o <= to_q8(x, neg);
        done  <= 1'b1;
        run   <= 1'b0;
      end else begin
        if (z >= 0) begin
          x <= x - (y >>> it);
          y <= y + (x >>> it);
          z <= z - atan_q16(int'(it));
        end else begin
          x <= x + (y >>> it);
          y <= y - (x >>> it);
          z <= z + atan_q16(int'(it));
        end
        it <= it + 1'b1;
      end
    end
  end
endmodule
