// grx_pkg: types and constants shared by the 3D wireframe pipeline.
//
// All arithmetic of the pipeline uses signed fixed point "10Q8": 18 bits,
// 10 integer bits (two's complement) and 8 fraction bits, so 1.0 = 256.
// The projection matrix travels as a 4x4 array of such numbers (288 bits),
// element (r,c) at flat index 4*r+c. Screen coordinates are 10-bit
// unsigned integers. Colours are 8 bits, RGB 3:3:2 (this encoding is a
// choice of this design; only the 8-bit depth is given).
package grx_pkg;
  localparam int FXP_W = 18;
  localparam int FXP_F = 8;
  typedef logic signed [FXP_W-1:0] fxp_t;

  localparam fxp_t FXP_ONE  = fxp_t'(256);
  localparam fxp_t FXP_HALF = fxp_t'(128);
  // sqrt(3)/2 and sqrt(2) in 10Q8
  localparam fxp_t FXP_SQRT3_2 = fxp_t'(222);
  localparam fxp_t FXP_SQRT2   = fxp_t'(362);
  // one full turn, 2*pi*256 rounded, and pi
  localparam int ANGLE_TURN = 1608;
  localparam int ANGLE_PI   = 804;

  typedef fxp_t [15:0] matrix_t;      // element (r,c) at [4*r+c]

  localparam int CW = 10;             // screen coordinate width
  typedef logic [CW-1:0] coord_t;

  typedef struct packed {
    fxp_t z;
    fxp_t y;
    fxp_t x;
  } vertex3d_t;

  typedef struct packed {
    coord_t y;
    coord_t x;
  } vertex2d_t;

  typedef logic [7:0] color_t;        // RGB332

  localparam int SCREEN_W = 640;
  localparam int SCREEN_H = 480;
  localparam int PANEL_H  = 32;
  localparam int DRAW_H   = SCREEN_H - PANEL_H;

  localparam int VIDX_W = 6;          // vertex index width
  localparam int EIDX_W = 6;          // edge index width
  typedef logic [VIDX_W-1:0] vidx_t;

  typedef struct packed {
    vidx_t v2;
    vidx_t v1;
  } edge_t;
endpackage
