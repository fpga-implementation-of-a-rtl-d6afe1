// PanelImageROM: the 640x32 status panel shown under the picture.
//
// The image is stored as 20480 two-bit colour indices, addressed by
// y*640 + x. The index read from the ROM (one cycle) goes through a
// four-entry look-up table (a second cycle) that gives the 8-bit colour:
// 00 -> 00000000, 01 -> 01110101, 10 -> 01001110, 11 -> 11111111.
// Addressing and table follow the original panel memory. The original
// artwork is not available; the ROM is filled at start-up by a formula
// that draws a frame, a dark background and a row of blocks:
//   index = 3 on the outer border, 2 on 8-pixel blocks every 16 pixels in
//   rows 10..21, 1 elsewhere.
// Replace panel_pixel() (or load a file) for a real image.
//
// Interface: x (0..639), y (0..31) in; color out two cycles later.
module PanelImageROM
  import grx_pkg::*;
#(
  parameter int IMG_W = 640,
  parameter int IMG_H = 32
) (
  input  logic       clk,
  input  coord_t     x,
  input  logic [4:0] y,
  output color_t     color
);
  localparam int N  = IMG_W * IMG_H;
  localparam int AW = $clog2(N);

  function automatic logic [1:0] panel_pixel(input int px, input int py);
    if (px == 0 || py == 0 || px == IMG_W - 1 || py == IMG_H - 1) return 2'd3;
    if (py >= 10 && py <= 21 && (px % 16) >= 4 && (px % 16) < 12)  return 2'd2;
    return 2'd1;
  endfunction

  logic [1:0] rom [N];
  initial begin
    for (int py = 0; py < IMG_H; py++)
      for (int px = 0; px < IMG_W; px++)
        rom[py * IMG_W + px] = panel_pixel(px, py);
  end

  logic [AW-1:0] addr;
  logic [1:0]    index;
  assign addr = AW'(y) * AW'(IMG_W) + AW'(x);

  always_ff @(posedge clk) begin
    index <= rom[addr];
    unique case (index)
      2'd0: color <= 8'b00000000;
      2'd1: color <= 8'b01110101;
      2'd2: color <= 8'b01001110;
      default: color <= 8'b11111111;
    endcase
  end
endmodule
