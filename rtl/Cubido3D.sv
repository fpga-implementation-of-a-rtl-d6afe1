// Cubido3D: top level of the wireframe 3D viewer.
//
// Five buttons steer the view. Each is resynchronised and debounced; then
//   left / right            azimuth down / up     (accelerating, wraps)
//   up / down               elevation up / down   (accelerating, wraps)
//   centre + up / down      viewing angle up / down (stops at 0 and 511)
//   centre + left / right   previous / next model
//   centre + left + right   global reset
// (combinations as printed in the help line of the original panel).
// Angles are 10Q8 radians: azimuth and elevation count 0..1607 (one turn),
// the viewing angle 0..511 (0 to 2 rad; 0 is an orthographic view).
//
// On every vertical sync pulse the graphics unit redraws the single
// frame buffer (clear, matrix, vertices, wireframe), which takes well
// under the vertical blanking time. The VGA adapter asks for each line
// in the system domain; a 4-stage compositor answers with white where
// the frame buffer has a pixel, the panel image in the bottom 32 rows
// and the dithered background elsewhere.
// Completed redraws are counted per FPS_PERIOD system clocks (one second)
// and shown on a 4-digit multiplexed 7-segment display.
//
// Clocks: clk_sys (100 MHz) for everything but the VGA timing, clk_pix
// (25 MHz) for the VGA timing; both come from an external clock manager.
// rst_n_async is the board reset. Counter ranges, the second timer and
// the compositor are this design's choices.
module Cubido3D
  import grx_pkg::*;
#(
  parameter int DEBOUNCE   = 1000000,
  parameter int PRESCALE   = 500000,
  parameter int FPS_PERIOD = 100000000,
  parameter int REFRESH    = 100000
) (
  input  logic       clk_sys,
  input  logic       clk_pix,
  input  logic       rst_n_async,
  input  logic [4:0] btn,          // {centre, down, up, right, left}
  output logic [2:0] vga_r,
  output logic [2:0] vga_g,
  output logic [1:0] vga_b,
  output logic       vga_hs,
  output logic       vga_vs,
  output logic [7:0] seg_n,
  output logic [3:0] an_n
);
  localparam int PIX_LAT = 4;

  // ---------------- resets ----------------
  logic rst_board, rst_sys, rst_pix, combo_rst;
  GResetSynchronizer u_rst_sys (.clk(clk_sys), .rst_async(!rst_n_async), .rst(rst_board));
  GResetSynchronizer u_rst_pix (.clk(clk_pix), .rst_async(!rst_n_async || combo_rst), .rst(rst_pix));
  assign rst_sys = rst_board || combo_rst;

  // ---------------- buttons ----------------
  logic [4:0] btn_s, btn_d;
  for (genvar i = 0; i < 5; i++) begin : g_btn
    GResynchronizer u_sync (.clk(clk_sys), .rst(rst_board), .d(btn[i]), .q(btn_s[i]));
    GDebounceFilter #(.COUNT(DEBOUNCE)) u_deb (.clk(clk_sys), .rst(rst_board), .d(btn_s[i]), .q(btn_d[i]));
  end
  logic b_l, b_r, b_u, b_d, b_c;
  assign {b_c, b_d, b_u, b_r, b_l} = btn_d;

  always_ff @(posedge clk_sys) begin
    if (rst_board) combo_rst <= 1'b0;
    else           combo_rst <= b_c && b_l && b_r;
  end

  logic [10:0] az_cnt, el_cnt;
  logic [9:0]  va_cnt;
  GAccelerateCounter #(.W(11), .TOP(ANGLE_TURN - 1), .PRESCALE(PRESCALE)) u_az (
    .clk(clk_sys), .rst(rst_sys), .up(!b_c && b_r && !b_l), .down(!b_c && b_l && !b_r), .value(az_cnt));
  GAccelerateCounter #(.W(11), .TOP(ANGLE_TURN - 1), .PRESCALE(PRESCALE), .RST_VAL(ANGLE_PI / 4)) u_el (
    .clk(clk_sys), .rst(rst_sys), .up(!b_c && b_u && !b_d), .down(!b_c && b_d && !b_u), .value(el_cnt));
  GNonOverflowCounter #(.W(10), .MIN(0), .MAX(511), .RST_VAL(256), .PRESCALE(PRESCALE)) u_va (
    .clk(clk_sys), .rst(rst_sys), .up(b_c && b_u && !b_d), .down(b_c && b_d && !b_u), .value(va_cnt));

  logic model_next, model_prev;
  logic [1:0] model_sel;
  GEdgeDetector u_ed_next (.clk(clk_sys), .rst(rst_sys), .d(b_c && b_r && !b_l), .pulse(model_next));
  GEdgeDetector u_ed_prev (.clk(clk_sys), .rst(rst_sys), .d(b_c && b_l && !b_r), .pulse(model_prev));
  always_ff @(posedge clk_sys) begin
    if (rst_sys)         model_sel <= '0;
    else if (model_next) model_sel <= model_sel + 1'b1;
    else if (model_prev) model_sel <= model_sel - 1'b1;
  end

  fxp_t azimuth, elevation, view_angle;
  assign azimuth    = fxp_t'(az_cnt);
  assign elevation  = fxp_t'(el_cnt);
  assign view_angle = fxp_t'(va_cnt);

  // ---------------- graphics pipeline and frame buffer ----------------
  logic   vsync_sys, redraw, gfx_busy, gfx_done;
  logic   vram_clear, vram_busy, px_we;
  coord_t px_x, px_y;
  GEdgeDetector u_ed_vs (.clk(clk_sys), .rst(rst_sys), .d(vsync_sys), .pulse(redraw));

  GrxGraphicUnit u_gfx (
    .clk(clk_sys), .rst(rst_sys), .start(redraw && !gfx_busy),
    .azimuth, .elevation, .view_angle, .model_sel,
    .vram_clear, .vram_busy, .px_x, .px_y, .px_we, .busy(gfx_busy), .done(gfx_done)
  );

  logic   req_valid, vram_pix;
  coord_t req_x, req_y;
  GrxVideoRAM u_vram (
    .clk(clk_sys), .rst(rst_sys), .clear(vram_clear),
    .wr_en(px_we), .wr_x(px_x), .wr_y(px_y), .wr_data(1'b1), .busy(vram_busy),
    .rd_x(req_x), .rd_y(req_y), .rd_data(vram_pix)
  );

  // ---------------- compositor ----------------
  color_t bg_color, panel_color;
  BackgroundVisualizer u_bg (.clk(clk_sys), .rst(rst_sys), .azimuth, .elevation, .y(req_y), .color(bg_color));
  PanelImageROM u_panel (.clk(clk_sys), .x(req_x), .y(5'(req_y - coord_t'(DRAW_H))), .color(panel_color));

  logic [PIX_LAT-1:0] valid_d, panel_d;
  logic [1:0]         vram_d;        // frame buffer bit, one to three cycles
  color_t             panel_q, pix_color;
  always_ff @(posedge clk_sys) begin
    if (rst_sys) valid_d <= '0;
    else         valid_d <= {valid_d[PIX_LAT-2:0], req_valid};
    panel_d <= {panel_d[PIX_LAT-2:0], (req_y >= coord_t'(DRAW_H))};
    vram_d  <= {vram_d[0], vram_pix};
    panel_q <= panel_color;
    // stage 4: background is three cycles old, panel and frame buffer aligned
    if (panel_d[2])     pix_color <= panel_q;
    else if (vram_d[1]) pix_color <= 8'hFF;
    else                pix_color <= bg_color;
  end

  color_t rgb;
  logic [15:0] underflows;
  GrxAdapterVGA u_vga (
    .clk_sys, .rst_sys, .clk_pix, .rst_pix,
    .req_valid, .req_x, .req_y, .pix_valid(valid_d[PIX_LAT-1]), .pix_color,
    .vsync_sys, .rgb, .hsync_n(vga_hs), .vsync_n(vga_vs), .underflows
  );
  assign {vga_r, vga_g, vga_b} = rgb;

  // ---------------- frame counter display ----------------
  localparam int FW = $clog2(FPS_PERIOD + 1);
  logic [FW-1:0]     sec_cnt;
  logic              sec_tick;
  logic [3:0][3:0]   fps_bcd, fps_shown;
  assign sec_tick = (sec_cnt == FW'(FPS_PERIOD - 1));
  always_ff @(posedge clk_sys) begin
    if (rst_sys) begin
      sec_cnt   <= '0;
      fps_shown <= '0;
    end else begin
      sec_cnt <= sec_tick ? '0 : sec_cnt + 1'b1;
      if (sec_tick) fps_shown <= fps_bcd;
    end
  end
  GBcdCounter #(.DIGITS(4)) u_fps (.clk(clk_sys), .rst(rst_sys || sec_tick), .inc(gfx_done), .bcd(fps_bcd));
  GBcd7Display #(.DIGITS(4), .REFRESH(REFRESH)) u_disp (.clk(clk_sys), .rst(rst_sys), .bcd(fps_shown), .seg_n, .an_n);
endmodule
