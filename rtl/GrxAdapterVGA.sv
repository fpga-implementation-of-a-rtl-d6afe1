// GrxAdapterVGA: VGA output with a line cache between two clock domains.
//
// Pixel domain (clk_pix): horizontal and vertical counters make the
// sync pulses and the visible window (default 640x480 at 60 Hz: 800x525
// clocks, sync 96/2, front porch 16/10, back porch 48/33; the standard
// mode, chosen by this design). Every visible pixel pops one colour from
// the line cache; an empty cache shows black and counts an underflow.
//
// Line cache: a dual-clock FIFO. At the end of each visible line the pixel
// domain toggles LineStrobe (fill the next line); at the end of the last
// blanking line it toggles FrameStrobe (fill line 0). The toggles and
// vsync cross into the system domain through two-flop resynchronisers.
//
// System domain (clk_sys): on a strobe the writer walks the requested
// line, one pixel per clock, on PixelRequestAxis (req_valid, req_x,
// req_y). Whoever serves the request returns the colour on
// pix_valid/pix_color (any fixed latency), and it goes into the FIFO.
// A line is written in H_ACTIVE system clocks, which must fit into the
// horizontal blanking (160 pixel clocks = 640 system clocks at 25/100 MHz).
//
// vsync_sys is the vertical sync pulse (active high) in the system domain;
// the top starts a redraw on it. Outputs rgb/hsync_n/vsync_n are
// registered and aligned.
module GrxAdapterVGA
  import grx_pkg::*;
#(
  parameter int H_ACTIVE = 640,
  parameter int H_FP     = 16,
  parameter int H_SYNC   = 96,
  parameter int H_BP     = 48,
  parameter int V_ACTIVE = 480,
  parameter int V_FP     = 10,
  parameter int V_SYNC   = 2,
  parameter int V_BP     = 33,
  parameter int FIFO_AW  = 10
) (
  input  logic   clk_sys,
  input  logic   rst_sys,
  input  logic   clk_pix,
  input  logic   rst_pix,
  // PixelRequestAxis and the returned colour (system domain)
  output logic   req_valid,
  output coord_t req_x,
  output coord_t req_y,
  input  logic   pix_valid,
  input  color_t pix_color,
  output logic   vsync_sys,
  // VGA (pixel domain)
  output color_t rgb,
  output logic   hsync_n,
  output logic   vsync_n,
  output logic [15:0] underflows
);
  localparam int H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  // ---------------- pixel domain ----------------
  coord_t hcnt, vcnt;
  logic   active, line_tgl, frame_tgl, vs_level;
  logic   fifo_empty, fifo_re;
  color_t fifo_rdata;

  assign active  = (hcnt < coord_t'(H_ACTIVE)) && (vcnt < coord_t'(V_ACTIVE));
  assign fifo_re = active && !fifo_empty;

  always_ff @(posedge clk_pix) begin
    if (rst_pix) begin
      hcnt <= '0; vcnt <= '0;
      line_tgl <= 1'b0; frame_tgl <= 1'b0;
      rgb <= '0; hsync_n <= 1'b1; vsync_n <= 1'b1; vs_level <= 1'b0;
      underflows <= '0;
    end else begin
      if (hcnt == coord_t'(H_TOTAL - 1)) begin
        hcnt <= '0;
        vcnt <= (vcnt == coord_t'(V_TOTAL - 1)) ? '0 : vcnt + 1'b1;
      end else begin
        hcnt <= hcnt + 1'b1;
      end
      if (hcnt == coord_t'(H_ACTIVE)) begin
        if (vcnt < coord_t'(V_ACTIVE - 1))      line_tgl  <= !line_tgl;
        else if (vcnt == coord_t'(V_TOTAL - 1)) frame_tgl <= !frame_tgl;
      end
      rgb     <= fifo_re ? fifo_rdata : '0;
      hsync_n <= !((hcnt >= coord_t'(H_ACTIVE + H_FP)) && (hcnt < coord_t'(H_ACTIVE + H_FP + H_SYNC)));
      vs_level <= (vcnt >= coord_t'(V_ACTIVE + V_FP)) && (vcnt < coord_t'(V_ACTIVE + V_FP + V_SYNC));
      vsync_n  <= !((vcnt >= coord_t'(V_ACTIVE + V_FP)) && (vcnt < coord_t'(V_ACTIVE + V_FP + V_SYNC)));
      if (active && fifo_empty) underflows <= underflows + 1'b1;
    end
  end

  // ---------------- line cache ----------------
  logic fifo_full;
  GAsyncFifo #(.W(8), .AW(FIFO_AW)) u_fifo (
    .wclk(clk_sys), .wrst(rst_sys), .we(pix_valid), .wdata(pix_color), .full(fifo_full),
    .rclk(clk_pix), .rrst(rst_pix), .re(fifo_re), .rdata(fifo_rdata), .empty(fifo_empty)
  );

  // ---------------- system domain ----------------
  logic line_s, frame_s, line_ev, frame_ev;
  GResynchronizer u_sync_line  (.clk(clk_sys), .rst(rst_sys), .d(line_tgl),  .q(line_s));
  GResynchronizer u_sync_frame (.clk(clk_sys), .rst(rst_sys), .d(frame_tgl), .q(frame_s));
  GResynchronizer u_sync_vs    (.clk(clk_sys), .rst(rst_sys), .d(vs_level),  .q(vsync_sys));
  GEdgeDetector #(.MODE(2)) u_ed_line  (.clk(clk_sys), .rst(rst_sys), .d(line_s),  .pulse(line_ev));
  GEdgeDetector #(.MODE(2)) u_ed_frame (.clk(clk_sys), .rst(rst_sys), .d(frame_s), .pulse(frame_ev));

  logic filling;
  assign req_valid = filling;
  always_ff @(posedge clk_sys) begin
    if (rst_sys) begin
      filling <= 1'b0;
      req_x   <= '0;
      req_y   <= '0;
    end else if (frame_ev) begin
      filling <= 1'b1;
      req_x   <= '0;
      req_y   <= '0;
    end else if (line_ev) begin
      filling <= 1'b1;
      req_x   <= '0;
      req_y   <= req_y + 1'b1;
    end else if (filling) begin
      if (req_x == coord_t'(H_ACTIVE - 1)) filling <= 1'b0;
      else                                 req_x <= req_x + 1'b1;
    end
  end

  // the cache holds more than a line, so it can never be written while full
  a_no_overflow: assert property (@(posedge clk_sys) disable iff (rst_sys) pix_valid |-> !fifo_full);
endmodule
