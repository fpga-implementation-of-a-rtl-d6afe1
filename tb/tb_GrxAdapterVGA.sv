// Testbench for GrxAdapterVGA with a small screen (32x10, 52x17 clocks
// per frame) and a system clock four times the pixel clock. A model of
// the compositor answers each PixelRequestAxis request after four cycles
// with colour f(x,y) = 7x + 13y. From the second frame on, every visible
// pixel must show f(x,y) in raster order, blanking must be black, each
// line must hold H_SYNC low hsync clocks, each frame V_SYNC lines of
// vsync, the line cache may never run empty, and vsync_sys must pulse
// once per frame.
module tb_GrxAdapterVGA;
  import grx_pkg::*;
  localparam int HA = 32, HF = 4, HS = 8, HB = 8, VA = 10, VF = 2, VS = 2, VB = 3;
  logic clk_sys = 0, clk_pix = 0, rst_sys = 1, rst_pix = 1;
  logic req_valid, vsync_sys, hsync_n, vsync_n;
  coord_t req_x, req_y;
  logic [3:0] vd = 0;
  color_t cd [4];
  color_t rgb;
  logic [15:0] underflows;
  int checks = 0, failures = 0, frames = 0, vs_pulses = 0;
  always #2 clk_sys = ~clk_sys;
  always #8 clk_pix = ~clk_pix;
  GrxAdapterVGA #(.H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB), .V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB), .FIFO_AW(6)) dut (
    .clk_sys, .rst_sys, .clk_pix, .rst_pix, .req_valid, .req_x, .req_y,
    .pix_valid(vd[3]), .pix_color(cd[3]), .vsync_sys, .rgb, .hsync_n, .vsync_n, .underflows);
  always @(posedge clk_sys) begin
    vd <= {vd[2:0], req_valid};
    cd[0] <= color_t'(7 * req_x + 13 * req_y); cd[1] <= cd[0]; cd[2] <= cd[1]; cd[3] <= cd[2];
  end
  logic vs_q = 0;
  always @(posedge clk_sys) begin vs_q <= vsync_sys; if (vsync_sys && !vs_q) vs_pulses++; end
  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int h, v, hs_low, vs_lines, uf_start;
    bit vs_prev;
    repeat (4) @(posedge clk_pix); #1 rst_sys = 0; rst_pix = 0;
    // outputs are registered: rgb at a pixel-clock edge belongs to the
    // position the counters had before that edge
    h = 0; v = 0; hs_low = 0; vs_lines = 0; uf_start = 0; vs_prev = 0;
    for (int cyc = 0; cyc < 52 * 17 * 4; cyc++) begin
      @(posedge clk_pix);
      #1;
      begin
        if (frames >= 1) begin
          checks++;
          if (h < HA && v < VA) begin
            if (rgb !== color_t'(7 * h + 13 * v)) begin failures++; if (failures < 6) $display("FAIL (%0d,%0d) %h", h, v, rgb); end
          end else if (rgb !== 8'h00) begin failures++; $display("blank not black"); end
        end
        if (!hsync_n) hs_low++;
        h++;
        if (h == 52) begin
          h = 0;
          if (frames >= 1) begin checks++; if (hs_low != HS) begin failures++; $display("hsync %0d", hs_low); end end
          hs_low = 0;
          if (!vsync_n) vs_lines++;
          v++;
          if (v == 17) begin
            v = 0;
            if (frames >= 1) begin checks++; if (vs_lines != VS) begin failures++; $display("vsync %0d lines", vs_lines); end end
            vs_lines = 0;
            frames++;
            if (frames == 1) uf_start = underflows;
          end
        end
      end
    end
    checks++; if (underflows != 16'(uf_start)) begin failures++; $display("underflows %0d", underflows - uf_start); end
    checks++; if (vs_pulses < 3) begin failures++; $display("vsync_sys pulses %0d", vs_pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
