// End-to-end testbench of Cubido3D with shortened button, counter, second
// and display timings (the VGA timing and the graphics are full size:
// 640x480 at 60 Hz, 25 MHz pixel clock, 100 MHz system clock).
//
// A scripted user presses the buttons: azimuth right/left, elevation
// up/down, viewing angle up and down to its lower limit (orthographic
// view), next/previous model, and the three-button global reset.
// Meanwhile the testbench
//  - checks the horizontal and vertical sync pulses against the pixel
//    position (800x525 frame, pulses at 656..751 and lines 490..491);
//  - captures whole displayed frames and checks them: the panel rows
//    against the panel image, white exactly where the frame buffer holds a
//    pixel, every frame-buffer pixel near an edge of the current model,
//    the projected vertices against a floating-point projection of the
//    current angles, and no line-cache underflow during the frame;
//  - checks that a redraw never overlaps the visible part of a frame,
//    that each redraw takes under 20000 system cycles, and that the
//    frame counter shown on the 7-segment display equals the number of
//    redraws in each counting period;
//  - counts every mechanism (vsync redraws, frame-buffer clears, page-miss
//    stalls, angle and model changes, global resets, counter display
//    updates) and fails if any never happened.
module tb_Cubido3D;
  import grx_pkg::*;
  localparam int FPS_PERIOD = 3360000;   // two frames
  logic clk_sys = 0, clk_pix = 0, rst_n = 0;
  logic [4:0] btn = '0;                  // {centre, down, up, right, left}
  logic [2:0] vga_r, vga_g; logic [1:0] vga_b;
  logic vga_hs, vga_vs;
  logic [7:0] seg_n; logic [3:0] an_n;
  int checks = 0, failures = 0;
  always #5  clk_sys = ~clk_sys;
  always #20 clk_pix = ~clk_pix;

  Cubido3D #(.DEBOUNCE(4), .PRESCALE(1000), .FPS_PERIOD(FPS_PERIOD), .REFRESH(50)) dut (
    .clk_sys, .clk_pix, .rst_n_async(rst_n), .btn, .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs, .seg_n, .an_n);

  // reference model memory
  vidx_t ref_vi = '0, ref_nv;
  logic [EIDX_W-1:0] ref_ei = '0, ref_ne;
  vertex3d_t ref_v;
  edge_t ref_e;
  ModelDescriptionROM u_ref (.clk(clk_sys), .model_sel(dut.model_sel), .vtx_index(ref_vi), .edge_index(ref_ei),
                             .vertex(ref_v), .edge_o(ref_e), .n_vertices(ref_nv), .n_edges(ref_ne));

  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  function automatic real seg_dist(input real px, py, ax, ay, bx, by);
    real dx, dy, t, l2;
    dx = bx - ax; dy = by - ay; l2 = dx * dx + dy * dy;
    if (l2 == 0.0) return $sqrt((px - ax) ** 2 + (py - ay) ** 2);
    t = ((px - ax) * dx + (py - ay) * dy) / l2;
    if (t < 0.0) t = 0.0; if (t > 1.0) t = 1.0;
    return $sqrt((px - ax - t * dx) ** 2 + (py - ay - t * dy) ** 2);
  endfunction
  function automatic logic [7:0] panel_ref(input int x, input int y);
    logic [1:0] i;
    if (x == 0 || y == 0 || x == 639 || y == 31) i = 3;
    else if (y >= 10 && y <= 21 && (x % 16) >= 4 && (x % 16) < 12) i = 2;
    else i = 1;
    case (i)
      2'd0: return 8'b00000000; 2'd1: return 8'b01110101;
      2'd2: return 8'b01001110; default: return 8'b11111111;
    endcase
  endfunction
  function automatic logic vram_bit(input int x, input int y);
    int a;
    a = y * 640 + x;
    return dut.u_vram.u_ram.mem[a / 32][a % 32];
  endfunction

  initial begin
    #1000000000; failures++;   // about 60 frames
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- pixel domain monitor ----------------
  int h_prev = -1, v_prev = -1, sync_err = 0, frames_seen = 0;
  bit capture_req = 0, capturing = 0, captured = 0;
  int uf_start;
  logic [7:0] frame [640][480];
  always @(posedge clk_pix) begin
    if (rst_n && !dut.rst_pix && h_prev >= 0) begin
      if ((!vga_hs) != (h_prev >= 656 && h_prev < 752)) sync_err++;
      if ((!vga_vs) != (v_prev >= 490 && v_prev < 492)) sync_err++;
      if (h_prev == 0 && v_prev == 0) begin
        frames_seen++;
        if (capture_req) begin capturing = 1; capture_req = 0; uf_start = int'(dut.underflows); end
      end
      if (capturing && h_prev < 640 && v_prev < 480) frame[h_prev][v_prev] = {vga_r, vga_g, vga_b};
      if (capturing && h_prev == 639 && v_prev == 479) begin
        capturing = 0; captured = 1;
        checks++;
        if (int'(dut.underflows) != uf_start) begin
          failures++; $display("line cache underflow during a frame (%0d)", int'(dut.underflows) - uf_start);
        end
      end
    end
    h_prev = int'(dut.u_vga.hcnt); v_prev = int'(dut.u_vga.vcnt);
    if (dut.rst_pix) begin h_prev = -1; v_prev = -1; end
  end

  // ---------------- system domain monitor ----------------
  int n_redraw = 0, n_clear = 0, n_stall = 0, n_az = 0, n_el = 0, n_va = 0, n_model = 0, n_combo = 0;
  int n_fps = 0, n_seg = 0, overlap = 0, cyc_draw = 0, max_draw = 0, done_cnt = 0;
  logic [10:0] az_q, el_q; logic [9:0] va_q; logic [1:0] m_q; logic combo_q = 0;
  logic sec_q = 0;
  int an_stable = 0; logic [3:0] an_q = '1;
  always @(posedge clk_sys) begin
    if (!dut.rst_sys) begin
      if (dut.gfx_done) begin
        n_redraw++;
        if (cyc_draw > max_draw) max_draw = cyc_draw;
      end
      if (dut.u_gfx.start) cyc_draw = 0; else if (dut.gfx_busy) cyc_draw++;
      if (dut.vram_clear) n_clear++;
      if (dut.px_we && dut.vram_busy) n_stall++;
      if (dut.gfx_busy && dut.u_vga.vcnt < 480 && !dut.rst_pix) overlap++;
      if (dut.az_cnt != az_q) n_az++;
      if (dut.el_cnt != el_q) n_el++;
      if (dut.va_cnt != va_q) n_va++;
      if (dut.model_sel != m_q) n_model++;
      // frame counter: the value shown must be the redraws of the period
      if (sec_q) begin
        n_fps++; checks++;
        if (dut.fps_shown != {4'd0, 4'd0, 4'(done_cnt / 10), 4'(done_cnt % 10)}) begin
          failures++; $display("frame counter shows %h, expected %0d", dut.fps_shown, done_cnt);
        end
        done_cnt = 0;
      end
      if (dut.gfx_done && !dut.sec_tick) done_cnt++;
      // 7-segment: decode the enabled digit
      if (an_n == an_q) an_stable++; else an_stable = 0;
      if (an_stable == 2) begin
        int d; logic [6:0] pat;
        d = (an_n == 4'b1110) ? 0 : (an_n == 4'b1101) ? 1 : (an_n == 4'b1011) ? 2 : 3;
        case (dut.fps_shown[d])
          4'd0: pat = 7'h3F; 4'd1: pat = 7'h06; 4'd2: pat = 7'h5B; 4'd3: pat = 7'h4F; 4'd4: pat = 7'h66;
          4'd5: pat = 7'h6D; 4'd6: pat = 7'h7D; 4'd7: pat = 7'h07; 4'd8: pat = 7'h7F; default: pat = 7'h6F;
        endcase
        n_seg++; checks++;
        if (seg_n != {1'b1, ~pat} || $countones(~an_n) != 1) begin
          failures++; $display("7-segment digit %0d shows %b", d, seg_n);
        end
      end
    end else begin
      done_cnt = 0;
    end
    if (dut.combo_rst && !combo_q) n_combo++;
    combo_q = dut.combo_rst;
    an_q = an_n; sec_q = dut.sec_tick && !dut.rst_sys;
    az_q = dut.az_cnt; el_q = dut.el_cnt; va_q = dut.va_cnt; m_q = dut.model_sel;
  end

  // ---------------- frame check ----------------
  task automatic check_frame(input string what);
    real e [16], a, l, p, xx, pp [4];
    int nv, ne, sx [16], sy [16], e1 [16], e2 [16], set_px, bad_fb, bad_panel, bad_near, bad_v;
    int ia, il, ip;
    ia = dut.az_cnt; il = dut.el_cnt; ip = dut.va_cnt;
    a = ia / 256.0; l = il / 256.0; p = ip / 256.0;
    e[0] = $cos(a); e[1] = $sin(a); e[2] = 0.0;
    e[4] = -$sin(l) * $sin(a); e[5] = $sin(l) * $cos(a); e[6] = $cos(l);
    e[8] = $cos(l) * $sin(a); e[9] = -$cos(l) * $cos(a); e[10] = $sin(l);
    e[3] = -0.5 * (e[0] + e[1] + e[2]); e[7] = -0.5 * (e[4] + e[5] + e[6]);
    e[11] = -0.5 * (e[8] + e[9] + e[10]) - 0.8660;
    xx = 1.4142 * $tan(p / 2.0);
    for (int k = 0; k < 4; k++) e[12 + k] = -xx * e[8 + k];
    e[15] += 1.0;
    nv = int'(ref_nv); ne = int'(ref_ne); bad_v = 0;
    for (int i = 0; i < nv; i++) begin
      vertex2d_t v2; real ex, ey;
      ref_vi = vidx_t'(i); @(posedge clk_sys); #1;
      for (int r = 0; r < 4; r++)
        pp[r] = e[4*r] * (ref_v.x / 256.0) + e[4*r+1] * (ref_v.y / 256.0) + e[4*r+2] * (ref_v.z / 256.0) + e[4*r+3];
      ex = 320.0 + pp[0] / pp[3] * 256.0; ey = 224.0 - pp[1] / pp[3] * 256.0;
      v2 = dut.u_gfx.u_bank.mem[i];
      sx[i] = int'(v2.x); sy[i] = int'(v2.y);
      if (fabs(sx[i] - ex) > 3.0 || fabs(sy[i] - ey) > 3.0) bad_v++;
    end
    for (int k = 0; k < ne; k++) begin
      ref_ei = 6'(k); @(posedge clk_sys); #1;
      e1[k] = int'(ref_e.v1); e2[k] = int'(ref_e.v2);
    end
    set_px = 0; bad_fb = 0; bad_panel = 0; bad_near = 0;
    for (int y = 0; y < 480; y++) for (int x = 0; x < 640; x++) begin
      if (y >= 448) begin
        if (frame[x][y] != panel_ref(x, y - 448)) bad_panel++;
      end else if (vram_bit(x, y)) begin
        real dmin;
        set_px++;
        if (frame[x][y] != 8'hFF) bad_fb++;
        dmin = 1.0e9;
        for (int k = 0; k < ne; k++) begin
          real d;
          d = seg_dist(x, y, sx[e1[k]], sy[e1[k]], sx[e2[k]], sy[e2[k]]);
          if (d < dmin) dmin = d;
        end
        if (dmin > 1.5) bad_near++;
      end else if (frame[x][y] == 8'hFF) bad_fb++;
    end
    $display("%s: model %0d az %0d el %0d va %0d, %0d wireframe pixels", what, dut.model_sel,
             dut.az_cnt, dut.el_cnt, dut.va_cnt, set_px);
    checks += 5;
    if (bad_v != 0)     begin failures++; $display("  %0d vertices misplaced", bad_v); end
    if (bad_panel != 0) begin failures++; $display("  %0d panel pixels wrong", bad_panel); end
    if (bad_fb != 0)    begin failures++; $display("  %0d pixels differ from the frame buffer", bad_fb); end
    if (bad_near != 0)  begin failures++; $display("  %0d frame buffer pixels off the edges", bad_near); end
    if (set_px < 200)   begin failures++; $display("  too few wireframe pixels"); end
  endtask

  task automatic wait_redraw_and_check(input string what);
    // the change must reach a redraw, then the following frame is captured
    // (a redraw already running may still use the old view)
    int r0;
    while (!dut.u_gfx.start) @(posedge clk_sys);
    r0 = n_redraw;
    while (n_redraw == r0) @(posedge clk_sys);
    captured = 0; capture_req = 1;
    while (!captured) @(posedge clk_sys);
    check_frame(what);
  endtask

  task automatic press(input logic [4:0] b, input int cycles);
    btn = b;
    repeat (cycles) @(posedge clk_sys);
    btn = '0;
    repeat (20) @(posedge clk_sys);
  endtask

  initial begin
    logic [10:0] v0;
    repeat (20) @(posedge clk_sys);
    rst_n = 1;
    repeat (20) @(posedge clk_sys);
    checks++;
    if (dut.az_cnt != 0 || dut.el_cnt != 201 || dut.va_cnt != 256 || dut.model_sel != 0) begin
      failures++; $display("reset values wrong");
    end
    wait_redraw_and_check("start");
    // azimuth
    press(5'b00010, 30000);
    checks++; if (dut.az_cnt == 0) begin failures++; $display("azimuth did not move"); end
    v0 = dut.az_cnt;
    press(5'b00001, 10000);
    checks++; if (dut.az_cnt >= v0) begin failures++; $display("azimuth did not go back"); end
    wait_redraw_and_check("azimuth");
    // elevation
    v0 = dut.el_cnt;
    press(5'b00100, 20000);
    checks++; if (dut.el_cnt <= v0) begin failures++; $display("elevation did not go up"); end
    v0 = dut.el_cnt;
    press(5'b01000, 8000);
    checks++; if (dut.el_cnt >= v0) begin failures++; $display("elevation did not go down"); end
    wait_redraw_and_check("elevation");
    // viewing angle: up, then down to the limit
    press(5'b10100, 20000);
    checks++; if (dut.va_cnt <= 256) begin failures++; $display("viewing angle did not grow"); end
    press(5'b11000, 400000);
    checks++; if (dut.va_cnt != 0) begin failures++; $display("viewing angle not at its limit"); end
    wait_redraw_and_check("orthographic");
    // models
    press(5'b10010, 100);
    press(5'b10010, 100);
    press(5'b10001, 100);
    checks++; if (dut.model_sel != 1) begin failures++; $display("model selection wrong (%0d)", dut.model_sel); end
    wait_redraw_and_check("pyramid");
    press(5'b10010, 100);
    press(5'b10010, 100);
    wait_redraw_and_check("prism");
    // global reset
    press(5'b10011, 100);
    repeat (10) @(posedge clk_sys);
    checks++;
    if (dut.az_cnt != 0 || dut.el_cnt != 201 || dut.va_cnt != 256 || dut.model_sel != 0) begin
      failures++; $display("global reset did not restore the view");
    end
    // the first frame after the reset has no filled line cache; check the next
    wait_redraw_and_check("after reset (1)");
    wait_redraw_and_check("after reset (2)");
    // summary
    $display("redraws %0d clears %0d stalls %0d az %0d el %0d va %0d model %0d combo %0d fps %0d seg %0d frames %0d",
             n_redraw, n_clear, n_stall, n_az, n_el, n_va, n_model, n_combo, n_fps, n_seg, frames_seen);
    $display("longest redraw %0d cycles, sync errors %0d, redraw overlapping the picture %0d cycles",
             max_draw, sync_err, overlap);
    checks += 14;
    // one redraw per frame, except the frames right after the two resets
    if (n_redraw < frames_seen - 3) begin failures++; $display("too few redraws"); end
    if (n_clear != n_redraw) begin failures++; $display("clears and redraws differ"); end
    if (n_stall == 0)  begin failures++; $display("no page-miss stall"); end
    if (n_az == 0)     begin failures++; $display("no azimuth change"); end
    if (n_el == 0)     begin failures++; $display("no elevation change"); end
    if (n_va == 0)     begin failures++; $display("no viewing angle change"); end
    if (n_model < 5)   begin failures++; $display("too few model changes"); end
    if (n_combo != 1)  begin failures++; $display("global reset count %0d", n_combo); end
    if (n_fps < 3)     begin failures++; $display("too few frame counter updates"); end
    if (n_seg < 100)   begin failures++; $display("too few display digits"); end
    if (sync_err != 0) begin failures++; $display("sync pulses misplaced"); end
    if (overlap != 0)  begin failures++; $display("redraw overlaps the visible frame"); end
    if (max_draw >= 20000) begin failures++; $display("redraw too slow"); end
    if (frames_seen < 10) begin failures++; $display("too few frames"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
