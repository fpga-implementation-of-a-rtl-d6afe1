// Testbench for GrxGraphicUnit with the real video memory, end to end for
// the graphics pipeline: for all four models and several views (including
// the orthographic one, viewing angle 0) it starts a redraw and then
//  - checks the redraw time: the cube must take under 20000 cycles
//    (200 us at 100 MHz), every model under 30000;
//  - compares each projected vertex in the 2D bank with a floating-point
//    projection (matrix from the formulas, perspective division, screen
//    offset 320/224, scale 256) to within 3 pixels;
//  - reads the whole frame back through the display port and checks that
//    every set pixel lies within 1.5 pixels of an edge of the model, that
//    every vertex and the midpoint of every edge are drawn, and that
//    nothing remains of the previous picture (the clear).
// A second copy with three vertex units (N_VU = 3) runs alongside on its
// own video memory: its 2D bank and its frame must be identical to those
// of the single-unit copy, and it must finish sooner.
module tb_GrxGraphicUnit;
  import grx_pkg::*;
  logic clk = 0, rst = 1, start = 0, busy, done, busy3, done3;
  fxp_t az, el, va;
  logic [1:0] model_sel;
  logic vram_clear, vram_busy, px_we, rd_data;
  coord_t px_x, px_y, rd_x = 0, rd_y = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  GrxGraphicUnit dut (.clk, .rst, .start, .azimuth(az), .elevation(el), .view_angle(va), .model_sel,
                      .vram_clear, .vram_busy, .px_x, .px_y, .px_we, .busy, .done);
  GrxVideoRAM u_vram (.clk, .rst, .clear(vram_clear), .wr_en(px_we), .wr_x(px_x), .wr_y(px_y), .wr_data(1'b1),
                      .busy(vram_busy), .rd_x, .rd_y, .rd_data);
  // three vertex units
  logic vram_clear3, vram_busy3, px_we3, rd_data3;
  coord_t px_x3, px_y3;
  GrxGraphicUnit #(.N_VU(3)) dut3 (.clk, .rst, .start, .azimuth(az), .elevation(el), .view_angle(va), .model_sel,
                      .vram_clear(vram_clear3), .vram_busy(vram_busy3), .px_x(px_x3), .px_y(px_y3), .px_we(px_we3),
                      .busy(busy3), .done(done3));
  GrxVideoRAM u_vram3 (.clk, .rst, .clear(vram_clear3), .wr_en(px_we3), .wr_x(px_x3), .wr_y(px_y3), .wr_data(1'b1),
                      .busy(vram_busy3), .rd_x, .rd_y, .rd_data(rd_data3));
  // second copy of the model memory, read by the checker
  vidx_t ref_vi = '0, ref_nv;
  logic [EIDX_W-1:0] ref_ei = '0, ref_ne;
  vertex3d_t ref_v;
  edge_t ref_e;
  ModelDescriptionROM u_ref (.clk, .model_sel, .vtx_index(ref_vi), .edge_index(ref_ei),
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
  initial begin
    #200000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    real e [16];
    int nv [4] = '{8, 5, 6, 6};
    int ne [4] = '{12, 8, 12, 9};
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int run = 0; run < 8; run++) begin
      real a, l, p, x, vx, vy, vz, pp [4];
      int cyc, cyc3, fin, fin3, diff3, bad, sx [16], sy [16], e1 [16], e2 [16];
      int m;
      m = run % 4;
      model_sel = 2'(m);
      az = fxp_t'((run * 211 + 50) % 1608); el = fxp_t'((run * 97 + 120) % 1608);
      va = (run == 2) ? fxp_t'(0) : fxp_t'(100 + run * 50);
      a = az / 256.0; l = el / 256.0; p = va / 256.0;
      e[0] = $cos(a); e[1] = $sin(a); e[2] = 0.0;
      e[4] = -$sin(l) * $sin(a); e[5] = $sin(l) * $cos(a); e[6] = $cos(l);
      e[8] = $cos(l) * $sin(a); e[9] = -$cos(l) * $cos(a); e[10] = $sin(l);
      e[3] = -0.5 * (e[0] + e[1] + e[2]); e[7] = -0.5 * (e[4] + e[5] + e[6]);
      e[11] = -0.5 * (e[8] + e[9] + e[10]) - 0.8660;
      x = 1.4142 * $tan(p / 2.0);
      for (int k = 0; k < 4; k++) e[12 + k] = -x * e[8 + k];
      e[15] += 1.0;
      start = 1; cyc = 1; cyc3 = 1; fin = 0; fin3 = 0;
      @(posedge clk); #1 start = 0;
      while (!(fin && fin3)) begin
        if (done) fin = 1;
        if (done3) fin3 = 1;
        @(posedge clk); #1;
        if (!fin) cyc++;
        if (!fin3) cyc3++;
      end
      $display("model %0d: redraw took %0d cycles (%0d with three vertex units)", m, cyc, cyc3);
      checks++;
      if (cyc3 >= cyc) begin failures++; $display("three vertex units are not faster"); end
      checks++;
      if (cyc > ((m == 0) ? 20000 : 30000)) begin failures++; $display("too slow"); end
      checks++;
      if (int'(ref_nv) != nv[m] || int'(ref_ne) != ne[m]) begin failures++; $display("model size"); end
      // vertices
      for (int i = 0; i < nv[m]; i++) begin
        vertex3d_t v3;
        vertex2d_t v2;
        real ex, ey;
        ref_vi = vidx_t'(i); @(posedge clk); #1 v3 = ref_v;
        vx = v3.x / 256.0; vy = v3.y / 256.0; vz = v3.z / 256.0;
        for (int r = 0; r < 4; r++) pp[r] = e[4*r] * vx + e[4*r+1] * vy + e[4*r+2] * vz + e[4*r+3];
        ex = 320.0 + pp[0] / pp[3] * 256.0; ey = 224.0 - pp[1] / pp[3] * 256.0;
        v2 = dut.u_bank.mem[i];
        checks++;
        if (dut3.u_bank.mem[i] != v2) begin failures++; $display("vertex %0d differs with three units", i); end
        sx[i] = int'(v2.x); sy[i] = int'(v2.y);
        checks++;
        if (fabs(sx[i] - ex) > 3.0 || fabs(sy[i] - ey) > 3.0) begin
          failures++; $display("vertex %0d at (%0d,%0d), expected (%f,%f)", i, sx[i], sy[i], ex, ey);
        end
      end
      for (int k = 0; k < ne[m]; k++) begin
        edge_t ed;
        ref_ei = 6'(k); @(posedge clk); #1 ed = ref_e;
        e1[k] = int'(ed.v1); e2[k] = int'(ed.v2);
      end
      // frame read-back
      bad = 0; diff3 = 0;
      begin
        int img [640][480];
        for (int yy = 0; yy < 480; yy++) for (int xx = 0; xx < 640; xx++) begin
          rd_x = coord_t'(xx); rd_y = coord_t'(yy);
          @(posedge clk); #1;
          img[xx][yy] = int'(rd_data);
          if (rd_data3 != rd_data) diff3++;
          if (rd_data) begin
            real dmin;
            dmin = 1.0e9;
            for (int k = 0; k < ne[m]; k++) begin
              real d;
              d = seg_dist(xx, yy, sx[e1[k]], sy[e1[k]], sx[e2[k]], sy[e2[k]]);
              if (d < dmin) dmin = d;
            end
            if (dmin > 1.5) bad++;
          end
        end
        checks++;
        if (diff3 != 0) begin failures++; $display("%0d pixels differ with three units", diff3); end
        checks++;
        if (bad != 0) begin failures++; $display("%0d pixels off the edges", bad); end
        for (int i = 0; i < nv[m]; i++) begin
          checks++; if (img[sx[i]][sy[i]] != 1) begin failures++; $display("vertex %0d not drawn", i); end
        end
        for (int k = 0; k < ne[m]; k++) begin
          int mx, my, found;
          mx = (sx[e1[k]] + sx[e2[k]]) / 2; my = (sy[e1[k]] + sy[e2[k]]) / 2; found = 0;
          for (int dx = -1; dx <= 1; dx++) for (int dy = -1; dy <= 1; dy++) found += img[mx + dx][my + dy];
          checks++; if (found == 0) begin failures++; $display("edge %0d not drawn", k); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
