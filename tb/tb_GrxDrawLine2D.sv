// Testbench for GrxDrawLine2D: random segments in all directions (short
// ones and ones across the 10-bit range, plus points and axis-parallel
// lines). For each line: the pixel count is max(|dx|,|dy|)+1, both end
// points are drawn, successive pixels are 8-connected and move one step
// along the major axis, every pixel lies less than one pixel from the
// ideal line, writes come exactly every 2 cycles without hold, and the
// line takes at most 60 + 2n cycles. Half of the lines run with random
// hold; then no write may be lost and a held pixel may not change.
module tb_GrxDrawLine2D;
  import grx_pkg::*;
  logic clk = 0, rst = 1, start = 0, hold = 0, px_we, busy, done;
  coord_t x0, y0, x1, y1, px_x, px_y;
  int checks = 0, failures = 0, held_cycles = 0;
  always #5 clk = ~clk;
  GrxDrawLine2D dut (.clk, .rst, .start, .x0, .y0, .x1, .y1, .hold, .px_x, .px_y, .px_we, .busy, .done);
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  function automatic int iabs(input int v); return (v < 0) ? -v : v; endfunction
  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 300; i++) begin
      int n, cnt, cyc, last_we, gap_bad, conn_bad, dist_bad, ax, ay, bx, by, px, py, lx, ly;
      bit got_a, got_b, use_hold, steep;
      coord_t hx, hy;
      bit was_held;
      if (i % 3 == 0) begin
        ax = $urandom % 1024; ay = $urandom % 1024; bx = $urandom % 1024; by = $urandom % 1024;
      end else begin
        ax = 100 + $urandom % 40; ay = 100 + $urandom % 40; bx = 100 + $urandom % 40; by = 100 + $urandom % 40;
      end
      if (i == 1) begin bx = ax; by = ay; end
      if (i == 2) begin by = ay; end
      if (i == 4) begin bx = ax; end
      x0 = coord_t'(ax); y0 = coord_t'(ay); x1 = coord_t'(bx); y1 = coord_t'(by);
      n = (iabs(bx - ax) > iabs(by - ay)) ? iabs(bx - ax) + 1 : iabs(by - ay) + 1;
      steep = iabs(by - ay) > iabs(bx - ax);
      use_hold = (i % 2 == 1);
      cnt = 0; cyc = 1; last_we = -10; gap_bad = 0; conn_bad = 0; dist_bad = 0;
      got_a = 0; got_b = 0; was_held = 0; lx = -5; ly = -5;
      start = 1;
      @(posedge clk); #1 start = 0;
      while (!done) begin
        hold = use_hold && (($urandom % 4) == 0);
        #1;
        if (px_we && was_held && (px_x !== hx || px_y !== hy)) begin
          failures++; $display("held pixel changed");
        end
        was_held = px_we && hold;
        hx = px_x; hy = px_y;
        if (hold) held_cycles++;
        if (px_we && !hold) begin
          real t, ideal;
          px = int'(px_x); py = int'(px_y);
          cnt++;
          if (!use_hold && cnt > 1 && cyc - last_we != 2) gap_bad++;
          last_we = cyc;
          if (px == ax && py == ay) got_a = 1;
          if (px == bx && py == by) got_b = 1;
          if (cnt > 1) begin
            if (steep ? (iabs(py - ly) != 1 || iabs(px - lx) > 1)
                      : (iabs(px - lx) != 1 || iabs(py - ly) > 1)) conn_bad++;
          end
          lx = px; ly = py;
          if (n > 1) begin
            if (steep) begin
              t = real'(py - ay) / real'(by - ay); ideal = ax + t * (bx - ax);
              if (fabs(px - ideal) >= 1.0) dist_bad++;
            end else begin
              t = real'(px - ax) / real'(bx - ax); ideal = ay + t * (by - ay);
              if (fabs(py - ideal) >= 1.0) dist_bad++;
            end
          end
        end
        @(posedge clk); cyc++;
      end
      #1 hold = 0;
      checks += 5;
      if (cnt != n) begin failures++; $display("line %0d: %0d pixels, expected %0d", i, cnt, n); end
      if (!got_a || !got_b) begin failures++; $display("line %0d: end point missing", i); end
      if (conn_bad != 0) begin failures++; $display("line %0d: %0d gaps", i, conn_bad); end
      if (dist_bad != 0) begin failures++; $display("line %0d (%0d,%0d)-(%0d,%0d): %0d far pixels", i, ax, ay, bx, by, dist_bad); end
      if (!use_hold && (gap_bad != 0 || cyc > 60 + 2 * n)) begin
        failures++; $display("line %0d: rate, %0d cycles for %0d pixels", i, cyc, n);
      end
    end
    checks++; if (held_cycles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
