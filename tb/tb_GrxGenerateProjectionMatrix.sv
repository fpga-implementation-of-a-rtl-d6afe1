// Testbench for GrxGenerateProjectionMatrix: random azimuth, elevation and
// viewing angle. Every element is compared with the matrix worked out in
// floating point from the same formulas (rotation, translation to the
// plane touching the bounding sphere, perspective row with
// X = sqrt(2) tan(phi/2)); tolerance grows with X. Geometric checks: the
// model centre (0.5,0.5,0.5) must project to the origin of the plane and
// lie at depth -0.866. The run time is also checked (under 100 cycles).
module tb_GrxGenerateProjectionMatrix;
  import grx_pkg::*;
  logic clk = 0, rst = 1, start = 0, busy, done;
  fxp_t az, el, va;
  matrix_t m;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  always #5 clk = ~clk;
  GrxGenerateProjectionMatrix dut (.clk, .rst, .start, .azimuth(az), .elevation(el), .view_angle(va), .matrix(m), .busy, .done);
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    real e [16];
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 60; i++) begin
      real a, l, p, ca, sa, ce, se, x, tol, cx, cy, cz;
      int cyc;
      az = fxp_t'($urandom % 1608); el = fxp_t'($urandom % 1608); va = fxp_t'($urandom % 512);
      if (i == 0) begin az = 0; el = 0; va = 0; end
      a = az / 256.0; l = el / 256.0; p = va / 256.0;
      ca = $cos(a); sa = $sin(a); ce = $cos(l); se = $sin(l);
      e[0] = ca;        e[1] = sa;        e[2] = 0.0;
      e[4] = -se * sa;  e[5] = se * ca;   e[6] = ce;
      e[8] = ce * sa;   e[9] = -ce * ca;  e[10] = se;
      e[3]  = -0.5 * (e[0] + e[1] + e[2]);
      e[7]  = -0.5 * (e[4] + e[5] + e[6]);
      e[11] = -0.5 * (e[8] + e[9] + e[10]) - 0.8660;
      x = 1.4142 * $tan(p / 2.0);
      for (int k = 0; k < 4; k++) e[12 + k] = -x * e[8 + k];
      e[15] += 1.0;
      start = 1; cyc = 1;
      @(posedge clk); #1 start = 0;
      while (!done) begin @(posedge clk); #1 cyc++; end
      checks++;
      if (cyc > 100) begin failures++; $display("took %0d cycles", cyc); end
      for (int k = 0; k < 16; k++) begin
        tol = (k < 12) ? 4.0 : 4.0 + 4.0 * x;
        checks++;
        if (fabs(real'(m[k]) - e[k] * 256.0) > tol) begin
          failures++; $display("FAIL i=%0d el %0d: %0d vs %f", i, k, m[k], e[k] * 256.0);
        end
      end
      cx = (m[0] + m[1] + m[2]) * 0.5 + m[3];
      cy = (m[4] + m[5] + m[6]) * 0.5 + m[7];
      cz = (m[8] + m[9] + m[10]) * 0.5 + m[11];
      checks++;
      if (fabs(cx) > 4 || fabs(cy) > 4 || fabs(cz + 222) > 4) begin
        failures++; $display("FAIL centre (%f %f %f)", cx, cy, cz);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
