// Testbench for GrxVertexProjection: random (well-formed) projection
// matrices and random vertices in the unit cube. The reference is the
// floating-point product A*[x y z 1] followed by the perspective division
// Q = P/P3; results must agree to 3 LSB plus 1.5 % (the 10Q8 reciprocal
// limits precision). Also checks the latency stays under 70 cycles.
module tb_GrxVertexProjection;
  import grx_pkg::*;
  logic clk = 0, rst = 1, start = 0, busy, done;
  matrix_t m;
  vertex3d_t v;
  fxp_t q0, q1;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  always #5 clk = ~clk;
  GrxVertexProjection dut (.clk, .rst, .start, .matrix(m), .vertex(v), .q0, .q1, .busy, .done);
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 300; i++) begin
      real p [4];
      real e0, e1;
      int cyc;
      // matrix: rows 0,1 random in [-1,1], row 3 = [0..0.25 each, 1..2]
      for (int k = 0; k < 8; k++) m[k] = fxp_t'(int'($urandom % 513) - 256);
      for (int k = 8; k < 12; k++) m[k] = '0;
      for (int k = 12; k < 15; k++) m[k] = fxp_t'($urandom % 65);  // D >= 1, as for a model behind the plane
      m[15] = fxp_t'(256 + $urandom % 256);
      v.x = fxp_t'($urandom % 257); v.y = fxp_t'($urandom % 257); v.z = fxp_t'($urandom % 257);
      for (int r = 0; r < 4; r++)
        p[r] = (real'(m[4*r]) * real'(v.x) + real'(m[4*r+1]) * real'(v.y) + real'(m[4*r+2]) * real'(v.z)) / 256.0 + real'(m[4*r+3]);
      e0 = p[0] / p[3] * 256.0; e1 = p[1] / p[3] * 256.0;
      start = 1; cyc = 1;
      @(posedge clk); #1 start = 0;
      while (!done) begin @(posedge clk); #1 cyc++; end
      checks++;
      if (cyc > 70) begin failures++; $display("took %0d", cyc); end
      checks++;
      if (fabs(q0 - e0) > 3 + 0.015 * fabs(e0) || fabs(q1 - e1) > 3 + 0.015 * fabs(e1)) begin
        failures++; $display("FAIL i=%0d q=(%0d,%0d) exp=(%f,%f)", i, q0, q1, e0, e1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
