// Testbench for CordicSinCos: angles over [-2pi, 2pi) plus the quadrant
// edges, sin and cos compared with $sin/$cos to within 2 LSB of 10Q8, and
// the latency of ITER+2 cycles.
module tb_CordicSinCos;
  import grx_pkg::*;
  logic clk = 0, rst = 1, start = 0, busy, done;
  fxp_t angle, s, c;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  always #5 clk = ~clk;
  CordicSinCos dut (.clk, .rst, .start, .angle, .sin_o(s), .cos_o(c), .busy, .done);
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 400; i++) begin
      int a, cyc;
      real ar, es, ec;
      if (i < 9) a = (i - 4) * 402;              // multiples of pi/2
      else a = int'($urandom % 3216) - 1608;
      angle = fxp_t'(a);
      ar = a / 256.0;
      es = $sin(ar) * 256.0; ec = $cos(ar) * 256.0;
      start = 1; cyc = 1;
      @(posedge clk); #1 start = 0;
      while (!done) begin @(posedge clk); #1 cyc++; end
      checks++;
      if (cyc != 18) begin failures++; $display("latency %0d", cyc); end
      checks++;
      if (fabs(real'(s) - es) > 2.0 || fabs(real'(c) - ec) > 2.0) begin
        failures++; $display("FAIL a=%0d sin %0d/%f cos %0d/%f", a, s, es, c, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
