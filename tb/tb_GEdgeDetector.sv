// Testbench for GEdgeDetector: rising, falling and both-edge instances
// driven by a random signal, each pulse compared with d and its previous
// value.
module tb_GEdgeDetector;
  logic clk = 0, rst = 1, d = 0, pr, pf, pb, dprev = 0;
  int checks = 0, failures = 0, nr = 0, nf = 0;
  always #5 clk = ~clk;
  GEdgeDetector #(.MODE(0)) u_r (.clk, .rst, .d, .pulse(pr));
  GEdgeDetector #(.MODE(1)) u_f (.clk, .rst, .d, .pulse(pf));
  GEdgeDetector #(.MODE(2)) u_b (.clk, .rst, .d, .pulse(pb));
  initial begin
    #50000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 300; i++) begin
      d = 1'($urandom);
      #1;
      checks++;
      if (pr !== (d & ~dprev) || pf !== (~d & dprev) || pb !== (d ^ dprev)) begin
        failures++; $display("FAIL d=%b prev=%b r=%b f=%b b=%b", d, dprev, pr, pf, pb);
      end
      nr += int'(pr); nf += int'(pf);
      @(posedge clk); dprev = d; #1;
    end
    checks++; if (nr == 0 || nf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
