// Testbench for GSerialDivider (WIDTH=16): random and corner divisions,
// quotient and remainder against the operators, and the latency: done in
// the (2*16+2)th cycle counting the start cycle.
module tb_GSerialDivider;
  localparam int W = 16;
  logic clk = 0, rst = 1, start = 0, busy, done;
  logic [W-1:0] dividend, divisor, quotient, remainder;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  GSerialDivider #(.WIDTH(W)) dut (.clk, .rst, .start, .dividend, .divisor, .quotient, .remainder, .busy, .done);
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 400; i++) begin
      int cyc;
      dividend = 16'($urandom);
      divisor  = (i % 3 == 0) ? 16'($urandom % 300 + 1) : 16'($urandom);
      if (i == 0) divisor = 0;
      if (i == 1) begin dividend = 16'hFFFF; divisor = 1; end
      start = 1; cyc = 1;
      @(posedge clk); #1 start = 0;
      while (!done) begin @(posedge clk); #1 cyc++; end
      checks++;
      if (cyc != 2 * W + 2) begin failures++; $display("latency %0d", cyc); end
      checks++;
      if (divisor == 0) begin
        if (quotient !== '1) failures++;
      end else if (quotient !== dividend / divisor || remainder !== dividend % divisor) begin
        failures++; $display("FAIL %0d/%0d = %0d r %0d", dividend, divisor, quotient, remainder);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
