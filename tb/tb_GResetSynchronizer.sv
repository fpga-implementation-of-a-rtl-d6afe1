// Testbench for GResetSynchronizer: the reset output must rise as soon as
// the asynchronous reset is applied (between clock edges) and fall on the
// second clock edge after it is released.
module tb_GResetSynchronizer;
  logic clk = 0, rst_async = 0, rst;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  GResetSynchronizer dut (.clk, .rst_async, .rst);
  task automatic chk(input logic exp, input string what);
    checks++;
    if (rst !== exp) begin failures++; $display("FAIL %s: rst=%b", what, rst); end
  endtask
  initial begin
    #20000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (4) @(posedge clk);
    for (int k = 0; k < 5; k++) begin
      #2 rst_async = 1; #1;
      chk(1'b1, "async assert");
      repeat (3) @(posedge clk);
      #1 rst_async = 0;
      @(posedge clk); #1 chk(1'b1, "one edge after release");
      @(posedge clk); #1 chk(1'b0, "two edges after release");
      repeat (3) @(posedge clk); #1 chk(1'b0, "stays released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
