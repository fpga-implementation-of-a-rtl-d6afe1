// Testbench for GNonOverflowCounter (range 0..10, pre-divider 3): a step
// every third cycle while held, saturation at both ends, and hold when
// released.
module tb_GNonOverflowCounter;
  logic clk = 0, rst = 1, up = 0, down = 0;
  logic [4:0] value;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  GNonOverflowCounter #(.W(5), .MIN(0), .MAX(10), .RST_VAL(5), .PRESCALE(3)) dut (.clk, .rst, .up, .down, .value);
  task automatic expect_val(input int v, input string what);
    checks++;
    if (value !== 5'(v)) begin failures++; $display("FAIL %s: %0d expected %0d", what, value, v); end
  endtask
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    expect_val(5, "reset");
    up = 1;
    repeat (3) @(posedge clk); #1 expect_val(6, "first step after 3");
    repeat (3) @(posedge clk); #1 expect_val(7, "second step");
    repeat (30) @(posedge clk); #1 expect_val(10, "saturate at max");
    up = 0; repeat (10) @(posedge clk); #1 expect_val(10, "hold");
    down = 1; repeat (60) @(posedge clk); #1 expect_val(0, "saturate at min");
    down = 0; up = 1; repeat (6) @(posedge clk); #1 expect_val(2, "up from min");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
