// Testbench for GResynchronizer: a random input must appear at the output
// exactly two clock edges later.
module tb_GResynchronizer;
  logic clk = 0, rst = 1, d = 0, q;
  int checks = 0, failures = 0;
  logic [7:0] hist;
  always #5 clk = ~clk;
  GResynchronizer dut (.clk, .rst, .d, .q);
  initial begin
    #20000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    hist = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      if (i > 3) begin
        checks++;
        if (q !== hist[1]) begin failures++; $display("mismatch at %0d", i); end
      end
      d = 1'($urandom);
      @(posedge clk); hist = {hist[6:0], d};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
