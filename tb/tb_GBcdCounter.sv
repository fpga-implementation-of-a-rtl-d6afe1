// Testbench for GBcdCounter (3 digits): random increments and resets,
// compared digit by digit with a decimal reference, including the wrap
// from 999 to 000.
module tb_GBcdCounter;
  logic clk = 0, rst = 1, inc = 0;
  logic [2:0][3:0] bcd;
  int checks = 0, failures = 0, n = 0;
  always #5 clk = ~clk;
  GBcdCounter #(.DIGITS(3)) dut (.clk, .rst, .inc, .bcd);
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 2500; i++) begin
      inc = ($urandom % 4) != 0;
      rst = (i == 1800);
      @(posedge clk); #1;
      if (rst) n = 0; else if (inc) n = (n + 1) % 1000;
      checks++;
      if (bcd[0] != 4'(n % 10) || bcd[1] != 4'((n / 10) % 10) || bcd[2] != 4'(n / 100)) begin
        failures++; if (failures < 5) $display("FAIL %0d: %0d%0d%0d", n, bcd[2], bcd[1], bcd[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
