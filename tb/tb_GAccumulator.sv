// Testbench for GAccumulator (W=8): random clear/enable/addend sequences
// against a reference sum with carry-out.
module tb_GAccumulator;
  logic clk = 0, clr = 1, en = 0, ovf;
  logic [7:0] init = 8'h10, addend = 0, sum;
  int checks = 0, failures = 0, novf = 0;
  int ref_sum = 0, ref_ovf = 0;
  always #5 clk = ~clk;
  GAccumulator #(.W(8)) dut (.clk, .clr, .init, .en, .addend, .sum, .ovf);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(posedge clk); #1;
    ref_sum = 8'h10; ref_ovf = 0; clr = 0;
    for (int i = 0; i < 500; i++) begin
      clr = ($urandom % 20) == 0;
      en = 1'($urandom);
      addend = 8'($urandom);
      init = 8'($urandom);
      @(posedge clk); #1;
      if (clr) begin ref_sum = init; ref_ovf = 0; end
      else if (en) begin
        ref_ovf = (ref_sum + addend) > 255;
        ref_sum = (ref_sum + addend) & 255;
      end
      checks++;
      if (sum !== 8'(ref_sum) || ovf !== 1'(ref_ovf)) begin
        failures++; $display("FAIL i=%0d sum=%0d/%0d ovf=%b/%0d", i, sum, ref_sum, ovf, ref_ovf);
      end
      novf += ref_ovf;
    end
    checks++; if (novf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
