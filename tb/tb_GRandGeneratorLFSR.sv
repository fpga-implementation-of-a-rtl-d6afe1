// Testbench for GRandGeneratorLFSR: the 16-bit generator must follow the
// Galois recurrence, never reach zero and return to its seed after exactly
// 65535 steps (maximal length).
module tb_GRandGeneratorLFSR;
  logic clk = 0, rst = 1, en = 0;
  logic [15:0] rnd, refv;
  int checks = 0, failures = 0, period = 0;
  always #5 clk = ~clk;
  GRandGeneratorLFSR #(.W(16)) dut (.clk, .rst, .en, .rnd);
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(posedge clk); #1 rst = 0;
    checks++; if (rnd !== 16'hACE1) failures++;
    refv = 16'hACE1;
    en = 1;
    for (int i = 1; i <= 65535; i++) begin
      @(posedge clk); #1;
      refv = (refv >> 1) ^ (refv[0] ? 16'hB400 : 16'h0);
      if (i < 300) begin
        checks++;
        if (rnd !== refv) begin failures++; $display("FAIL step %0d", i); end
      end
      if (rnd == 16'h0) begin failures++; $display("reached zero"); end
      if (rnd == 16'hACE1 && period == 0) period = i;
    end
    checks++;
    if (period != 65535) begin failures++; $display("period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
