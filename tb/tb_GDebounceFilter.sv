// Testbench for GDebounceFilter with COUNT=5: pulses shorter than five
// cycles must be ignored; a level held for five cycles must pass, and
// exactly after five cycles.
module tb_GDebounceFilter;
  logic clk = 0, rst = 1, d = 0, q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  GDebounceFilter #(.COUNT(5)) dut (.clk, .rst, .d, .q);
  initial begin
    #50000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int k = 0; k < 20; k++) begin
      logic lvl;
      int   len;
      lvl = !q;
      len = 1 + ($urandom % 4);             // glitch 1..4 cycles
      d = lvl; repeat (len) @(posedge clk); #1 d = !lvl;
      repeat (8) @(posedge clk); #1;
      checks++; if (q === lvl) begin failures++; $display("glitch of %0d passed", len); end
      d = lvl;
      repeat (4) @(posedge clk); #1;
      checks++; if (q === lvl) begin failures++; $display("passed too early"); end
      @(posedge clk); #1;
      checks++; if (q !== lvl) begin failures++; $display("did not pass after 5"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
