// Testbench for GrxDsp: random 10Q8 operands, R = A + (B - C) * D worked
// out with integer arithmetic (floor of the product / 256, wrapped to
// 18 bits), one cycle of latency, and en = 0 holding the result.
module tb_GrxDsp;
  import grx_pkg::*;
  logic clk = 0, en = 0;
  fxp_t a, b, c, d, r;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  GrxDsp dut (.clk, .en, .a, .b, .c, .d, .r);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    longint expv, held;
    held = 0;
    for (int i = 0; i < 1000; i++) begin
      en = (i % 7) != 3;
      a = fxp_t'($urandom); b = fxp_t'($urandom % 2048) - 18'sd1024;
      c = fxp_t'($urandom % 2048) - 18'sd1024; d = fxp_t'($urandom % 1024) - 18'sd512;
      expv = longint'(a) + ((longint'(b) - longint'(c)) * longint'(d) >>> 8);
      @(posedge clk); #1;
      if (!en) expv = held;
      checks++;
      if (r !== fxp_t'(expv)) begin failures++; if (failures < 5) $display("FAIL %0d %0d", r, expv); end
      held = longint'(r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
