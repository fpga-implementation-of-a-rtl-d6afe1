// Testbench for PanelImageROM: random coordinates; the colour two cycles
// later must be the look-up-table colour of the pattern's index (frame
// 11111111, blocks 01001110, elsewhere 01110101).
module tb_PanelImageROM;
  import grx_pkg::*;
  logic clk = 0;
  coord_t x = 0;
  logic [4:0] y = 0;
  color_t color, expq [3];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  PanelImageROM dut (.clk, .x, .y, .color);
  function automatic color_t expected(input int px, input int py);
    if (px == 0 || py == 0 || px == 639 || py == 31) return 8'b11111111;
    if (py >= 10 && py <= 21 && (px % 16) >= 4 && (px % 16) < 12) return 8'b01001110;
    return 8'b01110101;
  endfunction
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 3000; i++) begin
      x = coord_t'($urandom % 640); y = 5'($urandom);
      if (i % 50 == 0) x = 0;
      expq[0] = expected(int'(x), int'(y));
      @(posedge clk); #1;
      expq[2] = expq[1]; expq[1] = expq[0];
      if (i >= 2) begin
        checks++;
        if (color !== expq[2]) begin failures++; if (failures < 5) $display("FAIL %h exp %h", color, expq[2]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
