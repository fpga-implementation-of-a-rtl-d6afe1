// Testbench for GBcd7Display (4 digits, refresh 3): each digit in turn
// must be selected (one anode low) for three cycles with the segment
// pattern of its value.
module tb_GBcd7Display;
  logic clk = 0, rst = 1;
  logic [3:0][3:0] bcd;
  logic [7:0] seg_n;
  logic [3:0] an_n;
  int checks = 0, failures = 0;
  logic [6:0] pat [10] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F};
  always #5 clk = ~clk;
  GBcd7Display #(.DIGITS(4), .REFRESH(3)) dut (.clk, .rst, .bcd, .seg_n, .an_n);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(posedge clk); #1 rst = 0;
    for (int r = 0; r < 10; r++) begin
      for (int k = 0; k < 4; k++) bcd[k] = 4'((r + 3 * k) % 10);
      #1;
      for (int dg = 0; dg < 4; dg++) begin
        for (int c = 0; c < 3; c++) begin
          checks++;
          if (an_n !== ~(4'b1 << dg) || seg_n !== {1'b1, ~pat[bcd[dg]]}) begin
            failures++; $display("FAIL digit %0d an=%b seg=%h", dg, an_n, seg_n);
          end
          @(posedge clk); #1;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
