// Testbench for Vertex2DBank: random writes on port A and reads on port B
// against a reference array (one-cycle read latency).
module tb_Vertex2DBank;
  import grx_pkg::*;
  logic clk = 0, a_we = 0;
  logic [5:0] a_addr = 0, b_addr = 0;
  vertex2d_t a_data, b_data, refm [64], expd;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  Vertex2DBank dut (.clk, .a_we, .a_addr, .a_data, .b_addr, .b_data);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 64; i++) refm[i] = '0;
    for (int i = 0; i < 1000; i++) begin
      a_we = 1'($urandom); a_addr = 6'($urandom); b_addr = 6'($urandom); a_data = 20'($urandom);
      expd = refm[b_addr];
      @(posedge clk); #1;
      if (a_we) refm[a_addr] = a_data;
      checks++;
      if (b_data !== expd) begin failures++; if (failures < 5) $display("FAIL %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
