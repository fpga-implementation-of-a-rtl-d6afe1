// Testbench for GBlockRAM (64 x 16): random writes on port A and reads on
// both ports against a reference array, including read-first behaviour
// when port A reads the word it writes.
module tb_GBlockRAM;
  logic clk = 0, a_we = 0;
  logic [5:0] a_addr = 0, b_addr = 0;
  logic [15:0] a_wdata = 0, a_rdata, b_rdata;
  logic [15:0] mem_ref [64];
  logic [15:0] exp_a, exp_b;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  GBlockRAM #(.W(16), .DEPTH(64)) dut (.clk, .a_we, .a_addr, .a_wdata, .a_rdata, .b_addr, .b_rdata);
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 64; i++) mem_ref[i] = '0;
    for (int i = 0; i < 2000; i++) begin
      a_we = 1'($urandom); a_addr = 6'($urandom); b_addr = 6'($urandom); a_wdata = 16'($urandom);
      exp_a = mem_ref[a_addr]; exp_b = mem_ref[b_addr];
      @(posedge clk); #1;
      if (a_we) mem_ref[a_addr] = a_wdata;
      checks++;
      if (a_rdata !== exp_a || b_rdata !== exp_b) begin
        failures++; if (failures < 5) $display("FAIL i=%0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
