// Testbench for GAccelerateCounter (0..20, pre-divider 2, step grows every
// 2 moves up to 3): random up/down holds against a reference model,
// covering wrap-around in both directions and the step growth.
module tb_GAccelerateCounter;
  logic clk = 0, rst = 1, up = 0, down = 0;
  logic [4:0] value;
  int checks = 0, failures = 0, wraps = 0, maxstep = 0;
  int rv = 3, pre = 0, step = 1, acc = 0;
  always #5 clk = ~clk;
  GAccelerateCounter #(.W(5), .TOP(20), .PRESCALE(2), .ACCEL(2), .MAX_STEP(3), .RST_VAL(3)) dut (.clk, .rst, .up, .down, .value);
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      if (i % 40 == 0) begin
        int r;
        r = $urandom % 3;
        up = (r == 1); down = (r == 2);
      end
      @(posedge clk); #1;
      // reference
      if (up ^ down) begin
        if (pre == 1) begin
          pre = 0;
          if (up) begin rv += step; if (rv > 20) begin rv -= 21; wraps++; end end
          else    begin rv -= step; if (rv < 0)  begin rv += 21; wraps++; end end
          if (acc == 1) begin acc = 0; if (step < 3) step++; end else acc++;
          if (step > maxstep) maxstep = step;
        end else pre++;
      end else begin pre = 0; step = 1; acc = 0; end
      checks++;
      if (value !== 5'(rv)) begin failures++; if (failures < 5) $display("FAIL i=%0d %0d vs %0d", i, value, rv); end
    end
    checks++; if (wraps == 0 || maxstep < 3) begin failures++; $display("coverage wraps=%0d maxstep=%0d", wraps, maxstep); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
