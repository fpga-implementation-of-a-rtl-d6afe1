// Testbench for GAsyncFifo (16 x 8) with unrelated write (10 ns) and read
// (37 ns) clocks: random pushes and pops; every popped word must be the
// next one pushed, full and empty must both be seen, and nothing may be
// written while full.
module tb_GAsyncFifo;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1, we = 0, re = 0, full, empty;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] q [$];
  int checks = 0, failures = 0, nfull = 0, nempty = 0, pushed = 0, popped = 0;
  always #5 wclk = ~wclk;
  always #18.5 rclk = ~rclk;
  GAsyncFifo #(.W(8), .AW(4)) dut (.wclk, .wrst, .we, .wdata, .full, .rclk, .rrst, .re, .rdata, .empty);
  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge rclk); #1 wrst = 0; rrst = 0;
  end
  // writer
  initial begin
    @(negedge wrst);
    while (pushed < 3000) begin
      @(negedge wclk);
      we = ($urandom % 100) < ((pushed / 500) % 2 ? 20 : 90);
      wdata = 8'($urandom);
      if (full) nfull++;
      @(posedge wclk);
      if (we && !full) begin q.push_back(wdata); pushed++; end
    end
    @(negedge wclk) we = 0;
  end
  // reader
  initial begin
    @(negedge rrst);
    while (popped < 3000) begin
      @(negedge rclk);
      re = ($urandom % 100) < 60;
      if (empty) nempty++;
      if (re && !empty) begin
        checks++;
        if (q.size() == 0 || rdata !== q[0]) begin failures++; if (failures < 5) $display("FAIL pop %0d", popped); end
        if (q.size() != 0) void'(q.pop_front());
        popped++;
      end
      @(posedge rclk);
    end
    checks++; if (nfull == 0 || nempty == 0) begin failures++; $display("full %0d empty %0d", nfull, nempty); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
