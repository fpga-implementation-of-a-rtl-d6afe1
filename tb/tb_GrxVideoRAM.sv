// Testbench for GrxVideoRAM at its full 640x480 size. It fills the
// memory with a random pattern through the write port (random set and
// clear writes, clustered so that both cached-page hits and page misses
// occur), checks the timing of each write (1 cycle on the cached page,
// 3 on a miss), reads back a large sample through the display port
// against a reference image, then clears and checks that the clear takes
// one cycle per 32-pixel page (9600 cycles) and leaves every pixel 0.
// Writes outside the screen must be dropped without stalling.
module tb_GrxVideoRAM;
  import grx_pkg::*;
  logic clk = 0, rst = 1, clear = 0, wr_en = 0, wr_data = 0, busy, rd_data;
  coord_t wr_x = 0, wr_y = 0, rd_x = 0, rd_y = 0;
  logic img [640*480];
  int checks = 0, failures = 0, hits = 0, misses = 0;
  always #5 clk = ~clk;
  GrxVideoRAM dut (.clk, .rst, .clear, .wr_en, .wr_x, .wr_y, .wr_data, .busy, .rd_x, .rd_y, .rd_data);
  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic write_px(input int x, input int y, input logic v, output int cyc);
    wr_en = 1; wr_x = coord_t'(x); wr_y = coord_t'(y); wr_data = v; cyc = 1;
    #1;
    while (busy) begin @(posedge clk); #1 cyc++; end
    @(posedge clk); #1 wr_en = 0;
    if (x < 640 && y < 480) img[y * 640 + x] = v;
  endtask
  task automatic read_check(input int x, input int y, input logic expv);
    rd_x = coord_t'(x); rd_y = coord_t'(y);
    @(posedge clk); #1;
    checks++;
    if (rd_data !== expv) begin failures++; if (failures < 10) $display("FAIL (%0d,%0d) %b exp %b", x, y, rd_data, expv); end
  endtask
  initial begin
    int cyc, cx, cy, lastpage, page;
    for (int i = 0; i < 640 * 480; i++) img[i] = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    // clear at start-up, measure its length
    clear = 1; @(posedge clk); #1 clear = 0; cyc = 0;
    while (busy) begin @(posedge clk); #1 cyc++; end
    checks++; if (cyc != 9600) begin failures++; $display("clear took %0d", cyc); end
    lastpage = -1;
    for (int k = 0; k < 3000; k++) begin
      if (k % 20 == 0) begin cx = $urandom % 640; cy = $urandom % 480; end
      else begin cx = (cx + 1) % 640; end
      page = (cy * 640 + cx) / 32;
      write_px(cx, cy, 1'($urandom % 4 != 0), cyc);
      checks++;
      if (page == lastpage) begin hits++; if (cyc != 1) begin failures++; $display("hit took %0d", cyc); end end
      else begin misses++; if (cyc != 3) begin failures++; $display("miss took %0d", cyc); end end
      lastpage = page;
    end
    write_px(700, 10, 1, cyc);  checks++; if (cyc != 1) failures++;
    write_px(10, 500, 1, cyc);  checks++; if (cyc != 1) failures++;
    for (int k = 0; k < 20000; k++) begin
      cx = $urandom % 640; cy = $urandom % 480;
      read_check(cx, cy, img[cy * 640 + cx]);
    end
    // every pixel of a few lines
    for (int y = 0; y < 480; y += 97) for (int x = 0; x < 640; x++) read_check(x, y, img[y * 640 + x]);
    clear = 1; @(posedge clk); #1 clear = 0; cyc = 0;
    while (busy) begin @(posedge clk); #1 cyc++; end
    checks++; if (cyc != 9600) begin failures++; $display("clear took %0d", cyc); end
    for (int k = 0; k < 5000; k++) read_check($urandom % 640, $urandom % 480, 1'b0);
    checks++; if (hits == 0 || misses == 0) failures++;
    $display("hits %0d misses %0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
