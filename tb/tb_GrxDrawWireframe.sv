// Testbench for GrxDrawWireframe with the real model memory and vertex
// bank. The bank is loaded with chosen screen positions for the cube; the
// drawer must write, for every edge, all pixels of that edge: the test
// counts the writes (sum over edges of max(|dx|,|dy|)+1) and checks that
// every vertex position was written. The video memory is modelled by a
// hold that is high one cycle in three.
module tb_GrxDrawWireframe;
  import grx_pkg::*;
  logic clk = 0, rst = 1, start = 0, hold = 0, px_we, busy, done;
  logic [EIDX_W-1:0] edge_index, n_edges;
  edge_t edge_v;
  vidx_t bank_addr, n_vertices;
  vertex2d_t bank_data, wdata;
  logic bank_we = 0;
  vidx_t bank_waddr = 0;
  vertex3d_t vtx;
  coord_t px_x, px_y;
  int checks = 0, failures = 0;
  int pos_x [8] = '{100, 300, 320, 110, 150, 350, 370, 160};
  int pos_y [8] = '{300, 310, 150, 140, 250, 260, 100,  90};
  int written [1024][1024];
  always #5 clk = ~clk;
  ModelDescriptionROM u_rom (.clk, .model_sel(2'd0), .vtx_index('0), .edge_index, .vertex(vtx), .edge_o(edge_v), .n_vertices, .n_edges);
  Vertex2DBank u_bank (.clk, .a_we(bank_we), .a_addr(bank_waddr), .a_data(wdata), .b_addr(bank_addr), .b_data(bank_data));
  GrxDrawWireframe dut (.clk, .rst, .start, .n_edges, .edge_index, .edge_i(edge_v), .bank_addr, .bank_data,
                        .hold, .px_x, .px_y, .px_we, .busy, .done);
  function automatic int iabs(input int v); return (v < 0) ? -v : v; endfunction
  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) hold <= ($urandom % 3) == 0;
  initial begin
    int expected, got;
    int ev1 [12] = '{0, 1, 2, 3, 4, 5, 6, 7, 0, 1, 2, 3};
    int ev2 [12] = '{1, 2, 3, 0, 5, 6, 7, 4, 4, 5, 6, 7};
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 8; i++) begin
      bank_we = 1; bank_waddr = vidx_t'(i); wdata.x = coord_t'(pos_x[i]); wdata.y = coord_t'(pos_y[i]);
      @(posedge clk); #1;
    end
    bank_we = 0;
    expected = 0;
    for (int e = 0; e < 12; e++) begin
      int dx, dy;
      dx = iabs(pos_x[ev1[e]] - pos_x[ev2[e]]); dy = iabs(pos_y[ev1[e]] - pos_y[ev2[e]]);
      expected += ((dx > dy) ? dx : dy) + 1;
    end
    start = 1; @(posedge clk); #1 start = 0;
    got = 0;
    while (!done) begin
      if (px_we && !hold) begin got++; written[px_x][px_y] = 1; end
      @(posedge clk); #1;
    end
    checks++;
    if (got != expected) begin failures++; $display("wrote %0d pixels, expected %0d", got, expected); end
    for (int i = 0; i < 8; i++) begin
      checks++; if (written[pos_x[i]][pos_y[i]] != 1) begin failures++; $display("vertex %0d not drawn", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
