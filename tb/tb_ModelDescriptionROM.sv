// Testbench for ModelDescriptionROM: per model it checks the vertex and
// edge counts, that every vertex lies in the unit cube, that every edge
// joins two different vertices of the model and that no edge appears
// twice, and for the cube that each edge has length exactly 1 and the
// eight corners are all distinct; read latency is one cycle.
module tb_ModelDescriptionROM;
  import grx_pkg::*;
  logic clk = 0;
  logic [1:0] model_sel = 0;
  vidx_t vtx_index = 0, n_vertices;
  logic [EIDX_W-1:0] edge_index = 0, n_edges;
  vertex3d_t vertex;
  edge_t edge_o;
  int checks = 0, failures = 0;
  int exp_v [4] = '{8, 5, 6, 6};
  int exp_e [4] = '{12, 8, 12, 9};
  always #5 clk = ~clk;
  ModelDescriptionROM dut (.clk, .model_sel, .vtx_index, .edge_index, .vertex, .edge_o, .n_vertices, .n_edges);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    vertex3d_t vs [16];
    for (int m = 0; m < 4; m++) begin
      model_sel = 2'(m); #1;
      checks++;
      if (n_vertices != vidx_t'(exp_v[m]) || n_edges != 6'(exp_e[m])) begin failures++; $display("counts of %0d", m); end
      for (int i = 0; i < exp_v[m]; i++) begin
        vtx_index = vidx_t'(i); @(posedge clk); #1;
        vs[i] = vertex;
        checks++;
        if (vertex.x < 0 || vertex.x > 256 || vertex.y < 0 || vertex.y > 256 || vertex.z < 0 || vertex.z > 256) failures++;
      end
      if (m == 0) for (int i = 0; i < 8; i++) for (int j = i + 1; j < 8; j++) begin
        checks++; if (vs[i] == vs[j]) failures++;
      end
      for (int e = 0; e < exp_e[m]; e++) begin
        edge_t ed;
        edge_index = 6'(e); @(posedge clk); #1;
        ed = edge_o;
        checks++;
        if (int'(ed.v1) >= exp_v[m] || int'(ed.v2) >= exp_v[m] || ed.v1 == ed.v2) begin failures++; $display("edge %0d of %0d bad", e, m); end
        if (m == 0) begin
          int d;
          d = ((vs[ed.v1].x != vs[ed.v2].x) ? 1 : 0) + ((vs[ed.v1].y != vs[ed.v2].y) ? 1 : 0) + ((vs[ed.v1].z != vs[ed.v2].z) ? 1 : 0);
          checks++; if (d != 1) begin failures++; $display("cube edge %0d not unit", e); end
        end
        for (int f = 0; f < e; f++) begin
          edge_t eo;
          edge_index = 6'(f); @(posedge clk); #1; eo = edge_o;
          checks++;
          if ((eo.v1 == ed.v1 && eo.v2 == ed.v2) || (eo.v1 == ed.v2 && eo.v2 == ed.v1)) begin failures++; $display("duplicate edge"); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
