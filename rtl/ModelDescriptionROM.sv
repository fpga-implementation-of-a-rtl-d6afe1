// ModelDescriptionROM: the memory of wireframe models.
//
// Three tables. The descriptor table gives, for each model, where its
// vertices start in the vertex table (Vertex3DBankROM) and how many there
// are, and where its edges start in the edge table (VertexPointerROM) and
// how many there are. A vertex is read at (vertex base + vertex index), an
// edge at (edge base + edge index). An edge is a pair of vertex indices
// local to its model, which are also the slots of the 2D vertex bank.
// Vertex coordinates are 10Q8 and normalised to the unit cube [0,1]^3.
// The structure follows the original model memory; the four models
// (cube, square pyramid, octahedron, triangular prism) are this design's.
//
// Both data outputs are registered: one cycle after the index.
module ModelDescriptionROM
  import grx_pkg::*;
(
  input  logic       clk,
  input  logic [1:0] model_sel,
  input  vidx_t      vtx_index,
  input  logic [EIDX_W-1:0] edge_index,
  output vertex3d_t  vertex,
  output edge_t      edge_o,
  output vidx_t      n_vertices,
  output logic [EIDX_W-1:0] n_edges
);
  localparam fxp_t O = '0;      // 0.0
  localparam fxp_t H = 18'sd128; // 0.5
  localparam fxp_t I = 18'sd256; // 1.0

  typedef struct packed {
    logic [4:0] vbase;
    vidx_t      vcount;
    logic [5:0] ebase;
    logic [EIDX_W-1:0] ecount;
  } descr_t;

  function automatic descr_t descr(input logic [1:0] m);
    unique case (m)
      2'd0: return '{5'd0,  6'd8, 6'd0,  6'd12};  // cube
      2'd1: return '{5'd8,  6'd5, 6'd12, 6'd8};   // square pyramid
      2'd2: return '{5'd13, 6'd6, 6'd20, 6'd12};  // octahedron
      default: return '{5'd19, 6'd6, 6'd32, 6'd9}; // triangular prism
    endcase
  endfunction

  function automatic vertex3d_t vrom(input logic [4:0] a);
    unique case (a)        // {z, y, x}
      // cube
      5'd0:  return '{O, O, O};  5'd1:  return '{O, O, I};
      5'd2:  return '{O, I, I};  5'd3:  return '{O, I, O};
      5'd4:  return '{I, O, O};  5'd5:  return '{I, O, I};
      5'd6:  return '{I, I, I};  5'd7:  return '{I, I, O};
      // square pyramid
      5'd8:  return '{O, O, O};  5'd9:  return '{O, O, I};
      5'd10: return '{O, I, I};  5'd11: return '{O, I, O};
      5'd12: return '{I, H, H};
      // octahedron
      5'd13: return '{O, H, H};  5'd14: return '{I, H, H};
      5'd15: return '{H, H, O};  5'd16: return '{H, H, I};
      5'd17: return '{H, O, H};  5'd18: return '{H, I, H};
      // triangular prism
      5'd19: return '{O, O, O};  5'd20: return '{O, O, I};
      5'd21: return '{O, I, H};  5'd22: return '{I, O, O};
      5'd23: return '{I, O, I};  5'd24: return '{I, I, H};
      default: return '{O, O, O};
    endcase
  endfunction

  function automatic edge_t erom(input logic [5:0] a);
    logic [3:0] p, q;
    unique case (a)
      // cube
      6'd0: {p,q} = {4'd0,4'd1}; 6'd1: {p,q} = {4'd1,4'd2}; 6'd2: {p,q} = {4'd2,4'd3};
      6'd3: {p,q} = {4'd3,4'd0}; 6'd4: {p,q} = {4'd4,4'd5}; 6'd5: {p,q} = {4'd5,4'd6};
      6'd6: {p,q} = {4'd6,4'd7}; 6'd7: {p,q} = {4'd7,4'd4}; 6'd8: {p,q} = {4'd0,4'd4};
      6'd9: {p,q} = {4'd1,4'd5}; 6'd10: {p,q} = {4'd2,4'd6}; 6'd11: {p,q} = {4'd3,4'd7};
      // square pyramid
      6'd12: {p,q} = {4'd0,4'd1}; 6'd13: {p,q} = {4'd1,4'd2}; 6'd14: {p,q} = {4'd2,4'd3};
      6'd15: {p,q} = {4'd3,4'd0}; 6'd16: {p,q} = {4'd0,4'd4}; 6'd17: {p,q} = {4'd1,4'd4};
      6'd18: {p,q} = {4'd2,4'd4}; 6'd19: {p,q} = {4'd3,4'd4};
      // octahedron: poles 0,1; equator 2,4,3,5
      6'd20: {p,q} = {4'd0,4'd2}; 6'd21: {p,q} = {4'd0,4'd3}; 6'd22: {p,q} = {4'd0,4'd4};
      6'd23: {p,q} = {4'd0,4'd5}; 6'd24: {p,q} = {4'd1,4'd2}; 6'd25: {p,q} = {4'd1,4'd3};
      6'd26: {p,q} = {4'd1,4'd4}; 6'd27: {p,q} = {4'd1,4'd5}; 6'd28: {p,q} = {4'd2,4'd4};
      6'd29: {p,q} = {4'd4,4'd3}; 6'd30: {p,q} = {4'd3,4'd5}; 6'd31: {p,q} = {4'd5,4'd2};
      // triangular prism
      6'd32: {p,q} = {4'd0,4'd1}; 6'd33: {p,q} = {4'd1,4'd2}; 6'd34: {p,q} = {4'd2,4'd0};
      6'd35: {p,q} = {4'd3,4'd4}; 6'd36: {p,q} = {4'd4,4'd5}; 6'd37: {p,q} = {4'd5,4'd3};
      6'd38: {p,q} = {4'd0,4'd3}; 6'd39: {p,q} = {4'd1,4'd4}; 6'd40: {p,q} = {4'd2,4'd5};
      default: {p,q} = {4'd0,4'd0};
    endcase
    return '{vidx_t'(q), vidx_t'(p)};
  endfunction

  descr_t d;
  assign d          = descr(model_sel);
  assign n_vertices = d.vcount;
  assign n_edges    = d.ecount;

  always_ff @(posedge clk) begin
    vertex <= vrom(d.vbase + 5'(vtx_index));
    edge_o <= erom(d.ebase + 6'(edge_index));
  end
endmodule
