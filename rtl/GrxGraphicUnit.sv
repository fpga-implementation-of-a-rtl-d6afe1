// GrxGraphicUnit: the graphics pipeline and its controlling state machine.
//
// A redraw (start pulse) runs these steps:
//  1. clear the video memory and compute the projection matrix from the
//     azimuth, elevation and viewing angle sampled at start (both at once);
//  2. for every vertex of the selected model: read it from the model
//     memory, project it in a vertex unit, convert the 10Q8 result to
//     screen coordinates and store it in the 2D vertex bank. Vertices are
//     independent, so N_VU identical vertex units can work side by side:
//     a batch of up to N_VU vertices is started (one every two cycles),
//     and when all are done their results are stored one per cycle;
//  3. draw the wireframe from the bank and the model's edge list.
// The conversion scales by 256, i.e. the raw 10Q8 value becomes a pixel
// offset: x = X_OFFSET + Q0, y = Y_OFFSET - Q1 (screen y grows downwards),
// clamped to 0..1023. With the unit-cube models the picture spans about
// +-222 pixels around (320, 224), the centre of the area above the panel.
// Offsets, scale and the overlap of step 1 are this design's choices, and
// so is the default of one vertex unit (the original leaves the count open).
//
// Interface: start pulse (ignored while busy); done pulses at the end.
// The video memory is outside: vram_clear (pulse), pixel writes
// px_x/px_y/px_we with vram_busy as hold; vram_busy is also polled to see
// the end of the clear.
module GrxGraphicUnit
  import grx_pkg::*;
#(
  parameter int X_OFFSET = 320,
  parameter int Y_OFFSET = 224,
  parameter int N_VU     = 1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  fxp_t       azimuth,
  input  fxp_t       elevation,
  input  fxp_t       view_angle,
  input  logic [1:0] model_sel,
  output logic       vram_clear,
  input  logic       vram_busy,
  output coord_t     px_x,
  output coord_t     px_y,
  output logic       px_we,
  output logic       busy,
  output logic       done
);
  typedef enum logic [3:0] {
    S_IDLE, S_PREP, S_V_ADDR, S_V_READ, S_V_PROJ, S_V_STORE, S_WIRE, S_WIRE_WAIT, S_DONE
  } state_t;
  state_t state;

  localparam int KW = (N_VU > 1) ? $clog2(N_VU) : 1;
  logic [1:0]  model_q;
  vidx_t       vi, base;
  logic [KW-1:0] k;
  logic        mat_ready;

  // model memory
  vertex3d_t         vtx;
  edge_t             edge_v;
  vidx_t             n_vertices;
  logic [EIDX_W-1:0] n_edges, edge_index;
  ModelDescriptionROM u_rom (
    .clk, .model_sel(model_q), .vtx_index(vi), .edge_index,
    .vertex(vtx), .edge_o(edge_v), .n_vertices, .n_edges
  );

  // projection matrix
  logic    mat_start, mat_done;
  matrix_t matrix;
  assign mat_start = (state == S_IDLE) && start;
  GrxGenerateProjectionMatrix u_mat (
    .clk, .rst, .start(mat_start), .azimuth, .elevation, .view_angle,
    .matrix, .busy(), .done(mat_done)
  );

  // vertex units
  logic [N_VU-1:0] vp_done, vp_fin;
  fxp_t            vq0 [N_VU];
  fxp_t            vq1 [N_VU];
  fxp_t            q0, q1;
  for (genvar u = 0; u < N_VU; u++) begin : g_vu
    GrxVertexProjection u_vp (
      .clk, .rst, .start((state == S_V_READ) && (k == KW'(u))), .matrix, .vertex(vtx),
      .q0(vq0[u]), .q1(vq1[u]), .busy(), .done(vp_done[u])
    );
  end
  assign q0 = vq0[k];
  assign q1 = vq1[k];
  // last vertex of the batch / of the model
  logic last_in_batch, last_vertex;
  assign last_vertex   = (vi == n_vertices - 1'b1);
  assign last_in_batch = last_vertex || (k == KW'(N_VU - 1));
  logic [N_VU-1:0] batch_mask;
  always_comb
    for (int u = 0; u < N_VU; u++) batch_mask[u] = (32'(base) + u) < 32'(n_vertices);

  // FXP to screen coordinates
  function automatic coord_t to_screen(input logic signed [FXP_W+1:0] v);
    if (v < 0)                      return '0;
    else if (v > (FXP_W+2)'(1023))  return coord_t'(1023);
    else                            return coord_t'(v);
  endfunction
  vertex2d_t v2d;
  assign v2d.x = to_screen((FXP_W+2)'(X_OFFSET) + (FXP_W+2)'(q0));
  assign v2d.y = to_screen((FXP_W+2)'(Y_OFFSET) - (FXP_W+2)'(q1));

  // 2D vertex bank
  vidx_t     bank_addr;
  vertex2d_t bank_data;
  Vertex2DBank u_bank (
    .clk, .a_we(state == S_V_STORE), .a_addr(vi), .a_data(v2d),
    .b_addr(bank_addr), .b_data(bank_data)
  );

  // wireframe
  logic wf_done;
  GrxDrawWireframe u_wire (
    .clk, .rst, .start(state == S_WIRE), .n_edges,
    .edge_index, .edge_i(edge_v), .bank_addr, .bank_data,
    .hold(vram_busy), .px_x, .px_y, .px_we, .busy(), .done(wf_done)
  );

  assign vram_clear = mat_start;
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      done      <= 1'b0;
      model_q   <= '0;
      vi        <= '0;
      base      <= '0;
      k         <= '0;
      vp_fin    <= '0;
      mat_ready <= 1'b0;
    end else begin
      done <= 1'b0;
      if (mat_done) mat_ready <= 1'b1;
      vp_fin <= vp_fin | vp_done;
      unique case (state)
        S_IDLE: if (start) begin
          model_q   <= model_sel;
          mat_ready <= 1'b0;
          vi        <= '0;
          base      <= '0;
          k         <= '0;
          state     <= S_PREP;
        end
        // the clear has started (vram_busy high); wait for it and the matrix
        S_PREP: if ((mat_ready || mat_done) && !vram_busy) state <= S_V_ADDR;
        S_V_ADDR: state <= S_V_READ;     // vertex read in flight
        S_V_READ: begin                  // vertex unit k started
          if (last_in_batch) begin
            vi     <= base;
            k      <= '0;
            vp_fin <= '0;
            state  <= S_V_PROJ;
          end else begin
            vi    <= vi + 1'b1;
            k     <= k + 1'b1;
            state <= S_V_ADDR;
          end
        end
        // wait for every unit of the batch: unit j is used if base+j is a vertex
        S_V_PROJ: if (&((vp_fin | vp_done) | ~batch_mask)) state <= S_V_STORE;
        S_V_STORE: begin                 // result of unit k to bank slot vi
          vi <= vi + 1'b1;
          if (last_vertex) state <= S_WIRE;
          else if (last_in_batch) begin
            base  <= vi + 1'b1;
            k     <= '0;
            state <= S_V_ADDR;
          end else begin
            k <= k + 1'b1;
          end
        end
        S_WIRE: state <= S_WIRE_WAIT;
        S_WIRE_WAIT: if (wf_done) state <= S_DONE;
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
