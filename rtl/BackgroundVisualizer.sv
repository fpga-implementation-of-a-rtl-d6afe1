// BackgroundVisualizer: colour of the background at a given screen row.
//
// The background is a vertical ramp from black whose hue follows the
// view: per channel c the intensity is
//   I_c = y * (2 + k_c) / 2048 + rnd / 4,   rnd in [0, 1),
//   k = [-cos az - cos el,  cos az - cos el / 2,  cos el - cos az / 2]
// saturated to 1 and quantised to RGB 3:3:2. The noise term dithers the
// ramp, which 8-bit colour cannot show smoothly; it comes from a 16-bit
// LFSR advanced every cycle (R, G and B take different bit slices).
// A small controller feeds azimuth and elevation in turn to its own
// CORDIC core, forever, and keeps the cosines in registers, so colour
// follows the angles a few dozen cycles late. Intensities are kept with
// 16 fraction bits. The per-channel reading of the formula and the RGB
// 3:3:2 packing are this design's.
//
// Interface: y in, color out three cycles later (a 3-stage pipeline).
module BackgroundVisualizer
  import grx_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  fxp_t   azimuth,
  input  fxp_t   elevation,
  input  coord_t y,
  output color_t color
);
  // ---- angle controller: az, then el, then again ----
  logic cor_start, cor_done, cor_busy, sel_el;
  fxp_t cor_sin, cor_cos, cos_az, cos_el;
  assign cor_start = !cor_busy && !cor_done;
  CordicSinCos u_cordic (
    .clk, .rst, .start(cor_start), .angle(sel_el ? elevation : azimuth),
    .sin_o(cor_sin), .cos_o(cor_cos), .busy(cor_busy), .done(cor_done)
  );
  always_ff @(posedge clk) begin
    if (rst) begin
      sel_el <= 1'b0;
      cos_az <= FXP_ONE;
      cos_el <= FXP_ONE;
    end else if (cor_done) begin
      if (sel_el) cos_el <= cor_cos;
      else        cos_az <= cor_cos;
      sel_el <= !sel_el;
    end
  end

  // ---- per-channel slopes s_c = 2 + k_c, Q8, range 0..4 ----
  logic signed [FXP_W+1:0] s_r, s_g, s_b;
  always_ff @(posedge clk) begin
    s_r <= 20'sd512 - 20'(cos_az) - 20'(cos_el);
    s_g <= 20'sd512 + 20'(cos_az) - (20'(cos_el) >>> 1);
    s_b <= 20'sd512 + 20'(cos_el) - (20'(cos_az) >>> 1);
  end

  function automatic logic [10:0] clamp_s(input logic signed [FXP_W+1:0] s);
    if (s < 0)                  return '0;
    else if (s > 20'sd1024)     return 11'd1024;
    else                        return 11'(s);
  endfunction

  // ---- dither source ----
  logic [15:0] rnd;
  GRandGeneratorLFSR #(.W(16)) u_lfsr (.clk, .rst, .en(1'b1), .rnd);

  // stage 1: products y * s_c (Q8); I = prod / 2^19, so Q16 = prod >> 3
  logic [20:0] p_r, p_g, p_b;
  logic [13:0] n_r, n_g, n_b;
  always_ff @(posedge clk) begin
    p_r <= 21'(y) * 21'(clamp_s(s_r));
    p_g <= 21'(y) * 21'(clamp_s(s_g));
    p_b <= 21'(y) * 21'(clamp_s(s_b));
    n_r <= rnd[13:0];
    n_g <= {rnd[6:0], rnd[15:9]};
    n_b <= {rnd[10:0], rnd[15:13]};
  end

  // stage 2: add noise (rnd/4 = 14-bit value in Q16), saturate
  function automatic logic [15:0] sat16(input logic [20:0] p, input logic [13:0] n);
    logic [18:0] t;
    t = 19'(p >> 3) + 19'(n);
    return (t > 19'd65535) ? 16'hFFFF : t[15:0];
  endfunction
  logic [15:0] i_r, i_g, i_b;
  always_ff @(posedge clk) begin
    i_r <= sat16(p_r, n_r);
    i_g <= sat16(p_g, n_g);
    i_b <= sat16(p_b, n_b);
  end

  // stage 3: quantise
  always_ff @(posedge clk) begin
    color <= {i_r[15:13], i_g[15:13], i_b[15:14]};
  end
endmodule
