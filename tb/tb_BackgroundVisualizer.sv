// Testbench for BackgroundVisualizer. For the four views of the original
// examples (azimuth and elevation 0 or pi) and random ones it waits for
// the controller to refresh the cosines, then feeds rows 0..479 and checks
// each channel three cycles later against the noise-free formula
// y*(2+k)/2048: the quantised output must lie between the value without
// noise and the value with the largest noise (+1/4), one step of slack
// for cosine rounding. It also checks that the dither actually varies the
// colour of a row.
module tb_BackgroundVisualizer;
  import grx_pkg::*;
  logic clk = 0, rst = 1;
  fxp_t az = 0, el = 0;
  coord_t y = 0;
  color_t color;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  BackgroundVisualizer dut (.clk, .rst, .azimuth(az), .elevation(el), .y, .color);
  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic bit in_range(input int q, input real lo, input real hi, input int levels);
    int qlo, qhi;
    qlo = int'($floor((lo > 1.0 ? 1.0 : lo) * levels)); if (qlo > levels - 1) qlo = levels - 1;
    qhi = int'($floor((hi > 1.0 ? 1.0 : hi) * levels)); if (qhi > levels - 1) qhi = levels - 1;
    return (q >= qlo - 1) && (q <= qhi + 1);
  endfunction
  initial begin
    int yq [4];
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 8; t++) begin
      real ca, ce, k [3];
      int distinct;
      color_t first;
      if (t < 4) begin az = (t % 2) ? fxp_t'(ANGLE_PI) : 0; el = (t / 2) ? fxp_t'(ANGLE_PI) : 0; end
      else begin az = fxp_t'($urandom % 1608); el = fxp_t'($urandom % 1608); end
      repeat (100) @(posedge clk);
      ca = $cos(az / 256.0); ce = $cos(el / 256.0);
      k[0] = -ca - ce; k[1] = ca - ce / 2.0; k[2] = ce - ca / 2.0;
      for (int i = 0; i < 3; i++) yq[i] = 0;
      distinct = 0;
      for (int row = 0; row < 480 + 2; row++) begin
        y = coord_t'(row < 480 ? row : 0);
        @(posedge clk); #1;
        yq[3] = yq[2]; yq[2] = yq[1]; yq[1] = yq[0]; yq[0] = row;
        if (row >= 2) begin
          real base [3];
          int r, g, b;
          for (int c = 0; c < 3; c++) base[c] = yq[2] * (2.0 + k[c]) / 2048.0;
          r = color[7:5]; g = color[4:2]; b = color[1:0];
          checks++;
          if (!in_range(r, base[0], base[0] + 0.25, 8) || !in_range(g, base[1], base[1] + 0.25, 8) ||
              !in_range(b, base[2], base[2] + 0.25, 4)) begin
            failures++; if (failures < 6) $display("FAIL t=%0d y=%0d col=%h base %f %f %f", t, yq[2], color, base[0], base[1], base[2]);
          end
        end
      end
      // dither: the same row must not always give the same colour
      y = 200; first = 0;
      for (int i = 0; i < 40; i++) begin
        @(posedge clk); #1;
        if (i == 4) first = color;
        if (i > 4 && color != first) distinct++;
      end
      checks++; if (distinct == 0) begin failures++; $display("no dither"); end
    end
    // colours of the example views: az=0, el=0 gives no red at the bottom
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
