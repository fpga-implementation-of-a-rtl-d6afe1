// GAsyncFifo: FIFO with independent write and read clocks.
//
// 2^AW entries of W bits. Read and write pointers are kept in binary and
// in Gray code; each Gray pointer crosses into the other domain through
// two flip-flops, so full and empty are computed from safely
// synchronised values (they are pessimistic by the synchroniser delay,
// never wrong). The read side is first-word-fall-through: rdata shows the
// oldest entry while empty is low, re removes it. Writes while full and
// reads while empty are ignored. Each side has its own reset.
module GAsyncFifo #(
  parameter int W  = 8,
  parameter int AW = 10
) (
  input  logic         wclk,
  input  logic         wrst,
  input  logic         we,
  input  logic [W-1:0] wdata,
  output logic         full,
  input  logic         rclk,
  input  logic         rrst,
  input  logic         re,
  output logic [W-1:0] rdata,
  output logic         empty
);
  logic [W-1:0] mem [2**AW];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] wbin_n, rbin_n;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  assign full   = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wbin_n = wbin + (AW+1)'(we && !full);
  always_ff @(posedge wclk) begin
    if (we && !full) mem[wbin[AW-1:0]] <= wdata;
  end
  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin  <= wbin_n;
      wgray <= bin2gray(wbin_n);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  // read side
  assign empty  = (rgray == wgray_r2);
  assign rdata  = mem[rbin[AW-1:0]];
  assign rbin_n = rbin + (AW+1)'(re && !empty);
  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin  <= rbin_n;
      rgray <= bin2gray(rbin_n);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
endmodule
