// GRandGeneratorLFSR: pseudo-random generator, a W-bit Galois linear
// feedback shift register advanced every cycle en is high. TAPS is the
// feedback polynomial (default x^16+x^14+x^13+x^11+1, maximal length);
// reset loads SEED, which must be non-zero.
module GRandGeneratorLFSR #(
  parameter int          W    = 16,
  parameter logic [W-1:0] TAPS = 16'hB400,
  parameter logic [W-1:0] SEED = 16'hACE1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  output logic [W-1:0] rnd
);
  always_ff @(posedge clk) begin
    if (rst)     rnd <= SEED;
    else if (en) rnd <= (rnd >> 1) ^ (rnd[0] ? TAPS : '0);
  end
endmodule
