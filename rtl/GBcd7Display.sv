// GBcd7Display: drives a common-anode multiplexed 7-segment display of
// DIGITS digits from BCD values. Every REFRESH cycles it moves to the next
// digit, enables its anode (active low) and outputs the decoded segments
// (active low, seg_n = {dp,g,f,e,d,c,b,a}). Values above 9 show blank.
module GBcd7Display #(
  parameter int DIGITS  = 4,
  parameter int REFRESH = 100000
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [DIGITS-1:0][3:0] bcd,
  output logic [7:0]             seg_n,
  output logic [DIGITS-1:0]      an_n
);
  localparam int RW = $clog2(REFRESH + 1);
  localparam int DW = (DIGITS > 1) ? $clog2(DIGITS) : 1;
  logic [RW-1:0] cnt;
  logic [DW-1:0] sel;
  logic [6:0]    seg;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      sel <= '0;
    end else if (cnt == RW'(REFRESH - 1)) begin
      cnt <= '0;
      sel <= (sel == DW'(DIGITS - 1)) ? '0 : sel + 1'b1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  always_comb begin
    unique case (bcd[sel])          // gfedcba
      4'd0: seg = 7'b0111111;
      4'd1: seg = 7'b0000110;
      4'd2: seg = 7'b1011011;
      4'd3: seg = 7'b1001111;
      4'd4: seg = 7'b1100110;
      4'd5: seg = 7'b1101101;
      4'd6: seg = 7'b1111101;
      4'd7: seg = 7'b0000111;
      4'd8: seg = 7'b1111111;
      4'd9: seg = 7'b1101111;
      default: seg = 7'b0000000;
    endcase
    seg_n = {1'b1, ~seg};
    an_n  = ~(DIGITS'(1) << sel);
  end
endmodule
