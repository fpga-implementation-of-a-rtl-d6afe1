// GBcdCounter: DIGITS-digit decimal counter in BCD (digit 0 least
// significant). inc adds one with decimal carries; after 9..9 it wraps
// to 0..0. rst clears it synchronously.
module GBcdCounter #(
  parameter int DIGITS = 4
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  inc,
  output logic [DIGITS-1:0][3:0] bcd
);
  always_ff @(posedge clk) begin
    if (rst) bcd <= '0;
    else if (inc) begin
      for (int i = 0; i < DIGITS; i++) begin
        // digit i moves when all lower digits are 9
        logic carry_in;
        carry_in = 1'b1;
        for (int j = 0; j < i; j++) carry_in &= (bcd[j] == 4'd9);
        if (carry_in) bcd[i] <= (bcd[i] == 4'd9) ? 4'd0 : bcd[i] + 4'd1;
      end
    end
  end
endmodule
