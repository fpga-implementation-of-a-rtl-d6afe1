// GSerialDivider: unsigned restoring divider, quotient = dividend /
// divisor and the remainder. One quotient bit takes two cycles (a
// trial-subtract cycle and a shift cycle), so a division of WIDTH bits
// takes 2*WIDTH+2 cycles from the start pulse to the done pulse, as the
// library's divider does ("approximately 2n + 2"). start is taken when
// busy is low; results hold until the next start. Division by zero gives
// an all-ones quotient (this design's choice).
module GSerialDivider #(
  parameter int WIDTH = 24
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [WIDTH-1:0] dividend,
  input  logic [WIDTH-1:0] divisor,
  output logic [WIDTH-1:0] quotient,
  output logic [WIDTH-1:0] remainder,
  output logic             busy,
  output logic             done
);
  typedef enum logic [1:0] {IDLE, LOAD, SUB, SHIFT} state_t;
  state_t           state;
  logic [WIDTH-1:0] den, q;
  logic [WIDTH:0]   rem, trial;
  logic [$clog2(WIDTH+1)-1:0] bitn;

  assign trial = rem - {1'b0, den};
  assign busy  = (state != IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      done      <= 1'b0;
      quotient  <= '0;
      remainder <= '0;
      den <= '0; q <= '0; rem <= '0; bitn <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          q     <= dividend;
          den   <= divisor;
          rem   <= '0;
          bitn  <= '0;
          state <= LOAD;
        end
        LOAD: begin        // bring in the first dividend bit
          rem   <= {rem[WIDTH-1:0], q[WIDTH-1]};
          q     <= {q[WIDTH-2:0], 1'b0};
          state <= SUB;
        end
        SUB: begin
          if (!trial[WIDTH]) begin
            rem  <= trial;
            q[0] <= 1'b1;
          end
          bitn  <= bitn + 1'b1;
          state <= SHIFT;
        end
        SHIFT: begin
          if (bitn == ($clog2(WIDTH+1))'(WIDTH)) begin
            quotient  <= q;
            remainder <= rem[WIDTH-1:0];
            done      <= 1'b1;
            state     <= IDLE;
          end else begin
            rem   <= {rem[WIDTH-1:0], q[WIDTH-1]};
            q     <= {q[WIDTH-2:0], 1'b0};
            state <= SUB;
          end
        end
      endcase
    end
  end
endmodule
