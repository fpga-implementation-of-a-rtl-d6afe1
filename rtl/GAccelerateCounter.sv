// GAccelerateCounter: bidirectional counter over 0..TOP that wraps freely
// in both directions. While up or down is held it moves once every
// PRESCALE cycles (the pre-divider); the step starts at 1 and grows by one
// every ACCEL moves up to MAX_STEP, so holding a button makes the count
// speed up; releasing both resets the step. Used for azimuth and
// elevation, where it gives the gradual-then-faster rotation. The
// acceleration law (linear step growth) is this design's choice.
module GAccelerateCounter #(
  parameter int W        = 11,
  parameter int TOP      = 1607,
  parameter int PRESCALE = 500000,
  parameter int ACCEL    = 8,
  parameter int MAX_STEP = 8,
  parameter int RST_VAL  = 0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         up,
  input  logic         down,
  output logic [W-1:0] value
);
  localparam int PW = $clog2(PRESCALE + 1);
  localparam int AW = $clog2(ACCEL + 1);
  localparam int SW = $clog2(MAX_STEP + 1);
  logic [PW-1:0] pre;
  logic [AW-1:0] acc_cnt;
  logic [SW-1:0] step;
  logic          tick, held;
  logic [W:0]    sum, diff;

  assign held = up ^ down;
  assign tick = held && (pre == PW'(PRESCALE - 1));
  assign sum  = {1'b0, value} + (W+1)'(step);
  assign diff = {1'b0, value} - (W+1)'(step);

  always_ff @(posedge clk) begin
    if (rst || !held || tick) pre <= '0;
    else                      pre <= pre + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst || !held) begin
      step    <= SW'(1);
      acc_cnt <= '0;
    end else if (tick) begin
      if (acc_cnt == AW'(ACCEL - 1)) begin
        acc_cnt <= '0;
        if (step != SW'(MAX_STEP)) step <= step + 1'b1;
      end else begin
        acc_cnt <= acc_cnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) value <= W'(RST_VAL);
    else if (tick) begin
      if (up) value <= (sum > (W+1)'(TOP)) ? W'(sum - (W+1)'(TOP + 1)) : sum[W-1:0];
      else    value <= diff[W] ? W'(diff + (W+1)'(TOP + 1)) : diff[W-1:0];
    end
  end
endmodule
