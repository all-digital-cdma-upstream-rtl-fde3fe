// interp_stuffer: zero-stuffing front end of an interpolating filter.
//
// in_valid marks a new low-rate sample; tick is the high-rate sample clock
// enable (its rate is an integer multiple of the input rate, and an input
// sample coincides with a tick or arrives before the next one). On each tick
// the output is the pending input sample, or zero when none arrived since the
// previous tick. Combinational output, valid in the tick cycle.
module interp_stuffer #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] din,
  input  logic                tick,
  output logic signed [W-1:0] dout
);
  logic               pending;
  logic signed [W-1:0] held;

  always_comb begin
    if (in_valid)     dout = din;
    else if (pending) dout = held;
    else              dout = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= 1'b0;
      held    <= '0;
    end else if (tick) begin
      pending <= 1'b0;
    end else if (in_valid) begin
      pending <= 1'b1;
      held    <= din;
    end
  end
endmodule
