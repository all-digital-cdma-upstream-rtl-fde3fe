// first_order_lpf: first-order IIR low-pass H(z) = (1-a) / (1 - a z^-1).
//
// The document uses this form for the DLL branch filters and says the loop
// filter is a similar first-order filter. Here a = 1 - 2^-K so the update
// y <= y + (x - y) / 2^K needs only a shift; with a = exp(-2 pi B T) this
// gives B ~ 2^-K / (2 pi T). The output is the state register; it changes
// the cycle after in_valid. clear resets the state.
module first_order_lpf #(
  parameter int W = 32,
  parameter int K = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y,
  output logic                out_valid
);
  logic signed [W:0] diff;

  assign diff = (W+1)'(x) - (W+1)'(y);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && !clear;
      if (clear)         y <= '0;
      else if (in_valid) y <= W'((W+1)'(y) + (diff >>> K));
    end
  end
endmodule
