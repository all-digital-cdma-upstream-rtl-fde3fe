// inv_sinc: inverse-sinc pre-compensation ahead of the DAC.
//
// A zero-order-hold DAC attenuates its output by sin(x)/x, about -3.9 dB at
// half the sample rate. This 3-tap linear-phase FIR y[n] = (-x[n] + 18 x[n-1]
// - x[n-2]) / 16 has unity gain at DC and +1.9 dB at a quarter of the sample
// rate, flattening the droop over the lower part of the band where the
// carrier sits. The document names the filter only; the taps are this
// design's choice. Runs every clock; output saturated to OUT_W bits and
// registered (delay: one sample of group delay plus one register).
module inv_sinc #(
  parameter int IN_W  = 16,
  parameter int OUT_W = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout
);
  localparam int A_W = IN_W + 6;
  logic signed [IN_W-1:0] x1, x2;
  logic signed [A_W-1:0]  acc, scaled;

  always_comb begin
    acc    = A_W'(18) * A_W'(x1) - A_W'(din) - A_W'(x2);
    scaled = acc >>> 4;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0; x2 <= '0; dout <= '0;
    end else begin
      x1 <= din;
      x2 <= x1;
      if (scaled > A_W'(2**(OUT_W-1) - 1))      dout <= OUT_W'(2**(OUT_W-1) - 1);
      else if (scaled < -A_W'(2**(OUT_W-1)))    dout <= OUT_W'(-(2**(OUT_W-1)));
      else                                      dout <= OUT_W'(scaled);
    end
  end
endmodule
