// quad_mixer: digital quadrature up-conversion, out = (I*cos - Q*sin) >>> SHIFT.
//
// Mixing in the digital domain gives the exact I/Q amplitude and phase match
// the document cites as the reason for an all-digital modulator. The result
// is rounded down by SHIFT and saturated to OUT_W bits. Registered: out is
// valid one cycle after its inputs.
module quad_mixer #(
  parameter int IN_W  = 16,
  parameter int LO_W  = 12,
  parameter int OUT_W = 16,
  parameter int SHIFT = 11
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  i_in,
  input  logic signed [IN_W-1:0]  q_in,
  input  logic signed [LO_W-1:0]  cos_i,
  input  logic signed [LO_W-1:0]  sin_i,
  output logic signed [OUT_W-1:0] out
);
  localparam int P_W = IN_W + LO_W + 1;
  logic signed [P_W-1:0] sum, scaled;

  always_comb begin
    sum    = P_W'(i_in) * P_W'(cos_i) - P_W'(q_in) * P_W'(sin_i);
    scaled = sum >>> SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out <= '0;
    else if (scaled > P_W'(2**(OUT_W-1) - 1)) out <= OUT_W'(2**(OUT_W-1) - 1);
    else if (scaled < -P_W'(2**(OUT_W-1)))    out <= OUT_W'(-(2**(OUT_W-1)));
    else                                      out <= OUT_W'(scaled);
  end
endmodule
