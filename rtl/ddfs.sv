// ddfs: direct digital frequency synthesizer for the transmitter's digital
// quadrature up-converter.
//
// A PHASE_W-bit phase accumulator advances by fcw every clock (the DAC-rate
// system clock), so the carrier is f = fcw / 2^PHASE_W * f_clk and can be
// moved anywhere in the upstream band by a register write (frequency
// agility). The top ADDR_W bits address a cosine/sine table. The document
// names the DDFS only; accumulator and table sizes are this design's choice.
//
// Timing: cos_o/sin_o are registered, one cycle after the phase they show.
module ddfs #(
  parameter int PHASE_W = 32,
  parameter int ADDR_W  = 10,
  parameter int OUT_W   = 12
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [PHASE_W-1:0]       fcw,
  output logic signed [OUT_W-1:0]  cos_o,
  output logic signed [OUT_W-1:0]  sin_o
);
  logic [PHASE_W-1:0] acc;
  logic signed [OUT_W-1:0] c, s;

  sincos_lut #(.ADDR_W(ADDR_W), .OUT_W(OUT_W)) u_lut (
    .phase(acc[PHASE_W-1 -: ADDR_W]), .cos_o(c), .sin_o(s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      cos_o <= '0;
      sin_o <= '0;
    end else begin
      acc   <= acc + fcw;
      cos_o <= c;
      sin_o <= s;
    end
  end
endmodule
