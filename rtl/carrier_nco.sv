// carrier_nco: carrier NCO and derotating mixers of the receiver.
//
// A 24-bit phase accumulator (2^24 = one turn) holds the carrier phase at
// the current chip and advances by the frequency word fw on every on-time
// chip (step). Each on-time sample x is rotated by the negative phase,
//   y = x * exp(-j phi): y.i = x.i cos + x.q sin, y.q = x.q cos - x.i sin,
// using a 1024-entry cosine/sine table (the -90 degree branch of the
// document's figure is the sin output). load sets the phase and the
// per-symbol frequency from the preamble estimate (phase0, omega in 2^16
// units; per chip the frequency is omega / 128). adj applies the Costas
// loop's phase step and frequency correction. clear zeroes both.
//
// Timing: y/y_valid one cycle after step (y uses the phase before the step).
module carrier_nco
  import cdma_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               load,
  input  logic signed [15:0] phase0,
  input  logic signed [15:0] omega,
  input  logic               adj,
  input  logic signed [15:0] dphase,
  input  logic signed [23:0] dfreq,
  input  logic               step,
  input  iq_t                x,
  output iq_t                y,
  output logic               y_valid,
  output logic [23:0]        phase,
  output logic signed [23:0] fw
);
  logic signed [11:0] c, s;
  logic signed [29:0] yi, yq;

  sincos_lut #(.ADDR_W(10), .OUT_W(12)) u_lut (
    .phase(phase[23:14]), .cos_o(c), .sin_o(s));

  always_comb begin
    yi = 30'(x.i) * 30'(c) + 30'(x.q) * 30'(s);
    yq = 30'(x.q) * 30'(c) - 30'(x.i) * 30'(s);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= '0;
      fw      <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= step;
      if (step) begin
        y.i <= sample_t'(yi >>> 11);
        y.q <= sample_t'(yq >>> 11);
      end
      if (clear) begin
        phase <= '0;
        fw    <= '0;
      end else if (load) begin
        phase <= {phase0, 8'd0};
        fw    <= 24'(omega) <<< 1;          // omega / 128 in 2^24 units
      end else begin
        phase <= phase + (step ? fw : 24'd0) + (adj ? {dphase, 8'd0} : 24'd0);
        if (adj) fw <= fw + dfreq;
      end
    end
  end
endmodule
