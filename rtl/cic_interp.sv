// cic_interp: cascaded integrator-comb interpolator, H(z) = [(1 - z^-RM) /
// (1 - z^-1)]^N with differential delay M = 1 and N = STAGES, no multipliers.
//
// The STAGES comb sections run at the input rate (in_valid). Their output is
// zero-stuffed to the output rate (tick, RATE ticks per input sample) and
// fed to STAGES integrators that run on every tick. RATE is a run-time
// setting (the document gives the ranges 2..8 and 3..12 for the two CIC
// filters of the transmitter). The CIC gain RATE^(STAGES-1) is removed by an
// arithmetic right shift by out_shift, which is exact for powers of two and
// otherwise leaves a gain between 1 and 2; the result is saturated to W bits.
// Integrator wrap-around is harmless: the comb/integrator pair is exact in
// modular arithmetic as long as ACC_W holds the full gain.
//
// Timing: dout/out_valid one cycle after tick.
module cic_interp #(
  parameter int W       = 16,
  parameter int STAGES  = 3,
  parameter int MAX_RATE = 12,
  parameter int ACC_W   = W + STAGES * $clog2(MAX_RATE)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] din,
  input  logic                tick,
  input  logic [4:0]          out_shift,
  output logic signed [W-1:0] dout,
  output logic                out_valid
);
  logic signed [ACC_W-1:0] comb_d  [STAGES];   // comb delay registers
  logic signed [ACC_W-1:0] comb_o  [STAGES+1]; // comb chain (combinational)
  logic signed [ACC_W-1:0] integ   [STAGES];
  logic signed [ACC_W-1:0] integ_n [STAGES];
  logic signed [ACC_W-1:0] comb_out_q;
  logic                    pending;
  logic signed [ACC_W-1:0] stuffed;
  logic signed [ACC_W-1:0] scaled;

  always_comb begin
    comb_o[0] = ACC_W'(din);
    for (int s = 0; s < STAGES; s++)
      comb_o[s+1] = comb_o[s] - comb_d[s];
  end

  // new comb output on the first tick after (or with) an input sample
  always_comb begin
    if (in_valid)     stuffed = comb_o[STAGES];
    else if (pending) stuffed = comb_out_q;
    else              stuffed = '0;
    integ_n[0] = integ[0] + stuffed;
    for (int s = 1; s < STAGES; s++)
      integ_n[s] = integ[s] + integ_n[s-1];
    scaled = integ_n[STAGES-1] >>> out_shift;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < STAGES; s++) begin
        comb_d[s] <= '0;
        integ[s]  <= '0;
      end
      comb_out_q <= '0;
      pending    <= 1'b0;
      dout       <= '0;
      out_valid  <= 1'b0;
    end else begin
      out_valid <= tick;
      if (in_valid) begin
        for (int s = 0; s < STAGES; s++) comb_d[s] <= comb_o[s];
      end
      if (tick)          pending <= 1'b0;
      else if (in_valid) begin
        pending    <= 1'b1;
        comb_out_q <= comb_o[STAGES];
      end
      if (tick) begin
        for (int s = 0; s < STAGES; s++) integ[s] <= integ_n[s];
        if (scaled > ACC_W'(2**(W-1) - 1))      dout <= W'(2**(W-1) - 1);
        else if (scaled < -ACC_W'(2**(W-1)))    dout <= W'(-(2**(W-1)));
        else                                    dout <= W'(scaled);
      end
    end
  end
endmodule
