// timing_processor: decrementing NCO that controls the interpolator.
//
// eta (unsigned fraction, 2^F_W = 1) decreases by the control word
// W = W_NOM + adj on every input sample and wraps modulo 1. A wrap
// (eta < W) marks the input sample as the base point m_k of an interpolant,
// and the fractional interval is mu_k = eta / W, approximated by
// eta / W_NOM = eta * 2 because W stays within a fraction of a percent of
// W_NOM = 1/2: the receiver takes 4 samples per chip in and wants 2 per chip
// out. The loop filter output adj makes W larger when samples are taken too
// late (strobes come earlier) and smaller when too early.
//
// sync restarts the NCO on the current sample with eta = 0, so that sample
// itself is a base point with mu = 0; before the first sync no strobes are
// produced. The document shows the timing processor and its outputs m_k and
// mu_k in the timing-recovery figure; this Gardner-style NCO is the common
// way to build it and is this design's choice.
//
// Timing: strobe and mu are combinational from in_valid/sync and the eta
// register, for the interpolator to take with the same sample.
module timing_processor #(
  parameter int F_W  = 16,
  parameter int MU_W = 12
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic                  sync,
  input  logic signed [F_W-1:0] adj,
  output logic                  strobe,
  output logic [MU_W-1:0]       mu,
  output logic                  running
);
  localparam logic [F_W:0] W_NOM = (F_W+1)'(1) << (F_W - 1);

  logic [F_W-1:0] eta;
  logic [F_W:0]   w;
  logic [F_W:0]   eta_cur;
  logic [F_W:0]   diff;

  always_comb begin
    w       = W_NOM + (F_W+1)'(adj);
    eta_cur = sync ? '0 : {1'b0, eta};
    diff    = eta_cur - w;
    strobe  = in_valid && (sync || (running && eta_cur < w));
    // mu = eta / W_NOM = 2 * eta, in MU_W bits; when W > 1/2 a base point
    // can have eta >= 1/2, where mu saturates just below 1
    if (eta_cur[F_W-1]) mu = '1;
    else                mu = MU_W'(eta_cur[F_W-2:0] >> (F_W - 1 - MU_W));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eta     <= '0;
      running <= 1'b0;
    end else if (in_valid && (sync || running)) begin
      running <= 1'b1;
      eta     <= diff[F_W-1:0];   // modulo 1
    end
  end
endmodule
