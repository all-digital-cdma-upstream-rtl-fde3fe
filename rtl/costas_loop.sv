// costas_loop: modified Costas loop tracking residual carrier phase and
// frequency after the preamble estimate.
//
// Phase detector (per despread, derotated symbol), from the cross products
// in the document's carrier-recovery figure:
//   e = Q * sgn(I) - I * sgn(Q)
// which is 2 |a| sin(phase error) for points on the diagonals (the QPSK
// points) and needs no multiplier; off-diagonal QAM points add a
// data-dependent term (|Q| - |I|) that averages to zero over random data. Pre-filter: a first-order low-pass (a = 1/2). Loop filter:
// proportional-integral, giving a second-order loop that follows a residual
// frequency offset with zero phase error:
//   dphase = pre >>> KP       (added to the NCO phase once per symbol)
//   dfreq  = pre >>> KI       (added to the NCO per-chip frequency word)
// Gains and the pre-filter are this design's choices; the document gives the
// block diagram only.
//
// Interface: sym_valid with a symbol; adj_valid two cycles later with
// dphase/dfreq; err is the raw detector output of the latest symbol.
module costas_loop
  import cdma_pkg::*;
#(
  parameter int KP = 2,
  parameter int KI = 6
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               sym_valid,
  input  iq_t                sym,
  output logic signed [16:0] err,
  output logic               err_valid,
  output logic               adj_valid,
  output logic signed [15:0] dphase,
  output logic signed [23:0] dfreq
);
  logic signed [16:0] e;
  logic signed [16:0] pre;
  logic               pre_valid;

  always_comb begin
    logic signed [16:0] qs, is;
    qs = sym.i[15] ? -17'(sym.q) : 17'(sym.q);
    is = sym.q[15] ? -17'(sym.i) : 17'(sym.i);
    e  = qs - is;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err <= '0;
      err_valid <= 1'b0;
    end else begin
      err_valid <= sym_valid && !clear;
      if (sym_valid) err <= e;
    end
  end

  first_order_lpf #(.W(17), .K(1)) u_pre (
    .clk, .rst_n, .clear, .in_valid(err_valid), .x(err), .y(pre),
    .out_valid(pre_valid));

  always_comb begin
    adj_valid = pre_valid;
    dphase    = 16'(pre >>> KP);
    dfreq     = 24'(pre >>> KI);
  end
endmodule
