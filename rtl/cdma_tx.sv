// cdma_tx: all-digital, frequency-agile DS-CDMA upstream transmitter.
//
// Datapath, per I and Q branch, all on one DAC-rate system clock with
// clock enables from tx_rate_gen (chip rate = f_clk / (8 * M * N)):
//   symbol_spreader (chips, +-7 scale)  -> x128
//   srrc_filter     x2   (square-root raised cosine pulse shaping)
//   halfband_filter x2
//   halfband_filter x2
//   cic_interp      x M  (3 stages, M = div_m)
//   cic_interp      x N  (3 stages, N = div_n)
// then quad_mixer: I*cos - Q*sin with the ddfs carrier (fcw sets the carrier
// frequency), and inv_sinc in front of the DAC. dac_out is the DAC's input
// word (the DAC itself is analog and outside this module).
//
// This is the chain of the document's transmitter figure; the 12-bit DAC
// word, the 16-bit internal samples, the three-stage CICs and the
// per-stage scaling are this design's choices. cic1_shift/cic2_shift divide
// out the CIC gains M^2 and N^2 (exact when M, N are powers of two).
//
// Latency from a chip to its pulse peak at dac_out is a few hundred system
// clocks and depends on M and N; no output handshake is needed because the
// DAC takes a word every clock. For the same reason the second CIC's out_valid
// pins are left open: its output is valid on every clock.
module cdma_tx
  import cdma_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // configuration
  input  mod_t        mode,
  input  logic [6:0]  code_seed,
  input  logic [3:0]  div_m,
  input  logic [3:0]  div_n,
  input  logic [4:0]  cic1_shift,
  input  logic [4:0]  cic2_shift,
  input  logic [31:0] fcw,
  // serial data in
  input  logic        bit_in,
  input  logic        bit_valid,
  output logic        bit_ready,
  // status
  output logic        chip_en,
  output logic        sym_start,
  output logic        underflow,
  // baseband at the DAC rate (before the mixer) and DAC word
  output sample_t     bb_i,
  output sample_t     bb_q,
  output logic signed [11:0] dac_out
);
  logic cic2_in, cic1_in, hb2_in, hb1_in;
  logic signed [3:0] chip_i, chip_q;
  sample_t s_i, s_q, h1_i, h1_q, h2_i, h2_q, c1_i, c1_q;
  sample_t mix;
  logic signed [11:0] lo_cos, lo_sin;
  logic unused_valid;
  logic [6:0] unused_v;

  tx_rate_gen u_rate (
    .clk, .rst_n, .div_m, .div_n,
    .cic2_in, .cic1_in, .hb2_in, .hb1_in, .chip(chip_en));

  symbol_spreader u_spread (
    .clk, .rst_n, .mode, .code_seed, .bit_in, .bit_valid, .bit_ready,
    .chip_en, .chip_i, .chip_q, .sym_start, .underflow);

  // the spreader's output is registered at chip_en, so each stage samples
  // its predecessor at the predecessor's output enable: one sample of
  // latency per stage, no valid handshake needed
  srrc_filter #(.INTERP(2), .OSR(2), .SHIFT(10)) u_srrc_i (
    .clk, .rst_n, .in_valid(chip_en), .din(sample_t'(chip_i) <<< 7),
    .tick(hb1_in), .dout(s_i), .out_valid(unused_v[0]));
  srrc_filter #(.INTERP(2), .OSR(2), .SHIFT(10)) u_srrc_q (
    .clk, .rst_n, .in_valid(chip_en), .din(sample_t'(chip_q) <<< 7),
    .tick(hb1_in), .dout(s_q), .out_valid(unused_v[1]));

  halfband_filter u_hb1_i (.clk, .rst_n, .in_valid(hb1_in), .din(s_i),
    .tick(hb2_in), .dout(h1_i), .out_valid(unused_v[2]));
  halfband_filter u_hb1_q (.clk, .rst_n, .in_valid(hb1_in), .din(s_q),
    .tick(hb2_in), .dout(h1_q), .out_valid(unused_v[3]));

  halfband_filter u_hb2_i (.clk, .rst_n, .in_valid(hb2_in), .din(h1_i),
    .tick(cic1_in), .dout(h2_i), .out_valid(unused_v[4]));
  halfband_filter u_hb2_q (.clk, .rst_n, .in_valid(hb2_in), .din(h1_q),
    .tick(cic1_in), .dout(h2_q), .out_valid(unused_v[5]));

  cic_interp u_cic1_i (.clk, .rst_n, .in_valid(cic1_in), .din(h2_i),
    .tick(cic2_in), .out_shift(cic1_shift), .dout(c1_i), .out_valid(unused_v[6]));
  cic_interp u_cic1_q (.clk, .rst_n, .in_valid(cic1_in), .din(h2_q),
    .tick(cic2_in), .out_shift(cic1_shift), .dout(c1_q), .out_valid(unused_valid));

  cic_interp u_cic2_i (.clk, .rst_n, .in_valid(cic2_in), .din(c1_i),
    .tick(1'b1), .out_shift(cic2_shift), .dout(bb_i), .out_valid());
  cic_interp u_cic2_q (.clk, .rst_n, .in_valid(cic2_in), .din(c1_q),
    .tick(1'b1), .out_shift(cic2_shift), .dout(bb_q), .out_valid());

  ddfs #(.PHASE_W(32), .ADDR_W(10), .OUT_W(12)) u_ddfs (
    .clk, .rst_n, .fcw, .cos_o(lo_cos), .sin_o(lo_sin));

  quad_mixer #(.IN_W(16), .LO_W(12), .OUT_W(16), .SHIFT(11)) u_mix (
    .clk, .rst_n, .i_in(bb_i), .q_in(bb_q), .cos_i(lo_cos), .sin_i(lo_sin),
    .out(mix));

  inv_sinc #(.IN_W(16), .OUT_W(12)) u_isinc (
    .clk, .rst_n, .din(mix), .dout(dac_out));
endmodule
