// cdma_top: the upstream DS-CDMA transmitter (cable modem side) and the
// head-end baseband receiver, side by side.
//
// The two ends of the link are separate designs: the transmitter's output
// is a DAC word at an intermediate frequency, while the receiver takes
// baseband I/Q from its own ADCs after an analog down-conversion that is not
// part of this design. Each keeps its own clock and ports here; the DAC and
// the ADCs are outside (their digital words are ports). See cdma_tx and
// cdma_rx for the datapaths and timing.
module cdma_top
  import cdma_pkg::*;
(
  // ---------------- transmitter ----------------
  input  logic               tx_clk,
  input  logic               tx_rst_n,
  input  mod_t               tx_mode,
  input  logic [6:0]         tx_code_seed,
  input  logic [3:0]         tx_div_m,
  input  logic [3:0]         tx_div_n,
  input  logic [4:0]         tx_cic1_shift,
  input  logic [4:0]         tx_cic2_shift,
  input  logic [31:0]        tx_fcw,
  input  logic               tx_bit_in,
  input  logic               tx_bit_valid,
  output logic               tx_bit_ready,
  output logic               tx_chip_en,
  output logic               tx_sym_start,
  output logic               tx_underflow,
  output sample_t            tx_bb_i,
  output sample_t            tx_bb_q,
  output logic signed [11:0] tx_dac,
  // ---------------- receiver ----------------
  input  logic               rx_clk,
  input  logic               rx_rst_n,
  input  mod_t               rx_mode,
  input  logic [6:0]         rx_code_seed,
  input  logic [23:0]        rx_acq_threshold,
  input  logic [5:0]         rx_dll_shift,
  input  logic [16:0]        rx_lock_thr,
  input  logic               rx_burst_start,
  input  logic               rx_adc_valid,
  input  logic signed [9:0]  rx_adc_i,
  input  logic signed [9:0]  rx_adc_q,
  output logic               rx_acquired,
  output logic               rx_est_valid,
  output logic signed [15:0] rx_theta,
  output logic signed [15:0] rx_omega,
  output logic               rx_tracking,
  output logic               rx_lock,
  output logic signed [15:0] rx_timing_adj,
  output logic signed [48:0] rx_dll_err,
  output logic               rx_dll_err_valid,
  output logic               rx_data_valid,
  output iq_t                rx_data_sym,
  output logic [2:0]         rx_d_i,
  output logic [2:0]         rx_d_q,
  output logic [15:0]        rx_unit
);
  cdma_tx u_tx (
    .clk(tx_clk), .rst_n(tx_rst_n), .mode(tx_mode), .code_seed(tx_code_seed),
    .div_m(tx_div_m), .div_n(tx_div_n), .cic1_shift(tx_cic1_shift),
    .cic2_shift(tx_cic2_shift), .fcw(tx_fcw), .bit_in(tx_bit_in),
    .bit_valid(tx_bit_valid), .bit_ready(tx_bit_ready), .chip_en(tx_chip_en),
    .sym_start(tx_sym_start), .underflow(tx_underflow), .bb_i(tx_bb_i),
    .bb_q(tx_bb_q), .dac_out(tx_dac));

  cdma_rx u_rx (
    .clk(rx_clk), .rst_n(rx_rst_n), .mode(rx_mode), .code_seed(rx_code_seed),
    .acq_threshold(rx_acq_threshold), .dll_shift(rx_dll_shift),
    .lock_thr(rx_lock_thr), .burst_start(rx_burst_start),
    .adc_valid(rx_adc_valid), .adc_i(rx_adc_i), .adc_q(rx_adc_q),
    .acquired(rx_acquired), .est_valid(rx_est_valid), .theta(rx_theta),
    .omega(rx_omega), .tracking(rx_tracking), .lock(rx_lock),
    .timing_adj(rx_timing_adj), .dll_err(rx_dll_err),
    .dll_err_valid(rx_dll_err_valid), .data_valid(rx_data_valid),
    .data_sym(rx_data_sym), .d_i(rx_d_i), .d_q(rx_d_q), .unit(rx_unit));
endmodule
