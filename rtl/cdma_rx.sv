// cdma_rx: head-end baseband receiver for one S-CDMA upstream user.
//
// Signal flow (one clock; the ADC samples, 4 per chip at a fixed rate
// unrelated to the transmitter's chip clock, arrive with adc_valid at most
// every other cycle):
//   srrc_filter (chip matched filter, I and Q)
//     -> code_acq: matched filter on the code, max+min/2 magnitude, peak
//        detector; its peak restarts the timing processor (coarse timing)
//     -> farrow_interp, driven by timing_processor (m_k strobe, mu_k), gives
//        2 samples per chip, alternately on-time and half-chip
//     -> code_gen labels them and supplies prompt, early and late chips
//   half-chip samples -> nc_dll (improved non-coherent DLL) ->
//        first_order_lpf loop filter -> timing_processor control word
//   on-time samples -> carrier_nco (derotation) -> despreader -> symbols
//   symbols -> carrier_init (preamble phase/frequency, loads the NCO)
//           -> costas_loop (tracks the NCO) and lock_detector
//           -> two data_detector slicers (I and Q)
//
// Burst protocol (this design's framing; the document describes burst-mode
// operation and a known preamble but no frame format): burst_start arms the
// receiver before a burst. The burst begins with PRE_SYMS = N_ACC + 3
// preamble symbols, each the QPSK point (+,+) (I = Q > 0). The first gives
// the acquisition peak, the next N_ACC + 1 feed the estimator, one more
// covers its computation; the NCO is loaded at the end of the last preamble
// symbol and every later symbol is data, demodulated with `mode`.
// data_valid pulses once per data symbol with the Gray-coded bits of each
// axis (d_i, d_q; 64QAM uses [2:0], 16QAM [1:0], QPSK [0]).
//
// The data detectors' amplitude unit is taken from the last preamble symbol,
// the first one the loaded NCO derotates: it lies at (+4,+4) units, so
// unit = (|I| + |Q|) / 8, which is insensitive to a small residual phase
// error. carrier_init's amp output (its sum magnitude, shrunk by the
// frequency offset over the window) is therefore left unconnected (an open pin,
// on purpose). Some sub-block outputs (levels, errors, busy flags) are
// likewise wired to named nets only for observation and not used here.
//
// The DLL error is scaled into the timing NCO as adj = lpf >>> dll_shift,
// saturated to +-ADJ_MAX (a 2^-16 step is 30 ppm of the sample period).
module cdma_rx
  import cdma_pkg::*;
#(
  parameter int N_ACC    = 31,
  parameter int DLL_K    = 1,
  parameter int COSTAS_KP = 2,
  parameter int COSTAS_KI = 6,
  parameter int ADJ_MAX  = 2048
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration
  input  mod_t               mode,
  input  logic [6:0]         code_seed,
  input  logic [23:0]        acq_threshold,
  input  logic [5:0]         dll_shift,
  input  logic [16:0]        lock_thr,
  // burst control and ADC samples
  input  logic               burst_start,
  input  logic               adc_valid,
  input  logic signed [9:0]  adc_i,
  input  logic signed [9:0]  adc_q,
  // status
  output logic               acquired,
  output logic               est_valid,
  output logic signed [15:0] theta,
  output logic signed [15:0] omega,
  output logic               tracking,
  output logic               lock,
  output logic signed [15:0] timing_adj,
  output logic signed [48:0] dll_err,
  output logic               dll_err_valid,
  // recovered data
  output logic               data_valid,
  output iq_t                data_sym,
  output logic [2:0]         d_i,
  output logic [2:0]         d_q,
  output logic [15:0]        unit
);
  localparam int PRE_SYMS = N_ACC + 3;

  typedef enum logic [1:0] {R_IDLE, R_ACQ, R_PRE, R_DATA} rstate_t;
  rstate_t st;
  logic [7:0] sym_cnt;   // symbols ended since sync
  logic       est_done;
  logic       data_armed;   // first data symbol has started

  // matched filter
  sample_t mf_i, mf_q;
  logic    mf_valid, mf_valid_q;

  srrc_filter #(.INTERP(1), .OSR(4), .IN_W(16), .OUT_W(16), .SHIFT(12)) u_mf_i (
    .clk, .rst_n, .in_valid(adc_valid), .din(sample_t'(adc_i)), .tick(1'b0),
    .dout(mf_i), .out_valid(mf_valid));
  srrc_filter #(.INTERP(1), .OSR(4), .IN_W(16), .OUT_W(16), .SHIFT(12)) u_mf_q (
    .clk, .rst_n, .in_valid(adc_valid), .din(sample_t'(adc_q)), .tick(1'b0),
    .dout(mf_q), .out_valid(mf_valid_q));

  // code acquisition
  logic acq_sync, sync_pend, tp_sync;
  logic [23:0] peak_mag;

  code_acq #(.OSR(4), .IN_W(16), .COR_W(24)) u_acq (
    .clk, .rst_n, .start(burst_start), .code_seed, .in_valid(mf_valid),
    .in_i(mf_i), .in_q(mf_q), .threshold(acq_threshold),
    .sync(acq_sync), .acquired, .peak_mag);

  // the peak restarts timing on the next matched-filter sample
  assign tp_sync = mf_valid && (sync_pend || acq_sync);

  // timing processor and interpolator
  logic        strobe, tp_running;
  logic [11:0] mu;
  iq_t         ip;
  logic        ip_valid;
  logic [2:0]  sync_pipe;

  timing_processor #(.F_W(16), .MU_W(12)) u_tp (
    .clk, .rst_n, .in_valid(mf_valid), .sync(tp_sync), .adj(timing_adj),
    .strobe, .mu, .running(tp_running));

  farrow_interp #(.MU_W(12)) u_interp (
    .clk, .rst_n, .in_valid(mf_valid), .din('{i: mf_i, q: mf_q}),
    .strobe, .mu, .dout(ip), .out_valid(ip_valid));

  // code generator on the interpolator output
  logic cg_ontime, cg_half, cg_prompt, cg_early, cg_late, cg_half_ok, cg_sym_end;
  logic [6:0] cg_idx;

  code_gen u_cg (
    .clk, .rst_n, .code_seed, .strobe(ip_valid), .sync(sync_pipe[2]),
    .ontime(cg_ontime), .half(cg_half), .prompt(cg_prompt), .early(cg_early),
    .late(cg_late), .half_ok(cg_half_ok), .chip_idx(cg_idx), .sym_end(cg_sym_end));

  // delay-lock loop
  logic signed [48:0] lf_y;
  logic               lf_valid;
  logic signed [48:0] adj_full;

  assign adj_full = lf_y >>> dll_shift;

  nc_dll #(.ACC_W(24)) u_dll (
    .clk, .rst_n, .clear(sync_pipe[2]), .half_valid(cg_half && cg_half_ok),
    .x(ip), .early(cg_early), .late(cg_late), .dump(cg_sym_end),
    .err(dll_err), .err_valid(dll_err_valid));

  first_order_lpf #(.W(49), .K(DLL_K)) u_dll_lf (
    .clk, .rst_n, .clear(burst_start), .in_valid(dll_err_valid), .x(dll_err),
    .y(lf_y), .out_valid(lf_valid));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) timing_adj <= '0;
    else if (burst_start) timing_adj <= '0;
    else if (lf_valid) begin
      if (adj_full > 49'(ADJ_MAX))       timing_adj <= 16'(ADJ_MAX);
      else if (adj_full < -49'(ADJ_MAX)) timing_adj <= -16'(ADJ_MAX);
      else                               timing_adj <= 16'(adj_full);
    end
  end

  // carrier NCO, despreader
  logic        nco_load, nco_clear;
  iq_t         dr;
  logic        dr_valid, prompt_q, sym_end_q;
  logic [23:0] nco_phase;
  logic signed [23:0] nco_fw;
  logic        c_adj;
  logic signed [15:0] c_dphase;
  logic signed [23:0] c_dfreq;
  logic signed [15:0] phase0;
  iq_t         sym;
  logic        sym_valid;

  carrier_nco u_nco (
    .clk, .rst_n, .clear(nco_clear), .load(nco_load), .phase0, .omega,
    .adj(c_adj && st == R_DATA), .dphase(c_dphase), .dfreq(c_dfreq),
    .step(cg_ontime), .x(ip), .y(dr), .y_valid(dr_valid),
    .phase(nco_phase), .fw(nco_fw));

  despreader #(.ACC_W(24)) u_desp (
    .clk, .rst_n, .clear(sync_pipe[2]), .chip_valid(dr_valid), .x(dr),
    .prompt(prompt_q), .sym_end(sym_end_q), .sym, .sym_valid);

  // carrier recovery initialisation
  logic        ci_busy;

  carrier_init #(.N_ACC(N_ACC), .ACC_W(40)) u_cinit (
    .clk, .rst_n, .start(sync_pipe[2]), .z_valid(sym_valid && st == R_PRE),
    .z(sym), .est_valid, .theta, .omega, .phase0, .amp(), .busy(ci_busy));

  // Costas loop, lock detector, data detectors
  logic signed [16:0] c_err;
  logic               c_err_valid;
  logic signed [3:0]  lvl_i, lvl_q;
  logic signed [19:0] e_i, e_q;

  costas_loop #(.KP(COSTAS_KP), .KI(COSTAS_KI)) u_costas (
    .clk, .rst_n, .clear(st != R_DATA), .sym_valid(sym_valid && data_armed),
    .sym, .err(c_err), .err_valid(c_err_valid), .adj_valid(c_adj),
    .dphase(c_dphase), .dfreq(c_dfreq));

  lock_detector #(.LOCK_N(8), .UNLOCK_N(4)) u_lock (
    .clk, .rst_n, .clear(st != R_DATA), .err_valid(c_err_valid), .err(c_err),
    .thr(lock_thr), .lock);

  data_detector u_det_i (.mode, .y(sym.i), .unit, .bits(d_i), .level(lvl_i), .err(e_i));
  data_detector u_det_q (.mode, .y(sym.q), .unit, .bits(d_q), .level(lvl_q), .err(e_q));

  // control
  logic [15:0] abs_i, abs_q, unit_new;
  assign abs_i    = sym.i[15] ? 16'(-sym.i) : 16'(sym.i);
  assign abs_q    = sym.q[15] ? 16'(-sym.q) : 16'(sym.q);
  assign unit_new = 16'((17'(abs_i) + 17'(abs_q) + 17'd4) >> 3);

  assign nco_clear = sync_pipe[2];
  assign nco_load  = (st == R_PRE) && cg_sym_end && int'(sym_cnt) == PRE_SYMS - 2;
  assign tracking  = (st == R_DATA);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= R_IDLE;
      sync_pend  <= 1'b0;
      sync_pipe  <= '0;
      prompt_q   <= 1'b0;
      sym_end_q  <= 1'b0;
      sym_cnt    <= '0;
      est_done   <= 1'b0;
      data_armed <= 1'b0;
      unit       <= '0;
      data_valid <= 1'b0;
      data_sym   <= '0;
    end else begin
      prompt_q   <= cg_prompt;
      sym_end_q  <= cg_sym_end;
      sync_pipe  <= {sync_pipe[1:0], tp_sync};
      data_valid <= 1'b0;
      if (acq_sync && !mf_valid) sync_pend <= 1'b1;
      else if (mf_valid)         sync_pend <= 1'b0;
      if (est_valid) begin
        est_done <= 1'b1;
      end
      if (burst_start) begin
        st         <= R_ACQ;
        est_done   <= 1'b0;
        data_armed <= 1'b0;
      end else begin
        case (st)
          R_ACQ: if (sync_pipe[2]) begin
            st      <= R_PRE;
            sym_cnt <= '0;
          end
          R_PRE: if (cg_sym_end) begin
            sym_cnt <= sym_cnt + 8'd1;
            if (nco_load) st <= R_DATA;
          end
          R_DATA: begin
            if (cg_sym_end) data_armed <= 1'b1;
            if (sym_valid && !data_armed) unit <= unit_new;
            if (sym_valid && data_armed) begin
              data_valid <= 1'b1;
              data_sym   <= sym;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // the estimate must be ready when the NCO is loaded
  a_est_ready: assert property (@(posedge clk) disable iff (!rst_n)
    nco_load |-> est_done)
    else $error("cdma_rx: carrier estimate not ready at the end of the preamble");
endmodule
