// cdma_top_tb: full-size test of cdma_top (no parameter overrides), the
// upstream transmitter and the head-end receiver together.
//
// Transmitter: random serial bits in 64QAM. It starts at M = 3, N = 3 (chip
// period 8*M*N = 72 clocks) with one carrier word, and part-way through is
// switched to M = 2, N = 4 (64 clocks) and another carrier word, the
// rate- and frequency-agility of the design. The chip-enable period is
// checked against 8*M*N before and after the switch, as is DAC activity.
//
// Receiver: one 64QAM burst from the behavioural channel model rx_signal_gen
// (34 preamble symbols, -200 ppm chip-rate offset, 0.1 turn/symbol carrier
// offset, square-root raised-cosine chips at 4 samples per chip). Every
// decoded data symbol is compared with the sent bits.
//
// Each mechanism is counted, and a mechanism that never happens is a
// failure: tx chips at each rate, tx symbols taken without underflow, DAC
// output, code acquisition, carrier estimate, DLL updates that move the
// timing NCO, Costas loop corrections, carrier lock, correct data symbols.
module cdma_top_tb;
  import cdma_pkg::*;
  localparam int  NDATA = 24;
  localparam real OMEGA = 0.6283;
  localparam int  LEAD  = 37;
  localparam logic [6:0] TX_SEED = 7'h11, RX_SEED = 7'h35;

  logic clk = 1'b0, rst_n = 1'b0;
  // transmitter side
  logic [3:0]  div_m = 4'd3, div_n = 4'd3;
  logic [4:0]  sh1 = 5'd3, sh2 = 5'd3;
  logic [31:0] fcw = 32'h0800_0000;
  logic tx_bit = 1'b0, tx_bit_ready, tx_chip_en, tx_sym_start, tx_underflow;
  sample_t tx_bb_i, tx_bb_q;
  logic signed [11:0] tx_dac;
  // receiver side
  logic go = 1'b0, burst_start = 1'b0, adc_valid, gen_done;
  logic signed [9:0] adc_i, adc_q;
  logic acquired, est_valid, tracking, lock, dll_err_valid, data_valid;
  logic signed [15:0] theta, omega, timing_adj;
  logic signed [48:0] dll_err;
  iq_t data_sym;
  logic [2:0] d_i, d_q;
  logic [15:0] unit;

  int checks = 0, failures = 0, cyc = 0;
  // mechanism counters
  int n_chip_a = 0, n_chip_b = 0, n_bad_period = 0, n_tx_sym = 0, n_underflow = 0;
  int n_dac = 0, n_acq = 0, n_est = 0, n_dll = 0, n_costas = 0, n_lock = 0;
  int n_data_ok = 0, n_data_bad = 0, ndata = 0;
  int last_chip = -1, period = 72;
  bit switched = 1'b0;
  logic sym_start_d = 1'b0;

  always #5 clk = ~clk;

  rx_signal_gen #(.SDIV(2), .PPM(-200.0), .OMEGA(OMEGA), .PHI0(1.0), .U(32.0),
                  .PRE(34), .NDATA(NDATA), .LEAD(LEAD)) u_gen (
    .clk, .go, .mode(MOD_QAM64), .seed(RX_SEED), .adc_valid, .adc_i, .adc_q,
    .done(gen_done));

  cdma_top dut (
    .tx_clk(clk), .tx_rst_n(rst_n), .tx_mode(MOD_QAM64), .tx_code_seed(TX_SEED),
    .tx_div_m(div_m), .tx_div_n(div_n), .tx_cic1_shift(sh1), .tx_cic2_shift(sh2),
    .tx_fcw(fcw), .tx_bit_in(tx_bit), .tx_bit_valid(1'b1), .tx_bit_ready,
    .tx_chip_en, .tx_sym_start, .tx_underflow, .tx_bb_i, .tx_bb_q, .tx_dac,
    .rx_clk(clk), .rx_rst_n(rst_n), .rx_mode(MOD_QAM64), .rx_code_seed(RX_SEED),
    .rx_acq_threshold(24'd12000), .rx_dll_shift(6'd20), .rx_lock_thr(17'd200),
    .rx_burst_start(burst_start), .rx_adc_valid(adc_valid), .rx_adc_i(adc_i),
    .rx_adc_q(adc_q), .rx_acquired(acquired), .rx_est_valid(est_valid),
    .rx_theta(theta), .rx_omega(omega), .rx_tracking(tracking), .rx_lock(lock),
    .rx_timing_adj(timing_adj), .rx_dll_err(dll_err), .rx_dll_err_valid(dll_err_valid),
    .rx_data_valid(data_valid), .rx_data_sym(data_sym), .rx_d_i(d_i), .rx_d_q(d_q),
    .rx_unit(unit));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && tx_bit_ready) tx_bit <= 1'($urandom);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      // transmitter
      if (tx_chip_en) begin
        // the first chip after a switch may come early (counters restart)
        if (last_chip >= 0 && cyc - last_chip != period) n_bad_period++;
        last_chip = cyc;
        if (switched) n_chip_b++;
        else          n_chip_a++;
      end
      if (tx_sym_start && !sym_start_d) n_tx_sym++;
      sym_start_d = tx_sym_start;
      if (tx_underflow && n_tx_sym > 1) n_underflow++;
      if (tx_dac > 100 || tx_dac < -100) n_dac++;
      // receiver
      if (acquired) n_acq++;
      if (est_valid) begin
        real d;
        n_est++;
        d = real'(omega) - OMEGA / 6.283185307 * 65536.0;
        check(d < 200.0 && d > -200.0, "frequency estimate");
      end
      if (dll_err_valid && timing_adj != 0) n_dll++;
      if (dut.u_rx.c_adj && tracking) n_costas++;
      if (lock) n_lock++;
      if (data_valid) begin
        if (ndata < NDATA) begin
          if (d_i == u_gen.bits_i[ndata] && d_q == u_gen.bits_q[ndata]) n_data_ok++;
          else n_data_bad++;
        end
        ndata++;
      end
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    burst_start = 1'b1;
    @(posedge clk);
    burst_start = 1'b0;
    go = 1'b1;
    // switch the transmitter's rate and carrier after 12 symbols at 72 clocks
    repeat (12 * 128 * 72) @(posedge clk);
    div_m = 4'd2; div_n = 4'd4; sh1 = 5'd2; sh2 = 5'd4; fcw = 32'h1400_0000;
    @(posedge tx_chip_en);
    @(negedge clk);
    period = 64;
    switched = 1'b1;
    last_chip = -1;
    wait (gen_done);
    repeat (3 * 128 * 64) @(posedge clk);
    $display("tx: chips %0d at 72, %0d at 64, bad periods %0d, symbols %0d, underflows %0d, DAC %0d",
             n_chip_a, n_chip_b, n_bad_period, n_tx_sym, n_underflow, n_dac);
    $display("rx: acquired %0d, estimates %0d, DLL %0d, Costas %0d, lock %0d, data ok %0d bad %0d",
             n_acq, n_est, n_dll, n_costas, n_lock, n_data_ok, n_data_bad);
    check(n_chip_a > 0, "tx chips at the first rate");
    check(n_chip_b > 0, "tx chips after the rate switch");
    check(n_bad_period == 0, "tx chip period 8*M*N");
    check(n_tx_sym > 0 && n_underflow == 0, "tx symbols without underflow");
    check(n_dac > 0, "tx DAC output");
    check(n_acq > 0, "rx code acquisition");
    check(n_est == 1, "rx carrier estimate");
    check(n_dll > 0, "rx DLL timing updates");
    check(n_costas > 0, "rx Costas loop corrections");
    check(n_lock > 0, "rx carrier lock");
    check(n_data_ok == NDATA && n_data_bad == 0, "rx data symbols");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
