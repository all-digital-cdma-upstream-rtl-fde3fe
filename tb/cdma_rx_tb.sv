// cdma_rx_tb: end-to-end test of the head-end receiver on one 64QAM burst
// with a -200 ppm chip-rate offset and a carrier offset of 0.1 turn per
// symbol (100 ppm of a 40 MHz carrier at 5.12 Mchip/s, 128-chip symbols).
// Checks: acquisition within two symbols of the burst start, the preamble
// phase and frequency estimates, that the DLL moved the timing NCO, carrier
// lock, and every data symbol's bits.
module cdma_rx_tb;
  import cdma_pkg::*;
  localparam int  NDATA = 24;
  localparam real OMEGA = 0.6283;
  localparam real PHI0  = 1.0;
  localparam int  LEAD  = 37;

  logic clk = 1'b0, rst_n = 1'b0;
  logic go = 1'b0;
  logic burst_start = 1'b0;
  logic adc_valid, gen_done;
  logic signed [9:0] adc_i, adc_q;
  logic acquired, est_valid, tracking, lock, dll_err_valid, data_valid;
  logic signed [15:0] theta, omega, timing_adj;
  logic signed [48:0] dll_err;
  iq_t data_sym;
  logic [2:0] d_i, d_q;
  logic [15:0] unit;
  int checks = 0, failures = 0;
  int cyc = 0, acq_cyc = -1, ndata = 0, adj_moves = 0, lock_seen = 0;
  int nbad = 0;

  always #5 clk = ~clk;

  rx_signal_gen #(.SDIV(2), .PPM(-200.0), .OMEGA(OMEGA), .PHI0(PHI0), .U(32.0),
                  .PRE(34), .NDATA(NDATA), .LEAD(LEAD)) u_gen (
    .clk, .go, .mode(MOD_QAM64), .seed(7'h35), .adc_valid, .adc_i, .adc_q,
    .done(gen_done));

  cdma_rx dut (
    .clk, .rst_n, .mode(MOD_QAM64), .code_seed(7'h35),
    .acq_threshold(24'd12000), .dll_shift(6'd20), .lock_thr(17'd200),
    .burst_start, .adc_valid, .adc_i, .adc_q, .acquired, .est_valid, .theta,
    .omega, .tracking, .lock, .timing_adj, .dll_err, .dll_err_valid,
    .data_valid, .data_sym, .d_i, .d_q, .unit);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (acquired && acq_cyc < 0) acq_cyc = cyc;
    if (dll_err_valid) adj_moves++;
    if (lock) lock_seen++;
    if (est_valid) begin
      real th_exp, om_exp, d;
      om_exp = OMEGA / 6.283185307 * 65536.0;
      d = real'(omega) - om_exp;
      $display("omega est %0d expected %0.1f", omega, om_exp);
      check(d < 200.0 && d > -200.0, "frequency estimate");
    end
    if (data_valid) begin
      if (ndata < NDATA) begin
        if (d_i != u_gen.bits_i[ndata] || d_q != u_gen.bits_q[ndata]) begin
          nbad++;
          $display("symbol %0d: got %0d/%0d want %0d/%0d (sym %0d,%0d unit %0d)", ndata,
                   d_i, d_q, u_gen.bits_i[ndata], u_gen.bits_q[ndata],
                   data_sym.i, data_sym.q, unit);
        end
        check(d_i == u_gen.bits_i[ndata] && d_q == u_gen.bits_q[ndata], "data symbol");
      end
      ndata++;
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
    wait (gen_done);
    repeat (2000) @(posedge clk);
    // burst starts LEAD samples (2 clocks each) after go; one symbol is
    // 512 samples
    $display("acquired at cycle %0d, data symbols %0d, DLL updates %0d, lock cycles %0d, bad %0d",
             acq_cyc, ndata, adj_moves, lock_seen, nbad);
    check(acq_cyc > 0 && acq_cyc - 6 - 2 * LEAD < 2 * 2 * 512, "acquisition within 2 symbols");
    // the receiver demodulates until the next burst_start, so the symbol
    // after the burst (noise/silence) may also be reported
    check(ndata >= NDATA && ndata <= NDATA + 1, "number of data symbols");
    check(adj_moves > 0 && timing_adj != 0, "DLL adjusted the timing");
    check(lock_seen > 0, "carrier lock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
