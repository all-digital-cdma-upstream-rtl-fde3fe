// cdma_tx_tb: end-to-end test of the upstream transmitter.
//
// Random serial bits are fed in 16QAM with M = 2, N = 4 (chip period
// 8*M*N = 64 clocks). The testbench records the level of every symbol the
// spreader starts and the baseband I/Q at the mixer input on every clock.
// After the run it despreads the baseband: it searches the chain delay D
// that maximises the correlation of one symbol, then correlates every later
// symbol at the chip centres t_sym + D + 64k with the code. Each despread
// value divided by its sent level must give the same gain (within 8%), so
// the whole interpolation chain keeps the levels and signs of the symbols.
// Also checked: the chip enable period (64 clocks, as the clock tree
// prescribes), no underflow once data flows, and that the DAC word moves
// within its 12-bit range (mixer, DDFS and inverse sinc running).
module cdma_tx_tb;
  import cdma_pkg::*;
  localparam int M = 2, N = 4, P = 8 * M * N;
  localparam int NSYM = 10;
  localparam int NCLK = (NSYM + 2) * CODE_LEN * P;
  localparam logic [6:0] SEED = 7'h2b;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bit_in = 1'b0, bit_valid = 1'b0, bit_ready;
  logic chip_en, sym_start, underflow;
  sample_t bb_i, bb_q;
  logic signed [11:0] dac_out;
  int checks = 0, failures = 0;

  int bbi [NCLK];
  int bbq [NCLK];
  int sym_t [NSYM + 4];
  int lvl_i [NSYM + 4];
  int lvl_q [NSYM + 4];
  int nsym = 0, cyc = 0, last_chip = -1, bad_period = 0, nchips = 0;
  int underflows = 0, dac_max = 0;
  logic sym_start_d = 1'b0;

  always #5 clk = ~clk;

  cdma_tx dut (
    .clk, .rst_n, .mode(MOD_QAM16), .code_seed(SEED), .div_m(4'(M)), .div_n(4'(N)),
    .cic1_shift(5'd2), .cic2_shift(5'd4), .fcw(32'h1000_0000),
    .bit_in, .bit_valid, .bit_ready, .chip_en, .sym_start, .underflow,
    .bb_i, .bb_q, .dac_out);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // bit source: always valid, random bits
  always @(posedge clk) begin
    if (rst_n && bit_ready) bit_in <= 1'($urandom);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (cyc < NCLK) begin
        bbi[cyc] = int'(bb_i);
        bbq[cyc] = int'(bb_q);
      end
      if (chip_en) begin
        if (last_chip >= 0 && cyc - last_chip != P) bad_period++;
        last_chip = cyc;
        nchips++;
      end
      if (sym_start && !sym_start_d && nsym < NSYM + 4) begin
        sym_t[nsym] = cyc;
        lvl_i[nsym] = code_chip(SEED, 0) ? -int'(dut.chip_i) : int'(dut.chip_i);
        lvl_q[nsym] = code_chip(SEED, 0) ? -int'(dut.chip_q) : int'(dut.chip_q);
        nsym++;
      end
      sym_start_d = sym_start;
      if (underflow && nsym > 1) underflows++;
      if (cyc > 4 * CODE_LEN * P && (dac_out > dac_max || -dac_out > dac_max))
        dac_max = dac_out > 0 ? int'(dac_out) : -int'(dac_out);
      cyc++;
    end
  end

  function automatic real despread(int t0, int d, bit q);
    real acc = 0.0;
    for (int k = 0; k < CODE_LEN; k++) begin
      int t, v;
      t = t0 + d + k * P;
      if (t >= NCLK) return 0.0;
      v = q ? bbq[t] : bbi[t];
      acc += code_chip(SEED, k) ? -real'(v) : real'(v);
    end
    return acc;
  endfunction

  initial begin
    int best_d = 0;
    real best = 0.0, g0 = 0.0;
    int nchk = 0;
    bit_valid = 1'b1;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (cyc == NCLK);
    check(bad_period == 0, "chip enable period 8*M*N");
    check(nchips >= (NSYM + 1) * CODE_LEN, "chip count");
    check(underflows == 0, "no underflow with data always available");
    // delay search on symbol 2 (a nonzero symbol of known level)
    for (int d = 0; d < 40 * P; d++) begin
      real c;
      c = despread(sym_t[2], d, 1'b0);
      if (c < 0) c = -c;
      if (c > best) begin best = c; best_d = d; end
    end
    $display("chain delay %0d clocks, peak %0.0f", best_d, best);
    g0 = despread(sym_t[2], best_d, 1'b0) / real'(lvl_i[2]);
    for (int s = 2; s < NSYM - 1; s++) begin
      real ci, cq, ri, rq;
      ci = despread(sym_t[s], best_d, 1'b0);
      cq = despread(sym_t[s], best_d, 1'b1);
      ri = ci / real'(lvl_i[s]) / g0;
      rq = cq / real'(lvl_q[s]) / g0;
      nchk++;
      if (ri < 0.92 || ri > 1.08 || rq < 0.92 || rq > 1.08)
        $display("symbol %0d: levels %0d/%0d despread %0.0f/%0.0f", s, lvl_i[s],
                 lvl_q[s], ci, cq);
      check(ri > 0.92 && ri < 1.08, "I symbol level after the chain");
      check(rq > 0.92 && rq < 1.08, "Q symbol level after the chain");
    end
    check(g0 > 1000.0, "despread gain");
    check(dac_max > 200 && dac_max < 2048, "DAC word activity and range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'(NCLK) * 10 + 100000);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
