// costas_loop_tb: symbols on random QAM points rotated by a random phase
// error. err must equal Q*sgn(I) - I*sgn(Q) one clock after sym_valid; its
// sign must follow the phase error on diagonal points; the pre-filter must be
// y += (e - y) >>> 1 and the PI outputs dphase = pre >>> KP, dfreq = pre >>> KI,
// with adj_valid two clocks after sym_valid.
module costas_loop_tb;
  import cdma_pkg::*;
  localparam int KP = 2, KI = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, sym_valid = 1'b0, err_valid, adj_valid;
  iq_t sym = '0;
  logic signed [16:0] err;
  logic signed [15:0] dphase;
  logic signed [23:0] dfreq;
  int checks = 0, failures = 0;
  int pre = 0;

  always #5 clk = ~clk;

  costas_loop #(.KP(KP), .KI(KI)) dut (.clk, .rst_n, .clear, .sym_valid, .sym, .err,
                                      .err_valid, .adj_valid, .dphase, .dfreq);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      int li, lq, e;
      real th, yi, yq;
      li = 2 * $urandom_range(0, 7) - 7;
      lq = 2 * $urandom_range(0, 7) - 7;
      th = (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0 * 0.3;
      yi = 30.0 * (real'(li) * $cos(th) - real'(lq) * $sin(th));
      yq = 30.0 * (real'(li) * $sin(th) + real'(lq) * $cos(th));
      sym.i = sample_t'($rtoi(yi));
      sym.q = sample_t'($rtoi(yq));
      e = (sym.i < 0 ? -int'(sym.q) : int'(sym.q)) - (sym.q < 0 ? -int'(sym.i) : int'(sym.i));
      sym_valid = 1'b1;
      @(negedge clk);
      sym_valid = 1'b0;
      check(err_valid && int'(err) == e, "phase detector output");
      // on diagonal points e = 2|a| sin(th); others carry a data term
      if (li == lq || li == -lq) begin
        if (th > 0.05) check(e > 0, "positive error for a positive phase error");
        if (th < -0.05) check(e < 0, "negative error for a negative phase error");
      end
      pre = pre + ((e - pre) >>> 1);
      @(negedge clk);
      check(adj_valid, "adj_valid two clocks after the symbol");
      check(int'(dphase) == (pre >>> KP), "proportional branch");
      check(int'(dfreq) == (pre >>> KI), "integral branch");
      repeat (2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
