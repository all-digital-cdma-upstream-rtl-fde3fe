// timing_processor_tb: samples every other clock. No strobe before sync;
// sync gives a strobe with mu = 0 on that sample. With adj = 0 (W = 1/2)
// every second sample is a strobe with mu = 0. With a control offset adj
// the NCO must strobe at the rate W = (2^15 + adj) / 2^16 per sample
// (counted over 40000 samples, within 1), and mu must equal 2 * eta, the
// fractional phase of a reference NCO (saturated just below 1 when
// W > 1/2 leaves eta >= 1/2 at a base point).
module timing_processor_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, sync = 1'b0, strobe, running;
  logic signed [15:0] adj = '0;
  logic [11:0] mu;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  timing_processor dut (.clk, .rst_n, .in_valid, .sync, .adj, .strobe, .mu, .running);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic run(int a, int n);
    int eta, w, ns;
    adj = 16'(a);
    w = 32768 + a;
    eta = 0;
    ns = 0;
    // sync on the first sample
    @(negedge clk);
    in_valid = 1'b1;
    sync = 1'b1;
    #1;
    check(strobe && mu == 12'd0, "sync sample is a base point with mu = 0");
    @(negedge clk);
    in_valid = 1'b0;
    sync = 1'b0;
    eta = 65536 - w;
    for (int k = 1; k < n; k++) begin
      bit es;
      @(negedge clk);
      in_valid = 1'b1;
      #1;
      es = (eta < w);
      check(strobe == es, "strobe at the NCO wrap");
      if (es) begin
        ns++;
        check(int'(mu) == (eta >= 32768 ? 4095 : eta >> 3), "mu = 2 * eta");
      end
      eta = (eta - w) & 65535;
      @(negedge clk);
      in_valid = 1'b0;
    end
    // expected number of strobes after the sync: (n - 1) * W, within 1
    check(real'(ns) > real'(n - 1) * real'(w) / 65536.0 - 1.0 &&
          real'(ns) < real'(n - 1) * real'(w) / 65536.0 + 1.0, "strobe rate W");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      in_valid = (k % 2 == 0);
      #1;
      check(!strobe && !running, "no strobe before sync");
    end
    in_valid = 1'b0;
    run(0, 2000);
    run(7, 40000);
    run(-7, 40000);
    run(300, 10000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
