// carrier_init_tb: a preamble of N + 1 = 32 correlator outputs
// z_n = A exp(j (pi/4 + phi + Omega n)) is fed for several frequency offsets
// Omega (including ones where the rotating sum changes sign) and phases phi.
// The estimates (2^16 = one turn) must be: omega = Omega within 8,
// theta = phi + 16 Omega (the window centre) within 64, and
// phase0 = theta + Omega * 33 / 2 within 64 + the omega error. est_valid
// must pulse once, within 2 * (15 + 2) + 4 cycles of the last symbol.
module carrier_init_tb;
  import cdma_pkg::*;
  localparam int N = 31;
  localparam real A = 180.0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, z_valid = 1'b0, est_valid, busy;
  iq_t z = '0;
  logic signed [15:0] theta, omega, phase0;
  logic [41:0] amp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  carrier_init dut (.clk, .rst_n, .start, .z_valid, .z, .est_valid, .theta, .omega,
                    .phase0, .amp, .busy);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s (omega %0d theta %0d phase0 %0d)", what, omega, theta, phase0);
    end
  endtask

  function automatic real wrapd(real d);
    while (d > 32768.0) d -= 65536.0;
    while (d < -32768.0) d += 65536.0;
    return d;
  endfunction

  task automatic run(real om, real phi);
    real ph;
    int lat;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int n = 0; n <= N; n++) begin
      ph = 6.283185307 * (0.125 + (phi + om * real'(n)) / 65536.0);
      z.i = sample_t'($rtoi(A * $cos(ph)));
      z.q = sample_t'($rtoi(A * $sin(ph)));
      z_valid = 1'b1;
      @(negedge clk);
      z_valid = 1'b0;
      repeat (3) @(negedge clk);
    end
    lat = 0;
    while (!est_valid && lat < 100) begin @(negedge clk); lat++; end
    check(lat < 2 * 17 + 4, "estimate latency");
    check(wrapd(real'(omega) - om) < 8.0 && wrapd(real'(omega) - om) > -8.0, "frequency");
    check(wrapd(real'(theta) - phi - 16.0 * om) < 64.0 &&
          wrapd(real'(theta) - phi - 16.0 * om) > -64.0, "phase at the window centre");
    check(wrapd(real'(phase0) - phi - 32.5 * om) < 64.0 + 17.0 * 8.0 &&
          wrapd(real'(phase0) - phi - 32.5 * om) > -64.0 - 17.0 * 8.0, "NCO start phase");
    @(negedge clk);
    check(!est_valid, "est_valid is one pulse");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run(6553.0, 6000.0);
    run(0.0, 0.0);
    run(-6553.0, -20000.0);
    run(1500.0, 30000.0);
    run(3000.0, 100.0);     // 31 * 3000 / 2 wraps past half a turn: sum sign flips
    run(-4500.0, 12345.0);
    // random offsets, away from the zeros of sin(N Omega / 2) where the
    // preamble sum vanishes and its phase is undefined
    for (int k = 0; k < 10; k++) begin
      real om;
      om = real'($urandom_range(0, 16000)) - 8000.0;
      while ($sin(31.0 * om / 65536.0 * 3.14159265) < 0.3 &&
             $sin(31.0 * om / 65536.0 * 3.14159265) > -0.3)
        om = real'($urandom_range(0, 16000)) - 8000.0;
      run(om, real'($urandom_range(0, 65535)) - 32768.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
