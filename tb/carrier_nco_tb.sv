// carrier_nco_tb: the NCO is loaded with a phase and per-symbol frequency
// and fed with on-time samples A exp(j phi_k) whose phase advances by
// omega / 128 per chip, starting at phase0. The derotated output must stay
// at (A, 0) within the table's accuracy over 20 symbols, one clock after
// each step. A Costas adjustment of +dphase must then rotate the output by
// -dphase; clear must zero phase and frequency.
module carrier_nco_tb;
  import cdma_pkg::*;
  localparam real A = 1500.0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, load = 1'b0, adj = 1'b0, step = 1'b0, y_valid;
  logic signed [15:0] phase0 = 16'sd12000, omega = 16'sd6553, dphase = '0;
  logic signed [23:0] dfreq = '0, fw;
  logic [23:0] phase;
  iq_t x = '0, y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  carrier_nco dut (.clk, .rst_n, .clear, .load, .phase0, .omega, .adj, .dphase, .dfreq,
                   .step, .x, .y, .y_valid, .phase, .fw);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (y %0d,%0d)", what, y.i, y.q);
    end
  endtask

  task automatic chip(real ph, real ei, real eq);
    @(negedge clk);
    x.i = sample_t'($rtoi(A * $cos(ph)));
    x.q = sample_t'($rtoi(A * $sin(ph)));
    step = 1'b1;
    @(negedge clk);
    step = 1'b0;
    check(y_valid, "y_valid one clock after step");
    check(real'(y.i) - ei < 12.0 && ei - real'(y.i) < 12.0 &&
          real'(y.q) - eq < 12.0 && eq - real'(y.q) < 12.0, "derotated sample");
  endtask

  initial begin
    real ph, d;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check(fw == 24'(int'(omega) * 2), "per-chip frequency word omega/128");
    ph = real'(phase0) / 65536.0 * 6.283185307;
    for (int k = 0; k < 20 * CODE_LEN; k++) begin
      chip(ph, A, 0.0);
      ph += real'(omega) / 65536.0 * 6.283185307 / 128.0;
    end
    // Costas phase step of +1/16 turn
    dphase = 16'sd4096;
    adj = 1'b1;
    @(negedge clk);
    adj = 1'b0;
    d = 6.283185307 / 16.0;
    for (int k = 0; k < 64; k++) begin
      chip(ph, A * $cos(d), -A * $sin(d));
      ph += real'(omega) / 65536.0 * 6.283185307 / 128.0;
    end
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    check(phase == 24'd0 && fw == 24'sd0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
