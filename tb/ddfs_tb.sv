// ddfs_tb: with fcw = 2^32 / 64 the carrier must repeat exactly every 64
// clocks and advance by 2 pi / 64 per clock (checked with atan2 of the
// outputs, within the 10-bit table's phase step); the amplitude must be
// 2047 +- 2. A second frequency word (2^32 * 5 / 128) checks agility.
module ddfs_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] fcw = 32'h0400_0000;
  logic signed [11:0] cos_o, sin_o;
  int checks = 0, failures = 0;
  real hist_c [64];

  always #5 clk = ~clk;

  ddfs dut (.clk, .rst_n, .fcw, .cos_o, .sin_o);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic run(real step, int n);
    real prev, ang, d, amp;
    prev = 0.0;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      ang = $atan2(real'(sin_o), real'(cos_o));
      amp = $sqrt(real'(cos_o) ** 2 + real'(sin_o) ** 2);
      if (k > 2) begin
        d = ang - prev;
        if (d < -3.14159265) d += 6.28318531;
        if (d > 3.14159265) d -= 6.28318531;
        check(d - step < 0.0062 && step - d < 0.0062, "phase step per clock");
        check(amp > 2045.0 && amp < 2049.5, "amplitude");
      end
      prev = ang;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run(6.283185307 / 64.0, 200);
    // period: 64 clocks
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      hist_c[k] = real'(cos_o);
    end
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      check(real'(cos_o) == hist_c[k], "period of 64 clocks");
    end
    fcw = 32'h0A00_0000;
    repeat (2) @(negedge clk);
    run(6.283185307 * 5.0 / 128.0, 200);
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
