// cordic_atan_tb: random vectors in all four quadrants and of very
// different sizes; the angle (2^16 per turn) must match atan2 within 4 LSB
// and mag must be 1.6468 |z| within 0.1%; done must come ITER + 2 = 17
// cycles after start.
module cordic_atan_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, done, busy;
  logic signed [39:0] x = '0, y = '0;
  logic signed [15:0] angle;
  logic [41:0] mag;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cordic_atan dut (.clk, .rst_n, .start, .x, .y, .angle, .mag, .done, .busy);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (x=%0d y=%0d angle=%0d)", what, x, y, angle);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      real a, m, d, xr, yr;
      int lat;
      int sc;
      sc = $urandom_range(4, 30);
      x = 40'($signed(40'($urandom_range(0, 2000000))) - 40'sd1000000) <<< sc;
      y = 40'($signed(40'($urandom_range(0, 2000000))) - 40'sd1000000) <<< sc;
      x = x >>> 8;
      y = y >>> 8;
      if (x == 0 && y == 0) x = 40'sd1000;
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      check(lat == 17, "latency ITER + 2");
      xr = real'(x); yr = real'(y);
      a = $atan2(yr, xr) / 6.283185307179586 * 65536.0;
      d = real'(angle) - a;
      if (d > 32768.0) d -= 65536.0;
      if (d < -32768.0) d += 65536.0;
      check(d < 4.0 && d > -4.0, "angle");
      m = 1.646760258 * $sqrt(xr * xr + yr * yr);
      check(real'(mag) > m * 0.999 - 4.0 && real'(mag) < m * 1.001 + 4.0, "magnitude");
    end
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
