// cic_interp_tb: 3-stage CIC interpolator at rates 2, 4, 8 (power of two,
// out_shift = 2 log2 R, unity gain) and 3 and 12 (ends of the document's
// second-filter range). Random input every R ticks, tick every clock. The
// output sequence must equal the zero-stuffed input convolved with the CIC
// impulse response (a length-R box convolved with itself three times)
// shifted right by out_shift and saturated, allowing the filter's fixed
// pipeline lag (found once per rate, at most 3 ticks).
module cic_interp_tb;
  localparam int NIN = 120;
  localparam int NMAX = NIN * 12 + 40;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, tick = 1'b0, out_valid;
  logic signed [15:0] din = '0, dout;
  logic [4:0] out_shift = 5'd2;
  int checks = 0, failures = 0;
  int xs [NMAX];
  int ys [NMAX];
  int ny = 0;

  always #5 clk = ~clk;

  cic_interp dut (.clk, .rst_n, .in_valid, .din, .tick, .out_shift, .dout, .out_valid);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid && ny < NMAX) begin ys[ny] <= int'(dout); ny <= ny + 1; end

  task automatic run(int r, int sh);
    int h [40];
    int nh, lag, nout;
    bit ok_lag;
    // impulse response of the three stages: box * box * box
    nh = 3 * r - 2;
    for (int k = 0; k < 40; k++) h[k] = 0;
    for (int a = 0; a < r; a++)
      for (int b = 0; b < r; b++)
        for (int c = 0; c < r; c++) h[a + b + c]++;
    for (int k = 0; k < NMAX; k++) xs[k] = 0;
    rst_n = 1'b0;
    out_shift = 5'(sh);
    @(negedge clk);
    rst_n = 1'b1;
    ny = 0;
    nout = NIN * r;
    for (int k = 0; k < nout + 8; k++) begin
      @(negedge clk);
      tick = 1'b1;
      in_valid = (k % r == 0) && (k < nout);
      if (in_valid) begin
        din = 16'($signed(16'($urandom_range(0, 4095))) - 16'sd2048);
        xs[k] = int'(din);
      end
    end
    @(negedge clk);
    tick = 1'b0;
    in_valid = 1'b0;
    repeat (2) @(negedge clk);
    lag = -1;
    for (int l = 0; l <= 3 && lag < 0; l++) begin
      ok_lag = 1'b1;
      for (int n = 0; n < nout; n++) begin
        int acc;
        acc = 0;
        for (int k = 0; k < nh; k++) if (n - k >= 0) acc += h[k] * xs[n - k];
        acc = acc >>> sh;
        if (acc > 32767) acc = 32767;
        if (acc < -32768) acc = -32768;
        if (ys[n + l] != acc) ok_lag = 1'b0;
      end
      if (ok_lag) lag = l;
    end
    $display("rate %0d: pipeline lag %0d ticks", r, lag);
    check(lag >= 0, "output equals the CIC reference");
    check(ny >= nout, "one output per tick");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run(2, 2);
    run(4, 4);
    run(8, 6);
    run(3, 3);
    run(12, 7);
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
