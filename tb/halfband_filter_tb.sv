// halfband_filter_tb: random input samples every other tick (x2
// interpolation, tick every clock). The output sequence must equal the
// zero-stuffed input convolved with [-1 0 9 16 9 0 -1] and shifted right by
// 4 (saturated), one clock after each tick. A DC input must come out at
// unity gain on both output phases.
module halfband_filter_tb;
  localparam int N = 600;
  localparam int H [7] = '{-1, 0, 9, 16, 9, 0, -1};
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, tick = 1'b0, out_valid;
  logic signed [15:0] din = '0, dout;
  int checks = 0, failures = 0;
  int xs [2 * N + 8];
  int ys [2 * N + 8];
  int ny = 0;

  always #5 clk = ~clk;

  halfband_filter dut (.clk, .rst_n, .in_valid, .din, .tick, .dout, .out_valid);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid && ny < 2 * N + 8) begin ys[ny] <= int'(dout); ny <= ny + 1; end

  initial begin
    for (int k = 0; k < 2 * N + 8; k++) xs[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 2 * N; k++) begin
      @(negedge clk);
      tick = 1'b1;
      in_valid = (k % 2 == 0);
      if (k % 2 == 0) begin
        din = (k < N) ? 16'($signed(16'($urandom_range(0, 16383))) - 16'sd8192) : 16'sd3000;
        xs[k] = int'(din);
      end
    end
    @(negedge clk);
    tick = 1'b0;
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    check(ny == 2 * N, "one output per tick");
    for (int n = 0; n < 2 * N; n++) begin
      int acc;
      acc = 0;
      for (int k = 0; k < 7; k++) if (n - k >= 0) acc += H[k] * xs[n - k];
      acc = acc >>> 4;
      if (acc > 32767) acc = 32767;
      if (acc < -32768) acc = -32768;
      check(ys[n] == acc, "output sample");
    end
    check(ys[2 * N - 1] == 3000 && ys[2 * N - 2] == 3000, "DC gain 1 on both phases");
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
