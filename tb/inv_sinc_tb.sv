// inv_sinc_tb: random 16-bit samples every clock against a reference model of
// y[n] = sat12((-x[n] + 18 x[n-1] - x[n-2]) >>> 4), registered, so dout
// must match the model one clock after each input. Also checks unity DC gain.
module inv_sinc_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [15:0] din = '0;
  logic signed [11:0] dout;
  int checks = 0, failures = 0;
  int h1 = 0, h2 = 0, expv = 0;
  bit run = 1'b0;

  always #5 clk = ~clk;

  inv_sinc dut (.clk, .rst_n, .din, .dout);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic int sat12(int v);
    return v > 2047 ? 2047 : (v < -2048 ? -2048 : v);
  endfunction

  // reference, clocked like the design
  always @(posedge clk) begin
    if (rst_n) begin
      expv <= sat12((18 * h1 - int'(din) - h2) >>> 4);
      h2 <= h1;
      h1 <= int'(din);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (run) check(int'(dout) == expv, "inverse-sinc output");
      run = 1'b1;
      din = (n < 2000) ? 16'($signed(16'($urandom_range(0, 4095))) - 16'sd2048)
                       : 16'sd1000;
    end
    check(dout == 12'sd1000, "DC gain 1");
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
