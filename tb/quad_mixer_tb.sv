// quad_mixer_tb: random I, Q, cos and sin every clock against the reference
// out = sat16((I*cos - Q*sin) >>> 11), registered one clock.
module quad_mixer_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [15:0] i_in = '0, q_in = '0, out;
  logic signed [11:0] cos_i = '0, sin_i = '0;
  int checks = 0, failures = 0;
  longint expv = 0;
  bit run = 1'b0;

  always #5 clk = ~clk;

  quad_mixer dut (.clk, .rst_n, .i_in, .q_in, .cos_i, .sin_i, .out);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    longint v;
    v = (longint'(i_in) * longint'(cos_i) - longint'(q_in) * longint'(sin_i)) >>> 11;
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    expv <= v;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (run) check(longint'(out) == expv, "mixer output");
      run = 1'b1;
      i_in  = 16'($urandom);
      q_in  = 16'($urandom);
      cos_i = 12'($urandom);
      sin_i = 12'($urandom);
      if (n % 3 == 0) begin   // keep many results in range as well
        i_in  = i_in >>> 4;
        q_in  = q_in >>> 4;
      end
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
