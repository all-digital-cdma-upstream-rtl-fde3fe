// sincos_lut_tb: every table address against round(2047 cos/sin(2 pi a/1024)),
// within one LSB.
module sincos_lut_tb;
  logic [9:0] phase = '0;
  logic signed [11:0] cos_o, sin_o;
  int checks = 0, failures = 0;

  sincos_lut dut (.phase, .cos_o, .sin_o);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s at %0d", what, phase);
    end
  endtask

  initial begin
    for (int a = 0; a < 1024; a++) begin
      real c, s;
      phase = 10'(a);
      #1;
      c = 2047.0 * $cos(6.283185307179586 * real'(a) / 1024.0);
      s = 2047.0 * $sin(6.283185307179586 * real'(a) / 1024.0);
      check(real'(cos_o) - c < 1.01 && c - real'(cos_o) < 1.01, "cosine");
      check(real'(sin_o) - s < 1.01 && s - real'(sin_o) < 1.01, "sine");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
