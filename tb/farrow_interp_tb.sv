// farrow_interp_tb: the cubic (M = 3, N = 2) interpolator must reproduce a
// cubic polynomial exactly, up to rounding. Samples x[n] = p(n) of a slow
// random cubic enter every other clock; each sample is strobed with a
// random mu, and the output, three clocks later, must equal
// p(n - 2 + mu) within 2 LSB on I and Q.
module farrow_interp_tb;
  import cdma_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, strobe = 1'b0, out_valid;
  logic [11:0] mu = '0;
  iq_t din = '0, dout;
  int checks = 0, failures = 0;
  real ci [4];
  real cq [4];
  real exp_i [$];
  real exp_q [$];

  always #5 clk = ~clk;

  farrow_interp dut (.clk, .rst_n, .in_valid, .din, .strobe, .mu, .dout, .out_valid);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic real p(real c [4], real t);
    return c[0] + t * (c[1] + t * (c[2] + t * c[3]));
  endfunction

  always @(posedge clk) begin
    if (out_valid) begin
      real ei, eq;
      ei = exp_i.pop_front();
      eq = exp_q.pop_front();
      check(real'(dout.i) - ei < 2.01 && ei - real'(dout.i) < 2.01, "I interpolant");
      check(real'(dout.q) - eq < 2.01 && eq - real'(dout.q) < 2.01, "Q interpolant");
    end
  end

  initial begin
    // cubic with values within +-8000 over n = 0..199 (t centred at 100)
    ci = '{1000.0, 40.0, 0.3, -0.004};
    cq = '{-2000.0, -25.0, 0.5, 0.003};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      real m;
      @(negedge clk);
      in_valid = 1'b1;
      din.i = sample_t'($rtoi($floor(p(ci, real'(n - 100)) + 0.5)));
      din.q = sample_t'($rtoi($floor(p(cq, real'(n - 100)) + 0.5)));
      strobe = (n >= 4);
      mu = 12'($urandom);
      m = real'(mu) / 4096.0;
      if (strobe) begin
        exp_i.push_back(p(ci, real'(n - 100) - 2.0 + m));
        exp_q.push_back(p(cq, real'(n - 100) - 2.0 + m));
      end
      @(negedge clk);
      in_valid = 1'b0;
      strobe = 1'b0;
    end
    repeat (5) @(negedge clk);
    check(exp_i.size() == 0, "one output per strobe");
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
