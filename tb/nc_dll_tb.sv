// nc_dll_tb: random half-chip samples with random early/late chips over
// integration periods of 127 samples; at each dump, err must equal the
// reference I_d*I_s + Q_d*Q_s, where the sum branch accumulates E*x when
// early = late ((E+L)/2 = E) and the difference branch when they differ.
// A sample arriving with dump counts in the period. Then the discriminator
// sign: samples taken late (early chip correlates) must give a positive e.
module nc_dll_tb;
  import cdma_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, half_valid = 1'b0, early = 1'b0, late = 1'b0, dump = 1'b0;
  iq_t x = '0;
  logic signed [48:0] err;
  logic err_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nc_dll dut (.clk, .rst_n, .clear, .half_valid, .x, .early, .late, .dump, .err, .err_valid);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int p = 0; p < 20; p++) begin
      longint is_a, id_a, qs_a, qd_a, e;
      is_a = 0; id_a = 0; qs_a = 0; qd_a = 0;
      for (int k = 0; k < 127; k++) begin
        int sg;
        @(negedge clk);
        half_valid = 1'b1;
        early = 1'($urandom);
        late = 1'($urandom);
        x.i = sample_t'($urandom_range(0, 2000) - 1000);
        x.q = sample_t'($urandom_range(0, 2000) - 1000);
        sg = early ? -1 : 1;
        if (early == late) begin is_a += sg * x.i; qs_a += sg * x.q; end
        else begin id_a += sg * x.i; qd_a += sg * x.q; end
        dump = (k == 126);
        @(negedge clk);
        half_valid = 1'b0;
        dump = 1'b0;
      end
      e = id_a * is_a + qd_a * qs_a;
      check(err_valid == 1'b1, "err_valid the cycle after dump");
      check(longint'(err) == e, "discriminator output");
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
