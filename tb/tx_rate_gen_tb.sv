// tx_rate_gen_tb: for several (M, N) settings including the ends of the
// document's ranges, the period of each enable must be N, N*M, 2*N*M,
// 4*N*M and 8*N*M clocks, and each slower enable must coincide with all
// faster ones.
module tx_rate_gen_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] div_m = 4'd2, div_n = 4'd3;
  logic cic2_in, cic1_in, hb2_in, hb1_in, chip;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tx_rate_gen dut (.clk, .rst_n, .div_m, .div_n, .cic2_in, .cic1_in, .hb2_in,
                   .hb1_in, .chip);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (M=%0d N=%0d)", what, div_m, div_n);
    end
  endtask

  task automatic measure(int m, int n);
    int last [5];
    int per [5];
    logic [4:0] en;
    int bad_nest;
    div_m = 4'(m);
    div_n = 4'(n);
    // let the counters wrap onto the new setting
    repeat (2 * 8 * 8 * 12 + 4) @(negedge clk);
    for (int j = 0; j < 5; j++) begin last[j] = -1; per[j] = 0; end
    bad_nest = 0;
    for (int t = 0; t < 4 * 8 * m * n; t++) begin
      @(negedge clk);
      en = {chip, hb1_in, hb2_in, cic1_in, cic2_in};
      for (int j = 0; j < 5; j++)
        if (en[j]) begin
          if (last[j] >= 0) begin
            if (per[j] == 0) per[j] = t - last[j];
            else if (per[j] != t - last[j]) per[j] = -1;
          end
          last[j] = t;
        end
      for (int j = 1; j < 5; j++)
        if (en[j] && !en[j-1]) bad_nest++;
    end
    check(per[0] == n, "cic2_in period N");
    check(per[1] == n * m, "cic1_in period N*M");
    check(per[2] == 2 * n * m, "hb2_in period 2*N*M");
    check(per[3] == 4 * n * m, "hb1_in period 4*N*M");
    check(per[4] == 8 * n * m, "chip period 8*N*M");
    check(bad_nest == 0, "slower enables coincide with faster ones");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    measure(2, 3);
    measure(8, 12);
    measure(3, 5);
    measure(2, 4);
    measure(7, 11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
