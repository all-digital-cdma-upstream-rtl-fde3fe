// despreader_tb: symbols of random level spread by random code chips, one
// chip every 2 clocks; the dumped value must be the level (the sum of
// chip * code over 128 chips divided by 128). With noise added the result
// must equal the reference sum >>> 7. clear in mid-symbol drops the
// partial sum.
module despreader_tb;
  import cdma_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, chip_valid = 1'b0, prompt = 1'b0, sym_end = 1'b0, sym_valid;
  iq_t x = '0, sym;
  int checks = 0, failures = 0;
  int ai = 0, aq = 0, ri = 0, rq = 0, nsym = 0;

  always #5 clk = ~clk;

  despreader dut (.clk, .rst_n, .clear, .chip_valid, .x, .prompt, .sym_end, .sym, .sym_valid);

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
    for (int s = 0; s < 40; s++) begin
      int li, lq;
      li = $urandom_range(0, 400) - 200;
      lq = $urandom_range(0, 400) - 200;
      ai = 0; aq = 0;
      for (int k = 0; k < CODE_LEN; k++) begin
        int ni, nq, sg;
        @(negedge clk);
        prompt = 1'($urandom);
        sg = prompt ? -1 : 1;
        ni = (s >= 20) ? $urandom_range(0, 60) - 30 : 0;
        nq = (s >= 20) ? $urandom_range(0, 60) - 30 : 0;
        x.i = sample_t'(sg * li + ni);
        x.q = sample_t'(sg * lq + nq);
        ai += sg * int'(x.i);
        aq += sg * int'(x.q);
        chip_valid = 1'b1;
        sym_end = (k == CODE_LEN - 1);
        clear = (s == 10 && k == 60);
        if (clear) begin ai = 0; aq = 0; end
        @(negedge clk);
        chip_valid = 1'b0;
        sym_end = 1'b0;
        clear = 1'b0;
        if (k == CODE_LEN - 1) begin
          check(sym_valid, "sym_valid after the last chip");
          if (s != 10) begin
            check(int'(sym.i) == (ai >>> 7) && int'(sym.q) == (aq >>> 7), "despread value");
            if (s < 20) check(int'(sym.i) == li && int'(sym.q) == lq, "symbol level recovered");
          end
          nsym++;
        end else begin
          check(!sym_valid, "no output inside a symbol");
        end
      end
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
