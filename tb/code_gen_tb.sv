// code_gen_tb: drives strobes into the receiver's code generator after a
// sync and checks the on-time/half-chip alternation, prompt chips against
// cdma_pkg::code_chip, the early/late pair of every half-chip sample,
// half_ok and sym_end over three code periods, and a re-sync.
module code_gen_tb;
  import cdma_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic strobe = 1'b0, sync = 1'b0;
  logic [6:0] seed = 7'h35;
  logic ontime, half, prompt, early, late, half_ok, sym_end;
  logic [6:0] chip_idx;
  logic ref_code [CODE_LEN];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  code_gen dut (.clk, .rst_n, .code_seed(seed), .strobe, .sync, .ontime, .half,
                .prompt, .early, .late, .half_ok, .chip_idx, .sym_end);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_periods(int nper);
    // sync strobe: on-time of chip 127
    @(negedge clk); strobe = 1'b1; sync = 1'b1;
    #1 check(ontime && !half && !sym_end && chip_idx == 7'd127, "sync strobe");
    @(negedge clk); strobe = 1'b0; sync = 1'b0;
    for (int p = 0; p < nper; p++) begin
      for (int c = 0; c < CODE_LEN; c++) begin
        // half-chip sample between chip c-1 (or 127) and chip c
        @(negedge clk); strobe = 1'b1;
        #1 check(half && !ontime, "half strobe");
        check(early == ref_code[c], "early chip");
        check(late == ref_code[(c + CODE_LEN - 1) % CODE_LEN], "late chip");
        check(half_ok == (c != 0), "half_ok");
        @(negedge clk); strobe = 1'b0;
        // idle cycle: nothing happens
        @(negedge clk); strobe = 1'b1;
        #1 check(ontime && !half, "on-time strobe");
        check(prompt == ref_code[c], "prompt chip");
        check(chip_idx == 7'(c), "chip index");
        check(sym_end == (c == CODE_LEN - 1), "sym_end");
        @(negedge clk); strobe = 1'b0;
      end
    end
  endtask

  initial begin
    for (int c = 0; c < CODE_LEN; c++) ref_code[c] = code_chip(seed, c);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_periods(3);
    seed = 7'h11;
    for (int c = 0; c < CODE_LEN; c++) ref_code[c] = code_chip(seed, c);
    run_periods(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
