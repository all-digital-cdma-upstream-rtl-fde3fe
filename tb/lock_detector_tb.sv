// lock_detector_tb: random runs of sm and large phase-detector values.
// lock must rise after LOCK_N = 8 consecutive values below thr, fall after
// UNLOCK_N = 4 consecutive values at or above it, and clear must drop it;
// checked against a counting reference after every value.
module lock_detector_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, err_valid = 1'b0, lock;
  logic signed [16:0] err = '0;
  logic [16:0] thr = 17'd200;
  int checks = 0, failures = 0;
  int good = 0, bad = 0, nrise = 0, nfall = 0;
  bit ref_lock = 1'b0;

  always #5 clk = ~clk;

  lock_detector dut (.clk, .rst_n, .clear, .err_valid, .err, .thr, .lock);

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
    for (int n = 0; n < 3000; n++) begin
      int m;
      bit sm;
      sm = ($urandom_range(0, 9) < ((n / 200) % 2 == 0 ? 9 : 3));
      m = sm ? $urandom_range(0, 199) : $urandom_range(200, 5000);
      err = 17'(($urandom & 1) != 0 ? -m : m);
      err_valid = 1'b1;
      clear = (n % 777 == 776);
      @(negedge clk);
      err_valid = 1'b0;
      if (clear) begin
        good = 0; bad = 0; ref_lock = 1'b0;
      end else if (sm) begin
        bad = 0; good++;
        if (good >= 8 && !ref_lock) begin ref_lock = 1'b1; nrise++; end
      end else begin
        good = 0; bad++;
        if (bad >= 4 && ref_lock) begin ref_lock = 1'b0; nfall++; end
      end
      clear = 1'b0;
      check(lock == ref_lock, "lock state");
    end
    check(nrise > 3 && nfall > 3, "lock rose and fell several times");
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
