// code_acq_tb: feeds the code-acquisition block a burst of rectangular
// chips (4 samples per chip) after a stretch of silence and checks the
// correlation peak value against the sum worked out here (128 chips times
// the chip amplitude, magnitude max + min/2), that sync fires at the sample
// after the peak's successor, that it fires once only, and that it fires
// within two symbols of the burst start.
module code_acq_tb;
  import cdma_pkg::*;
  localparam int OSR  = 4;
  localparam int LEAD = 57;
  localparam int AI   = 100;
  localparam int AQ   = -60;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, in_valid = 1'b0;
  logic signed [15:0] in_i = '0, in_q = '0;
  logic sync, acquired;
  logic [23:0] peak_mag;
  logic code [CODE_LEN];
  int checks = 0, failures = 0, nsync = 0, sync_sample = -1, k = 0;
  int exp_peak, exp_sample;

  always #5 clk = ~clk;

  code_acq #(.OSR(OSR)) dut (.clk, .rst_n, .start, .code_seed(7'h35), .in_valid,
    .in_i, .in_q, .threshold(24'd6000), .sync, .acquired, .peak_mag);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n && sync) begin
    nsync++;
    if (sync_sample < 0) sync_sample = k;
  end

  initial begin
    int a, b;
    for (int c = 0; c < CODE_LEN; c++) code[c] = code_chip(7'h35, c);
    a = 128 * AI; b = 128 * (AQ < 0 ? -AQ : AQ);
    exp_peak = (a > b) ? a + b / 2 : b + a / 2;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    // silence, then 3 symbols of the same data
    for (k = 0; k < LEAD + 3 * CODE_LEN * OSR; k++) begin
      @(negedge clk);
      in_valid = 1'b1;
      if (k < LEAD) begin
        in_i = '0; in_q = '0;
      end else begin
        int chip;
        chip = ((k - LEAD) / OSR) % CODE_LEN;
        in_i = 16'(code[chip] ? -AI : AI);
        in_q = 16'(code[chip] ? -AQ : AQ);
      end
      @(negedge clk);
      in_valid = 1'b0;
    end
    repeat (10) @(posedge clk);
    // the full correlation is first reached when the first sample of chip
    // 127 of the first symbol enters (sample LEAD + 508) and stays for the 4
    // samples of that chip; the local-max rule takes the first, and sync
    // follows two samples later
    exp_sample = LEAD + (CODE_LEN - 1) * OSR + 2;
    $display("sync at sample %0d (expected %0d), peak %0d (expected %0d)",
             sync_sample, exp_sample, peak_mag, exp_peak);
    check(acquired, "acquired");
    check(nsync == 1, "one sync pulse");
    check(int'(peak_mag) == exp_peak, "peak magnitude max+min/2");
    check(sync_sample - LEAD <= 2 * CODE_LEN * OSR, "within two symbols");
    check(sync_sample == exp_sample, "sync sample");
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
