// srrc_filter_tb: both configurations of the square-root raised-cosine
// filter. Transmitter (x2 interpolating, 17 taps, shift 10): random chips
// every other tick; the output must equal the zero-stuffed input convolved
// with the taps, shifted and saturated. Receiver matched filter (no
// interpolation, 33 taps, shift 12): random samples on in_valid every other
// clock; the output must equal the convolution. One output per tick /
// input, one clock later. The taps themselves are checked for symmetry and
// against the unity-gain sums (2*1024 and 4*1024).
module srrc_filter_tb;
  import cdma_pkg::*;
  localparam int N = 400;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tv = 1'b0, tt = 1'b0, tov, rv = 1'b0, rov;
  logic signed [15:0] tdin = '0, tdout, rdin = '0, rdout;
  int checks = 0, failures = 0;
  int txs [2 * N];
  int tys [2 * N];
  int rxs [N];
  int rys [N];
  int nt = 0, nr = 0;

  always #5 clk = ~clk;

  srrc_filter #(.INTERP(2), .OSR(2)) u_tx (
    .clk, .rst_n, .in_valid(tv), .din(tdin), .tick(tt), .dout(tdout), .out_valid(tov));
  srrc_filter #(.INTERP(1), .OSR(4)) u_rx (
    .clk, .rst_n, .in_valid(rv), .din(rdin), .tick(1'b0), .dout(rdout), .out_valid(rov));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic int sat16(int v);
    return v > 32767 ? 32767 : (v < -32768 ? -32768 : v);
  endfunction

  always @(posedge clk) begin
    if (tov && nt < 2 * N) begin tys[nt] <= int'(tdout); nt <= nt + 1; end
    if (rov && nr < N) begin rys[nr] <= int'(rdout); nr <= nr + 1; end
  end

  initial begin
    int s;
    s = 0;
    for (int k = 0; k < SRRC_TX_TAPS; k++) begin
      s += SRRC_TX_COEF[k];
      check(SRRC_TX_COEF[k] == SRRC_TX_COEF[SRRC_TX_TAPS - 1 - k], "tx taps symmetric");
    end
    check(s > 2040 && s < 2056, "tx taps sum 2*1024");
    s = 0;
    for (int k = 0; k < SRRC_RX_TAPS; k++) begin
      s += SRRC_RX_COEF[k];
      check(SRRC_RX_COEF[k] == SRRC_RX_COEF[SRRC_RX_TAPS - 1 - k], "rx taps symmetric");
    end
    check(s > 4080 && s < 4112, "rx taps sum 4*1024");
    for (int k = 0; k < 2 * N; k++) txs[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 2 * N; k++) begin
      @(negedge clk);
      tt = 1'b1;
      tv = (k % 2 == 0);
      rv = (k % 2 == 0);
      if (k % 2 == 0) begin
        tdin = (($urandom & 1) != 0) ? 16'sd896 : -16'sd896;   // +-7 << 7
        txs[k] = int'(tdin);
        rdin = 16'($signed(16'($urandom_range(0, 1023))) - 16'sd512);
        rxs[k / 2] = int'(rdin);
      end
    end
    @(negedge clk);
    tt = 1'b0; tv = 1'b0; rv = 1'b0;
    repeat (3) @(negedge clk);
    check(nt == 2 * N && nr == N, "one output per tick / input");
    for (int n = 0; n < 2 * N; n++) begin
      int acc;
      acc = 0;
      for (int k = 0; k < SRRC_TX_TAPS; k++) if (n - k >= 0) acc += SRRC_TX_COEF[k] * txs[n - k];
      check(tys[n] == sat16(acc >>> 10), "transmit pulse-shaper output");
    end
    for (int n = 0; n < N; n++) begin
      int acc;
      acc = 0;
      for (int k = 0; k < SRRC_RX_TAPS; k++) if (n - k >= 0) acc += SRRC_RX_COEF[k] * rxs[n - k];
      check(rys[n] == sat16(acc >>> 12), "receive matched-filter output");
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
