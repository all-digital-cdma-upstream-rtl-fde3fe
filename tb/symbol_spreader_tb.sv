// symbol_spreader_tb: random serial bits in 64QAM, then 16QAM, then QPSK,
// chip enable every 3 clocks. Every chip must be the symbol's Gray-mapped
// axis level (first half of the bits on I, first bit most significant)
// times the code chip of the selected cyclic shift; a symbol lasts exactly
// 128 chips. With the bit source stopped, the spreader must send zero
// chips and pulse underflow at each symbol start.
module symbol_spreader_tb;
  import cdma_pkg::*;
  localparam logic [6:0] SEED = 7'h5a;
  logic clk = 1'b0, rst_n = 1'b0;
  mod_t mode = MOD_QAM64;
  logic bit_in = 1'b0, bit_valid = 1'b0, bit_ready, chip_en = 1'b0;
  logic signed [3:0] chip_i, chip_q;
  logic sym_start, underflow;
  int checks = 0, failures = 0;
  bit q [$];
  int exp_i = 0, exp_q = 0, k = 0, nsym = 0, nunder = 0;
  bit gap = 1'b0, started = 1'b0, chk_pending = 1'b0;

  always #5 clk = ~clk;

  symbol_spreader dut (.clk, .rst_n, .mode, .code_seed(SEED), .bit_in, .bit_valid,
                       .bit_ready, .chip_en, .chip_i, .chip_q, .sym_start, .underflow);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (symbol %0d chip %0d)", what, nsym, k);
    end
  endtask

  // record every accepted bit
  always @(posedge clk) if (rst_n && bit_valid && bit_ready) q.push_back(bit_in);

  always @(negedge clk) begin
    if (chk_pending) begin
      chk_pending = 1'b0;
      if (sym_start) begin
        logic [2:0] gi, gq;
        int b;
        if (started) check(k == CODE_LEN, "128 chips per symbol");
        started = 1'b1;
        k = 0;
        nsym++;
        if (underflow) begin
          exp_i = 0; exp_q = 0; nunder++;
        end else begin
          b = bits_per_symbol(mode) / 2;
          gi = '0; gq = '0;
          for (int j = 0; j < b; j++) gi = {gi[1:0], q.pop_front()};
          for (int j = 0; j < b; j++) gq = {gq[1:0], q.pop_front()};
          exp_i = int'(axis_level(mode, gi));
          exp_q = int'(axis_level(mode, gq));
        end
      end
      if (started) begin
        int s;
        s = code_chip(SEED, k) ? -1 : 1;
        check(int'(chip_i) == s * exp_i, "I chip");
        check(int'(chip_q) == s * exp_q, "Q chip");
        k++;
      end
    end
  end

  initial begin
    int t;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    bit_valid = 1'b1;
    t = 0;
    while (nsym < 30) begin
      @(negedge clk);
      if (t % 3 == 0) begin chip_en = 1'b1; end else chip_en = 1'b0;
      if (bit_ready) bit_in = 1'($urandom);
      if (nsym == 10) mode = MOD_QAM16;
      if (nsym == 16) mode = MOD_QPSK;
      if (nsym == 22) bit_valid = 1'b0;   // source stops: gaps
      @(posedge clk);
      if (chip_en) chk_pending = 1'b1;
      t++;
    end
    check(nunder >= 6, "underflow while the source is stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
