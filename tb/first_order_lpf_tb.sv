// first_order_lpf_tb: random inputs on random in_valid cycles against the
// reference y <= y + (x - y) >>> K (K = 2), updated the cycle after
// in_valid; clear must zero the state; a held step input must settle to
// within 2^K of the step.
module first_order_lpf_tb;
  localparam int K = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, in_valid = 1'b0, out_valid;
  logic signed [31:0] x = '0, y;
  int checks = 0, failures = 0;
  longint ref_y = 0;

  always #5 clk = ~clk;

  first_order_lpf #(.W(32), .K(K)) dut (.clk, .rst_n, .clear, .in_valid, .x, .y, .out_valid);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (clear) ref_y <= 0;
      else if (in_valid) ref_y <= ref_y + ((longint'(x) - ref_y) >>> K);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      check(longint'(y) == ref_y, "filter state");
      in_valid = ($urandom_range(0, 2) != 0);
      clear = (n == 1500);
      x = (n < 2000) ? 32'($signed(32'($urandom_range(0, 2000000))) - 1000000) : 32'sd123456;
    end
    @(negedge clk);
    in_valid = 1'b0;
    check(y > 32'sd123456 - 32'sd4 && y <= 32'sd123456, "step settles");
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
