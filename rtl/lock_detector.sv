// lock_detector: carrier lock indication.
//
// Counts consecutive symbols whose phase-detector output magnitude is below
// thr; lock rises after LOCK_N such symbols and falls after UNLOCK_N
// consecutive symbols above thr. The document shows a lock detector fed by
// the derotated signal without detail; this counter rule is this design's
// choice. clear drops lock.
module lock_detector #(
  parameter int LOCK_N   = 8,
  parameter int UNLOCK_N = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               err_valid,
  input  logic signed [16:0] err,
  input  logic [16:0]        thr,
  output logic               lock
);
  logic [7:0]  good, bad;
  logic [16:0] mag;

  assign mag = err[16] ? 17'(-err) : 17'(err);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      good <= '0; bad <= '0; lock <= 1'b0;
    end else if (clear) begin
      good <= '0; bad <= '0; lock <= 1'b0;
    end else if (err_valid) begin
      if (mag < thr) begin
        bad <= '0;
        if (good != 8'hff) good <= good + 8'd1;
        if (int'(good) + 1 >= LOCK_N) lock <= 1'b1;
      end else begin
        good <= '0;
        if (bad != 8'hff) bad <= bad + 8'd1;
        if (int'(bad) + 1 >= UNLOCK_N) lock <= 1'b0;
      end
    end
  end
endmodule
