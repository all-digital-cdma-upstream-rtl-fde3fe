// fir_filter: direct-form FIR with constant integer taps, shared by the
// square-root raised-cosine and half-band filters.
//
// On every shift_en the input sample enters the delay line and the output
// register takes sum(c[k] * x[n-k]) >>> SHIFT, saturated to OUT_W bits.
// The tap set is chosen by SET from the tables in cdma_pkg (FIR_HALFBAND,
// FIR_SRRC_TX, FIR_SRRC_RX); TAPS must be that table's length.
// An interpolating user feeds zeros on the ticks between its input samples
// (zero stuffing); the tap sets are scaled for that.
//
// Timing: dout is valid the cycle after shift_en (out_valid pulses then).
module fir_filter
  import cdma_pkg::*;
#(
  parameter int SET   = FIR_HALFBAND,
  parameter int TAPS  = fir_taps(SET),
  parameter int IN_W  = 16,
  parameter int OUT_W = 16,
  parameter int SHIFT = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    shift_en,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout,
  output logic                    out_valid
);
  localparam int ACC_W = IN_W + 16;

  logic signed [IN_W-1:0] line [TAPS];
  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] scaled;

  // sum over the delay line as it will be after this shift
  always_comb begin
    acc = ACC_W'(fir_coef(SET, 0)) * ACC_W'(din);
    for (int k = 1; k < TAPS; k++)
      acc += ACC_W'(fir_coef(SET, k)) * ACC_W'(line[k-1]);
    scaled = acc >>> SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) line[k] <= '0;
      dout      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= shift_en;
      if (shift_en) begin
        line[0] <= din;
        for (int k = 1; k < TAPS; k++) line[k] <= line[k-1];
        if (scaled > ACC_W'(2**(OUT_W-1) - 1))
          dout <= OUT_W'(2**(OUT_W-1) - 1);
        else if (scaled < -ACC_W'(2**(OUT_W-1)))
          dout <= OUT_W'(-(2**(OUT_W-1)));
        else
          dout <= OUT_W'(scaled);
      end
    end
  end
  initial assert (TAPS == fir_taps(SET)) else $error("fir_filter: TAPS does not match SET");
endmodule
