// halfband_filter: x2 interpolating half-band FIR.
//
// Input samples arrive with in_valid; tick runs at twice the input rate. Each
// tick the filter takes the pending input sample or a stuffed zero and
// produces one output sample. The 7 taps [-1 0 9 16 9 0 -1] (sum 32) make
// every other tap zero except the centre one, which is what makes a half-band
// filter cheap; with zero stuffing the passband gain is 32/2 and SHIFT = 4
// restores unity. Two of these in cascade give the x4 the document's
// transmitter assigns to its half-band pair; the tap set is this design's
// choice (the document gives no taps).
//
// Timing: dout/out_valid one cycle after tick.
module halfband_filter #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] din,
  input  logic                tick,
  output logic signed [W-1:0] dout,
  output logic                out_valid
);
  logic signed [W-1:0] fir_in;

  interp_stuffer #(.W(W)) u_stuff (
    .clk, .rst_n, .in_valid, .din, .tick, .dout(fir_in));

  fir_filter #(.SET(cdma_pkg::FIR_HALFBAND), .TAPS(7), .IN_W(W),
               .OUT_W(W), .SHIFT(4)) u_fir (
    .clk, .rst_n, .shift_en(tick), .din(fir_in), .dout, .out_valid);
endmodule
