// srrc_filter: square-root raised-cosine Nyquist filter (roll-off 0.25,
// +-4 chips long).
//
// INTERP = 2, OSR = 2: transmit pulse shaper. Chips arrive with in_valid at
// the chip rate; tick runs at twice that rate and the filter output follows at
// 2 samples/chip (17 taps, zero stuffing).
// INTERP = 1, OSR = 4: receive chip matched filter at 4 samples/chip (33
// taps); tick is ignored and the filter runs on in_valid.
// Tap values and their formula are in cdma_pkg. The document names a square-
// root filter in both the transmitter and the receiver; roll-off, length,
// oversampling and scaling are this design's choices. SHIFT sets the output
// scaling (the taps carry a gain of OSR*1024).
//
// Timing: dout/out_valid one cycle after the filter's shift tick.
module srrc_filter
  import cdma_pkg::*;
#(
  parameter int INTERP = 2,
  parameter int OSR    = 2,
  parameter int IN_W   = 16,
  parameter int OUT_W  = 16,
  parameter int SHIFT  = (OSR == 2) ? 10 : 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  din,
  input  logic                    tick,
  output logic signed [OUT_W-1:0] dout,
  output logic                    out_valid
);
  logic                   shift_en;
  logic signed [IN_W-1:0] fir_in;

  if (INTERP > 1) begin : g_interp
    interp_stuffer #(.W(IN_W)) u_stuff (
      .clk, .rst_n, .in_valid, .din, .tick, .dout(fir_in));
    assign shift_en = tick;
  end else begin : g_direct
    assign fir_in   = din;
    assign shift_en = in_valid;
  end

  if (OSR == 2) begin : g_tx
    fir_filter #(.SET(FIR_SRRC_TX), .TAPS(SRRC_TX_TAPS), .IN_W(IN_W),
                 .OUT_W(OUT_W), .SHIFT(SHIFT)) u_fir (
      .clk, .rst_n, .shift_en, .din(fir_in), .dout, .out_valid);
  end else begin : g_rx
    fir_filter #(.SET(FIR_SRRC_RX), .TAPS(SRRC_RX_TAPS), .IN_W(IN_W),
                 .OUT_W(OUT_W), .SHIFT(SHIFT)) u_fir (
      .clk, .rst_n, .shift_en, .din(fir_in), .dout, .out_valid);
  end

  initial assert (OSR == 2 || OSR == 4) else $error("srrc_filter: OSR must be 2 or 4");
endmodule
