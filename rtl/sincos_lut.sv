// sincos_lut: full-wave cosine/sine table for the transmitter's DDFS and the
// receiver's carrier NCO.
//
// The phase is the top ADDR_W bits of a phase accumulator (2^ADDR_W = one
// turn). cos and sin are AMP * cos/sin(2 pi phase / 2^ADDR_W), rounded, with
// AMP = 2^(OUT_W-1) - 1. The table is filled once from that formula when the
// simulation or synthesis starts. Read is combinational.
module sincos_lut #(
  parameter int ADDR_W = 10,
  parameter int OUT_W  = 12
) (
  input  logic [ADDR_W-1:0]       phase,
  output logic signed [OUT_W-1:0] cos_o,
  output logic signed [OUT_W-1:0] sin_o
);
  localparam int  DEPTH = 2 ** ADDR_W;
  localparam real AMP   = real'(2 ** (OUT_W - 1) - 1);
  localparam real TWO_PI = 6.283185307179586;

  logic signed [OUT_W-1:0] sin_tab [DEPTH];

  initial begin
    for (int k = 0; k < DEPTH; k++)
      sin_tab[k] = OUT_W'($rtoi($floor(AMP * $sin(TWO_PI * real'(k) / real'(DEPTH)) + 0.5)));
  end

  assign sin_o = sin_tab[phase];
  assign cos_o = sin_tab[phase + ADDR_W'(DEPTH / 4)];
endmodule
