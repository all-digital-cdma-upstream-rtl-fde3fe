// data_detector: slicer of one axis (I or Q) of a QPSK, 16QAM or 64QAM
// symbol.
//
// unit is the received amplitude of level 1 (the axis levels are odd
// multiples of it, scaled as in cdma_pkg: 64QAM +-1..+-7, 16QAM +-2/+-6,
// QPSK +-4). The decision is the number of thresholds at or below y:
//   64QAM: -6u -4u -2u 0 2u 4u 6u -> k = 0..7, level 2k-7
//   16QAM: -4u 0 4u               -> k = 0..3, level 2(2k-3)
//   QPSK : 0                      -> k = 0..1, level 8k-4
// bits is the Gray code of k (the inverse of the transmitter's mapping);
// err = y - level*unit. Combinational.
module data_detector
  import cdma_pkg::*;
(
  input  mod_t              mode,
  input  sample_t           y,
  input  logic [15:0]       unit,
  output logic [2:0]        bits,
  output logic signed [3:0] level,
  output logic signed [19:0] err
);
  logic [2:0] k;
  logic signed [19:0] yy, u;

  always_comb begin
    yy = 20'(y);
    u  = 20'({4'd0, unit});
    k  = '0;
    case (mode)
      MOD_QPSK: begin
        k     = (yy >= 0) ? 3'd1 : 3'd0;
        level = k[0] ? 4'sd4 : -4'sd4;
        bits  = k;
      end
      MOD_QAM16: begin
        for (int j = -1; j <= 1; j++)
          if (yy >= 20'(4 * j) * u) k = k + 3'd1;
        level = 4'(2 * (2 * int'(k) - 3));
        bits  = bin_to_gray3(k);
      end
      default: begin
        for (int j = -3; j <= 3; j++)
          if (yy >= 20'(2 * j) * u) k = k + 3'd1;
        level = 4'(2 * int'(k) - 7);
        bits  = bin_to_gray3(k);
      end
    endcase
    err = yy - 20'(level) * u;
  end
endmodule
