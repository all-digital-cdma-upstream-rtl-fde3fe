// cdma_pkg: types and constants shared by the DS-CDMA upstream transmitter and
// the head-end receiver.
//
// Spreading code: one symbol is spread over CODE_LEN = 128 chips. The code is a
// 127-chip maximal-length sequence (7-bit LFSR, x^7 + x^6 + 1) followed by one
// appended chip, so that a symbol is a power of two long; different users use
// different cyclic shifts of the sequence. This follows the 128-chip codes of
// DOCSIS 2.0 S-CDMA, which the transmitter is meant to comply with; the
// particular polynomial is this design's choice.
//
// Constellations: QPSK, 16QAM and 64QAM. Levels of one axis are odd integers
// scaled so that all three share the same peak: 64QAM {+-1,+-3,+-5,+-7},
// 16QAM {+-2,+-6}, QPSK {+-4}. Level index k (0..L-1) maps to 2k-(L-1) before
// scaling, with Gray-coded bits per axis.
//
// Filter taps (integers, unity passband gain after the listed shift):
//   SRRC_TX: square-root raised cosine, roll-off 0.25, 2 samples/chip, +-4 chips,
//            h(t) = [sin(pi t (1-b)) + 4 b t cos(pi t (1+b))] / [pi t (1-(4 b t)^2)],
//            scaled so that sum(h) = 2 * 1024 (x2 zero stuffing), shift 10.
//   SRRC_RX: same pulse at 4 samples/chip, sum(h) = 4 * 1024, shift 12.
//   HALFBAND: 7-tap half-band [-1 0 9 16 9 0 -1], sum 32, x2 zero stuffing, shift 4.
//   INV_SINC: 3-tap [-1 18 -1]/16, boosts the top of the band by about +1.9 dB
//            against the DAC's sin(x)/x droop.
package cdma_pkg;

  localparam int CODE_LEN  = 128;

  typedef enum logic [1:0] {
    MOD_QPSK  = 2'd0,
    MOD_QAM16 = 2'd1,
    MOD_QAM64 = 2'd2
  } mod_t;

  // one axis of a chip or symbol sample
  typedef logic signed [15:0] sample_t;

  typedef struct packed {
    sample_t i;
    sample_t q;
  } iq_t;

  localparam int SRRC_TX_TAPS = 17;
  localparam int SRRC_RX_TAPS = 33;

  typedef int coef17_t [SRRC_TX_TAPS];
  typedef int coef33_t [SRRC_RX_TAPS];

  localparam coef17_t SRRC_TX_COEF = '{
    22, -19, -38, 67, 54, -173, -65, 633, 1088, 633, -65, -173, 54, 67, -38, -19, 22};
  localparam coef33_t SRRC_RX_COEF = '{
    22, 10, -19, -44, -38, 6, 67, 96, 54, -56, -174, -204, -66, 244, 637, 966, 1094,
    966, 637, 244, -66, -204, -174, -56, 54, 96, 67, 6, -38, -44, -19, 10, 22};

  localparam int HB_TAPS = 7;
  typedef int coef7_t [HB_TAPS];
  localparam coef7_t HB_COEF = '{-1, 0, 9, 16, 9, 0, -1};

  // tap-set selectors of fir_filter
  localparam int FIR_HALFBAND = 0;
  localparam int FIR_SRRC_TX  = 1;
  localparam int FIR_SRRC_RX  = 2;

  function automatic int fir_taps(int set);
    case (set)
      FIR_SRRC_TX: return SRRC_TX_TAPS;
      FIR_SRRC_RX: return SRRC_RX_TAPS;
      default:     return HB_TAPS;
    endcase
  endfunction

  function automatic int fir_coef(int set, int k);
    case (set)
      FIR_SRRC_TX: return SRRC_TX_COEF[k];
      FIR_SRRC_RX: return SRRC_RX_COEF[k];
      default:     return HB_COEF[k];
    endcase
  endfunction

  // Bits per symbol for each modulation.
  function automatic int bits_per_symbol(mod_t m);
    case (m)
      MOD_QPSK:  return 2;
      MOD_QAM16: return 4;
      default:   return 6;
    endcase
  endfunction

  // Gray-decoded axis bits -> level index.
  function automatic logic [2:0] gray_to_bin3(logic [2:0] g);
    return {g[2], g[2] ^ g[1], g[2] ^ g[1] ^ g[0]};
  endfunction

  function automatic logic [2:0] bin_to_gray3(logic [2:0] b);
    return b ^ (b >> 1);
  endfunction

  // Axis level (scaled, peak +-7) from the axis bits of one symbol.
  // QPSK uses g[0], 16QAM g[1:0], 64QAM g[2:0].
  function automatic logic signed [3:0] axis_level(mod_t m, logic [2:0] g);
    logic [2:0] k;
    case (m)
      MOD_QPSK:  return g[0] ? 4'sd4 : -4'sd4;
      MOD_QAM16: begin
        k = gray_to_bin3({1'b0, g[1:0]});
        return 4'(2 * (2 * int'(k) - 3));
      end
      default: begin
        k = gray_to_bin3(g);
        return 4'(2 * int'(k) - 7);
      end
    endcase
  endfunction

  // Next state of the code LFSR (x^7 + x^6 + 1, Fibonacci form).
  function automatic logic [6:0] lfsr_next(logic [6:0] s);
    return {s[5:0], s[6] ^ s[5]};
  endfunction

  // Chip k (0..127) of the code with cyclic shift `shift` of the m-sequence.
  // Chip 127 is the appended chip, always +1 (bit value 0). Bit 1 means -1.
  function automatic logic code_chip(logic [6:0] seed, int k);
    logic [6:0] s;
    s = seed;
    if (k == CODE_LEN - 1) return 1'b0;
    for (int j = 0; j < k; j++) s = lfsr_next(s);
    return s[6];
  endfunction

endpackage
