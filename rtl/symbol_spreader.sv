// symbol_spreader: serial-to-symbol converter, QAM mapper and spreader.
//
// Bits arrive serially (bit_valid/bit_ready, first bit first). Once
// bits_per_symbol(mode) bits (2, 4 or 6) have been collected they form the
// next symbol: the first half of the bits selects the I level, the second
// half the Q level, each Gray coded (cdma_pkg::axis_level). At each chip
// enable the spreader outputs the current symbol times the current chip of
// the spreading code (bit 1 = -1). A new symbol is taken at chip 0 of every
// 128-chip code period; if none is ready a zero symbol is sent and
// underflow pulses. code_seed selects the user's cyclic shift of the code
// and must be non-zero.
//
// The document names the serial-to-symbol spreader and the QPSK..64QAM
// constellations; the bit order, Gray mapping, level scaling and code are
// this design's choices (see cdma_pkg).
//
// Timing: chip_i/chip_q change one cycle after each chip enable and hold
// until the next; sym_start is high with chip 0 of each symbol.
module symbol_spreader
  import cdma_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  mod_t              mode,
  input  logic [6:0]        code_seed,
  input  logic              bit_in,
  input  logic              bit_valid,
  output logic              bit_ready,
  input  logic              chip_en,
  output logic signed [3:0] chip_i,
  output logic signed [3:0] chip_q,
  output logic              sym_start,
  output logic              underflow
);
  logic [5:0] shreg;
  logic [2:0] nbits;
  logic       full;          // a complete symbol waits in shreg
  logic [5:0] sym_bits;
  mod_t       sym_mode;
  logic       sym_on;        // current symbol is real (not a gap)
  logic [6:0] chip_cnt;
  logic [6:0] lfsr;
  logic       code_bit;
  logic [5:0] use_bits;
  logic       use_on;
  mod_t       use_mode;
  logic signed [3:0] lvl_i, lvl_q;
  logic [2:0] gi, gq;
  int         bps;

  assign bps       = bits_per_symbol(mode);
  assign bit_ready = !full;
  assign code_bit  = (chip_cnt == 7'(CODE_LEN - 1)) ? 1'b0 : lfsr[6];

  // symbol used for this chip: the waiting one at chip 0, else the held one
  always_comb begin
    if (chip_cnt == 7'd0) begin
      use_bits = shreg;
      use_on   = full;
      use_mode = mode;
    end else begin
      use_bits = sym_bits;
      use_on   = sym_on;
      use_mode = sym_mode;
    end
    case (use_mode)
      MOD_QPSK:  begin gi = {2'b00, use_bits[1]};   gq = {2'b00, use_bits[0]};   end
      MOD_QAM16: begin gi = {1'b0, use_bits[3:2]};  gq = {1'b0, use_bits[1:0]};  end
      default:   begin gi = use_bits[5:3];          gq = use_bits[2:0];          end
    endcase
    lvl_i = use_on ? axis_level(use_mode, gi) : 4'sd0;
    lvl_q = use_on ? axis_level(use_mode, gq) : 4'sd0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '0;
      nbits     <= '0;
      full      <= 1'b0;
      sym_bits  <= '0;
      sym_mode  <= MOD_QPSK;
      sym_on    <= 1'b0;
      chip_cnt  <= '0;
      lfsr      <= code_seed;
      chip_i    <= '0;
      chip_q    <= '0;
      sym_start <= 1'b0;
      underflow <= 1'b0;
    end else begin
      sym_start <= 1'b0;
      underflow <= 1'b0;
      // collect serial bits
      if (bit_valid && !full) begin
        shreg <= {shreg[4:0], bit_in};
        if (int'(nbits) + 1 == bps) begin
          full  <= 1'b1;
          nbits <= '0;
        end else begin
          nbits <= nbits + 3'd1;
        end
      end
      if (chip_en) begin
        chip_i <= code_bit ? -lvl_i : lvl_i;
        chip_q <= code_bit ? -lvl_q : lvl_q;
        if (chip_cnt == 7'd0) begin
          sym_bits  <= shreg;
          sym_mode  <= mode;
          sym_on    <= full;
          sym_start <= 1'b1;
          underflow <= !full;
          if (full) full <= 1'b0;
        end
        chip_cnt <= chip_cnt + 7'd1;
        lfsr     <= (chip_cnt >= 7'(CODE_LEN - 2)) ? code_seed : lfsr_next(lfsr);
      end
    end
  end
endmodule
