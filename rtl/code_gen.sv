// code_gen: local spreading-code generator of the receiver.
//
// Works on the interpolator's strobes, which alternate between on-time
// samples (chip centres) and half-chip samples (between chip n and n+1).
// sync declares the current strobe the on-time sample of chip 127, the last
// chip of a code period (the code-acquisition peak). Each following on-time
// strobe advances the chip index; the half-chip strobe after chip n carries
// the early chip c(n+1) and the late chip c(n), half a chip on either side of
// the sample, i.e. the early-late spacing Delta = 1 chip of the document.
// The code register holds c(n) and c(n+1) like the two-cell shift register
// of the document's improved DLL figure. Bit 1 means chip value -1.
//
// Outputs are combinational with the strobe (this sample's chips and flags):
//   ontime  prompt    chip_idx  sym_end (chip 127, not on the sync strobe)
//   half    early late half_ok  (half_ok = 0 after chip 127, where the
//                                 sample straddles two symbols)
module code_gen
  import cdma_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [6:0] code_seed,
  input  logic       strobe,
  input  logic       sync,
  output logic       ontime,
  output logic       half,
  output logic       prompt,
  output logic       early,
  output logic       late,
  output logic       half_ok,
  output logic [6:0] chip_idx,
  output logic       sym_end
);
  logic [6:0] idx;       // index of the latest on-time chip
  logic       cur;       // c(idx)
  logic [6:0] lfsr;      // state whose bit 6 is c(idx+1) for idx+1 < 127
  logic       next_is_half;
  logic       nxt_chip;  // c(idx+1)
  logic [6:0] idx_new;

  always_comb begin
    if (idx == 7'(CODE_LEN - 2))      nxt_chip = 1'b0;          // appended chip
    else if (idx == 7'(CODE_LEN - 1)) nxt_chip = code_seed[6];  // chip 0
    else                              nxt_chip = lfsr[6];
    idx_new  = idx + 7'd1;
    ontime   = strobe && (sync || !next_is_half);
    half     = strobe && !sync && next_is_half;
    prompt   = sync ? 1'b0 : nxt_chip;
    chip_idx = sync ? 7'(CODE_LEN - 1) : idx_new;
    sym_end  = ontime && !sync && (idx_new == 7'(CODE_LEN - 1));
    early    = nxt_chip;
    late     = cur;
    half_ok  = idx != 7'(CODE_LEN - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx          <= 7'(CODE_LEN - 1);
      cur          <= 1'b0;
      lfsr         <= 7'h7f;
      next_is_half <= 1'b0;
    end else if (strobe) begin
      if (sync) begin
        idx          <= 7'(CODE_LEN - 1);
        cur          <= 1'b0;
        lfsr         <= code_seed;
        next_is_half <= 1'b1;
      end else if (!next_is_half) begin
        idx          <= idx_new;
        cur          <= nxt_chip;
        // lfsr must describe chip idx_new + 1
        if (idx == 7'(CODE_LEN - 1)) lfsr <= lfsr_next(code_seed); // idx_new = 0
        else if (idx_new < 7'(CODE_LEN - 2)) lfsr <= lfsr_next(lfsr);
        next_is_half <= 1'b1;
      end else begin
        next_is_half <= 1'b0;
      end
    end
  end
endmodule
