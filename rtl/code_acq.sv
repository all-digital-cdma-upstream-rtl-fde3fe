// code_acq: code acquisition by a matched filter on the spreading code.
//
// The I and Q outputs of the chip matched filter (OSR samples per chip) are
// correlated with the 128 code chips, taking samples OSR apart (the newest
// sample meets the last chip). Each branch is a transposed-form FIR of
// (CODE_LEN-1)*OSR+1 taps whose non-zero taps are +-1: a chain of partial
// sums with one adder per chip and no multipliers. The complex magnitude is approximated by
// max(|I|,|Q|) + min(|I|,|Q|)/2 (at most about 12 % high), as the document
// prescribes instead of sqrt(I^2+Q^2).
//
// Peak detector: once armed (start), the first sample whose magnitude is at
// least `threshold` and is a local maximum (larger than the sample before,
// not smaller than the one after) is taken as the end of a code period. One
// sample later `sync` pulses, `acquired` rises and `peak_mag` holds the peak.
// Acquisition therefore completes about one code period plus the filter
// delays after the burst begins, inside the two symbols the document states.
// The detector's local-maximum rule and the threshold input are this
// design's choices; the document shows a "peak detector" box only.
//
// Timing: corr/mag registered one cycle after in_valid; sync is aligned with
// the in_valid of the sample after the peak's successor (two samples after the
// peak sample entered).
module code_acq
  import cdma_pkg::*;
#(
  parameter int OSR   = 4,
  parameter int IN_W  = 16,
  parameter int COR_W = IN_W + 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [6:0]              code_seed,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_i,
  input  logic signed [IN_W-1:0]  in_q,
  input  logic [COR_W-1:0]        threshold,
  output logic                    sync,
  output logic                    acquired,
  output logic [COR_W-1:0]        peak_mag
);
  localparam int DL = (CODE_LEN - 1) * OSR + 1;

  logic signed [COR_W-1:0] z_i [1:DL-1];
  logic signed [COR_W-1:0] z_q [1:DL-1];
  logic [CODE_LEN-1:0]     code;      // code[c] = chip c, bit 1 = -1
  logic signed [COR_W-1:0] sum_i, sum_q;
  logic signed [COR_W-1:0] cor_i, cor_q;
  logic [COR_W-1:0]        abs_i, abs_q, mx, mn, mag, mag_d1, mag_d2;
  logic                    cor_valid;
  logic                    armed;
  logic [1:0]              have;      // magnitudes seen since start (sat. 2)

  // code register: chips of the user's code, rebuilt when the seed changes
  always_comb begin
    logic [6:0] s;
    s = code_seed;
    for (int c = 0; c < CODE_LEN - 1; c++) begin
      code[c] = s[6];
      s = lfsr_next(s);
    end
    code[CODE_LEN-1] = 1'b0;
  end

  // transposed-form correlator: z[k] <= z[k+1] + h[k] * x, where
  // h[k] = +-1 for chip 127 - k/OSR at every OSR-th tap and 0 between
  function automatic logic signed [COR_W-1:0] tap(int k, logic signed [IN_W-1:0] x);
    if (k % OSR != 0) return '0;
    return code[CODE_LEN - 1 - k / OSR] ? -COR_W'(x) : COR_W'(x);
  endfunction

  assign sum_i = z_i[1] + tap(0, in_i);
  assign sum_q = z_q[1] + tap(0, in_q);

  always_comb begin
    abs_i = cor_i[COR_W-1] ? COR_W'(-cor_i) : COR_W'(cor_i);
    abs_q = cor_q[COR_W-1] ? COR_W'(-cor_q) : COR_W'(cor_q);
    mx    = (abs_i > abs_q) ? abs_i : abs_q;
    mn    = (abs_i > abs_q) ? abs_q : abs_i;
    mag   = mx + (mn >> 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < DL; k++) begin
        z_i[k] <= '0;
        z_q[k] <= '0;
      end
      cor_i     <= '0;
      cor_q     <= '0;
      cor_valid <= 1'b0;
      mag_d1    <= '0;
      mag_d2    <= '0;
      armed     <= 1'b0;
      have      <= '0;
      sync      <= 1'b0;
      acquired  <= 1'b0;
      peak_mag  <= '0;
    end else begin
      cor_valid <= in_valid;
      sync      <= 1'b0;
      if (in_valid) begin
        for (int k = 1; k < DL - 1; k++) begin
          z_i[k] <= z_i[k+1] + tap(k, in_i);
          z_q[k] <= z_q[k+1] + tap(k, in_q);
        end
        z_i[DL-1] <= tap(DL - 1, in_i);
        z_q[DL-1] <= tap(DL - 1, in_q);
        cor_i <= sum_i;
        cor_q <= sum_q;
      end
      if (start) begin
        armed    <= 1'b1;
        acquired <= 1'b0;
        have     <= '0;
      end else if (cor_valid) begin
        mag_d1 <= mag;
        mag_d2 <= mag_d1;
        if (have != 2'd2) have <= have + 2'd1;
        // mag_d1 is the candidate: above threshold, rising into it, not
        // smaller than the sample after it
        if (armed && have == 2'd2 && mag_d1 >= threshold &&
            mag_d1 > mag_d2 && mag_d1 >= mag) begin
          armed    <= 1'b0;
          acquired <= 1'b1;
          sync     <= 1'b1;
          peak_mag <= mag_d1;
        end
      end
    end
  end
endmodule
