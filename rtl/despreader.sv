// despreader: integrate-and-dump correlator of the on-time chip samples
// with the prompt code, one output per symbol.
//
// Each on-time sample is added with the sign of its prompt chip (bit 1 =
// -1); at the sample flagged sym_end the sum over the 128 chips, divided by
// 128, is output as the symbol (sym_valid the next cycle). This is the
// low-pass after the carrier mixers in the document's carrier-recovery
// figure and the correlator that feeds its initialisation. clear drops a
// partial sum.
module despreader
  import cdma_pkg::*;
#(
  parameter int ACC_W = 24
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic chip_valid,
  input  iq_t  x,
  input  logic prompt,
  input  logic sym_end,
  output iq_t  sym,
  output logic sym_valid
);
  localparam int SH = $clog2(CODE_LEN);
  logic signed [ACC_W-1:0] acc_i, acc_q, nxt_i, nxt_q;

  always_comb begin
    nxt_i = acc_i + (prompt ? -ACC_W'(x.i) : ACC_W'(x.i));
    nxt_q = acc_q + (prompt ? -ACC_W'(x.q) : ACC_W'(x.q));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_i <= '0; acc_q <= '0;
      sym <= '0;
      sym_valid <= 1'b0;
    end else begin
      sym_valid <= 1'b0;
      if (clear) begin
        acc_i <= '0; acc_q <= '0;
      end else if (chip_valid) begin
        if (sym_end) begin
          acc_i     <= '0;
          acc_q     <= '0;
          sym.i     <= sample_t'(nxt_i >>> SH);
          sym.q     <= sample_t'(nxt_q >>> SH);
          sym_valid <= 1'b1;
        end else begin
          acc_i <= nxt_i;
          acc_q <= nxt_q;
        end
      end
    end
  end
endmodule
