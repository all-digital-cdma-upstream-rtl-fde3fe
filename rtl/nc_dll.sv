// nc_dll: discriminator of the improved non-coherent delay-lock loop.
//
// The conventional non-coherent DLL forms I_e^2 + Q_e^2 - I_l^2 - Q_l^2 from
// early and late correlations. The improved form computes the same error as
//   e = I_d * I_s + Q_d * Q_s,
// where I_s, Q_s are the correlations of the half-chip samples with
// (early + late)/2 and I_d, Q_d with (early - late)/2, each integrated and
// dumped over one symbol; the two squarers become one multiplier per branch
// and the code products are only +x, -x or 0. e does not depend on the data
// or on the carrier phase. e > 0 means that the half-chip samples lie
// nearer the early chip, i.e. sampling is late.
//
// Interface: half_valid with the half-chip sample and its early/late chips
// (bit 1 = -1) accumulates; dump ends the integration period and outputs e
// (err_valid one cycle later); clear restarts without output.
module nc_dll
  import cdma_pkg::*;
#(
  parameter int ACC_W = 24,
  parameter int ERR_W = 2 * ACC_W + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    half_valid,
  input  iq_t                     x,
  input  logic                    early,
  input  logic                    late,
  input  logic                    dump,
  output logic signed [ERR_W-1:0] err,
  output logic                    err_valid
);
  logic signed [ACC_W-1:0] is_acc, id_acc, qs_acc, qd_acc;
  logic signed [ACC_W-1:0] xi, xq, is_n, id_n, qs_n, qd_n;

  always_comb begin
    xi = early ? -ACC_W'(x.i) : ACC_W'(x.i);
    xq = early ? -ACC_W'(x.q) : ACC_W'(x.q);
    is_n = is_acc; id_n = id_acc; qs_n = qs_acc; qd_n = qd_acc;
    if (half_valid) begin
      if (early == late) begin   // (E+L)/2 = E, (E-L)/2 = 0
        is_n = is_acc + xi;
        qs_n = qs_acc + xq;
      end else begin             // (E+L)/2 = 0, (E-L)/2 = E
        id_n = id_acc + xi;
        qd_n = qd_acc + xq;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      is_acc <= '0; id_acc <= '0; qs_acc <= '0; qd_acc <= '0;
      err <= '0;
      err_valid <= 1'b0;
    end else begin
      err_valid <= dump && !clear;
      if (clear || dump) begin
        is_acc <= '0; id_acc <= '0; qs_acc <= '0; qd_acc <= '0;
      end else begin
        is_acc <= is_n; id_acc <= id_n; qs_acc <= qs_n; qd_acc <= qd_n;
      end
      if (dump && !clear)
        err <= ERR_W'(id_n) * ERR_W'(is_n) + ERR_W'(qd_n) * ERR_W'(qs_n);
    end
  end
endmodule
