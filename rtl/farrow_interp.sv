// farrow_interp: cubic polynomial interpolator in Farrow structure
// (order M = 3, 2N = 4 taps with N = 2, the document's choice).
//
// H(z, mu) = sum_m mu^m * C_m(z): four fixed FIR branches C_3..C_0 over the
// samples x[n-3..n] and one fractional interval mu shared by all branches,
// combined by Horner's rule ((v3*mu + v2)*mu + v1)*mu + v0. The base point
// m_k is x[n-2] and the output is the signal at x[n-2] + mu*(x[n-1]-x[n-2])
// in time, 0 <= mu < 1.
//
// The branch taps here are those of cubic Lagrange interpolation, scaled by
// 6 to stay integer:
//   6*v0 = 6 x0
//   6*v1 = -2 x-1 - 3 x0 + 6 x1 - x2
//   6*v2 =  3 x-1 - 6 x0 + 3 x1
//   6*v3 = -x-1 + 3 x0 - 3 x1 + x2      (x0 = base point)
// The document obtains its taps by a least-squares fit over a bandwidth B
// it does not state; the Lagrange set is the limit of that fit for a narrow
// band and needs no table.
//
// Interface: in_valid shifts one I/Q sample in. strobe (with mu) in the same
// cycle asks for an output at base point x[n-2] of the window after that
// shift. Timing: out_valid three cycles after the strobe; the next sample
// may enter no earlier than two cycles after the previous one.
module farrow_interp
  import cdma_pkg::*;
#(
  parameter int MU_W = 12
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  iq_t             din,
  input  logic            strobe,
  input  logic [MU_W-1:0] mu,
  output iq_t             dout,
  output logic            out_valid
);
  localparam int V_W = 20;            // 6*v fits in 16+4 bits
  localparam int H_W = V_W + MU_W + 2;

  iq_t             win [4];           // win[0] newest = x2, win[3] = x-1
  logic            stb_q, stb_q2;
  logic [MU_W-1:0] mu_q, mu_q2;
  logic signed [V_W-1:0] v0 [2], v1 [2], v2 [2], v3 [2];
  logic signed [V_W-1:0] r0 [2], r1 [2], r2 [2], r3 [2];
  logic signed [H_W-1:0] h  [2];
  logic signed [H_W+15:0] y [2];

  function automatic logic signed [V_W-1:0] ext(sample_t s);
    return V_W'(s);
  endfunction

  // branch FIR filters (combinational on the window)
  always_comb begin
    for (int a = 0; a < 2; a++) begin
      logic signed [V_W-1:0] xm1, x0, x1, x2;
      xm1 = ext(a == 0 ? win[3].i : win[3].q);
      x0  = ext(a == 0 ? win[2].i : win[2].q);
      x1  = ext(a == 0 ? win[1].i : win[1].q);
      x2  = ext(a == 0 ? win[0].i : win[0].q);
      v0[a] = 6 * x0;
      v1[a] = -2 * xm1 - 3 * x0 + 6 * x1 - x2;
      v2[a] = 3 * xm1 - 6 * x0 + 3 * x1;
      v3[a] = -xm1 + 3 * x0 - 3 * x1 + x2;
    end
  end

  // Horner evaluation on the pipelined branch outputs
  always_comb begin
    for (int a = 0; a < 2; a++) begin
      logic signed [H_W-1:0] m;
      m = H_W'(r3[a]);
      m = ((m * $signed(H_W'({1'b0, mu_q2}))) >>> MU_W) + H_W'(r2[a]);
      m = ((m * $signed(H_W'({1'b0, mu_q2}))) >>> MU_W) + H_W'(r1[a]);
      m = ((m * $signed(H_W'({1'b0, mu_q2}))) >>> MU_W) + H_W'(r0[a]);
      h[a] = m;
      // divide by 6: multiply by round(2^16/6) = 10923
      y[a] = ((H_W+16)'(h[a]) * (H_W+16)'(10923)) >>> 16;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) win[k] <= '0;
      for (int a = 0; a < 2; a++) begin
        r0[a] <= '0; r1[a] <= '0; r2[a] <= '0; r3[a] <= '0;
      end
      stb_q     <= 1'b0;
      stb_q2    <= 1'b0;
      mu_q      <= '0;
      mu_q2     <= '0;
      dout      <= '0;
      out_valid <= 1'b0;
    end else begin
      if (in_valid) begin
        win[0] <= din;
        for (int k = 1; k < 4; k++) win[k] <= win[k-1];
      end
      stb_q <= strobe;
      mu_q  <= mu;
      // stage 1: branch filters
      stb_q2 <= stb_q;
      mu_q2  <= mu_q;
      for (int a = 0; a < 2; a++) begin
        r0[a] <= v0[a]; r1[a] <= v1[a]; r2[a] <= v2[a]; r3[a] <= v3[a];
      end
      // stage 2: Horner
      out_valid <= stb_q2;
      if (stb_q2) begin
        dout.i <= sample_t'(y[0]);
        dout.q <= sample_t'(y[1]);
      end
    end
  end
endmodule
