// carrier_init: feed-forward, data-aided carrier phase and frequency
// estimation on the burst preamble.
//
// The preamble is a run of identical symbols at 45 degrees (I = Q > 0). With
// z_n the correlator (despreader) outputs of the preamble, n = 0..N,
//   Omega = atan( sum_{n=1..N} z_n z*_{n-1} )     (frequency, rad/symbol, L = 1)
//   theta = atan( sum_{n=1..N} z_n ) - pi/4       (phase at the window centre)
// with N = 31, the document's accumulation length; the 1/N factors cancel in
// the arctangent. The -pi/4 removes the known preamble phase. One CORDIC
// (cordic_atan) computes both arctangents in turn. Omega is unambiguous for
// |Omega| < pi (pi/L).
//
// The rotating preamble sums with the weight sin(N Omega/2) / sin(Omega/2)
// about the window centre; when that weight is negative (sin(N|Omega|/2) < 0)
// the arctangent is off by pi, so pi is added back.
//
// Because the window centre is symbol (N+1)/2, the carrier phase at the
// start of symbol N+2 (the first symbol after the estimation finishes) is
//   phase0 = theta + Omega * (N+2) / 2.
// The receiver loads its NCO with phase0 and Omega there. Angles are signed
// fractions of a turn, 2^16 = 2 pi.
//
// Interface: start clears and arms; z_valid brings one symbol. est_valid
// pulses once ~2*(ITER+2) cycles after symbol N. amp is the CORDIC-scaled
// magnitude of sum z_n (1.6468 * N * |z|), which the receiver uses as an
// amplitude reference for the data detectors.
module carrier_init
  import cdma_pkg::*;
#(
  parameter int N_ACC = 31,
  parameter int ACC_W = 40
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               z_valid,
  input  iq_t                z,
  output logic               est_valid,
  output logic signed [15:0] theta,
  output logic signed [15:0] omega,
  output logic signed [15:0] phase0,
  output logic [ACC_W+1:0]   amp,
  output logic               busy
);
  typedef enum logic [2:0] {S_IDLE, S_ACC, S_FREQ, S_WAIT_F, S_PHASE, S_WAIT_P} state_t;
  state_t st;

  logic signed [ACC_W-1:0] sz_i, sz_q, sf_i, sf_q;
  iq_t                     zp;
  logic [5:0]              n;
  logic                    c_start, c_done, c_busy;
  logic signed [ACC_W-1:0] c_x, c_y;
  logic signed [15:0]      c_ang;
  logic [ACC_W+1:0]        c_mag;
  logic signed [ACC_W-1:0] pr_i, pr_q;   // z_n * conj(z_{n-1})
  logic signed [31:0]      adv;
  logic [31:0]             kern;   // N |Omega| / 2, turns * 2^16
  logic [15:0]             flip;

  always_comb begin
    pr_i = ACC_W'(z.i) * ACC_W'(zp.i) + ACC_W'(z.q) * ACC_W'(zp.q);
    pr_q = ACC_W'(z.q) * ACC_W'(zp.i) - ACC_W'(z.i) * ACC_W'(zp.q);
    c_start = (st == S_FREQ) || (st == S_PHASE);
    c_x = (st == S_FREQ) ? sf_i : sz_i;
    c_y = (st == S_FREQ) ? sf_q : sz_q;
    adv = (32'(omega) * 32'(N_ACC + 2)) >>> 1;
    kern = (32'(omega[15] ? -omega : omega) * 32'(N_ACC)) >> 1;
    flip = kern[15] ? 16'h8000 : 16'h0000;
  end

  cordic_atan #(.IN_W(ACC_W)) u_cordic (
    .clk, .rst_n, .start(c_start), .x(c_x), .y(c_y),
    .angle(c_ang), .mag(c_mag), .done(c_done), .busy(c_busy));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      sz_i <= '0; sz_q <= '0; sf_i <= '0; sf_q <= '0;
      zp <= '0; n <= '0;
      est_valid <= 1'b0;
      theta <= '0; omega <= '0; phase0 <= '0; amp <= '0;
    end else begin
      est_valid <= 1'b0;
      if (start) begin
        st <= S_ACC;
        sz_i <= '0; sz_q <= '0; sf_i <= '0; sf_q <= '0;
        n <= '0;
      end else begin
        case (st)
          S_ACC: if (z_valid) begin
            zp <= z;
            n  <= n + 6'd1;
            if (n != 6'd0) begin
              sz_i <= sz_i + ACC_W'(z.i);
              sz_q <= sz_q + ACC_W'(z.q);
              sf_i <= sf_i + pr_i;
              sf_q <= sf_q + pr_q;
            end
            if (int'(n) == N_ACC) st <= S_FREQ;
          end
          S_FREQ:   st <= S_WAIT_F;
          S_WAIT_F: if (c_done) begin
            omega <= c_ang;
            st    <= S_PHASE;
          end
          S_PHASE:  st <= S_WAIT_P;
          S_WAIT_P: if (c_done) begin
            theta     <= c_ang - 16'sd8192 + flip;
            phase0    <= 16'(c_ang - 16'sd8192 + flip + 16'(adv));
            amp       <= c_mag;
            est_valid <= 1'b1;
            st        <= S_IDLE;
          end
          default: ;
        endcase
      end
    end
  end

  assign busy = (st != S_IDLE) || c_busy;
endmodule
