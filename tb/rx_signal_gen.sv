// rx_signal_gen: behavioural model of one S-CDMA burst as the head-end ADCs
// see it, used by the receiver testbenches.
//
// Chips are square-root raised-cosine pulses (roll-off 0.25, truncated to
// +-4 chips) of the symbol level times the user's code chip
// (cdma_pkg::code_chip), as the transmitter's pulse shaper sends them. The ADC samples 4 times per nominal chip, one
// sample every SDIV clocks, but the transmitter's chip period is off by
// PPM parts per million, so the sample instants drift through the chips.
// The complex baseband is rotated by a carrier phase PHI0 + OMEGA * t, t in
// symbols. The burst starts with PRE symbols of the QPSK point (+4,+4)*U,
// followed by NDATA random symbols of the given modulation. The Gray bits of
// each data symbol are kept in bits_i / bits_q for checking. Before the
// burst, LEAD samples of silence are sent.
module rx_signal_gen
  import cdma_pkg::*;
#(
  parameter int  SDIV   = 2,
  parameter real PPM    = -200.0,
  parameter real OMEGA  = 0.6283,
  parameter real PHI0   = 1.0,
  parameter real U      = 32.0,
  parameter int  PRE    = 34,
  parameter int  NDATA  = 40,
  parameter int  LEAD   = 37,
  parameter real DELAY  = 0.3
) (
  input  logic              clk,
  input  logic              go,
  input  mod_t              mode,
  input  logic [6:0]        seed,
  output logic              adc_valid,
  output logic signed [9:0] adc_i,
  output logic signed [9:0] adc_q,
  output logic              done
);
  localparam int NSYM = PRE + NDATA;
  logic [2:0] bits_i [NDATA];
  logic [2:0] bits_q [NDATA];
  int  lvl_i [NSYM];
  int  lvl_q [NSYM];
  logic code [CODE_LEN];

  function automatic real srrc(real t);
    real b, pi, x;
    b  = 0.25;
    pi = 3.141592653589793;
    if (t < 1.0e-9 && t > -1.0e-9) return 1.0 - b + 4.0 * b / pi;
    x = 4.0 * b * t;
    if (x * x > 0.999999 && x * x < 1.000001)
      return b / $sqrt(2.0) * ((1.0 + 2.0 / pi) * $sin(pi / (4.0 * b)) +
                                (1.0 - 2.0 / pi) * $cos(pi / (4.0 * b)));
    return ($sin(pi * t * (1.0 - b)) + x * $cos(pi * t * (1.0 + b))) /
           (pi * t * (1.0 - x * x));
  endfunction

  function automatic int lvl_of(mod_t m, logic [2:0] g);
    logic signed [3:0] l;
    l = axis_level(m, g);
    return int'(l);
  endfunction

  // 10-bit converter with saturation
  function automatic logic signed [9:0] adc(real v);
    int r;
    r = $rtoi($floor(v + 0.5));
    if (r > 511) r = 511;
    if (r < -512) r = -512;
    return 10'(r);
  endfunction

  initial begin
    adc_valid = 1'b0;
    adc_i = '0;
    adc_q = '0;
    done  = 1'b0;
  end

  initial begin
    int  k, cyc;
    real t, ts, re, im, ph, a_i, a_q;
    int  chip, sym;
    @(posedge go);
    for (int c = 0; c < CODE_LEN; c++) code[c] = code_chip(seed, c);
    for (int s = 0; s < NSYM; s++) begin
      if (s < PRE) begin
        lvl_i[s] = 4;
        lvl_q[s] = 4;
      end else begin
        logic [2:0] gi, gq;
        gi = 3'($urandom_range(0, 7));
        gq = 3'($urandom_range(0, 7));
        if (mode == MOD_QPSK) begin gi &= 3'b001; gq &= 3'b001; end
        if (mode == MOD_QAM16) begin gi &= 3'b011; gq &= 3'b011; end
        bits_i[s-PRE] = gi;
        bits_q[s-PRE] = gq;
        lvl_i[s] = lvl_of(mode, gi);
        lvl_q[s] = lvl_of(mode, gq);
      end
    end
    ts = 0.25 * (1.0 + PPM * 1.0e-6);   // sample period in (transmitter) chips
    k = 0;
    forever begin
      for (cyc = 0; cyc < SDIV - 1; cyc++) begin
        @(posedge clk);
        adc_valid <= 1'b0;
      end
      @(posedge clk);
      t = real'(k - LEAD) * ts - DELAY;
      a_i = 0.0;
      a_q = 0.0;
      chip = $rtoi($floor(t));
      for (int c = chip - 4; c <= chip + 5; c++) begin
        if (c >= 0 && c < NSYM * CODE_LEN) begin
          real pv, sg;
          sym = c / CODE_LEN;
          pv  = srrc(t - real'(c) - 0.5);
          sg  = code[c % CODE_LEN] ? -1.0 : 1.0;
          a_i += U * real'(lvl_i[sym]) * sg * pv;
          a_q += U * real'(lvl_q[sym]) * sg * pv;
        end
      end
      if (t > real'(NSYM * CODE_LEN + 8)) done <= 1'b1;
      ph = PHI0 + OMEGA * t / real'(CODE_LEN);
      re = a_i * $cos(ph) - a_q * $sin(ph);
      im = a_i * $sin(ph) + a_q * $cos(ph);
      adc_valid <= 1'b1;
      adc_i <= adc(re);
      adc_q <= adc(im);
      k++;
    end
  end
endmodule
