# DS-CDMA upstream link for cable networks: digital transmitter and head-end receiver

On a cable (HFC) plant, many modems share one upstream channel. In this design each modem
spreads its QAM symbols with its own 128-chip code. The head end must then pick one burst out
of that shared channel and decode it:

- find where the code starts;
- follow a chip clock that is up to ±200 ppm off its own;
- remove a carrier offset;
- slice 64QAM.

All of this has to happen within a short preamble.

This repository holds synthesizable SystemVerilog for both ends:

- **`cdma_tx`** is an all-digital transmitter. It turns serial bits into a 12-bit DAC word at a
  programmable intermediate frequency. Pulse shaping, interpolation and up-conversion are all
  digital, so amplitude and phase are exact and the carrier can be moved freely.
- **`cdma_rx`** is a head-end baseband receiver. It takes 4-samples-per-chip I/Q from its ADCs
  and delivers Gray-coded data symbols.

`cdma_top` places the two side by side, each with its own clock and reset. The DAC, the ADCs and
the analog up- and down-conversion are outside the design; only their digital words are ports.

## Codes and constellations (`cdma_pkg`)

One symbol spans 128 chips. The code is a 127-chip maximal-length sequence from the LFSR
x^7 + x^6 + 1, with one chip of +1 appended. A user is selected by a 7-bit seed, i.e. a cyclic
shift of that sequence.

Symbols are QPSK, 16QAM or 64QAM. The per-axis levels are scaled so that all three share a peak
of 7:

| Mode | Axis levels |
|---|---|
| 64QAM | ±1, ±3, ±5, ±7 |
| 16QAM | ±2, ±6 |
| QPSK | ±4 |

The bits of each axis are Gray coded. The package also holds the filter tap tables and the
functions the testbenches use as a reference (`code_chip`, `axis_level`).

## Transmitter

```
bits -> symbol_spreader -> srrc x2 -> halfband x2 -> halfband x2 -> CIC xM -> CIC xN -> quad_mixer -> inv_sinc -> dac_out
                                                                                           ^
                                                                                   ddfs (fcw)
```

**Single clock.** Everything runs on the DAC clock. `tx_rate_gen` derives one clock enable per
rate from the run-time dividers `div_m` and `div_n`. The chip rate is f_clk / (8·M·N):

- ×2 in the square-root raised-cosine filter;
- ×4 in the two half-band filters;
- ×M and ×N in the CICs.

For example, M = 2 and N = 4 give 64 clocks per chip, so 5.12 Mchip/s from a 327.68 MHz clock.
Changing `div_m`/`div_n` changes the rate on the fly. The testbenches switch rate mid-stream.

**Spreader.** `symbol_spreader` takes serial bits through a valid/ready handshake and holds a
whole symbol. It emits 128 chips of ±level. `underflow` flags a symbol that started without
enough bits; the symbol is then sent as zero.

**Filters.**
- Pulse shaping is a 17-tap SRRC with roll-off 0.25 at 2 samples per chip.
- Each half-band filter is the 7-tap [-1 0 9 16 9 0 -1]/16.
- Both are instances of `fir_filter`, with zero stuffing done by `interp_stuffer`.
- The CICs have three stages. `cic1_shift`/`cic2_shift` divide out their gains M² and N², which
  is exact when M and N are powers of two.

**Mixing and output.**
- `ddfs` is a 32-bit phase accumulator with a 1024-entry quarter-folded sine/cosine table
  (`sincos_lut`).
- `quad_mixer` forms I·cos − Q·sin.
- `inv_sinc` is the 3-tap pre-emphasis [-1 18 -1]/16. It lifts the top of the band by about
  1.9 dB against the DAC's sin(x)/x droop.

## Receiver

### Signal flow

```
adc -> srrc (33 taps, 4 samp/chip) -> code_acq ------------------+ (restart)
                                   -> farrow_interp <- timing_processor <- first_order_lpf <- nc_dll
                                          | 2 samples/chip                                    ^
                                          +-> code_gen: on-time / half-chip labels ----------+
                                          +-> on-time -> carrier_nco -> despreader -> symbols
symbols -> carrier_init (preamble estimate, loads NCO) -> costas_loop, lock_detector, data_detector x2
```

The ADC sample rate is fixed and unrelated to the transmitter's chip clock. Samples arrive with
`adc_valid`, at most every other cycle.

### Acquisition

`code_acq` correlates the filtered samples with the whole code. Each branch is a transposed
FIR of 127·4 + 1 taps, of which 128 (one per chip, 4 samples apart) are ±1 and the rest zero,
so it needs one adder per chip and no multipliers. The magnitude is approximated by
max(|I|,|Q|) + min(|I|,|Q|)/2. Once armed, the first local maximum at or above `acq_threshold`
marks the end of a code period; one sample later `sync` restarts the timing processor, so the
interpolator starts in step with the chips within the first two symbols of the burst. The
threshold (12000 in the testbenches, for their 10-bit ADC scaling) must sit clearly above the
code's correlation sidelobes.

### Timing recovery

`farrow_interp` is a cubic Lagrange interpolator in Farrow form, with four taps and a fractional
delay mu.

`timing_processor` is a decrementing NCO in the style of Gardner:
- Its control word is W = 1/2 (two outputs per chip at four samples per chip) plus the DLL
  correction.
- Underflow gives the strobe m_k.
- mu = eta/W. Because W is close to 1/2, mu is computed as 2·eta with a shift and saturated at 1.

`code_gen` labels the interpolants alternately on-time and half-chip. It supplies the prompt,
early and late chips.

`nc_dll` is a non-coherent delay-locked loop that uses the half-chip samples:
- It forms early-minus-late (Δ) and early-plus-late (Σ) correlations per symbol.
- Its error is e = I_Δ·I_Σ + Q_Δ·Q_Σ.
- This error is insensitive to the carrier phase, so timing can lock before the carrier is known.

`first_order_lpf` smooths the error. The correction is lpf >>> `dll_shift`, saturated to
±`ADJ_MAX`. With `dll_shift` = 20 the loop tracks the −200 ppm test case.

### Carrier recovery

This is the part of the design that is easiest to get wrong.

**Feed-forward estimate.** `carrier_init` estimates phase and frequency from the despread
preamble symbols z_n, with N = 31 and lag L = 1:
- Ω = arg Σ z_n·z*_(n−1)
- θ = arg Σ z_n

Both arctangents come from one `cordic_atan`, which returns a 16-bit angle (65536 = one turn).

Summing symbols that rotate by Ω shrinks the sum by the Dirichlet kernel sin(NΩ/2)/sin(Ω/2).
For |Ω| above 2π/N that kernel is negative, which would put θ off by π. The block therefore
evaluates the kernel's sign from its own Ω and adds π where needed. It then moves θ to the last
preamble symbol and loads `carrier_nco` with phase and frequency.

**Derotation.** `carrier_nco` rotates every on-time sample by the running phase before
despreading. Derotating chips, rather than symbols, keeps the despreading gain under frequency
offset.

**Tracking.** `costas_loop` is a proportional-integral loop. Its shift gains are KP = 2 and
KI = 6. Its detector is e = Q·sgn(I) − I·sgn(Q):
- On the diagonal points of a constellation this is exactly proportional to the phase error.
- On other 64QAM points it has a data-dependent term. The loop averages that term out.

`lock_detector` declares lock after a run of small errors.

**Slicing.** The detectors need an amplitude unit. It is taken from the last preamble symbol,
which sits at (+4,+4) units: unit = (|I| + |Q|)/8. This is the first symbol the loaded NCO
derotates, so the estimate is not shortened by the frequency offset across the estimation
window. `data_detector` then slices each axis and returns the Gray-coded bits.

### Burst format

The burst format is this design's own; nothing else in the link defines one:
1. Assert `burst_start` before the burst.
2. Send N + 3 = 34 preamble symbols, all the QPSK point (+,+):
   - one for acquisition;
   - 32 for the estimator (31 products need 32 symbols);
   - one that covers the estimator's latency.
3. Every symbol after that is data in `mode`. `data_valid` pulses once per data symbol.

The receiver has no end-of-burst detection. It keeps demodulating until the next `burst_start`.

## Interfaces

`cdma_tx`:

| Port | Meaning |
|---|---|
| `mode` | modulation |
| `code_seed` | user code |
| `div_m`, `div_n` | CIC rates |
| `cic1_shift`, `cic2_shift` | CIC gain correction |
| `fcw` | carrier frequency word: f = fcw·f_clk/2^32 |
| `bit_in`, `bit_valid`, `bit_ready` | serial bit input, with handshake |
| `chip_en`, `sym_start`, `underflow` | status |
| `bb_i`, `bb_q` | baseband at the mixer input |
| `dac_out` | 12-bit signed DAC word |

`cdma_rx`:

| Port | Meaning |
|---|---|
| `mode`, `code_seed` | modulation and user code |
| `acq_threshold` | acquisition threshold |
| `dll_shift` | DLL correction shift |
| `lock_thr` | lock detector threshold |
| `burst_start` | arms the receiver before a burst |
| `adc_valid`, `adc_i`, `adc_q` | 10-bit ADC input |
| `acquired`, `est_valid`, `theta`, `omega`, `tracking`, `lock` | status |
| `timing_adj`, `dll_err`, `dll_err_valid` | DLL observation |
| `data_valid`, `data_sym`, `d_i`, `d_q`, `unit` | data symbols |

Parameter defaults are the numbers of the method: N_ACC = 31, L = 1, and the filter lengths and
loop gains above.

## Verification

Every block has a self-checking testbench `tb/<module>_tb.sv`. Each one ends with
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. The testbenches compare against bit-true
or real-valued models, for example:
- LFSR chips;
- filter convolutions;
- CIC and half-band responses;
- DDFS phase;
- Farrow interpolation against the cubic Lagrange formula;
- the Gardner NCO over random control words;
- CORDIC angles;
- the Dirichlet-sign case of the estimator.

They also check clock-enable periods against 8·M·N.

`tb/rx_signal_gen.sv` is a behavioural channel model. It produces a burst:
- shaped with SRRC at 4 samples per chip;
- with a chip-rate offset in ppm;
- with a carrier offset and initial phase;
- quantised to the 10-bit ADC.

`cdma_rx_tb` and `cdma_top_tb` use it. `cdma_top_tb` runs the top with every parameter at its
default:
- The transmitter runs in 64QAM at M = 3, N = 3, then switches to M = 2, N = 4 and a new carrier.
- The receiver decodes a 64QAM burst with −200 ppm timing offset and a carrier offset of
  0.1 turn per symbol.
- It counts each mechanism and fails any that never happens: chips at both rates, correct chip
  period, symbols without underflow, DAC activity, acquisition, one estimate, DLL updates,
  Costas corrections, lock, and 24 of 24 data symbols correct.

To run a testbench with Verilator 5, name the package file first:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/cdma_pkg.sv \
  --top-module cdma_top_tb tb/cdma_top_tb.sv
./obj_dir/Vcdma_top_tb
```

`-y` lets Verilator find every other module by its file name. The full-size `cdma_top_tb`
simulates a few hundred thousand clocks and runs in a few seconds, as do the block testbenches.

## Where the design departs from the method or is incomplete

**Analog parts are not here.** The DAC, the ADCs and the analog filters are not modelled in RTL.

**Filter specifications are not met.**
- The filters are short integer designs. The 7-tap half-band filter does not meet a
  5·10⁻³ dB passband-ripple specification; that needs a longer filter (roughly 20 to 40 taps).
- The stopband of the DAC output was not measured.

**Chip-rate range.** One clock covers a 16:1 span of chip rates with M = 2..8 and N = 3..12,
while 160 kchip/s to 5.12 Mchip/s is 32:1. The lowest rates need a slower clock, or a CIC
ratio beyond 4-bit `div_m`/`div_n`.

**Design choices of this implementation:**
- the burst framing and preamble;
- the code polynomial;
- all word widths;
- the acquisition threshold;
- the π correction of the phase estimate;
- the amplitude unit from the last preamble symbol;
- the loop gains of the DLL (`dll_shift` = 20) and of the Costas loop.

**Not tested.** The receiver was exercised without noise, multipath or ingress. Performance in
such channels has not been evaluated.
