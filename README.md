# Wideband ground receiver: from 1.28 GS/s IF samples to soft symbols

This RTL is a digital telemetry receiver for QPSK and OQPSK. It takes the
samples of an 8-bit ADC that digitises an intermediate frequency (IF) at
1.28 GS/s, delivered as eight samples per 160 MHz clock. It returns 16-bit
complex soft symbols, one per data symbol, with carrier phase and symbol
timing recovered by two digital tracking loops.

The architecture is that of the Reconfigurable Wideband Ground Receiver
(RWGR), a deep-space telemetry receiver built at JPL. This RTL implements
that architecture independently. The notes below say where it follows the
published description and where it makes its own choices.

The symbol rates cover four decades. The design therefore has two ways into
the receiver core:

* **Low rates (about 39 kBd to 40 MBd).** A *filter-decimate* front-end mixes
  the IF to baseband with a 40-bit NCO. A host-loaded table of Doppler
  predicts retunes that NCO once per second, with no feedback. A
  reprogrammable FIR then decimates by 2^k, with k from 3 to 10. Each output
  sample carries an NTP time stamp derived from the 1 pps time tag.
* **High rates.** The ADC words go *directly* to the receiver core. Its own
  open-loop mixer and coarse 1, 2 or 4:1 decimation stand in for the
  front-end.

In both cases the receiver core does the same work:

1. A quarter-band filter and a linear fine interpolator finish the
   decimation. They support any total factor D = D_C · D_F, where D_C is a
   power of two and 1 ≤ D_F < 2, so the core can reach exactly
   4 samples per symbol for any symbol rate.
2. The samples then go two ways: to an integrate-and-dump port for a
   software demodulator, and to the hardware demodulator.
3. The demodulator runs at 4 samples per symbol. Its stages are a
   closed-loop carrier NCO, a 17-tap matched filter, a timing resampler that
   produces half symbols, and Costas and Gardner tracking loops.

**Main limitation: the direct path runs at one sample per clock.** Everything
here runs in one 160 MHz clock domain, and the receiver core takes at most
one complex sample per clock. So the direct path carries at most one ADC
word every 8 clocks, which is 160 MS/s, or 40 MBd at 4 samples per symbol.
Running the core at 320 MBd would need it to take eight samples per clock,
a parallel structure this design does not contain. All the mechanisms of
the high-rate path are present and tested, but only at rates up to
160 MS/s.

## Signal path and module map

```
adc_lane[8] ──> input_router ──┬─> filter_decimate ───────────────┐ fd_valid_o/fd_y, fd_ntp
                               │    doppler_predict → nco_mixer    │
                               │    (8 lanes, 40 bit)              │
                               │    → decim_filter (2^k:1)         │
                               │    ntp_timecode                   │
                               └─> lane_serializer ──┐             │
                                                     v             v
                                   rx_frontend: source select → nco_mixer (1 lane, open loop)
                                     → coarse_decimator (1/2/4) → quarterband_filter
                                     → fine_interpolator (D_F) → gain_scaler ─┬─> integrate_dump → sw_valid/sw_y
                                                                              v
                                   demod_core: cplx_rotator (carrier NCO) → matched_filter
                                     → signal_resampler → sync_fifo ─┬─> costas_detector → loop_filter ─┐ phase
                                                                     ├─> gardner_detector → loop_filter ┐│ tau
                                                                     └─> soft_symbol_out ─> sym_valid/sym, soft_symbol_ram
```

| File | Role |
|---|---|
| `rwgr_pkg.sv` | Shared types: `cplx_t` (signed 16-bit I and Q), `path_t`, `mod_t`, default loop gains, `sat16` |
| `input_router.sv` | Sends each 8-lane ADC word to one path, registered |
| `sincos_lut.sv`, `cplx_rotator.sv` | Cosine/sine ROM (1024 phases, computed at elaboration); complex rotation by exp(−jφ) |
| `nco_mixer.sv` | Phase accumulator plus rotator for LANES samples per clock |
| `doppler_predict.sv` | Table of (UTC second, frequency word) entries; plays them back at each 1 pps epoch |
| `ntp_timecode.sv` | UTC seconds and a 160 MHz clock count turned into a 64-bit NTP timestamp |
| `decim_filter.sv` | 2^k:1 FIR with 2^(k+3) host-written taps on 8 lanes |
| `filter_decimate.sv` | Wires the four blocks above into the low-rate front-end |
| `lane_serializer.sv` | Sends an 8-lane word as 8 single samples |
| `fir_fixed.sv` | Small fixed-tap FIR with optional 2:1 decimation |
| `coarse_decimator.sv`, `quarterband_filter.sv` | Two half-band stages; 11-tap low-pass cutting off at fs/4 |
| `fine_interpolator.sv` | Linear (first-order Farrow) interpolator, 1 ≤ D_F < 2 |
| `gain_scaler.sv`, `integrate_dump.sv` | 4.12 gain; sum-and-dump by `len` samples |
| `rx_frontend.sv` | The receiver-core chain above |
| `matched_filter.sv` | 17-tap symmetric FIR, nine stored taps, pre-adders |
| `signal_resampler.sv` | 4 samples/symbol in, half symbols out, 1/16-symbol timing steps |
| `sync_fifo.sv` | Half-symbol FIFO (show-ahead) |
| `costas_detector.sv`, `gardner_detector.sv` | Error metrics for QPSK and OQPSK |
| `loop_filter.sv` | F(z) = α/(1−z⁻¹) + β/(1−z⁻¹)² |
| `soft_symbol_out.sv`, `soft_symbol_ram.sv` | Decimate by 2 with the OQPSK stagger; 4096-entry circular buffer |
| `demod_core.sv` | The demodulator with both loops closed |
| `rwgr_top.sv` | The whole receiver |

### Conventions

* **Clocking and handshakes.** There is one clock and a synchronous,
  active-high reset. Every stream is qualified by a `valid` strobe that pulses
  once per sample, and there is no back-pressure. A sample's rate is the
  rate of its strobes.
* **Complex samples.** These are `cplx_t`: signed 16-bit I and Q, full
  scale ±32767. Stages round to nearest and saturate when they narrow a
  result.
* **ADC samples.** Codes are two's complement. A code is placed in the top
  byte of the 16-bit word.
* **Configuration.** All settings are plain input ports that the host holds
  steady. The decimation exponent, the decimation taps, the matched-filter
  taps, the loop gains, the fine factor D_F and the gains are all programmable.

## The filter-decimate front-end

### Predict-driven NCO

The NCO accumulates a 40-bit phase. At 1.28 GS/s that gives a frequency
step of 1.28 GHz / 2^40 = 1.16 mHz. Eight samples arrive per clock, so
lane l uses phase `acc + l·fcw` and the accumulator steps by `8·fcw` per
word. All eight lanes therefore see one continuous oscillator.

The frequency word in force is `if_fcw + doppler_fcw`:

* `if_fcw` is the host's IF setting.
* `doppler_fcw` is the predict for the current UTC second.

Changing the word changes only the step, never the phase, so retuning is
phase continuous.

`doppler_predict` holds up to 256 entries, sorted by time. After `arm` it
compares each 1 pps epoch's `utc_sec` with the next entry:

* An entry whose second has passed is skipped.
* An entry for this second is loaded, and `doppler_update` pulses.
* A later entry waits.

Between epochs the frequency is constant: a step update at 1 Hz.

### The decimation filter

This block is the most unusual structure in the design. For D = 2^k the
filter has 8D taps:

    y[n] = Σ_{i=0}^{8D−1} h[i] · x[(n+1)D − 1 − i]

Each clock brings 8 samples, so one block of D inputs spans W = D/8
clocks. The filter is eight blocks long, so every input sample contributes
to eight different outputs.

The filter keeps **eight rotating accumulators**. In block b, accumulator j
builds output b + j. Lane l of word w in the block meets tap
`j·D + 8·(W−1−w) + (7−l)`. The taps are stored in **64 banks**: bank
(j, l) holds, at address W−1−w, the tap that accumulator j needs from lane
l. All 64 coefficients of a clock therefore come from one common address.
The hardware cost is 64 complex-by-real multiplies per clock for every k.

At the end of each block the oldest accumulator is complete. It is rounded,
shifted right by `out_shift`, saturated and sent out, then cleared for
output b + 8.

The host writes the taps as `coef_idx` = 0 … 8D−1 in natural order; the
bank mapping is internal. Changing `k` restarts all the accumulators.

The gain law for the filters is usually `H_k = 2^((k−3)/2) · G1 · H̄_k`,
where H̄_k is the nominal filter:

* ripple 0.1 dB peak to peak;
* stopband 50 dB;
* −6 dB point at 1/2^(k+1) of the input rate.

This law keeps the output level constant when input power is proportional
to symbol rate. It is a property of the coefficients the host computes, not
of the hardware. `out_shift` is an extra coarse scale.

Each output also carries the NTP time of the clock on which it left
(`fd_ntp`):

* NTP seconds = UTC seconds since 1970 + 2,208,988,800.
* The 32-bit fraction is the top half of a 64-bit accumulator. The
  accumulator steps by ⌈2^64 / 160 MHz⌉ per clock and is cleared at each pps.

Latency is 4 clocks from the word that completes a block: 2 in the mixer and
2 in the filter.

## Receiver-core front-end

`rx_frontend` picks one of two streams:

* `src = 1`: the serialized direct ADC samples. Real samples become complex
  samples with Q = 0.
* `src = 0`: the filter-decimate output.

It then runs the stream through these stages:

* **Open-loop mixer.** A 32-bit accumulator, not predict-driven. Carrier
  tracking on the direct path is left to the demodulator's Costas loop.
* **Coarse decimator.** `dec_sel` 0/1/2 gives 1:1, 2:1 or 4:1, using two
  cascaded 7-tap half-band filters (−1, 0, 9, 16, 9, 0, −1)/32.
* **OQPSK stagger.** The I/Q stagger for OQPSK is applied only to the soft
  symbols. The tracking loops get the unstaggered half symbols, because
  their OQPSK equations already index the offset arms.
* **Quarter-band filter.** An 11-tap low-pass with its cutoff at a quarter of
  its sampling rate. It can be bypassed. D_F stays below 2 and the signal is
  sampled at 4 or more samples per symbol, so this cutoff both prevents
  aliasing and keeps the whole signal band.
* **Fine interpolator.** Output n lies at input position D_F·n = q + r, and
  the output is `y = x[q] + r·(x[q+1] − x[q])`. The module does not multiply
  D_F by n. It keeps t, the position of the next output measured from the
  previous input:
  * When a sample arrives and t < 1, it emits an output with r = t and adds
    D_F − 1 to t.
  * Otherwise it only subtracts 1 from t.

  With D_F ≥ 1 there is at most one output per input. The position is exact,
  so the only error is the 16-bit quantisation of D_F.
* **Gain.** Unsigned 4.12 format.
* **Split.** The result goes both to the demodulator and to
  `integrate_dump` (sum `id_len` samples, shift by `id_shift`), whose output
  is the software-demodulator port.

To pick the settings for a symbol rate R, compute D = 1.28 GHz / (4R):

* D_C = 2^⌊log2 D⌋, split into the filter-decimate factor 2^k and the core
  factor 1, 2 or 4.
* D_F = D / D_C.

## Demodulator core (4 samples per symbol)

### Data path

1. **Carrier rotator.** A `cplx_rotator` turns the samples by the carrier
   loop's phase (10 bits, one full turn).
2. **Matched filter.** A 17-tap linear-phase FIR, spanning ±2 symbols. The
   host writes the nine distinct taps: `coef[8]` is the centre and `coef[m]`
   is the tap m places from either end. Pre-adders fold the symmetric pairs
   before the multipliers.
3. **Signal resampler** (see the next section).
4. **FIFO.** A 16-entry half-symbol FIFO, drained whenever it holds data.
5. **Soft symbols.** The odd half symbols are the on-time samples, and each
   becomes a soft symbol. For OQPSK the I arm is delayed by one half symbol,
   so a symbol pairs I[n] with Q[n+1]. The soft symbols go both to the test
   port and to a 4096-entry circular RAM, read through `ram_addr` with
   `ram_wr_ptr` showing the write position.

### Signal resampler

Conceptually, the resampler works on the matched-filter output (4 samples
per symbol) in three steps:

1. Upsample it by 4 with linear interpolation, which gives 1/16-symbol
   resolution.
2. Delay it by τ + k0 sixteenths of a symbol. τ is the Gardner loop output
   and k0 is a fixed host offset.
3. Keep every 8th point, which gives half symbols.

Only the points that survive are computed:

* The module keeps T, the time of the next output in quarter-sample units
  relative to the newest input. T drops by 4 per input.
* When T enters (−4, 0], the output is interpolated between the two newest
  inputs with weight (T+4)/4.
* T then advances by 8 plus the change in τ + k0 since the previous output.
  That change is clamped to ±3 per output, and any excess is applied on
  later outputs. So outputs never come closer than 5/4 input samples apart,
  and at most one leaves per input.
* τ + k0 wraps modulo 256 sixteenths (16 symbols), so a timing loop that
  runs on through a wrap costs nothing.
* `tim_adjust` pulses whenever an output moves off the nominal grid.

### Tracking loops

Both loops update once per four half symbols (two symbols). Let I[n] and
Q[n] be the resampler's half symbols, so that n+1 and n+3 are on time for
QPSK. Take sgn(0) = +1.

**Costas (carrier phase)**

    QPSK : Q[n+1]sgn(I[n+1]) − I[n+1]sgn(Q[n+1]) + Q[n+3]sgn(I[n+3]) − I[n+3]sgn(Q[n+3])
    OQPSK: Q[n]sgn(I[n])     − I[n+1]sgn(Q[n+1]) + Q[n+2]sgn(I[n+2]) − I[n+3]sgn(Q[n+3])

**Gardner (symbol timing)**

    QPSK : (I[n+1]−I[n−1])I[n] + (Q[n+1]−Q[n−1])Q[n] + (I[n+3]−I[n+1])I[n+2] + (Q[n+3]−Q[n+1])Q[n+2]
    OQPSK: (I[n]−I[n−2])I[n−1] + (Q[n+1]−Q[n−1])Q[n] + (I[n+2]−I[n])I[n+1]   + (Q[n+3]−Q[n+1])Q[n+2]

The Gardner sum is shifted right by 16 before filtering. Both detectors work
on the unstaggered resampler output, because their OQPSK forms already allow
for the half-symbol offset between the arms.

**Loop filter.** Each loop uses F(z) = α/(1−z⁻¹) + β/(1−z⁻¹)², built from
two wrapping 48-bit accumulators. α and β are 32-bit signed host registers.
The RWGR defaults are α = −10⁴ and β = 0 (`rwgr_pkg::ALPHA_DEFAULT`,
`BETA_DEFAULT`).

**Wiring the loops.** Two choices make these defaults work:

* The carrier phase sent to the rotator is the **negated** loop output
  `−lf[CAR_LSB +: 10]`. The rotator removes phase φ, and the Costas error is
  positive when residual phase is positive. Negating the output lets a
  negative α give negative feedback.
* The timing estimate is `τ = lf[TIM_LSB +: 8]`.

`CAR_LSB = TIM_LSB = 24` set the effective loop gain. With half symbols of a
few thousand LSB and α = −10⁴, both loops lock in a few hundred symbols. The
loop gain scales with the signal level, so set `gain` (or α) for the level
you have.

**Loop delay.** Each loop has a loop delay L, counted in loop updates:
L_C = 5 for the Costas loop and L_G = 7 for the Gardner loop, the RWGR's
values (parameters
`L_C`, `L_G` of `demod_core`). The path from detector to estimate takes one
update by itself. A shift register then delays each error by L − 1 more
updates before it reaches the loop filter. The linearised loop is therefore
A·z^−L·F(z) with the RWGR's L, so loop bandwidths computed for the RWGR
from α, β and the loop gain apply here too.
`demod_core_tb` measures both delays.

## Where this design departs from the RWGR architecture

* **Direct-path throughput.** The direct path takes one sample per clock
  (160 MS/s) instead of 1.28 GS/s, so symbol rates are limited to 40 MBd.
  No parallel receiver core is provided.
* **Link between the front-end and the core.** The filter-decimate output
  reaches the core by a direct wire in the same clock domain, not over a
  multi-gigabit serial link.
* **Gardner equation, two terms.** The published equation has two terms
  that do not follow its own pattern. The QPSK third term was printed as
  `(Q[n+3] − I[n+1]) I[n+2]` and is used here as
  `(I[n+3] − I[n+1]) I[n+2]`. The OQPSK last term was printed with `Q[n]`
  and is used here with `Q[n+2]`.
* **OQPSK stagger.** The I/Q stagger for OQPSK is applied only to the soft
  symbols. The tracking loops get the unstaggered half symbols, because
  their OQPSK equations already index the offset arms.
* **Quarter-band filter.** "Quarter band" is read as a cutoff at a quarter
  of the sampling rate.
* **This design's own parts and sizes**, none of which are part of the
  published RWGR description:
  * the coarse-decimation half-band filters;
  * the quarter-band taps;
  * the predict table format and depth (256);
  * the NTP fraction method;
  * all word widths;
  * the FIFO depth (16) and RAM depth (4096).
* **Outside the RTL.** The ADC, the 1:8 demultiplexer, the software
  demodulator and the frame synchronizer/decoder are not included. Their
  signals are top-level ports.

## Simulating

Every block has a self-checking testbench in `tb/<module>_tb.sv`. Each one:

* compares the block with an independent model;
* checks latencies;
* ends with a line `TB_RESULT checks=N failures=M`;
* contains a watchdog.

The shared macros are in `tb/tb_macros.svh`. With Verilator 5, from the
directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/rwgr_pkg.sv rtl/*.sv tb/rwgr_top_tb.sv --top rwgr_top_tb -o sim
./obj_dir/sim
```

Put `rwgr_pkg.sv` first: the other files import it. Verilator warns about
the duplicate, which is harmless; or list the files explicitly. For a single
block, replace the testbench and `--top`.

`rwgr_top_tb` runs the whole receiver with every parameter at its default,
in about 20 s:

* **Filter-decimate path.** A QPSK signal at 1/32 of the ADC rate on a
  f_s/4 IF, with Doppler. Two 1 pps epochs load two predicts. The path runs
  at k = 3 with 64 windowed-sinc taps.
* **Direct path.** An OQPSK signal at 1/24 of the ADC rate. The path uses
  coarse decimation by 4 and D_F = 1.5.

In both parts the last 300 soft symbols must decode without errors (up to
the phase ambiguity and the delay) and sit at ±45°. The RAM is read back
against the test port. The test also counts each mechanism and fails if one
never happened: predict updates, both router paths, time-coded outputs,
coarse decimation, interpolator drops, resampler timing moves,
integrate-and-dump outputs, and both constellations.

`rwgr_rates_tb` runs QPSK through the filter-decimate path at three symbol
rates: 32, 6.67 and 2.86 MBd (D = 10, 48 and 112, with k = 3, 4 and 6).
The decimation taps follow the 2^((k−3)/2) gain rule and the input
amplitude falls with the rate. The test checks decoding, that the
demodulator gets 4 samples per symbol, and that the soft-symbol level stays
the same across rates.

`rwgr_gmsk_tb` receives GMSK with BT = 0.5 and BT = 0.25 in OQPSK mode,
where one OQPSK symbol spans two bits. The matched filter holds the first
amplitude-modulated pulse C0 of the GMSK signal. Both cases decode. As
expected from the weaker C0 dominance, BT = 0.25 leaves about four times
the soft-symbol dispersion.

`rwgr_pulse_tb` covers square-root raised-cosine pulses with roll-off 0.5
and 0.35, using a matched filter that is the pulse truncated to ±2 symbols.
It runs QPSK, then 16-QAM with the QPSK loops. All three cases decode. The
0.35 pulse decays more slowly, so the truncated filter leaves more
intersymbol interference and more soft-symbol dispersion than with 0.5.

`demod_core_tb` locks both loops, for QPSK and for OQPSK, at the default
α, and measures the loop delays. `decim_filter_tb` checks k = 3, 4, 5 and 10 at the default `KMAX = 10`.
`filter_decimate_tb` instantiates the front-end at its default sizes (KMAX = 10).
