# Symbol boundary and carrier frequency offset synchronisation for an 802.16e OFDMA downlink

A mobile WiMAX receiver has one preamble symbol at the start of each downlink frame. Before that
symbol ends, the receiver must know two things: where the OFDM symbols start, and how far its
local oscillator is off in frequency. This RTL finds both from the preamble, then corrects the
frequency error on every sample that follows. The target profile is the 10 MHz channel:
1024-point FFT, 1/8 cyclic prefix (128 samples), 11.2 MHz sampling. The offset may be up to
±3 subcarrier spacings plus a fraction.

The offset is split into an integer part (ICFO) and a fractional part (FCFO):

* **Integer part and timing, together.** An integer offset of k subcarriers turns the known
  time-domain preamble into a copy rotated by `exp(j2πkn/N)`. Correlating the received stream
  against seven pre-rotated copies (k = −3..+3) gives a peak only at the right sample *and* at
  the right k. One correlator therefore finds the symbol boundary and the coarse ICFO at once.
* **Fractional part.** The cyclic prefix repeats the last 128 samples of the symbol. Multiplying
  each CP sample by the conjugate of the sample 1024 earlier, and summing over the prefix, gives
  a phasor whose angle is 2π·ε, where ε is the fractional offset.
* **Correction.** An NCO turns the total estimate into a rotating phasor, and a derotator
  multiplies every incoming sample by it.

The most unusual parts are the correlator, which uses almost no arithmetic, and the way the
integer decision is made robust. Those get the most room below.

## Block map

```
in_re/in_im ─► derotator ─┬─► quantizer ─► corr_bank ─► boundary_finder ─► sync_ctrl
     ▲                    │               (7 hyps)  └─► icfo_storage ────► icfo_decision ─┐
     │                    └─► fcfo_estimator ─► cordic (vectoring) ─► fcfo ───────────────┤
    nco ◄────────────────────────────── nco_freq = −(icfo·2^16 + fcfo) ◄──────────────────┘

pilot_* (from an FFT) ─► sco_estimator ─► sco_est
```

| file | what it is |
|---|---|
| `sync_pkg.sv` | sizes, the `qsym_t` two-bit sample type, controller states, CORDIC angle table |
| `quantizer.sv` | 10-bit sample → {−1, 0, +1} per component, dead zone set by `q_thresh` |
| `corr_delay_line.sv` | 300-tap shift register of two-bit samples plus a running zero count |
| `corr_unit.sv` | one real correlation: matches counted, no signed arithmetic |
| `coef_store.sv` | sign bits of the seven rotated preambles, two halves each |
| `corr_bank.sv` | two delay lines, four correlation units, hypothesis sequencer, energy |
| `boundary_finder.sv` | running maximum over 200 window positions |
| `icfo_storage.sv` | seven-register hold/shift chain, second-half accumulation, two largest |
| `icfo_decision.sv` | ping-pong choice between two adjacent peaks |
| `spram.sv`, `twister_delay.sv` | 1024-sample delay from two 512-word single-port memories |
| `cmult3.sv` | `a·conj(b)` with three multipliers |
| `fcfo_estimator.sv` | CP cross-correlation accumulator |
| `cordic.sv` | unrolled, pipelined CORDIC, rotation or vectoring mode |
| `nco.sv` | phase accumulator + rotation CORDIC → cos/sin |
| `derotator.sv` | complex multiply by the NCO phasor, round and saturate to 10 bits |
| `sync_ctrl.sv` | sequencing and block enables |
| `sco_estimator.sv` | sampling clock offset from FFT pilots four symbols apart |
| `wman_sync_top.sv` | everything wired together |

## The three-level correlator

A straightforward matched filter of length 300 would need 300 complex multipliers per
hypothesis. Three simplifications remove them:

1. **Coefficients are signs.** Each rotated preamble sample is replaced by the sign of its real
   part (C) and of its imaginary part (D), stored as one bit each (1 means −1). A well-designed
   preamble still correlates sharply.
2. **Samples are three-level.** Each received component becomes −1, 0 or +1. The `quantizer`
   sets a component to 0 when its magnitude is below `q_thresh`, and otherwise keeps its sign.
   Set `q_thresh` to about half the rms value of a component. With a much smaller threshold,
   almost no sample is 0 and the samples are in effect one bit. The ICFO decision then depends
   on the carrier phase. For example, at an offset of −0.1 subcarrier and a phase near 45°,
   the neighbouring hypothesis wins. A floating-point model of the same quantised correlation
   shows the same errors, so they come from the quantisation, not from the logic.
   A sample is two bits (`{neg, pos}`), so the 300-tap delay line is only 600 bits per
   component.
3. **No signed sums.** The complex correlation is Σ(A+jB)(C−jD), with Re = AC+BD and
   Im = BC−AD. Each of the four real products contributes +1, −1 or 0 per tap. Instead of a
   signed adder tree, `corr_unit` counts the taps where the sample *matches* the coefficient
   sign. With `z` taps holding zero,

   ```
   sum = matches − mismatches = matches − (L − z − matches) = 2·matches + z − L
   ```

   The match count is an unsigned popcount of 300 bits, one AND-OR term per tap. The zero
   count `z` is not counted over the taps each time. `corr_delay_line` keeps it as a register
   that starts at 300 (all taps empty), adds one when a zero enters and subtracts one when a
   zero leaves. The constant −L and the doubling are applied once, at the end.

`corr_bank` has two delay lines (real and imaginary samples) and four correlation units
(A·C, B·D, B·C, A·D). It evaluates the seven hypotheses one per clock cycle, reading a
different coefficient vector each cycle. The energy `Re² + Im²` is used as the magnitude.

### Timing

The design has a single clock, which plays the role of the fast correlator clock (seven times
the sample rate; 83.3 MHz for 11.9 MHz sampling in the reference implementation). `in_valid`
marks a received sample. Samples must be **at least 7 cycles apart**: the bank asserts that no
new sample arrives while a hypothesis sweep is still running. In `corr_bank`, the result for
hypothesis k of a sample appears k+2 cycles after its `in_valid`, with `res_last` on k = 6.
The slow and fast clock domains of the reference implementation are therefore one clock with
an enable here.

## Finding the boundary

The first 299 samples after `start` only fill the delay line. From sample 299 on, each sample
completes a 300-sample window, and `boundary_finder` compares its seven energies with the
largest seen so far. It keeps the position (`best_n`), the hypothesis (`best_hyp`, the coarse
ICFO) and the energy. After 200 positions the search ends. The symbol boundary, i.e. the first
sample of the cyclic prefix, is `best_n − 299`.

The window covers the first 300 samples of the preamble's CP and body. The preamble must
therefore start within the first 200 samples after `start`.

## Making the integer decision robust

With 300 taps and three-level arithmetic, a single correlation peak is not reliable enough for
the ICFO. This matters most when the true offset lies near the midpoint between two integers.
Two mechanisms handle it.

**Second half (`icfo_storage`).** The seven energies of the best position are kept. Exactly
300 samples after that position, the bank correlates the *next* 300 preamble samples (the
second coefficient half) for the same seven hypotheses. Each second-half energy is added to the
stored first-half energy of the same hypothesis.

In hardware this is a chain of seven registers, each with a mux:

* in *hold* mode the registers recirculate;
* in *shift* mode they pass values along, so the value leaving the last register always
  belongs to the hypothesis now arriving from the bank.

Results arrive one per cycle. Whether a sample is the new maximum is only known after its
seventh result, so a second, always-shifting copy of the chain exists. When `boundary_finder`
reports a new maximum, that copy is loaded in parallel into the hold chain. The sums go through
a compare stage that keeps the two largest and their hypotheses.

**Ping-pong (`icfo_decision`).** When the fractional estimate ε is near ±0.5 (here
|ε| ≥ 0.25, the *weak region*), two neighbouring hypotheses give similar peaks. The fractional
estimate then decides between them:

* if ε > 0, the true offset is `lower + ε`, so the lower of the two adjacent peaks is taken;
* if ε < 0, the upper one is taken.

Example: the true offset is 1.42 and the largest peak falls at 2. The estimate would be
2 + 0.42 = 2.42, which is inconsistent with the second peak at 1, so 1 is chosen. In the
strong region, or when the two largest peaks are not adjacent, the largest peak is taken.
`weak_region` and `peak_swapped` report what happened.

## Fractional offset

`fcfo_estimator` forms Σ r(n)·conj(r(n−1024)) over the 128 CP samples
n = B+1024 … B+1151, where B is the boundary. The controller knows the window as soon as B is
known. It gates the multiplier input to zero outside the window (`fcfo_enable`), so a single
accumulator register does the sum instead of a 128-tap moving sum.

* **1024-sample delay (`twister_delay`).** The delay is two 512-word single-port memories used
  alternately. Sample t is written to bank `t mod 2` at address `t/2`. In the same cycle, the
  other bank reads address `(t+1)/2`, which holds sample t−1023; it is presented as
  `dout` at the next enable, 1024 samples late. Each memory makes one access per sample, so
  single-port memories suffice.
* **Multiplier (`cmult3`).** The complex multiply uses three real multipliers:
  `Re = AC+BD`, `Im = (A+B)(C−D) − AC + BD`.
* **Angle.** The accumulated phasor (29-bit components) goes to a vectoring `cordic` with 15
  iterations. Its angle is the 16-bit FCFO: 2^16 is one full turn, which is one subcarrier
  spacing of offset.

## NCO and derotator

`nco` accumulates a 26-bit frequency word each sample. The word is in units of 2^−16
subcarrier spacings, so a phase step of `f/2^26` of a turn is 2π·f/2^16/1024 per sample. The
top 16 bits address a rotation-mode CORDIC, which rotates (2047, 0) by that phase. The CORDIC
gain is pre-compensated, and four guard bits are rounded off at the end. The result is cos/sin
as 12-bit numbers with amplitude 2047. Sixteen phase bits satisfy the usual bound for a 12-bit
function generator, W_A > W_FG + 1 + log2 π ≈ 14.7.

`derotator` computes `(in_re·cos − in_im·sin, in_re·sin + in_im·cos)` with four multipliers. It
rounds by 2^11 and saturates to 10 bits, with one register stage.

After the decision, the top loads `nco_freq = −(icfo·2^16 + fcfo)`, and from then on the
derotator output is corrected. The estimators see the derotator output too. The NCO word is
zero until the first decision.

## Sampling clock offset

A sampling clock that runs slow by a fraction t makes subcarrier k of symbol l turn by an angle
proportional to k·t·l. `sco_estimator` works on the pilots at the FFT output.

* **Correlation.** Each pilot is correlated with the same pilot four symbols earlier,
  Z = R(l,k)·conj(R(l−4,k)). The channel and the pilot value cancel, and the phase left is
  2π·k·t·4·(1 + CP/N).
* **Two halves.** The Z of the negative-frequency pilots and of the positive-frequency pilots
  are summed separately, and two vectoring CORDICs give their angles φ1 and φ2.
* **Estimate.** t = (φ2 − φ1) / (2π · 4 · (1 + CP/N) · K/2), where K/2 = 420 is the distance
  between the centres of the two halves of the 840 used subcarriers. The scale is a constant
  multiplier. `sco_est` is t in units of 2^−40, and `sco_phase` is φ2 − φ1.
* **History.** The four-symbol history is one single-port memory (4 banks × 128 pilot slots).
  Each pilot reads its slot, then overwrites it with the new value.

Interface rules:

* The FFT side must give every pilot a slot number that names the same subcarrier four symbols
  later, and the same pilot value there.
* It flags each pilot as positive-frequency (`pilot_right`) and marks the last pilot of a
  symbol (`pilot_last`).
* Pilots must be at least two cycles apart.
* An estimate comes 19 cycles after each `pilot_last`, from the fifth symbol after `start` on.
* Nothing in this design closes the loop to the sampling clock.

## Controller

`sync_ctrl` counts samples from `start` and steps through:

| state | active blocks | leaves when |
|---|---|---|
| `ST_IDLE` | none | `start` |
| `ST_SEARCH` | bank, CP delay | 200 positions searched → sets boundary and second-half sample |
| `ST_ACC2` | bank (second-half sample), CP delay | seven second-half sums done |
| `ST_FCFO` | CP delay, multiplier in the window | last CP sample accumulated |
| `ST_ANGLE` | CORDIC (started after 3 settle cycles) | angle ready |
| `ST_DECIDE` | ping-pong decision | decision registered |
| `ST_TRACK` | NCO and derotator only | a new `start` |

The correlation bank and the delay lines are clock-enabled only in the states that need them.
`start` clears all estimates and restarts the search from any state.

## Interface of `wman_sync_top`

* `clk`, `rst_n` (asynchronous, active low), `start`.
* `pilot_valid`, `pilot_re`, `pilot_im`, `pilot_slot`, `pilot_right`, `pilot_last` in, and
  `sco_valid`, `sco_phase`, `sco_est` out: the SCO estimator (see above).
* `in_valid`, `in_re`, `in_im`: 10-bit received samples, at most one every 7 cycles.
* `q_thresh`: the quantiser dead zone.
* `coef_we`, `coef_half`, `coef_hyp`, `coef_idx`, `coef_c`, `coef_d`: write one coefficient.
  * `coef_hyp` is 0..6 for k = −3..+3, and `coef_idx` is 0..299 within the half.
  * `coef_c` and `coef_d` are the sign bits (1 means negative) of the real and imaginary parts
    of `P(s)·exp(j2πks/1024)`.
  * P is the known time-domain preamble including its CP, and s = 300·half + idx.
* `out_valid`, `out_re`, `out_im`: the derotated stream.
* `state`, `boundary_valid`, `boundary` (sample index of the CP start, counted from the sample
  after `start`), `coarse_hyp`, `cfo_valid`, `icfo` (−3..+3), `fcfo` (2^16 = one subcarrier),
  `weak_region`, `peak_swapped`, `nco_freq`.

## Where this design departs from the reference architecture

* **One clock with an enable** instead of a sample-rate clock and a 7× clock.
* **Magnitude is Re² + Im².** The simpler |Re| + |Im| was tried. At offsets near half a
  subcarrier, its phase-dependent error of up to ~40 % picked the wrong neighbour.
* **Candidate chain.** A second shifting copy of the seven results is kept so that a new
  maximum can be captured after the fact (see above).
* **Non-coherent combination.** The two halves are combined by adding energies, not complex
  sums.
* **Coefficients are written in**, not fixed in logic, because they depend on which preamble
  (segment and cell) is expected.
* **Fixed choices** where the reference gives no number:
  * the quantiser threshold is a port;
  * the weak-region border is 0.25;
  * non-adjacent peaks keep the largest;
  * CORDIC iteration counts and internal widths are our own.
* **The controller's states are this design's own.** The order follows the algorithm.
* **Not built:**
  * the low-power differential-coefficient gate in the correlation unit. It changes switching,
    not function;
  * the interpolator and its controller, and the loop filter between the SCO estimate and the
    interpolator;
  * the FFT and everything after it.

  The derotated stream and `boundary` are where an FFT would connect. The SCO estimator takes
  its pilots from ports.
* The NCO word is loaded once per acquisition. There is no tracking loop.

## Simulation

Every block has a self-checking testbench `tb/tb_<block>.sv` that prints
`TB_RESULT checks=… failures=…`. Two system tests run at full size:

* `tb_wman_sync_top` sends ten frames in light noise.
  * The offsets are 2.10, 1.42, −0.30, −2.80, 1.49, −1.55, −1.50 (twice), 0.90 and −0.10
    subcarriers.
  * The carrier phase advances by 0.9 rad per frame.
  * Two frames put the preamble at the first and at the last search position (delays 0 and
    199).

  It checks:
  * the boundary to ±1 sample;
  * the total estimate to 0.03 subcarrier;
  * the NCO word;
  * that the output no longer rotates.

  It also counts the search, capture, second-half, CP window, weak- and strong-region and
  ping-pong-swap events, and fails if any never happens. It then sends six symbols of pilots
  with a 25 ppm sampling offset and checks the two SCO estimates to 5 %.
* `tb_wman_multipath` puts the preamble through six static paths with the Vehicular A power
  profile and delays up to 50 samples, plus a second transmit antenna with another preamble.
  It checks that the boundary lands on one of the paths and that the estimate is within 0.05.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/sync_pkg.sv tb/tb_wman_sync_top.sv \
          -y rtl --top-module tb_wman_sync_top
./obj_dir/Vtb_wman_sync_top
```

Replace the testbench file and top name for any other test. Each system test takes about a
second.

## Known limits

* The correlation covers 300 samples and the search 200 positions. Both are parameters
  (`CORR_LEN`, `SEARCH_LEN` in the package), but the coefficient table must match.
* Other FFT sizes and CP ratios need `N_FFT`, `CP_LEN` and the widths of the sample counters
  (`NW`) changed together.
* The statistical performance has not been measured here: error rates over SNR, Doppler at
  120 km/h, and random multipath. The tests are spot checks.
* `corr_bank` and `sco_estimator` use `rst_n` both as the asynchronous reset and in the
  `disable iff` of an assertion on the input spacing. Lint reports this as a mixed synchronous/asynchronous use. The assertion is not
  synthesised.
