# Multi-level QAM demodulator with wideband carrier recovery and a dual-mode equalizer

This is a cable-modem style QAM receiver back end for 4-, 16-, 64- and 256-QAM.
It takes IF samples from an ADC and delivers decoded I/Q symbol decisions. It
addresses two weak points of such receivers:

* **Carrier-frequency offset.** An inaccurate analog tuner leaves a frequency
  offset that an ordinary decision-directed phase detector cannot pull in.
  That detector works only while the phase error stays below half the angular
  spacing of neighbouring points, which is a few degrees at 64/256-QAM. The
  phase detector here uses the *power* of the received sample to guess which
  points could have been sent. It then measures the phase error against those
  points, so it works over +/-45 degrees whatever the QAM order. Its errors
  drive two loops:
  * an inner, fully digital phase loop (APC), which rotates the signal with an NCO;
  * an outer frequency loop (AFC), whose output goes off chip to retune the analog tuner.
* **Multipath echoes.** A decision-feedback equalizer (8 feedforward and 16
  feedback taps) can run its feedforward part *T-spaced* (one sample per
  symbol) or *T/2-spaced* (two samples per symbol). Both modes run from the same
  symbol-rate clock. T/2 mode costs only two selectors and a falling-edge
  register stage, not a double-speed datapath.

The whole data path is synchronous logic in SystemVerilog. It is parameterised
around one shared package, `qam_pkg`.

## Signal flow

```
            clk_s (4 samples/symbol)                       clk_sym = clk_s/4
 in_s --> quad_mixer --> srrc_filter (I) --\
 (IF at   (fs/4 LO)  \-> srrc_filter (Q) ---> phase_derotator --> dfe --> diff_decoder --> i_out, q_out
  fs/4)                 (decimate to 2 sps)        ^     |          |
                                                 nco    |          +--> phase_detector --> loop_select
                                                   ^     +--> agc ---------> agc_out          |      |
                                                   |     +--> clock_recovery --> clock_out    v      v
                                                   +------------------------------ apc_loop_filter  afc_loop_filter --> afc_out
 scl/sda <--> serial_bus_if (control register: QAM order, T or T/2, loop select, adaptation; status: lock)
```

The blocks and their jobs:

| module | job |
|---|---|
| `qam_pkg` | Widths, types, slicer helpers. Computes its sine, filter and power-ring tables at elaboration. |
| `nco` | 24-bit phase accumulator with a quarter-wave 10-bit sine/cosine table. |
| `quad_mixer` | Brings the fs/4 IF down to baseband I/Q, using an `nco` as its local oscillator. |
| `srrc_filter` | 49-tap root-raised-cosine receive filter (roll-off 0.15), 4 to 2 samples/symbol. |
| `phase_derotator` | Complex multiply by the NCO phasor of the carrier loop. |
| `dfe_ff_filter` | The dual-mode 8-tap feedforward section. |
| `dfe` | Feedforward plus 16 feedback taps, slicer, LMS adaptation. |
| `phase_detector` | Power-based +/-45 degree phase detector. |
| `loop_select` | Routes detected errors to the APC and/or AFC loop; lock detector. |
| `apc_loop_filter` | PI loop filter; sets the NCO frequency. |
| `afc_loop_filter` | Integrator; output to the tuner as a pulse-density bit stream. |
| `agc` | Level detector, pulse-density gain-control output. |
| `clock_recovery` | Gardner timing-error detector and integrator, pulse-density output for the sampling-clock oscillator. |
| `diff_decoder` | Removes the 90 degree ambiguity of the carrier loop (quadrant-differential code). |
| `serial_bus_if` | Two-wire (I2C-style) register interface. |
| `sigma_delta_dac` | First-order pulse-density modulator used by the three analog-control outputs. |
| `qam_demod_top` | Wires the blocks together. |

The analog tuner, the ADC and the low-pass filter that smooths the AFC output
are outside the chip. Their signals are the top's ports: `in_s`, `afc_out`,
`agc_out` and `clock_out`.

## The power-based phase detector (`phase_detector`)

This is the central idea of the design. For a received equalized sample
X = (Xi, Xq), the detector proceeds in four stages:

1. **Power.** It computes P = Xi² + Xq². A pure rotation of the carrier
   leaves P unchanged, so P says which *ring* of the constellation the symbol
   came from even when the phase is badly off.
2. **Candidate symbols.** It picks the ring whose power is closest to P. The
   ring boundaries are the midpoints of adjacent ring powers, so the test is
   2P compared with R_j + R_(j+1). The first-quadrant points of that ring are
   the candidates S1..S4. In 256-QAM no ring holds more than four
   first-quadrant points, so four candidate paths are enough for every order.
   The ring table (`qam_pkg::RINGS`) is built at elaboration by enumerating
   a² + b² over odd levels a, b.
3. **Angle per candidate.** Each candidate can appear in any quadrant. Of its
   four 90-degree rotations, the detector keeps the one within +/-45 degrees
   of X: dot > 0 and |cross| <= dot. The tangent of the error angle,
   cross/dot, then lies in [-1, 1]. No divider is used. The tangent is
   quantised to 16 equal regions by counting how many of the thresholds
   k·dot/8 (k = 1..7) the value |cross| reaches. The sign of cross picks the
   half. This bounds the detectable range to +/-45 degrees.
4. **Selection.** Wrong candidates give angles that jump around from symbol
   to symbol, while the true error changes slowly. So each region keeps a
   counter of *consecutive* symbols for which some candidate landed in it.
   When a region reaches four in a row, the detector outputs a valid error.
   The value is the region centre: `eout = 2r-15`, in units of tan/16. If
   several regions qualify, the one with the longest run wins. Ties go to the
   region nearest zero.

Timing: the sample is registered on `vin`, and the error appears one clock
later. When no region qualifies, `evalid` stays low and both loop filters
hold. This is also how the loops ride out symbols whose candidates give no
consistent answer.

## The dual-mode feedforward equalizer (`dfe_ff_filter`, `dfe`)

The feedforward section is two 4-tap circuits, "odd" and "even". Each has its
own delay line, coefficient multipliers and adder. The input `IN` is captured
on the rising edge of the symbol clock (`top`). In parallel it is captured on
the falling edge (`neg`) and then re-timed to the rising edge (`neg2`). Two
selectors, controlled by `t_spaced`, choose what feeds each delay line:

| `t_spaced` | odd line input | even line input | result |
|---|---|---|---|
| 1 (T) | `top` | last odd register | one 8-tap line, one sample per symbol |
| 0 (T/2) | `neg2` (falling-edge sample) | `top` (rising-edge sample) | 2 samples/symbol, split over two 4-tap lines |

The even sum passes one extra register before it is added to the odd sum, and
the total is registered. Written out, with c_o and c_e the odd and even
coefficients:

* T mode: y(m) = Σ c_o[k]·x(m-1-k) + Σ c_e[k]·x(m-5-k), k = 0..3
* T/2 mode: y(m) = Σ c_o[k]·x_fall(m-2-k) + Σ c_e[k]·x_rise(m-2-k)

In T/2 mode the input changes twice per symbol clock. The top level arranges
this: its 2-samples/symbol data change on the `clk_s` edges between the
`clk_sym` edges. Every register still runs at the symbol rate, which is the
point of the scheme.

`dfe` adds 16 complex feedback taps on past decisions, a slicer for the
selected QAM order, and decision-directed LMS:
c += 2^-MU_SHIFT · err · conj(x), with err = decision − soft output. The
coefficient accumulators carry 8 guard bits and saturate. After reset, and
whenever the T/T2 mode changes, the coefficients restart from a single unit
tap: even-circuit tap 0, the centre of the 8-tap span. A change of QAM order
keeps them, because the constellation scale is the same in every order.
This matters for 256-QAM under a strong echo:
* Its eye is too small for decision-directed LMS to open from a unit tap.
* It converges if the link is first brought up at a lower order and then
  switched.

`adapt` = 0 freezes the coefficients.

Latency from the equalizer input to `y_o`/`d_o`: 6 symbol clocks in T mode
(with the unit centre tap) and 3 in T/2 mode.

## Carrier loops (`loop_select`, `apc_loop_filter`, `afc_loop_filter`, `nco`)

* **APC (inner loop).** `freq = integ + (e << 11)` and `integ += e << 5` on
  every valid error. `freq` is the NCO phase step per 2-samples/symbol sample.
  The NCO phasor derotates the filtered signal ahead of the equalizer, so the
  loop closes entirely on chip. `integ` is the loop's frequency estimate.
* **AFC (outer loop).** A 20-bit integrator of the same errors. Its top 16
  bits go out as a first-order pulse-density stream on `afc_out`. An external
  RC low-pass turns the stream into the tuner control voltage.
* **Loop select** (`ctrl[4:3]`): 0 APC only, 1 AFC only, 2 both, 3 automatic.
  In automatic mode both loops run until lock, then the AFC holds and only the
  APC tracks.
  * Lock: 64 consecutive valid errors with |e| <= 3 (tan units of 1/16).
  * Unlock: 64 consecutive valid errors outside that band.

## Clocking and number formats

* One input clock, `clk_s`, at 4 samples per symbol. The IF is fs/4, so the
  mixer LO is the sequence 1, 0, −1, 0 (generated by an NCO all the same).
  A 2-bit counter gives `clk_sym = clk_s/4`. The filters decimate on
  alternate samples. The sample taken on the `clk_sym` rising edge is the
  on-symbol sample.
* Reset is synchronous, active high, on `clk_s`. The divider stands still
  during reset, so `clk_sym` has no edges then. The symbol-rate blocks
  therefore get `rst_sym`, a copy of reset stretched by eight `clk_s` cycles
  (two `clk_sym` edges).
* Samples are 12-bit two's complement. Constellation level n (odd,
  |n| <= L−1) sits at n·256/L, so the mean |I| is 128 for every QAM order. The
  AGC regulates to that.
* NCO: 24-bit phase, 10-bit table address, 2047 = 1.0.
* Filter coefficients: 12 fractional bits. Equalizer coefficients: Q2.14.
* `i_out`/`q_out` are 4-bit level indices (0..L−1, from most negative). They
  change once per symbol, on `clk_sym`.

## Serial control register (`serial_bus_if`)

The interface is an I2C-style slave at address `0x1C`. To write, send the
address, a register pointer and data bytes. To read, the data come from the
current pointer. The pointer auto-increments.

| reg | access | bits |
|---|---|---|
| 0x00 CTRL | RW, reset 0x3E | [1:0] QAM 0:4 1:16 2:64 3:256 · [2] 1 = T-spaced, 0 = T/2-spaced · [4:3] loop select · [5] LMS adapt |
| 0x01 STATUS | RO | [0] lock · [1] APC enabled · [2] AFC enabled |

The reset value selects 64-QAM, T-spaced, automatic loop select and adaptation on.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
With plain Verilator 5 (the package goes first, `-y rtl` finds the rest):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/qam_pkg.sv tb/tb_dfe.sv --top-module tb_dfe -o sim
./obj_dir/sim
```

Replace `tb_dfe` with any other testbench. `tb_qam_demod_top` runs the whole
receiver at its default parameters, in a few seconds on a PC:
* A transmitter model in the testbench generates differentially coded QAM.
* It shapes the signal with an RRC pulse, adds an echo (0.05, one symbol,
  30 degrees), a carrier offset of 0.002 cycles/symbol and the fs/4 IF.
* Settings are written over the serial bus.
* It acquires at 4-QAM: the carrier loop first, with equalizer adaptation
  off for 2000 symbols, then the equalizer.
* The run then goes through 16-QAM T-spaced, then T/2-spaced, then 64-QAM and
  256-QAM (both T-spaced), then 4-QAM T/2-spaced.
* In each phase it checks 1000 decoded symbols against the data.
* It also checks that each mechanism occurred: detections, lock, AFC hold,
  the AFC word moving in the direction of the offset, the APC frequency
  estimate, mode switches, and AGC and timing activity.

`tb_pullin` measures carrier pull-in of the APC loop from a cold start at
64-QAM. It covers offsets from 0.000125 to 0.004 cycles/symbol (1 to 32 kHz
at 8 MBaud). Each offset locks within about 1200 symbols, and 500 decoded
symbols are then checked.

`tb_agc_loop` closes the AGC loop through a model of the gain stage. AGC OUT
is RC-filtered and sets an amplifier gain that starts 4.4 dB low. The test
checks three things:
* the level at the equalizer input settles to the target, within 4 %;
* the carrier loop locks;
* 64-QAM decodes error-free.

Lint the whole design with `verilator --lint-only -Wall -y rtl rtl/qam_pkg.sv rtl/qam_demod_top.sv`.
It reports only a few unused-bit warnings (add `-Wno-fatal` for a zero exit status):
* the spare control bits;
* the ring-table fields that a given comparison does not need.

## How far to trust it; departures from the original chip

The original chip was described at block-diagram level. The following are
taken from it:
* the block set and the signal flow;
* the QAM orders;
* the 8 + 16 tap counts;
* the four-candidate, 16-region, four-in-a-row phase detector;
* the +/-45 degree range;
* the odd/even, selector and falling-edge structure of the dual-mode feedforward filter;
* the two loops: AFC to the tuner, APC on chip.

Everything below is this design's own choice:

* All word lengths and number formats, the filter length (49 taps) and roll-off (0.15).
* The IF of fs/4 and the 4/2 samples-per-symbol rates.
* Phase detector details: equal-width regions in tan(θ), the rotation search, the tie-break among qualifying regions, and the ring decision rule.
* Loop filter forms and gains, and the pulse-density coding of the AFC, AGC and clock-control outputs.
* The lock detector and the four loop-select modes.
* LMS adaptation and the coefficient restart.
* The AGC detector and the Gardner timing detector.
* The quadrant-differential code.
* The register map and bus protocol.

Limits, and what was not verified:

* The chip's 8 MBaud rate was not timed. No timing constraints were
  evaluated, and the equalizer multiplies are fully parallel.
* **The carrier pull-in range is smaller than the original's.** The original
  chip pulls in +/-80 kHz, which is about 0.01 cycles/symbol (3.6 degrees per
  symbol) at 8 MBaud. With the default loop gains, this design's APC loop
  pulls in reliably from a cold start only up to about 0.004 cycles/symbol.
  At 0.005 it pulls in only sometimes.
  * The limit comes from the four-in-a-row rule. Near zero error a region
    spans about 7 degrees, so the true error can stay in one region for four
    symbols only while the rotation is well under 2 degrees per symbol.
  * How the original reaches further is not known. Its region widths and
    loop gains are not published.
  * Trying other proportional and integral gains did not extend the range.
    Neither did holding the proportional term between detections.
* Start-up under a strong echo is not always reliable. With an echo of 0.1
  (one symbol, 30 degrees) instead of 0.05, the end-to-end sequence failed to
  lock in 2 of 12 runs with random initial state and random data. After lock,
  all orders up to 256-QAM decoded error-free under that echo.
* The timing loop (`clock_out`) is not closed in simulation. The testbenches
  sample at a fixed, correct phase and only check that the timing detector
  responds.
* The AGC loop is closed only in `tb_agc_loop`, through a simple
  amplifier-and-RC model. During acquisition, keep equalizer adaptation off
  (`ctrl[5]` = 0) until the level has settled.
  * An equalizer that adapts from the start absorbs both the level error and
    the carrier rotation.
  * The carrier loop can then settle on a wrong frequency.
  * The end-to-end test avoids this by starting at the right level.
* The AFC integrates the same phase errors as the APC. Once the APC integrator
  has taken up the offset, those errors average zero, so the AFC word moves
  mainly during acquisition. It does not steadily hand the offset over to the
  tuner. The original gives no detail of how its two loops share the offset.
  With no tuner model, the testbenches check only the direction in which the
  AFC word moves.
