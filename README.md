# Fast voltage-sag controller

Weak grids, such as microgrids in island mode, sag badly when a load draws a large inrush
current: LED drivers that switch on together are a common cause. A stabilisation device can
catch these sags by injecting short, timed current pulses through an H-bridge. This repository
holds the digital controller of such a device. It compares the measured grid voltage with a
clean reference sine that is in phase with the grid. It keeps only the fast part of the
difference, so the 50 Hz fundamental is ignored. It turns that into a duty cycle between 0 and 1
that drives the H-bridge through PWM. The loop is meant to act within microseconds. It runs on
an FPGA at 100 MHz, takes grid samples at 1 MS/s and has a fixed latency of 6 clocks (60 ns)
from sample to duty cycle.

```
            +-------------------------------- sd_controller_top ---------------------------------+
 vgrid ---->|  error_normalizer -> hp_filter -> sign_correction -> dead_zone -> error_gain --+--> processed_error
 vref  ---->|  (Vref-Vgrid, /456)  (2 biquads)   (x sign(Vgrid))   (- threshold)  (x gain)   +--> pwm_generator --> pwm_out
 sample_valid|  last vgrid / vref sample (offset binary) --> 2 x pwm_generator --> pwm_vgrid_mon, pwm_vref_mon
 ext_reset_in, dcm_locked --> reset_manager --> synchronous reset of everything                     |
            +----------------------------------------------------------------------------------------+
```

## The signal chain

Each grid sample is a pair, `vgrid` (measured) and `vref` (reference from the grid voltage
tracker's PLL), marked by a one-clock `sample_valid`. Every stage is registered and passes a valid
strobe to the next, so a result leaves `LATENCY = 6` clocks after its sample. Samples may come as
often as every clock, so the datapath has no minimum spacing. The 1 MS/s rate is set by the source.

| stage | module | does | output format | clocks |
|---|---|---|---|---|
| error calculation, normaliser | `error_normalizer` | `(vref - vgrid) * NORM_GAIN`; a positive error is a sag in the positive half cycle | sfix18_En17 | 1 |
| high-pass | `hp_filter` (2 x `biquad_section`) | removes what is left of 50 Hz and slow drift | sfix18_En17 | 2 |
| sign correction | `sign_correction` | multiplies by sign(vgrid), clamps to [0, 1) | ufix18_En18 | 1 |
| starting threshold | `dead_zone` | `u - threshold` above the threshold, 0 below | ufix18_En18 | 1 |
| gain | `error_gain` | multiplies by the run-time gain | ufix18_En18 | 1 |

Number formats (`sd_ctrl_pkg`): `sfixW_EnF` is a W-bit two's-complement number with F fraction
bits, and `ufix` is unsigned.

| type | format | range | use |
|---|---|---|---|
| `volt_t` | sfix18_En8 | ±512 V | grid and reference voltage; 230 Vrms + 40 % is 456 V peak |
| `norm_t` | sfix18_En17 | [-1, 1) | normalised error, filter I/O |
| `duty_t` | ufix18_En18 | [0, 1) | sag measure, threshold, gain, duty cycle |
| `coef_t` | sfix96_En94 | [-2, 2) | filter coefficients |
| `state_t` | sfix64_En32 | ±2^31 | filter states, products, sums |

All conversions round toward minus infinity (floor) and saturate. None of them wraps except the
product truncation inside a filter section, described below.

## The high-pass filter

This is the part to understand before changing anything. The filter is a 4th-order inverted
Chebyshev (Chebyshev type II) high-pass with these properties:

- minimum order for a stopband edge of 80 Hz, a passband edge of 200 Hz and 40 dB stopband
  attenuation at 1 MS/s;
- it is built as two direct form II biquads (`v = x - a1 v1 - a2 v2`, `y = b0 v + b1 v1 + b2 v2`);
- 50 Hz is attenuated by at least 40 dB, and 1-10 kHz (the range of inrush transients) passes at
  0 dB;
- the transition band sits high so that the group delay stays small.

Things that are easy to get wrong:

* **Poles close to z = 1.** At 1 MS/s, 80-200 Hz corners put all four poles within 1e-3 of z = 1,
  and the zeros lie on the unit circle at about 31 Hz and 74 Hz. In direct form II the internal
  state `v` is the input passed through `1/A(z)`, whose DC gain is about 1.2e6. This is why the
  states have 32 integer bits and the coefficients 94 fraction bits. Shorter words move the poles
  enough to change the response or make the filter unstable. Only change `COEF_W`/`STATE_W` together
  with a new stability check.
* **DC is not removed completely.** An even-order type II filter keeps the stopband level at
  DC: a constant input comes out at 1 % (-40 dB) of its value. After sign correction and the
  threshold this is harmless.
* **Coefficients.** The defaults in `hp_filter` come from the standard type II design with the
  stopband edge matched exactly: `cheby2(N = 4, Rs = 40 dB, Ws = 80 Hz, high-pass, fs = 1 MHz)`,
  as second-order sections. All the gain is in section 1. Each value is rounded to sfix96_En94;
  every |coefficient| is below 2. For another cutoff or sample rate, recompute them with the
  same formula and override `SEC1`/`SEC2`.
* **Arithmetic.** Each 96 x 64-bit product is exact (160 bits), then floored to sfix64_En32. The
  two sections pass sfix64_En32 between them. Only the filter output is cut back to
  sfix18_En17. Compared with a double-precision model, the error stays below 1e-9.
* **Timing.** Each section evaluates its whole recursion, five wide multiplies, in the clock where
  its input is valid. That is one long combinational path. A 100 MHz FPGA build will need
  multi-cycle constraints for it, or an iterative multiplier shared over the 100 clocks between
  samples. Registers cannot simply be put inside the recursion.

## Sign correction and the threshold

During the negative half cycle a sag makes the error negative. So the filtered error is multiplied
by the sign of the *same* grid sample. The grid sample travels down a 3-register delay line next to
the normaliser and filter for this. The sign is applied after the filter so its jumps at zero
crossings do not excite the filter. The product is clamped to [0, 1): swells give 0.

The dead zone subtracts `starting_threshold` from anything above it and gives 0 below it. The
output is therefore shifted down by the threshold, not gated. A switch-and-comparator variant
would pass the full value once it exceeds the threshold; it is not built here. To get it, change
the upper branch of `dead_zone` to `diff = u`.

The gain input defaults to the ufix18_En18 format, so it covers gains below 1 (`18'h3FFFF`
≈ 1). For gains above 1, set `GAIN_FRAC` on `sd_controller`/`error_gain` lower. With
`GAIN_FRAC = 14` the gain can reach 16, and a gain of 10 is `18'd163840`.

## PWM output

`pwm_generator` counts 0 to `PERIOD-1` and drives `pwm_out` high for the first
`floor(duty * PERIOD)` clocks. With the default `PERIOD = 100` at 100 MHz this is a 1 MHz PWM
with 1 % duty resolution; `PERIOD = 10000` gives 10 kHz. The duty is sampled once, in the last
clock of each period, and held for the next one. The duty changes at 1 MS/s and the PWM counter
is not tied to the sample strobe. Following it continuously would let one period mix two
duty values, which shows up as an offset on the output. The largest duty, 1 - 2^-18, gives 99 of
100 clocks, so the output is never on for a whole period.

Two more instances drive the monitor outputs `pwm_vgrid_mon` and `pwm_vref_mon`. They let a
board with few free pins show the grid voltage, the reference and the processed error on a
scope: an RC or digital low-pass filter recovers each signal. The monitors modulate the last
accepted sample in offset binary, `(v / 512 V + 1) / 2`, which is the sfix18 value with its sign
bit inverted. So 0 V is a 50 % duty cycle.

## Reset and clocking

`reset_manager` synchronises four reset requests with two flip-flops each:

- the push button `ext_reset_in`, active high;
- `aux_reset_in`, active low;
- the debug reset `mb_debug_sys_rst`;
- the clock generator's `dcm_locked`, which requests reset while it is low.

The button and aux requests must be stable for 4 clocks, which filters contact bounce. After the
last request ends, reset is held for 16 more clocks and then released on all outputs at once. In
the top the aux and debug inputs are tied inactive. The synchronous, active-high
`peripheral_reset` clears every register of the datapath and the PWM counter.

The 100 MHz clock itself (from a 12 MHz board oscillator) comes from an FPGA clock generator and
is an input here, as `clk` plus `dcm_locked`.

## Top-level interface (`sd_controller_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 100 MHz |
| `ext_reset_in` | in | 1 | reset button, active high |
| `dcm_locked` | in | 1 | clock generator locked |
| `sample_valid` | in | 1 | one clock per 1 MS/s sample pair |
| `vgrid`, `vref` | in | 18 | measured and reference voltage, sfix18_En8 volts |
| `error_gain` | in | 18 | gain, GAIN_FRAC fraction bits (default 18) |
| `starting_threshold` | in | 18 | threshold, ufix18_En18 (normalised: 1.0 = 456 V of error) |
| `processed_error` | out | 18 | duty cycle, ufix18_En18 |
| `pe_valid` | out | 1 | `processed_error` updated, 6 clocks after `sample_valid` |
| `pwm_out` | out | 1 | PWM of `processed_error` |
| `pwm_vgrid_mon`, `pwm_vref_mon` | out | 1 | PWM of the last grid / reference sample, offset binary |
| `peripheral_aresetn` | out | 1 | synchronised reset, active low, for a host interface |

A host is expected to write the gain and threshold while the design runs. They are plain inputs
and are read in the clock where the matching stage takes its sample. `vgrid` and `vref` should
come from a grid voltage tracker: an ADC plus a PLL that produces the in-phase reference. Both are
outside this design.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With Verilator 5 (the package
must come first):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sd_controller_top \
    rtl/sd_ctrl_pkg.sv rtl/*.sv tb/tb_sd_controller_top.sv
./obj_dir/Vtb_sd_controller_top
```

The package is named first because the wildcard would otherwise list it after modules that
import it. Listing it twice does no harm.

| testbench | what it shows |
|---|---|
| `tb_sd_controller_top` | the whole design at its default parameters: 40 ms of a distorted 50 Hz grid with sags in both half cycles and a swell, at 1 MS/s on a 100 MHz clock (4 M clocks, a few seconds). Every output is checked against a real-valued model, and so is the 6-clock latency and every 1 MHz PWM period, monitors included. Also covers reset before lock, button bounce and a gain change at run time. |
| `tb_sd_controller` | the datapath with the gain formats for gain ≈ 1 / threshold 0.05 and gain 10 / threshold 15 V; a sag shows in the processed error from its first sample on (limit checked: 10 samples) |
| `tb_hp_filter` | bit-level agreement with a double model; 50 Hz at ≤ -40 dB, 1 kHz and 5 kHz within 1 dB; DC at the -40 dB stopband level |
| `tb_biquad_section` | one section against a double model, including the near-unit-circle section |
| `tb_error_normalizer`, `tb_sign_correction`, `tb_dead_zone`, `tb_error_gain` | each stage against a real-number model, including saturation corners |
| `tb_pwm_generator` | period length, high time and once-per-period duty sampling with random duty changes, at 1 MHz, 10 kHz and a short period |
| `tb_reset_manager` | lock gating, bounce rejection, button/aux/debug resets and release delay |

## What follows the original design and what does not

These come from the controller this RTL implements:

- the order of the processing stages;
- the number formats;
- the filter specification and its word lengths;
- the 1 MS/s sample rate, the 100 MHz clock and the 1 MHz PWM;
- holding the PWM duty for a whole period;
- bringing the grid and reference voltage out as PWM next to the processed error.

These are choices of this implementation:

- **Normaliser gain 1/456.** Only "scale into the duty range" is specified; 456 V is the largest
  expected grid amplitude.
- **Rounding and overflow.** Floor rounding and saturation at every conversion.
- **Filter coefficients.** Recomputed from the filter specification; they match the known pole
  and zero positions.
- **Pipeline.** One register per stage; the original evaluated the chain combinationally at the
  sample rate.
- **Handshake.** The valid-strobe handshake and the sample-aligned sign.
- **PWM and reset details.** The PWM counter layout, the offset-binary monitor mapping, and the
  reset widths, hold time and polarities.
- **Gain format.** It defaults to the original unsigned 18-bit fraction (gains below 1). Gains
  such as 10 need a smaller `GAIN_FRAC`.

Not included, because they are outside the digital controller:

- the grid voltage tracker (ADC and PLL);
- the FPGA clock generator;
- the host register access;
- the H-bridge driver, the H-bridge and its output filter.

Their signals are ports of the top.

Known limits:

- **Timing closure.** The single-cycle filter recursion (see above) has not been checked against
  100 MHz on an FPGA.
- **Closed loop.** The controller has only been verified open-loop. Its behaviour inside the
  complete inverter, and its stability there, are unverified.
