# Two-lane programmable FIR filter, 8 to 48 taps

A multi-standard radio front end needs one FIR filter that can serve several
air interfaces: 3G (WCDMA), wireless LAN (802.11g/n) and digital TV (DVB-T/H,
ATSC) ask for different tap counts, word lengths and sample rates. This design
meets that with a *parallel, time-interleaved transverse filter*: the input
stream is split into even and odd samples, two filter lanes compute the even
and the odd output side by side, and the two output streams are merged again.
Each lane only has to finish one result every two clock cycles, so the
arithmetic runs at half the sample rate. The tap count is programmable from 8
to 48 by grounding the coefficients of unused taps, and clock gating stops the
odd lane in half-band (decimate-by-two) mode and the whole filter in sleep
mode.

The architecture is the 8–48-tap programmable FIR described in
F. Sheikh et al., "Power-Performance Optimal DSP Architectures and ASIC
Implementation". That publication gives the block diagram and the structure of
the two-lane filter; everything below the block level that it leaves open
(timing, reset, control port, number format) is this design's own and is
listed in [Departures and open choices](#departures-and-open-choices).

```
            +---------------+  x_even  +----------------------+  y_even  +-------------+
  x_in ---->| deinterleaver |--------->|                      |--------->|             |
  (X[n])    |               |  x_odd   | parallel_real_filter |  y_odd   | interleaver |---> y_out, y_valid
            +---------------+--------->|   (48 taps x 2 lanes)|--------->|             |     (Y[n])
                                       +----------------------+          +-------------+
  fir_half_band_mode --+                  ^ clk_2n  ^ clk_2n1  ^ coef, mselect
  fir_sleep_mode ------+-> clock_gating_circuit ----+          |
  clk -----------------+                               tap_control  <--- ctrl_clk, write port
```

## How two lanes compute one filter

The filter computes y[n] = Σ a_k · x[n−k], k = 0 … N−1. Split the output into
its even and odd samples. For the pair of inputs (X[2n], X[2n+1]) that is at
the lane inputs in a given filter cycle:

* Y[2n]   = a0·X[2n]   + a1·X[2n−1] + a2·X[2n−2] + a3·X[2n−3] + …
* Y[2n+1] = a0·X[2n+1] + a1·X[2n]   + a2·X[2n−1] + a3·X[2n−2] + …

Each lane keeps a delay line of its own samples, one register per filter
cycle: `ev[j]` holds X[2n−2−2j] and `od[j]` holds X[2n−1−2j]. The sample each
tap needs is then:

| tap k          | Y[2n] (even output) | Y[2n+1] (odd output) |
|----------------|---------------------|----------------------|
| 0              | `x_even`            | `x_odd`              |
| 1              | `od[0]`             | `x_even`             |
| odd k ≥ 3      | `od[(k−1)/2]`       | `ev[(k−3)/2]`        |
| even k ≥ 2     | `ev[k/2−1]`         | `od[k/2−1]`          |

So the lanes cross at every tap: the even output reads the odd delay line at
odd taps, and the odd output reads the even delay line at odd taps. With 48
taps the even line is 23 registers long and the odd line 24. Both outputs
share the coefficient of each tap; a multiplexer in front of a_1 … a_47
chooses a_k or zero under `mselect[k]` (a_0 has none and is always used).
The 2 × 48 products are summed by a plain adder chain (transverse form) into
one output register per lane. There is no pipelining inside the chain: the
critical path is one multiplier plus 47 adders, which the half-rate filter
clock is there to accommodate.

## Clocks, timing and modes

There are three clocks:

* `clk`, the sample clock: one input sample and, in full-band mode, one output
  sample per cycle.
* `clk_2n` and `clk_2n1`, the filter clocks, made from `clk` by
  `clock_gating_circuit`. Each passes every second pulse of `clk`. `clk_2n`
  drives both delay lines and the Y[2n] register; `clk_2n1` drives only the
  Y[2n+1] register.
* `ctrl_clk`, the control clock of the coefficient memory; it may be
  unrelated to `clk`.

The de-interleaver, the clock gate and the interleaver each hold a phase bit
that toggles every `clk` cycle from reset, so they agree on which edge is
which. On phase 0 the de-interleaver parks the even sample; on phase 1 it
publishes the pair (X[2m], X[2m+1]); on the following phase-0 edge the filter
clocks fire and load the pair; the interleaver sends Y[2m] on the next edge
and Y[2m+1] on the edge after. **Every output Y[m] leaves three `clk` edges
after X[m] was taken**, and the output stream is gap-free in full-band mode.

The gating cells are latch-based: the enable is captured by a latch that is
transparent while `clk` is low and ANDed with `clk`, so a gated clock never
glitches. The two latches this produces are intended; a library
clock-gating cell would take their place in an implementation flow.

| mode                  | `clk_2n` | `clk_2n1` | output                          |
|-----------------------|----------|-----------|---------------------------------|
| full band             | runs     | runs      | Y[n] every `clk` cycle          |
| `fir_half_band_mode`  | runs     | stopped   | Y[2n] only, every second cycle  |
| `fir_sleep_mode`      | stopped  | stopped   | none (`y_valid` stays low)      |

Half-band mode is the decimate-by-two use of a half-band filter: only the
even outputs are wanted, so the odd output register is not clocked. Because
`clk_2n1` drives no delay-line register, stopping it leaves the history of
the even output intact. In sleep mode the delay lines keep the samples taken
before sleep; samples that arrive during sleep are never filtered, so the
first outputs after waking mix old and new samples (flush 48 samples, or
reset, if that matters). Mode inputs are sampled on the `clk` edges, and they
act on the next pair-load edge; the interleaver follows the same rule, so
`y_valid` is always right.

## Programming the taps

`tap_control` holds a_0 … a_47 and the tap count. On `ctrl_clk`:

* `coef_we`, `coef_addr` (0 … 47), `coef_wdata`: write one coefficient.
  Addresses of 48 and above are ignored.
* `ntaps_we`, `ntaps_wdata`: set the tap count; values below 8 become 8,
  values above 48 become 48. `ntaps` reads it back.

`mselect[k]` is 1 for k < tap count, so a filter of N taps uses a_0 … a_{N−1}
and the rest are grounded. After reset all coefficients are zero and all 48
taps are on. The configuration crosses to the filter clock without
synchronisers, so it must only be written while `fir_sleep_mode` is 1; the
top level asserts this.

## Number format and sizes

Samples and coefficients are two's complement, 12 bits each by default
(the largest word length the target standards need). The output keeps full
precision: 12 + 12 + ⌈log2 48⌉ = 30 bits, no rounding or saturation. For
coefficients with F fraction bits, divide the output by 2^F. Narrower
samples, e.g. 8-bit WCDMA data, are sign-extended onto `x_in`.

Parameters (`fir_pkg` holds the defaults):

| parameter | default | meaning                          |
|-----------|---------|----------------------------------|
| `N_TAPS`  | 48      | largest tap count                |
| `DATA_W`  | 12      | sample width                     |
| `COEF_W`  | 12      | coefficient width                |
| `OUT_W`   | 30      | output width, `DATA_W+COEF_W+$clog2(N_TAPS)` |
| `MIN_TAPS`| 8       | smallest tap count (in `fir_pkg`) |

## How it fits the target standards

One sample per `clk` cycle means the sample clock must run at the sample rate.
Tap counts and word lengths of the standards against the defaults:

| standard           | taps needed | word bits | fits at defaults        | rate → `clk` |
|--------------------|-------------|-----------|-------------------------|--------------|
| WCDMA / UMTS       | 8 – 64      | 6 – 8     | up to 48 taps           | 16 – 32 MHz  |
| 802.11g            | 8 – 64      | 10 – 12   | up to 48 taps           | 40 – 80 MHz  |
| 802.11n            | 8 – 64      | 10 – 12   | up to 48 taps           | 40 – 160 MHz |
| DVB-T/H            | 32 – 64     | 10 – 12   | 32 – 48 taps            | 20 – 25 MHz  |
| ATSC re-sampler    | 32 – 64     | 10 – 12   | 32 – 48 taps            | 15 – 25 MHz  |
| 27-tap half-band WLAN | 27       | 12        | yes, in half-band mode  |              |

Filters longer than 48 taps need `N_TAPS` raised. Whether a given `clk` rate
can be met depends on the technology and on the unpipelined adder chain; no
timing figure is part of this design.

## Departures and open choices

Taken from the architecture description: the four front-end blocks and their
connections, the CLK_2n/CLK_2n+1 clock pair and the two mode inputs; the two
lanes with their delay lines, the lane crossings, a_0 without a multiplexer,
the a_k/ground multiplexers under mselect, and the adder chain; the 8–48 tap
range; and word lengths of 12 bits from the standards' requirements.

This design's own choices, where the description is silent:

* Which registers each filter clock drives, and the meaning of half-band mode
  (decimation by two, odd output register stopped).
* The phase bits and the exact three-cycle timing; the input has no valid
  strobe and must deliver one sample per `clk` from the first edge after
  reset.
* `y_valid` and the mode inputs on the interleaver.
* The control port, the coefficient register file, tap-count clamping and the
  rule that configuration changes only in sleep mode.
* Two's complement, full-precision arithmetic; asynchronous active-low reset.
* The description says the tap programmability uses folding in time, but does
  not say how; here all 48 taps are built in parallel and programmability
  comes only from the coefficient multiplexers.

## Files and simulation

`rtl/`: `fir_pkg.sv` (defaults), `deinterleaver.sv`, `clock_gating_circuit.sv`,
`parallel_real_filter.sv`, `interleaver.sv`, `tap_control.sv`, and the top
`prog_fir_top.sv`.

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), and
`tb_fir_standards.sv`, which programs Hamming-windowed low-pass filters for
the standards above (48 taps with 8- and 12-bit data, 32 taps, and the 27-tap
half-band filter in half-band mode), checks every output bit-exactly against
Σ a_k x[n−k], checks the output rate and three-cycle latency, and checks
pass-band gain within 1 dB and stop-band attenuation beyond 30 dB.
`tb_prog_fir_top.sv` runs the whole filter at its default size through
full-band, half-band and sleep mode, tap-count changes, clamping and
coefficient reloads. Each prints `TB_RESULT checks=N failures=M`.

Run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl +libext+.sv rtl/fir_pkg.sv tb/tb_prog_fir_top.sv \
  --top-module tb_prog_fir_top
./obj_dir/Vtb_prog_fir_top
```

The testbenches need a falling edge on `rst_n` (they start it high and pull
it low after 1 ns): the filter registers are clocked only by the gated
clocks, which are stopped in sleep mode, so only the asynchronous reset
clears them.
