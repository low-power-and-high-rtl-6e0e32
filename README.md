# Digital class-D audio amplifier: composite interpolation filter, 3rd-order delta-sigma modulator, dead-time bridge driver

This design turns 16-bit PCM audio at 32 kHz into the switching signals of a
full-bridge class-D output stage. The digital part is small and low-power.
It raises the sample rate 32 times with a cheap cascade of filters, then
reduces each 16-bit sample at 1.024 MHz to one bit with a 3rd-order
delta-sigma modulator (DSM). The quantisation noise is pushed above the
8 kHz voice/audio band. The bit stream drives two bridge legs in opposite
phase. A gate driver on each leg inserts a short dead time so that the PMOS
and NMOS of a leg are never on together (shoot-through).

```
 PCM 16b @ fs=32 kHz                                                 +--> gate driver A --> leg A --+
 --> DFS FIR x2 --> Lagrange-2 x2 --> Lagrange-1 x2 (x3) --> DSM --PDM                               load
     (2 fs)         (4 fs)            (8, 16, 32 fs)        1 bit   +-> NOT -> gate driver B --> leg B --+
     \____________________ digital_modulator ______________/
```

`class_d_amp_top` is the whole chain. `digital_modulator` is its
synthesizable part. The gate drivers and the bridge are behavioural models
of analog circuits, with real delays.

## Clocking and the sample-rate enables

All logic runs on one clock, `clk` = 32 fs = 1.024 MHz. `rate_gen` counts
clocks modulo 32 and decodes one-cycle enables `tick[k]` at 2^k fs:
`tick[0]` comes every 32 clocks and `tick[5]` on every clock. A slower enable
is only ever high on a cycle where all the faster ones are also high.

Every interpolation stage k has two enables:

* `out_tick = tick[k]`: the stage produces an output.
* `in_tick = tick[k-1]`: the stage takes a new input.

On a cycle with both enables, the stage reads the output register of stage
k-1 and writes its own first output. That is the value written at the
previous `tick[k-1]`, so each word is consumed exactly once, with one
register of delay per stage. On a cycle with only `out_tick`, the stage
writes its second output.

The source handshake is `pcm_req`: a one-cycle strobe at fs. `pcm_in` is
sampled on that cycle. Reset (`rst_n`) is synchronous and active low. It
clears all filter and modulator state, and the first `pcm_req` comes in the
first cycle after reset. From a sample taken at cycle c, the first output
word that depends on it appears at the filter output 31 clocks later. The
testbench checks this latency.

## The composite interpolation filter

Most of the image rejection comes from the first stage, which runs at the
lowest rate. The later stages only remove images that are already far from
the audio band, so simple polynomial interpolators do.

**Stage 1, `dfs_fir_interp` (fs → 2 fs).**
* Zeros are inserted between input samples, and a 14-tap symmetric FIR runs
  at 2 fs.
* The delay line is folded: tap i and tap 13−i are added before they meet a
  shared coefficient. Seven multipliers serve fourteen taps.
* The coefficients C1..C7 are exact multiples of 2^-16 and below 0.5 in
  magnitude. They are stored as 16-bit integers:
  −642, −22, 2282, −1000, −6250, 6812, 31431. The taps are C1..C7 followed by
  C7..C1.
* Zero insertion halves the signal, so the product sum is shifted by 15
  rather than 16. The DC gain is then 2·Σh = 0.9952.
* The result is rounded half-up and clipped to 16 bits. The folded taps can
  reach 1.48 FS for worst-case inputs.

**Stage 2, `lagrange2_interp` (2 fs → 4 fs).** A parabola through x(n),
x(n−1), x(n−2) is evaluated half-way between x(n−1) and x(n). The datapath
has Farrow form:

```
s1  = x(n)/2 - x(n-1) + x(n-2)/2
s2  = -3/2 x(n) + 2 x(n-1) - x(n-2)/2
mid = x(n) + (s2 + s1/2)/2            = 3/8 x(n) + 3/4 x(n-1) - 1/8 x(n-2)
```

It is computed exactly in units of 1/8, then rounded half-up and clipped.
The parabola can overshoot full scale.

**Stages 3–5, `lagrange1_interp` (4 fs → 32 fs).** Linear interpolation:
`mid = x(n) + (x(n-1) - x(n))/2`. The halving is an arithmetic shift. The
midpoint always lies between two valid samples, so it needs no clipping.

**Output order.** For each input x(n), a stage outputs the midpoint between
x(n−1) and x(n) first, then x(n) itself. This is a choice of this design.

**Measured response** (testbench `tb_if_response`, 0.5 FS tones):

| tone | gain | strongest first image (32 kHz ± f) |
|---|---|---|
| 1 kHz | −0.03 dB | −65.7 dB |
| 4 kHz | +0.01 dB | −65.1 dB |
| 6 kHz | −0.08 dB | −93.1 dB |
| 8 kHz | −0.19 dB | −60.5 dB |

The reference design targets ±0.09 dB ripple to 8 kHz and −66 dB at
32 kHz. This realisation sags to −0.19 dB at 8 kHz. Most of that droop
(about 0.11 dB) comes from the three linear stages. The document's exact
ripple figure is not reproduced.

## The delta-sigma modulator (`dsm3`)

The loop is a 3rd-order cascade of integrators with distributed feedback
(CIFB). It has three delaying integrators and input feed-in only at the
first one. One resonator path −g1 runs from the third integrator back into
the second, which places a noise-transfer zero inside the band. c3 = 1 and
b2 = b3 = b4 = 0, so the 1-bit quantiser looks at the third integrator
directly. v = ±FS is the output bit.

```
s1' = s1 + b1·u  − a1·v
s2' = s2 + c1·s1 − g1·s3 − a2·v
s3' = s3 + c2·s2 − a3·v            pdm = (s3 >= 0)
```

Each coefficient is a sum of at most two powers of two, so each product is
two shifts and an add:

| coefficient | value | coefficient | value |
|---|---|---|---|
| a1 | 1/16 + 1/64 | c1 | 1/8 + 1/32 |
| a2 | 1/8 + 1/32 | c2 | 1/4 + 1/8 |
| a3 | 1/4 + 1/16 | c3 | 1 |
| b1 | 1/16 + 1/64 | g1 | 1/256 |

The shift amounts are in `classd_pkg`. The resonator zero sits near
√(g1·c2)·fclk/2π ≈ 6.2 kHz, which suits an 8 kHz band. The loop is designed
for an out-of-band noise gain of 1.2. Its largest stable input is about
0.9 FS.

Word widths are this design's choice. The states carry 8 fractional bits
below the input LSB and are 28 bits wide, i.e. ±16 FS. They clip rather
than wrap. With stable inputs the states stay below about 1.2 FS (up to
3 FS near 0.95 FS input), so the clip only matters when the loop is driven
into instability.

Measured through the whole digital modulator (`tb_digital_modulator`), the
bit stream was low-passed with a plain sinc³ decimator and fitted with a
sine:

| input | reconstructed amplitude | SINAD |
|---|---|---|
| 0.1 FS | 0.0991 | 41 dB |
| 0.8 FS | 0.793 | 59 dB |
| 0.897 FS | 0.889 | 58 dB |

The sinc³ decimator leaves most of the shaped noise between 8 and 16 kHz in
the measurement, so these are lower bounds on the in-band figure. A
floating-point model of the same loop gives about 78 dB in-band SNR at
0.8 FS.

## Dead-time gate driver and full bridge (behavioural)

Each leg has a PMOS high-side switch, on while its gate `drv_p` is low, and
an NMOS low-side switch, on while `drv_n` is high. The leg output is the
inverse of the leg input.

`gate_driver` makes a delayed copy `in_d` of its input and forms:

* `v_pmos = in | in_d`: the PMOS gate rises at once and falls `DEAD_TIME_PS`
  late.
* `v_nmos = in & in_d`: the NMOS gate rises `DEAD_TIME_PS` late and falls at
  once.

So on every transition the conducting switch turns off first, and the other
turns on one dead time later. The default dead time is 150 ps. It is a
continuous-assignment delay and has no relation to the clock.

`class_d_bridge` reports each leg's level (`out` = 1 while the PMOS
conducts). It flags `floating` (both switches off: the dead-time interval)
and `shoot_through` (both on). It models levels only. Switch sizes, losses,
the LC output filter and the speaker are not modelled.

At the top, leg A is driven by `pdm` and leg B by `~pdm`. `amp_out[1] −
amp_out[0]` is therefore +1 for a PDM one and −1 for a zero. The end-to-end
test checks that every PDM edge gives exactly one 150 ps floating interval
per leg and never a shoot-through.

## Files

| file | contents |
|---|---|
| `rtl/classd_pkg.sv` | PCM type, FIR coefficients, DSM shift pairs, clip function |
| `rtl/rate_gen.sv` | enable generator |
| `rtl/dfs_fir_interp.sv`, `rtl/lagrange2_interp.sv`, `rtl/lagrange1_interp.sv` | interpolation stages |
| `rtl/composite_interp_filter.sv` | the five-stage cascade |
| `rtl/dsm3.sv` | delta-sigma modulator |
| `rtl/digital_modulator.sv` | filter + modulator (synthesizable top) |
| `rtl/gate_driver.sv`, `rtl/class_d_bridge.sv` | behavioural analog models |
| `rtl/class_d_amp_top.sv` | complete amplifier |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_if_response` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each also has a watchdog. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -y tb rtl/classd_pkg.sv tb/tb_class_d_amp_top.sv \
    --top-module tb_class_d_amp_top -o sim
./obj_dir/sim
```

Replace the testbench name for the others. `classd_pkg.sv` must come first
because the modules import it.

What each testbench checks:

* `tb_class_d_amp_top`: runs the complete amplifier at its default
  parameters, 24 ms of a 1 kHz, 0.8 FS sine, in well under a second.
* The filter-stage testbenches: compare against an unfolded convolution or
  the plain polynomial formulas, bit for bit, including the clipping cases.
* `tb_dsm3`: compares every output bit with a reference model of the loop
  equations, and checks DC inputs against the mean of the bit stream.
* `tb_gate_driver`: measures the dead time.

## Changing it

* **Coefficients.** Edit `FIR_COEF` or the `DSM_*` shift pairs in
  `classd_pkg`. The DSM coefficients must stay in two-term shift form, or
  `mul2` in `dsm3` must change.
* **Word widths.** `W` (filter word, default 16), and `FRAC` and `ACC_W`
  (DSM state precision and width), are parameters.
* **Dead time.** Set `DEAD_TIME_PS` on `class_d_amp_top` or `gate_driver`.
* **Sample rate.** The design has no fixed sample rate. fs is simply
  clk/32, because the cascade is fixed at five ×2 stages.

## Limits and departures

* "14th order" is read as 14 taps: seven coefficients, folded.
* The interpolation by zero insertion with a gain of 2, all rounding and
  clipping rules, the output order of each stage and every width inside the
  DSM are this design's choices.
* The passband droop at 8 kHz is −0.19 dB, against the ±0.09 dB ripple
  target.
* Only one DSM coefficient set exists: the one for out-of-band gain 1.2.
  The coefficients for the other noise gains the reference design compares
  (1.1, 1.3, 1.4) are not known, so they are not provided.
* The gate drivers, bridge, LC filter and load are analog. The first two are
  timing/level models only; the last two are absent. Efficiency, output
  power and THD of the power stage cannot be derived from this RTL.
