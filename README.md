# SSA-PID: a separate-sampling adaptive PID controller for a digital buck converter

A digitally controlled DC-DC converter reacts to a disturbance only when it next samples its output
voltage. A conventional digital PID loop samples once per switching period, so a load or line step can
go uncorrected for up to a whole period. Its fixed gains are also a compromise: the gains that keep the
loop well damped in steady state are too weak during a large transient.

The separate-sampling adaptive PID (SSA-PID) controller deals with both problems:

* **Separate sampling.** The PID law is split into two channels that run side by side.
  * The **P channel** uses a fast, coarse converter and samples four times per switching period
    (4 MHz at fs = 1 MHz). It reacts within a quarter period.
  * The **ID channel** uses a precise 8-bit converter and samples once per period (1 MHz). It
    sets the steady-state accuracy and damping.

  The duty command is the sum of what the two channels have accumulated.
* **Adaptive gains.** Each channel sorts its error into one of four states every sample. The state
  decides how much extra gain is added to the base gains, so the loop speeds up while the error is large
  and falls back to its calm steady-state gains near the reference.

This repository contains synthesizable SystemVerilog for the digital part: the compensator (error
history, adaptive gain selection, the correction terms and the duty accumulators) and a DPWM that also
times the sampling. The converters, the gate driver and the power stage are outside the RTL. The
testbench models them to close the loop.

## Control law

Let `e = Vref - vout` in converter codes. Positive means the output is too low. The two channels
accumulate their contributions in velocity (incremental) form:

```
ID channel, once per period (Clk1):
    d1[n] = d1[n-1] + a*e1[n] - b*e1[n-1] + c*e1[n-2]
    a = Ki' + Kd',  b = 2*Kd',  c = Kd'

P channel, four times per period (Clk4):
    d4[n] = d4[n-1] + d*(e4[n] - e4[n-1])
    d = Kp'

duty command:
    dn = d1 + d4      (clamped to 0 .. 1023)
```

`Ki'`, `Kd'` and `Kp'` are the base gains plus the adaptive adjustments described next. The P channel
is a pure proportional term. Written in velocity form it needs only the last two samples, and its
accumulator `d4` tracks `Kp'*e4`.

## Adaptive gain states

The adaptive part is the least obvious part of the design. Every time a channel takes a sample,
`state_selector` compares the present error magnitude `|e(n)|` with a threshold `Vthr`, and compares it
with the previous sample `e(n-1)`:

| State      | Condition                                                       | Kp / Ki adjustment        | Kd adjustment |
|------------|-----------------------------------------------------------------|---------------------------|---------------|
| steady     | `|e(n)| < Vthr`                                                 | 0                         | 0             |
| transition | `|e(n)| >= Vthr` and the sign of e changed                      | `dK1` (negative by default) | `dKd`       |
| rising     | `|e(n)| >= Vthr`, same sign, `|e(n-1)| <= |e(n)|`               | `dK`                      | `dKd`         |
| falling    | `|e(n)| >= Vthr`, same sign, `|e(n-1)| >  |e(n)|`               | `dK * |e(n)| / peak`      | `dKd`         |

* **Steady.** The loop runs on its base gains. This keeps it stable near the reference.
* **Rising.** The error is growing. The full boost `dK` widens the bandwidth. The channel also records
  `|e(n)|` as the error peak.
* **Falling.** The error is shrinking. The boost is scaled by how far the error has come down from its
  peak, so the gain returns smoothly to its base value instead of stepping down.
* **Transition.** The output has crossed the reference while still far from it. Applying `dK1` to the
  P and I gains damps the swing-back. `dK1` is signed and negative by default.

The derivative gain gets `dKd` in every state except steady. `adaptive_gain` computes one gain from this
table. It clamps the result to 0..1023 (in 1/8 steps). When no usable peak is recorded (the peak is 0 or
not above `|e(n)|`), it applies the falling-state boost unscaled.

Each channel has its own selector, peak register and threshold. The channels measure in different LSBs:
10 mV for the ID channel and 40 mV for the P channel.

### Default numbers

The gains are parameters. The defaults below were tuned for the reference power stage in a
closed-loop model. They are this design's values, not published ones. All gains are unsigned fixed point
with 3 fractional bits, so a parameter value `G` means `G/8` duty LSBs per error LSB.

| Parameter | Default | Meaning                       |
|-----------|---------|-------------------------------|
| `KP`      | 64      | Kp = 8                        |
| `KI`      | 2       | Ki = 0.25                     |
| `KD`      | 128     | Kd = 16                       |
| `DKP`     | 32      | dKp = +4 (rising/falling)     |
| `DKP1`    | -32     | dKp1 = -4 (transition)        |
| `DKI`     | 2       | dKi = +0.25                   |
| `DKI1`    | -1      | dKi1 = -0.125                 |
| `DKD`     | 64      | dKd = +8                      |
| `VTHR1`   | 5       | 50 mV (ID channel, 10 mV LSB) |
| `VTHR4`   | 2       | 80 mV (P channel, 40 mV LSB)  |

They live in `rtl/ssa_pid_pkg.sv` and can be overridden on `ssa_pid_compensator`.

## Sampling and timing

A single clock runs the whole controller. At the default 10-bit DPWM resolution and fs = 1 MHz, this
is the DPWM counter clock of 1.024 GHz. The DPWM counter produces both sample strobes:

```
counter   0 ........ 256 ........ 512 ........ 768 ........ 1023 | 0
Clk1      ^                                                      | ^      ID sample (1 MHz)
Clk4      ^           ^            ^            ^                | ^      P samples (4 MHz)
A (S1)    ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\______________________________________|‾‾‾    high while counter < dn
```

* An ADC code present at a strobe is registered by `error1`/`error2` on that clock edge. The
  accumulators in `dn_output` take the new increments one clock later. `dn` therefore reflects a sample
  **two clocks** after its strobe. The registered PWM output follows one clock after that.
* The DPWM compares the counter with `dn` live. A P-channel correction taken at a quarter-period strobe
  can therefore end the present pulse early. This is what lets the oversampled channel act within the
  period in which a disturbance arrives.
* Once a pulse has ended it does not restart in the same period, even if `dn` rises above the counter.
  There is at most one pulse per period.
* `pwm_a_n` is the complement of `pwm_a` with no dead time. Any dead time belongs in the gate driver.

## Blocks

```
ssa_pid_top
├── ssa_pid_compensator
│   ├── error1          1 MHz error history e1n, e1n1, e1n2 (magnitude + sign)
│   ├── error2          4 MHz error history e4n, e4n1 at 6-bit resolution
│   ├── ssa_algorithm   gain selection and the five products
│   │   ├── state_selector  x2 (ID, P)
│   │   └── adaptive_gain   x3 (Ki, Kd, Kp)
│   ├── d_correction    signs applied: delta_d1, delta_d2
│   └── dn_output       accumulators d1n, d4n and dn = d1n + d4n
└── dpwm                10-bit counter DPWM, Clk1/Clk4 strobes
```

The error blocks pass magnitudes and sign bits rather than two's-complement numbers. `ssa_algorithm`
multiplies magnitudes only, and `d_correction` puts the signs back. That split mirrors the published
block diagram.

### Top-level ports (`ssa_pid_top`)

| Port                      | Dir | Width | Meaning |
|---------------------------|-----|-------|---------|
| `clk`, `n_rst`            | in  | 1     | counter clock, asynchronous active-low reset |
| `adc1_data`               | in  | 8     | ADC1 code of vout (10 mV/LSB in the testbench) |
| `adc2_data`               | in  | 8     | ADC2 code; the P channel uses the upper 6 bits |
| `vref`                    | in  | 8     | reference code (180 = 1.8 V) |
| `pwm_a`, `pwm_a_n`        | out | 1     | gate commands for the high-side and low-side switches |
| `adc1_sample`             | out | 1     | strobe at the start of each switching period |
| `adc2_sample`             | out | 1     | strobe at the start of each quarter period |
| `dn`                      | out | 10    | duty command |
| `pwm_count`               | out | 10    | DPWM counter |
| `state1`, `state4`        | out | 2     | ID / P channel state (0 steady, 1 transition, 2 rising, 3 falling) |

The converters are assumed to present their latest code continuously. The controller takes the code
on its own strobe, so a converter with a conversion delay should be started by the strobe of the
previous slot.

## Where this departs from, or fills in, the published design

The published design fixes the algorithm and the block structure. It also fixes these numbers: 8-bit
1 MHz and "8/6-bit" 4 MHz converters, a 10-bit DPWM, fs = 1 MHz, and the 5 V → 1.8 V, 4.7 µH / 10 µF
power stage. It does not give the following, so this design chooses them:

* **Gains, thresholds and number formats.** All gain values are this design's own; see the tables
  above.
* **ADC2 resolution.** ADC2 is read as an 8-bit converter of which the 6 most significant bits are
  used.
* **Sign-change test.** This compares sign bits, and a zero error counts as positive. The published
  equations and flowchart differ on whether a zero previous error counts as a sign change; this follows
  the comparator-based block diagram.
* **Threshold test.** `|e| >= Vthr` counts as transient. This follows the equations; the flowchart
  writes `>`.
* **Channel mapping.** The precise 1 MHz converter feeds the ID channel and the fast converter feeds
  the P channel, as in the system diagram and the prose. One published flowchart draws them the other
  way round.
* **DPWM.** A plain counter/comparator. At 10 bits and 1 MHz it needs a 1.024 GHz clock, which an
  FPGA cannot provide directly. A hardware build would replace `dpwm` by a hybrid (coarse counter plus
  fine phase or delay-line) DPWM with the same ports. The one-pulse rule and the absence of dead time
  are also this design's own.
* **Limits.** Each accumulator is clamped to ±1024 duty LSBs to prevent windup, and `dn` is clamped
  to 0..1023.
* **Reset.** All registers reset to zero. The converter therefore starts from duty 0 and the loop
  performs the start-up.
* **Clocking.** The published diagram draws Clk1 and Clk4 as clocks. Here they are enable strobes in
  one clock domain.
* **Multipliers.** The products are written as plain `*`. The published FPGA build used no hard
  multipliers, but how it formed the products is not described.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The unit testbenches compare against integer models written from the
equations. `tb/ssa_ref_pkg.sv` holds a reference implementation of the whole control law, used by the
compensator and top-level tests.

| Testbench                | What it checks |
|--------------------------|----------------|
| `tb_error1`, `tb_error2` | history taps, magnitudes, signs, 6-bit truncation, update pulse |
| `tb_state_selector`      | four-way classification, peak register; all states covered |
| `tb_adaptive_gain`       | all states, falling-edge scaling, negative adjustments, clamping |
| `tb_ssa_algorithm`       | gains and the five products at the default parameters |
| `tb_d_correction`        | signed sums, including full-scale inputs |
| `tb_dn_output`           | accumulation, accumulator and duty clamps |
| `tb_ssa_pid_compensator` | `dn` against the reference law, two-clock latency, duty limits |
| `tb_dpwm`                | period, pulse width 0..1023, strobes, one-pulse rule, early cut |
| `tb_ssa_pid_top`         | closed loop at full size (below) |

`tb_ssa_pid_top` runs the top at its default parameters: 10-bit DPWM and 1024 clocks per period. It
drives behavioural models of the power stage (`buck_model`: 5 V in, 4.7 µH / 80 mΩ, 10 µF / 70 mΩ)
and of the converters (`adc_model`, 10 mV LSB). The run is about 1.3 ms of converter time:

* start-up from 0 V into 0.3 A,
* a 0.7 A load step up and down,
* a 1 V input step (5 V → 4 V → 5 V),
* a reference step to 1.5 V and back,
* a 0.5 A load step up and down.

At every clock, `dn` must equal the reference law fed with the same codes. The output must settle
within ±60 mV, and every state of both channels, a mid-period duty update and duty saturation must each
occur. With the default gains it measures:

| Event                    | Peak deviation | Time back within ±30 mV |
|--------------------------|----------------|-------------------------|
| start-up                 | +48 mV         | –                       |
| load +0.7 A / −0.7 A     | 144 / 169 mV   | 30 / 49 µs              |
| load +0.5 A / −0.5 A     | 103 / 132 mV   | 29 / 47 µs              |
| input −1 V / +1 V        | 152 / 194 mV   | 41 / 64 µs              |

These figures depend on the assumed gains and on the idealised model: no converter delay, no switch
resistance. They are not a reproduction of published measurements. The published hardware reports
zero start-up overshoot and about 100 µs / 44 mV for a 0.7 A step on its own board.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/ssa_pid_pkg.sv tb/ssa_ref_pkg.sv tb/tb_ssa_pid_top.sv \
    --top-module tb_ssa_pid_top --Mdir obj_top
./obj_top/Vtb_ssa_pid_top
```

Replace `tb_ssa_pid_top` with any other testbench name. The closed-loop run takes under a second.

## Changing the design

* **Gains and thresholds.** Override the parameters of `ssa_pid_compensator`, or edit the defaults
  in `ssa_pid_pkg`. Both `tb_ssa_algorithm` and `tb_ssa_pid_top` read the package defaults, so they
  follow the change. The closed-loop bounds in `tb_ssa_pid_top` may need adjusting for very different
  gains.
* **DPWM resolution.** `DPWM_W` on the top sets both the resolution and the clocks per period. The
  Clk4 strobe assumes `DPWM_W >= 3`.
* **Converter widths.** `ADC_W` and `RES_W` set the word widths. The error magnitude of the ID
  channel is `ADC_W` bits, and that of the P channel `RES_W` bits.
