# Interleaved three-phase PWM inverter controller with repetitive (minimal-THD) control

A single-phase AC output (110 V rms, 60 Hz) is produced by three half-bridge
legs on a split 400 V DC link. The legs share the load through their own
inductors into one output capacitor and switch at 18 kHz, 120 degrees apart.
Interleaving triples the effective ripple frequency and splits the current
three ways.

Under a strongly non-linear load, such as a diode rectifier with a crest factor
of 3, a plain deadbeat controller leaves a distorted output voltage. The
distortion is periodic at the output frequency. This controller therefore adds
a **repetitive controller**: a delay line one output period long that learns
the periodic error and feeds it forward, cycle after cycle. Coarse
measurements add more periodic error, and the same controller removes that too:
the design is meant to work with **5-bit** converters.

The RTL is one clock domain (200 MHz) and fully synchronous. It contains:

* the control datapath: reference sine, repetitive controller, deadbeat
  voltage and current loops, and DC-link feed-forward division;
* a phase-shifted digital PWM generator with dead time;
* a synchronous sampling controller that starts each converter exactly where
  the inductor current equals its switching-period average.

The power stage and the A/D converters are outside the RTL. The end-to-end
testbench contains behavioural models of both.

## Control law

All signals are fixed point. Voltages and currents are signed 24-bit Q15.8:
volts or amps with 8 fraction bits. Gains are signed 20-bit Q7.12. Each
product is saturated before it is added. The stages below run once per sample
period Ts = 1/18 kHz.

| stage | equation | default constants |
|---|---|---|
| error | e = v_ref - v_o | v_ref: 300-point sine, 155.56 V peak |
| repetitive controller | e' = e + u_rc (see next section) | q = 0.95, g = 0.5, N = 300, M = 3 |
| voltage loop (deadbeat) | i_com = Kv e' + i_o / m | Kv = C/Ts = 0.648 S, 1/m = 1/3 |
| current loop (deadbeat), per phase | v_c,j = Kc (i_com - i_L,j) + v_o | Kc = L/Ts = 12.15 ohm |
| DC-link feed-forward | y_j = v_c,j / V_dc (Q.15) | restoring divider, 40 clocks |
| duty mapping | V_MOD_j = FSW (1/2 + y_j), clamped to 0..FSW | half-bridge: v_leg = (d - 1/2) V_dc |

The gains come from placing the closed-loop pole at z = 0. For the current
loop, Kc = L/Ts with the inductor resistance neglected, and the output-voltage
feed-forward removes the capacitor voltage the inductor sees. For the voltage
loop, Kv = C/Ts with the capacitor ESR neglected, and the load-current
feed-forward i_o/m gives each phase its share. All gains, q and g are input
ports. The package `inv_pkg` holds the default values (`KC_DEF`, `KV_DEF`,
`INV_M_DEF`, `Q_DEF`, `G_DEF`).

The three phases are computed one after another on one shared datapath. The
**ring counter** carries a one-hot token around the PHAM active phases and
writes each new V_MOD into its phase's register. One full computation takes
4 + 1 + 43·PHAM + 1 clocks: 135 clocks, or 0.68 us, for three phases. The
sample period is 55.6 us. A start that arrives while a computation is running
is dropped and flagged on `overrun`.

## The repetitive (minimal-THD) controller

`rep_ctrl` implements, per sample k:

```
y(k)  = q · y(k-N) + e(k)        main delay loop, band-limiting gain Q(z) = q < 1
u(k)  = g · y(k-(N-M))           post filter S(z) = g · z^-(N-M)
e'(k) = e(k) + u(k)
```

* **Main delay loop.** A loop with positive feedback through z^-N generates
  any waveform of period N. With N = 18 kHz / 60 Hz = 300, the loop holds the
  internal model of every harmonic of 60 Hz. Its output, W(k) = y(k-N), is the
  learned periodic compensation.
* **Q(z) = q < 1.** This pulls the loop poles just inside the unit circle.
  The loop then stays stable, and an error the controller cannot cancel does
  not pile up without limit.
* **Post filter.** z^+M would be a phase lead of M samples. It makes up for
  the lag of the closed deadbeat loop at the fundamental, which is
  θ = 3.23 degrees: M = N·θ/360 = 2.69, rounded to 3. A lead cannot be built,
  but the error repeats every period, so the lead is taken one period late:
  g·z^(M-N). In hardware this is just a second read of the same buffer, at the
  slot written N - M samples ago. g < 1 sets how fast the error converges.

The buffer is one N × 24-bit single-port memory with a registered read. Each
sample it is read twice: at the write pointer, which holds y(k-N), and at the
pointer + M, which holds y(k-N+M). The new y(k) is then written at the write
pointer. After reset a sweep writes zeros into the buffer, which takes N
clocks, and `ready` is low until the sweep ends. With `rc_en` low the output is
0 and zeros are written, so the controller starts from nothing when it is
switched on. From start to `done` takes 4 clocks.

The choices q = 0.95 and g = 0.5 are only defaults; both must lie in (0, 1).
With q = g = 1, a constant error e adds one more e to u every period. The unit
testbench checks this build-up.

## Timing of one switching period

```
carrier a  /\/\/\ ...   (phase b lags by P/3, phase c by 2P/3)
              ^ zero of phase a: AD1, AD4, AD5, AD6 chip selects (CS_W = 20 clocks)
              |   +1 clock: results captured, control computation starts (0.68 us)
              |   V_MOD of a, b, c written
              v next zero of each phase: its comparator takes the new V_MOD
```

* The carrier position advances on a 20 MHz enable: the 200 MHz clock divided
  by 10. The symmetric carrier counts 0 → FSW → 0, so the period is
  P = 2·FSW ticks. FSW = 555 gives 18.02 kHz, and FSW = 417 gives 23.98 kHz.
* **Synchronous sampling.** With the symmetric carrier and "high while
  carrier < V_MOD", a leg's high-side pulse is centred on its carrier zero and
  its low-side pulse on its carrier peak. The inductor current crosses its
  period average in the middle of its rising slope and in the middle of its
  falling slope. Sampling at the zero or the peak therefore needs no filter
  and sees no switching noise. Each phase current is sampled at its own
  phase's instant. The output voltage, load current and DC-link voltage are
  sampled with phase a.
* **Duty update.** Each phase takes its new V_MOD into a shadow register at
  its next carrier zero. A period therefore never mixes two compare values
  inside one carrier ramp. The value computed from one sample acts during the
  whole next switching period.

**This delay matters for the deadbeat gains.** The deadbeat design assumes the
new duty acts at once. With one full period of delay, the current loop with
Kc = L/Ts has the characteristic equation z² - z + 1 = 0, whose poles lie on
the unit circle. The loop then oscillates. The end-to-end testbench runs the
closed loop with Kc = L/(2Ts), which puts the poles at |z| = 0.71, and with
Kv = C/(4Ts). Both are set at the gain input ports; the RTL is unchanged.
Applying the duty earlier, for example at the carrier peak after a
carrier-zero sample, would halve the delay. This design does not do that.

## Phase-shifted DPWM (`dpwm`)

`freq_divider` → `carrier_gen` → `pwm_compare` → `deadtime_gen`.

* `carrier_gen` has one master position counter over the period P. Phase j
  runs at (master - j·P/PHAM) mod P, so it lags phase a by j/PHAM of a period:
  120 degrees for three phases. PHSH = 0 puts all phases in step. SYM/ASYM
  chooses between the triangle (up-down, P = 2·FSW) and the sawtooth
  (up count, P = FSW). Because every phase comes from one counter, the phases
  stay locked.
* `pwm_compare`: output high while carrier < V_MOD. On the triangle this gives
  2·V_MOD - 1 high steps out of 2·FSW. FSW = 555 gives 1110 steps, about 10
  bits of resolution at 18 kHz.
* `deadtime_gen`: PWM(2j+1) is the high-side gate of leg j and PWM(2j+2) the
  low-side gate. Every turn-on waits DTIME ticks of 20 MHz (6 bits, up to
  3.15 us); every turn-off is immediate. A leg at or above PHAM keeps both
  gates off.
* `ADSYN`: the 12-bit carrier of phase a, passed to the sampling controller.

## Synchronous sampling controller (`sync_sampler`)

ADSYN carries only the carrier value of phase a, so on the triangle the
sampler keeps a direction flag: set at the peak, cleared at zero. With it, the
sampler turns ADSYN back into the position in the period. From that position,
FSW, PHAM, PHSH and SYM, it rebuilds each phase's carrier
position with the same package functions the carrier generator uses. It starts
conversions on AD1CS..AD6CS:

| SAMP_MODE | instant |
|---|---|
| 0 | carrier zero: middle of the rising current slope |
| 1 | carrier peak (FSW; FSW-1 for the sawtooth): middle of the falling slope |
| 2 | both: double-frequency sampling |
| 3 | off |

Channel map: AD1..AD3 are the currents i_La, i_Lb and i_Lc. AD4 is v_o, AD5 is
i_o and AD6 is V_dc; these three are sampled at phase a's instant. A two-state
FSM (IDLE/PULSE) holds the selected chip selects for CS_W = 20 clocks
(100 ns). A trigger that arrives during a pulse joins that pulse and restarts
its count. The output register applies the polarity: `act_high` = 0 makes the
chip selects active low. `cs_end` pulses when a pulse ends. The top captures
`adc_data[ch]` on that pulse, so an external converter must present its result
by the end of its chip-select pulse.

In mode 2 the controller runs twice per switching period. N must then be 600
to keep a 60 Hz reference, because N counts control samples.

## Top level (`inverter_ctrl_top`)

| port | width | meaning |
|---|---|---|
| `clk`, `rst` | 1 | 200 MHz clock, synchronous active-high reset |
| `fsw`, `pham`, `phsh`, `sym`, `dtime` | 12, 3, 1, 1, 6 | DPWM configuration (see above) |
| `samp_mode`, `act_high` | 2, 1 | sampling configuration |
| `rc_en`, `kv`, `kc`, `inv_m`, `q`, `g` | 1, 20 each | control configuration (Q.12 gains) |
| `adc_data[6]` | ADC_W each | converter results, channel order as above |
| `adcs` | 6 | AD1CS..AD6CS |
| `pwm` | 6 | gate signals, {low, high} per leg |
| `vmod[3]`, `vref`, `u_rc`, `ctrl_done`, `overrun` | - | status |

Configuration inputs are meant to be static while the controller runs. The
testbench changes them on the fly only to exercise each mode.

Converter scaling (`adc_scale`): value = (code - offset)·SPAN/2^ADC_W.
Bipolar channels use offset binary, with code 2^(ADC_W-1) meaning zero. The
spans are v_o ±200 V, i_L ±32 A per phase, i_o ±64 A, and V_dc 0..512 V
(unipolar). With 5-bit converters, one step of v_o is 12.5 V. Parameters:
`ADC_W` (5), `NPH` (3), `N` (300), `M` (3), `DIV` (10), `CS_W` (20).

A generic synthesis gives about 740 word-level cells, 550 flip-flop bits and
14.6 kbit of memory. Most of the memory is the 300 × 24-bit sine table and the
300 × 24-bit repetitive buffer.

Module hierarchy:

```
inverter_ctrl_top
├── dpwm ── freq_divider, carrier_gen, pwm_compare, deadtime_gen
├── sync_sampler
├── adc_scale ×6
└── control_core ── sine_ref, rep_ctrl, volt_loop, curr_loop,
                    dclink_div, duty_map, ring_counter
inv_pkg: types, default gains, saturation, carrier-position functions
```

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. It compares the
module's outputs with a model written independently in the testbench and ends
by printing `TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
          rtl/inv_pkg.sv tb/tb_rep_ctrl.sv --top-module tb_rep_ctrl -o sim
./obj_dir/sim
```

`tb_inverter_ctrl_top` runs the top at its default parameters, in closed loop
with a behavioural power stage and 5-bit converters. It simulates 8.5 output
periods, which takes about 15 s of wall time. It checks:

* every V_MOD against a model of the whole control chain;
* that each current sample falls inside the pulse it is meant to sample;
* the exact sample spacing and the interleave;
* that a leg never has both gates on, and that no overrun happens.

It also counts sampling in all three modes, dead-time intervals, the
repetitive controller switched on, a DC-link step and the sawtooth carrier.
Each of these must occur at least once. Measured RMS deviation from the
reference, with the reduced gains above:

| condition | RMS error |
|---|---|
| resistive load, repetitive control off | 9.3 V |
| rectifier load, repetitive control off | 10.6 V |
| rectifier load, fourth period after repetitive control is switched on | 6.9 V |

The test requires the repetitive controller to cut this error by at least
15 %.

Two further testbenches run the cases that differ from the default setup:

* `tb_inverter_ctrl_adc12` builds the top with `ADC_W = 12` and the same
  closed-loop plant. It simulates two periods with the resistive load, then
  three with the rectifier load and repetitive control on. It checks every
  V_MOD against the model at 12-bit scaling. With the rectifier load, the RMS
  deviation falls to 3.4 V, against 6.9 V with 5-bit converters. The
  resistive-load deviation hardly changes (8.8 V), because it comes from the
  reduced loop gains rather than from quantisation.
* `tb_dpwm_24k` runs the PWM generator at its default divider. It uses three
  legs at 24 kHz (FSW = 417) and at 18 kHz, and checks the period, the
  120-degree spacing and the on-times to the clock. It does not measure THD, and these figures belong to the simplified
testbench plant. They are not a prediction for real hardware.

## Departures and open points

* **Gains and delay.** The default gains are the ideal deadbeat values. With
  the one-period duty delay of this DPWM they are too high (see the section
  on timing), so the closed-loop test uses lower values.
* **V_MOD.** The source's PWM diagram shows a single 12-bit V_MOD input.
  Here there is one V_MOD per phase, written by the ring counter. The "digital
  current controller" and "digital ring counter" blocks of the source are only
  named there. Reading them as duty mapping and phase distribution is this
  design's interpretation.
* **Design choices.** The following are this design's own: the PHSH meaning
  (a 1-bit interleave enable with offsets P/PHAM), the SAMP_MODE encoding, the
  channel map, the chip-select width, sensor spans and number formats, the
  dead time counted in 20 MHz ticks, the shadow load at the carrier zero, and
  q, g.
* **Number of phases.** The source's parameter table lists phase inductors
  "i = 1, 2, 3, 4" but three phases. Three legs (NPH = 3) are built.
* **Resolution and frequency.** The source evaluates 5-bit and 12-bit
  converters. `ADC_W` covers both, and the default is 5. Its interleaving
  example runs at 24 kHz, while its system table gives 18 kHz. Both are FSW
  settings.
* **Not included.** The power stage, the converters with their sample-and-hold,
  and the soft processor used for host communication on the FPGA are not
  included.
