# RSSI-driven digital AGC for an 802.11a/g receiver

A WLAN receiver sees signals anywhere from about -90 dBm to -20 dBm at the
antenna. Before the OFDM baseband can demodulate anything, the radio's
low-noise amplifier (LNA) and variable-gain amplifier (VGA) must be set so that
the baseband signal is neither clipped nor buried in quantisation noise.

This controller sets both gains from one input: the radio's analog RSSI
(received signal strength) voltage after a 10-bit A/D converter. It never looks
at the I/Q samples. The central observation is that, at a fixed LNA level, the
VGA gain a signal needs is close to a straight line in the RSSI reading. A
single multiply-add therefore replaces the usual power estimator, look-up
tables and memories. A change of LNA level only shifts that line by a
constant, which one small correction handles.

The result is a four-stage pipeline with one multiplier and no memory. It runs
at one RSSI sample per clock and targets 80 MHz. In closed-loop simulation it
settles in 23 clocks on average, well under 1 µs.

```
            +----------------+   +-------------+   +------------------+   +-----------+
 rssi[9:0] -| power detector |-->| power calc  |-->| VGA & LNA        |-->| end stage |--> vga_gain[4:0]
 rssi_valid | y += (x-y)>>>m | Pn| Pc=Beta*Pn  | Pc| correction       |   | freeze /  |--> lna_gain[1:0]
            +----------------+   |    + A0     |   | Level_set, VGA   |   | release / |
                    ^ m          +-------------+   | max, quantise    |   | n-cycle   |
                    |               ^ Beta, A0     +------------------+   | hold      |
            +-------+-------------------------------^----------^------+   +-----------+
            |           control registers (dagc_regs)                 |     ^      |
            +----------------------------------------------------------+     |      |
                                                      applied LNA level <-----------+
                                                      freeze, release from baseband
```

## The gain model: what Pc means

Everything downstream of the multiplier works in **VGA gain steps**. The VGA
has 5 bits in 2 dB steps. The linear fit

    Pc = Beta * Pn + A0

is calibrated so that Pc is the VGA setting the current signal needs. Here Pn
is the averaged RSSI code. Pc keeps 10 fraction bits until the correction
stage rounds it. The calibration is a measurement of the needed VGA gain
against RSSI, taken with the LNA at its highest level. The slope Beta is
negative because a stronger signal needs less gain.

The RSSI detector sits *between* the LNA and the VGA. Two things follow:

* **VGA changes do not move the RSSI.** The VGA can therefore be updated on
  every sample with no settling time.
* **LNA changes do move the RSSI, by a constant per level.** The offset is
  about 16 dB (8 VGA steps) for medium and 32 dB (16 steps) for low. Those
  offsets are the programmable **Level_set** values.

## VGA & LNA correction: choosing the LNA level

`dagc_gain_correction` does the following with each estimate:

1. **Quantise:** `q = round(Pc)`, rounding half up.
2. **Refer to LNA high:** `g_high = q - Level_set(current LNA)`, with
   `Level_set(high) = 0`. `g_high` is the VGA gain the signal would need if the
   LNA were at its highest level. It is negative for signals so strong that
   even the VGA minimum would overdrive the receiver.
3. **Pick the highest usable LNA level.** Take the first level, from high to
   low, whose VGA gain is not negative:
   * if `g_high >= 0`, choose LNA high with `vga = g_high`;
   * else if `g_high + Level_set(med) >= 0`, choose LNA medium with
     `vga = g_high + Level_set(med)`;
   * otherwise choose LNA low with `vga = g_high + Level_set(low)`.

   Keeping the LNA as high as possible gives the best noise figure.
4. **Saturate** the VGA gain to `0 .. VGA max`.

**VGA max** is the highest gain that still improves reception. Past the
receiver's sensitivity, more gain only amplifies noise. Weak signals therefore
stop at VGA max instead of at the VGA's full scale.

The rule in step 3 is this implementation's own. The design only fixes what
the stage takes into account: the current LNA level, Level_set, quantisation
and VGA max. The rule has no hysteresis. A signal sitting exactly on an LNA
switching point can make the LNA toggle, with each toggle followed by the
n-cycle hold described below. If your front end needs hysteresis, add it here.

With the reset calibration and the testbench's front end, the switching
points are as follows (P is the antenna power in dBm):

| antenna power  | LNA    | VGA steps                    |
|----------------|--------|------------------------------|
| below -40 dBm  | high   | (-40 - P)/2, at most VGA max |
| -40 .. -24 dBm | medium | (-24 - P)/2                  |
| above -24 dBm  | low    | (-8 - P)/2                   |

## Power detector: averaging with alpha = 2^-m

The RSSI is noisy. The detector keeps a first-order recursive average:

    y(i+1) = (1 - a) y(i) + a x(i),   a = 2^-m

It is built as `y += (x - y) >>>` m, so it needs no multiplier. A small m
tracks fast power changes. A large m averages harder but responds slowly. With
3 bits for m, alpha runs from 1 (no averaging) down to 1/128.

The state keeps 7 fraction bits. Without them, a large m would let the average
stall up to 2^m - 1 codes away from a constant input. The output is rounded to
10 bits. The state is cleared at reset. It is not restarted after an LNA
change; the n-cycle hold covers that transient.

## End stage: when the gains may change

The end stage owns the gain word driven to the radio. It drops computed values
in two situations:

* **freeze .. release.** When the baseband detects a frame and synchronises, it
  pulses `freeze`. The gains applied in that cycle are then held until a
  `release` pulse, which marks the end of the frame or an aborted reception.
  A gain change in the middle of an OFDM frame would corrupt the channel
  estimate. If both pulses arrive together, freeze wins.
* **The n-cycle hold after an LNA change.** The RSSI needs time to settle after
  the LNA moves. Whenever an update changes the LNA level, the gains are held
  for `n` clocks and the values computed meanwhile are discarded. VGA-only
  changes start no hold. The counter keeps running while frozen.

After reset the LNA is at its highest level and the VGA at VGA max. That is
the most sensitive setting, so even a very weak signal can be seen. Two
assertions in `dagc_end_stage` check that the gains never move while frozen
and the LNA never moves during the hold.

## Control registers

All tuning is run-time programmable, so one controller serves both bands and
any board. Registers are written through a simple port: `reg_we`,
`reg_addr[2:0]` and `reg_wdata[17:0]`. A write takes effect on the clock edge.
`reg_rdata` returns the addressed field combinationally, with Beta and A0
sign-extended.

| addr | field     | width            | reset | meaning |
|------|-----------|------------------|-------|---------|
| 0    | m         | 3                | 2     | averaging exponent, alpha = 2^-m |
| 1    | Beta      | 16 signed, Q.10  | -43   | slope in VGA steps per RSSI code, ×1024 |
| 2    | A0        | 18 signed, Q.10  | 30720 | offset in VGA steps, ×1024 (30.0) |
| 3    | VGA max   | 5                | 26    | VGA saturation level |
| 4    | Level_set (medium) | 6       | 8     | LNA medium offset in VGA steps |
| 5    | Level_set (low)    | 6       | 16    | LNA low offset in VGA steps |
| 6    | n         | 8                | 32    | hold after an LNA change, clocks |

## Calibrating for a front end

Measure, with the LNA at its highest level, the VGA setting that gives good
reception at several input powers, together with the RSSI code. Fit a line
`vga = s * code + c`, then write `Beta = round(1024 * s)` and
`A0 = round(1024 * c)`. Measure the RSSI shift of each lower LNA level in dB,
halve it for 2 dB VGA steps, and write that as Level_set.

The reset values fit a front end whose RSSI reads 12 codes per dB, with 0 V at
-100 dBm and 2 mV per code, and whose ideal output is reached at
`vga = (-40 - P)/2`. That gives `vga = 30 - code/24`. They are placeholders
for such a measurement. The testbench's second band model (10 codes/dB plus
an offset) shows reprogramming: `Beta = -51`, `A0 = 32768`.

## Timing, size and interfaces

* **Latency:** a sample on `rssi` reaches `vga_gain`/`lna_gain` on the fourth
  clock edge. There is one register per stage: detector, multiply-add,
  correction, end stage.
* **Throughput:** one RSSI sample per clock. `rssi_valid` may be low on any
  cycle; the averaging then simply skips that cycle.
* **Reset:** synchronous, active high, `rst`.
* **LNA pins:** `lna_gain` uses the MAX2829 receive-gain bits B7:B6 (11 high,
  10 medium, 00 low). `lna_level` gives the same as an enum.
* **Size:** one 16×11 signed multiplier, which fits one 18×18 FPGA multiplier.
  There are 133 flip-flops: 65 in the pipeline and 68 in the control
  registers.

## How far this follows the original design

These parts follow the design as published:

* the chain of four stages and what each one does;
* the averaging equation and the power-of-two alpha;
* the linear estimate with one multiplier;
* the LNA correction by Level_set, the quantisation and the VGA saturation;
* freeze/release, the n-cycle LNA hold, and the reset state (LNA maximum, VGA
  at its saturation value);
* the 10-bit RSSI, the three LNA levels and the 80 MHz target.

These are this implementation's choices:

* all other widths and the fixed-point formats;
* the exact LNA decision rule (above) and round-half-up quantisation;
* freeze and release as pulses, with freeze taking priority;
* the register map and its port;
* every reset value of the coefficients;
* the 5-bit, 2 dB VGA code, taken from the front end's data sheet.

The published FPGA result reports 48 flip-flops. This RTL has 133, most of
them the control registers, whose exact contents and location the published
figures do not break down. No attempt was made to match that count.

## Verification

Each block has a self-checking testbench in `tb/` that compares against an
independent model. Each ends with a line `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `dagc_power_detector_tb` | 20k random samples with random m and valid gaps against an integer model of the recursion; convergence for every m; latency |
| `dagc_power_calc_tb` | 20k random Beta/A0/Pn against 64-bit arithmetic, corners; latency |
| `dagc_gain_correction_tb` | directed LNA decisions, rounding edges, both clamps; 20k random cases against a real-number model |
| `dagc_end_stage_tb` | reset state; exact n + 1 clock hold after an LNA change; freeze holds until release; 50k random cycles against a cycle model |
| `dagc_regs_tb` | reset values; random writes and read-back with truncation and sign extension |
| `dagc_top_tb` | closed loop, described below |
| `dagc_channel_sweep_tb` | six channel models (three per band, one calibration per band), -90 to -20 dBm in 1 dB steps: output level within 4 dB of target (worst seen 2 dB), LNA level away from switching points |

`dagc_top_tb` runs the whole design at its default configuration, in a closed
loop with two behavioural models:

* `rf_frontend_model`: LNA, RSSI detector and VGA, with a 16-clock RSSI
  settling after each LNA change and two band models;
* `rssi_adc_model`: a 10-bit converter with ±2 codes of noise.

In that loop the testbench:

* checks the 4-clock latency;
* steps the input power over -96 to -20 dBm and checks the final LNA level and
  VGA gain (to ±1 step) after every step;
* checks that the mean settling time is at most 80 clocks (1 µs at 80 MHz);
  it measures about 23;
* checks freeze/release during a "frame";
* switches band by reprogramming Beta and A0;
* runs with samples on alternate clocks.

It counts each mechanism (LNA changes and holds, VGA saturation, all three
LNA levels, freeze, release, band switch, sample gaps) and fails if one never
occurred.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb rtl/dagc_pkg.sv tb/dagc_top_tb.sv \
  --top-module dagc_top_tb -o sim
./obj_dir/sim
```

Replace `dagc_top_tb` with any other testbench name. Each one finishes in well
under a second.

## Files

* `rtl/dagc_pkg.sv`: widths, the LNA enum, the register map, the
  configuration struct and the reset defaults.
* `rtl/dagc_top.sv`: the controller.
* `rtl/dagc_power_detector.sv`, `rtl/dagc_power_calc.sv`,
  `rtl/dagc_gain_correction.sv`, `rtl/dagc_end_stage.sv`: the four pipeline
  stages.
* `rtl/dagc_regs.sv`: the control registers.
* `tb/*_tb.sv`: the testbenches.
* `tb/rf_frontend_model.sv`, `tb/rssi_adc_model.sv`: the behavioural models
  used by the testbenches only.

Not included: the RF front end, the RSSI A/D converter, the baseband receiver
that issues freeze/release, and the MAC. These are external parts; connect
them at the ports of `dagc_top`.
