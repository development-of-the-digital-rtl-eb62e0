# Pulsed digital I/Q feedback for a 350 MHz linac cavity

This is the FPGA logic of a low-level RF (LLRF) controller. It holds the
accelerating field of a 350 MHz proton-linac cavity to ±1 % in amplitude and
±1° in phase. The cavity pick-up is mixed down to a 10 MHz intermediate
frequency (IF) outside the FPGA and sampled at 40 MHz. The logic recovers the
field's in-phase and quadrature parts (I and Q) from those samples. It
subtracts them from host-programmed set values and runs a
proportional-integral (PI) controller on each part. The two results go to two
14-bit DAC channels, which drive an analogue IQ modulator in front of the RF
amplifier. RF comes in pulses, opened by an external trigger. A host processor
sets the set values and gains at any time, even during a pulse. It reads back
the measured I/Q of every pulse, plus the live amplitude and phase.

The design follows the published PEFP (Proton Engineering Frontier Project)
prototype LLRF system. That system uses a commercial PMC board with 14-bit
ADCs, 14-bit DACs and a Xilinx FPGA, driven by a VME host over PCI. The
prototype's structure is reproduced here: four-times IF sampling, digital I/Q
detection, comparison with set values, a PI controller per channel, pulsed
operation and host access. The original publication does not give its
register map, number formats, pipelining or buffer layout, so those are
choices made here. Each one is noted below and in the header comment of the
file it belongs to.

```
 ADC 14b, 40 MS/s         +-------------+  meas I/Q   +---------------+   +--------------+
 10 MHz IF  ------------->| iq_detector |--------+--->| pi_controller |-->|              |--> DAC I
                          +-------------+        |    |  (I channel)  |   | drive_select |
                                                 +--->| pi_controller |-->|              |--> DAC Q
                                                 |    |  (Q channel)  |   +--------------+
                                                 |    +---------------+          ^ rf_on, fb_en
                                                 +--> capture_buffer (one pulse, for the host)
                                                 +--> iq_to_polar    (amplitude, phase)
 ext_trig --> pulse_ctrl --> rf_on ------------------------------------------------+--> rf_gate
 host bus <-> host_regs  --> set values, gains, pulse length, stride, mode
                   ^--- polar_to_iq (amplitude/phase set value -> I/Q)
```

## Detecting I and Q with four samples per period

The sample clock is exactly four times the IF, so consecutive samples sit 90°
apart on the IF carrier. If the IF is written as
`x[n] = I·cos(πn/2) − Q·sin(πn/2)`, the four samples of one period are
`I, −Q, −I, Q`. `iq_detector` keeps the latest sample of each of the four
phases and, after every new sample, forms

    meas_i = x0 − x2 = 2·I        meas_q = x3 − x1 = 2·Q

This gives three things:

* I/Q are refreshed at the full 40 MHz rate and not once per IF period.
* Any DC offset of the ADC cancels in the difference.
* The measured values are twice the IF amplitude in ADC LSBs. Set values are
  written in these measured units.

The phase counter runs freely from reset. Its relation to the IF phase is a
fixed rotation, which calibrating the set values absorbs. There is no
multiplier and no filter in the detector. Noise is handled only by the
averaging that the cavity and the loop provide.

## The PI controller, its number formats and the loop delay

Each channel computes `error = set − measured`. Its output is
`Kp·error + Σ Ki·error`, clipped to the DAC range. The gains are unsigned
18-bit registers:

| gain | format | reset value | meaning |
|------|--------|-------------|---------|
| Kp   | 10.8 fixed point | 768 | 3.0 |
| Ki   | 2.16 fixed point, per sample | 328 | 0.005 per 25 ns sample |

The reset values come from the loop study of the original system: P gain 3,
and I gain 200 000 s⁻¹ for an integrator in continuous time. A discrete
integrator that adds `Ki·error` every sample has `Ki = 200 000 s⁻¹ × 25 ns
= 0.005`.

The integrator is 40 bits wide and is clipped to the range that maps onto the
DAC (anti-windup). A clipped output or integrator raises `sat`, which the host
sees in the status register. When the controller is disabled, the integrator
and the pipeline are held at zero. That happens outside a pulse, in open loop,
and before the detector has seen four samples. Every pulse therefore starts
from a clean state.

Delay decides how far the gain can be pushed: the loop study found a gain
margin of about 12 at a total loop delay of 1.6 µs. The FPGA contributes
5 clocks (125 ns) from an ADC sample to the DAC code:

| stage | clocks |
|-------|--------|
| detector output register | 1 |
| error | 1 |
| gain products | 1 |
| integrate, add, clip | 1 |
| drive select | 1 |

The rest of the 1.6 µs is in the converters, the analogue chain and the
cables.

## Pulses and loop modes

`pulse_ctrl` passes the asynchronous external trigger through a two-flop
synchroniser. Each rising edge opens a pulse of `PULSE_LEN` clocks; the reset
value is 4000, which is 100 µs. The pulse opens three clocks after the edge is
sampled. A trigger that arrives during a pulse is ignored. `PULSE_LEN = 0`
disables pulsing. A software trigger (CTRL bit 1) does the same as the
external one.

`drive_select` chooses what the DAC gets:

| condition | DAC I/Q |
|-----------|---------|
| outside a pulse | 0 |
| closed loop (CTRL bit 0 = 1) | PI outputs |
| open loop (CTRL bit 0 = 0) | set values, clipped to 14 bits |

The open-loop drive is a choice made here; the original only compares open
and closed loop. With a plant gain that maps drive `u` onto a measured value
`u`, the open-loop field equals the set value. DAC codes are two's
complement.

## Host registers

The host bus is a simple synchronous word bus on the 40 MHz clock. A write
takes effect at its clock edge. A read returns data with `bus_rvalid` one
clock later. Addresses are word addresses:

| addr | name | access | contents |
|------|------|--------|----------|
| 0x000 | CTRL | rw | [0] feedback enable; [1] software trigger (write 1, reads 0) |
| 0x001 | SP_I | rw | signed 16-bit I set value, measured units |
| 0x002 | SP_Q | rw | signed 16-bit Q set value |
| 0x003/0x004 | KP_I / KP_Q | rw | Kp, 8 fraction bits |
| 0x005/0x006 | KI_I / KI_Q | rw | Ki per sample, 16 fraction bits |
| 0x007 | PULSE_LEN | rw | pulse length in clocks (24 bits) |
| 0x008 | STRIDE | rw | capture keeps one sample in STRIDE (0 acts as 1) |
| 0x009 | STATUS | ro | [0] RF on, [1] feedback, [2] I clipped, [3] Q clipped, [4] buffer full |
| 0x00A | SHOTS | ro | pulses since reset |
| 0x00B | LIVE_IQ | ro | {meas_i, meas_q} |
| 0x00C | CAP_COUNT | ro | entries captured in the current or last pulse |
| 0x00D | DRIVE | ro | {dac_i, dac_q}, each sign-extended to 16 bits |
| 0x00E | AMP_PH | ro | {amplitude, phase}; phase is two's complement, 2¹⁶ per turn |
| 0x00F | SP_AMP | rw | set value as amplitude (measured units); a write converts |
| 0x010 | SP_PH | rw | set value phase, 2¹⁶ per turn; a write converts |
| 0x800 + n | buffer | ro | capture entry n as {I, Q} |

The set value can be given in either of two forms:

* As I and Q, written directly to SP_I and SP_Q.
* As amplitude and phase, which is how the loop study's command input states
  it. A write to SP_AMP or SP_PH sends the pair through `polar_to_iq`. This
  is a 16-iteration CORDIC rotator: it pre-scales the amplitude by 1/K and
  handles phases beyond ±90° by starting from the negated vector. After
  18 clocks its result overwrites SP_I/SP_Q, accurate to 2 LSB + 0.01 %.

To change both amplitude and phase, write SP_AMP and then SP_PH. The first
conversion produces an intermediate set value, which the second replaces one
clock later. A direct SP_I/SP_Q write in the same clock as a conversion
result takes precedence.

The original system reaches its registers through a PCI bridge chip. Bridging
PCI to this bus is not part of this RTL.

## Monitoring: capture buffer and amplitude/phase

`capture_buffer` is a 1024 × 32-bit RAM. At each pulse start it rewinds. It
stores the measured I/Q of the start clock, then one sample in every `STRIDE`
while the pulse lasts, and stops when full. At stride 1 it holds the first
25.6 µs of a pulse. A larger stride spreads the 1024 entries over a longer
pulse. The host must read a pulse's record before the next pulse starts.

`iq_to_polar` is a pipelined 16-iteration CORDIC in vectoring mode. It turns
the live I/Q into amplitude and phase, so the digital measurement can be
compared with an analogue amplitude detector and phase comparator. It first
folds the vector into the right half plane. It then rotates it by
±atan(2⁻ⁱ) while accumulating the angle in 2¹⁸ units per turn. Finally it
scales the amplitude by 1/K = 39797/2¹⁶ to remove the CORDIC gain. Results
arrive 18 clocks after their input:

* amplitude: within 3 LSB + 0.01 %
* phase: within 0.022° for amplitudes above 1024

## What is outside this RTL

The following parts of the complete system have no RTL here:

* the ADC and DAC chips
* the DAC's own quadrature up-converter, which is not used in this signal path
* the board's ADC decimator
* its SDRAM/QDR memories
* the PCI bridge
* the VME host and its software
* the analogue subrack: IQ modulator, mixer, RF switch, detector, phase
  comparator
* the VSWR trip and interlock circuits

The top brings out what connects to them:

* `adc_data`: one ADC channel, two's complement
* `dac_i`, `dac_q`
* `rf_gate`, high during a pulse, for an RF switch or for gating
* the host bus

Everything runs on the one 40 MHz sample clock. A host interface on another
clock would need its own synchroniser.

## Where this design departs from or goes beyond the original

* Only one ADC channel is used: the cavity pick-up. The board's second ADC
  channel and its decimator are left alone, and the logic runs at the full
  40 MHz.
* The prototype is a plain PI loop. Feed-forward is named as a reason for
  choosing a digital system, but the prototype does not have it, and neither
  does this design. Beam-loading compensation, set-value tables over the
  pulse and interlock logic are also absent.
* The capture buffer is on-chip RAM of one pulse. The board's SDRAM and QDR
  SRAM are not used.
* The controller is disabled in open loop and between pulses, so each pulse
  starts with an empty integrator. Gains and set values are used as soon as
  they are written; there are no shadow registers.
* The I/Q reference phase is whatever the free-running sample counter gives.
  Set values therefore need a one-time phase calibration against the real
  cavity.

## Verification

Every module has a self-checking testbench in `tb/`:

| testbench | what it checks |
|-----------|----------------|
| `tb_iq_detector` | every output against a sliding-window reference, including offset rejection and the one-clock latency |
| `tb_pi_controller` | a 64-bit cycle model, plus directed P-only, I-only, clipping, wind-up and enable cases, and 20 000 random cycles |
| `tb_pulse_ctrl` | pulse width to the clock, synchroniser latency, retrigger rule, shot count |
| `tb_drive_select` | the DAC selection rule |
| `tb_capture_buffer` | depth, stride, rewind and read latency |
| `tb_host_regs` | every register, the reset values and the read latency |
| `tb_iq_to_polar` | against floating-point `sqrt`/`atan2` in all four quadrants |
| `tb_polar_to_iq` | against floating-point `cos`/`sin`, quadrant borders and saturation |

`tb_llrf_top` runs the whole controller at its default parameters. It closes
the loop through `tb/cavity_model.sv`, a behavioural plant (not
synthesizable) with these properties:

* a first-order complex low-pass with a time constant of 512 samples
  (12.8 µs)
* plant gain and phase that can be set
* ±2 LSB of ADC noise
* 59 clocks of extra delay, which makes the total loop delay 64 clocks,
  i.e. 1.6 µs

The test repeats the original system's detuning experiment: a step of −10 % in
plant gain and +12° in plant phase in the middle of a pulse.

| loop | amplitude error | phase error |
|------|-----------------|-------------|
| open | −10.0 % | +12.0° |
| closed, default gains | −0.013 % | −0.015° |

The closed-loop errors are measured 6500 clocks after the step. The test also
does the following:

* compares every DAC code against `Kp·(set − measured)` rebuilt from the raw
  ADC samples. This pins the 5-clock latency.
* checks the capture buffer against the same rebuilt samples.
* forces the controller into clipping.
* rewrites the set value, as amplitude and phase, and the gains during a
  pulse, and checks that the loop settles again.
* checks that a retrigger is ignored.
* counts each of these mechanisms, and fails if any of them never occurred.

`tb_llrf_beam_loading` repeats the beam-loading case of the loop study with
the same gains and a 65-clock (1.625 µs) loop delay. The beam is a field of
5 % of the set value in antiphase, switched on for 4000 clocks in the middle
of a pulse:

| loop | worst dip during the beam | error at the end of the beam |
|------|---------------------------|------------------------------|
| open | 5.1 % | −5.0 % |
| closed | 1.2 % | +0.03 % |

The closed-loop dip is the transient while the integrator catches up; the
P term alone would leave a quarter of the beam's 5 %.

`tb_llrf_shot_to_shot` repeats the shot-to-shot measurement over 60 shots.
Before each shot the plant gets a new random gain (±1.5 %) and a phase that
drifts by 2.6° over the series. Each shot runs once in open loop and once in
closed loop. The host reads the amplitude/phase register 125 µs into each
pulse. Peak-to-peak spread over the 60 shots:

| loop | amplitude | phase |
|------|-----------|-------|
| open | 3.0 % | 2.8° |
| closed | 0.16 % | 0.09° |

The cavity model is deliberately simple. Its beam is a plain step of induced
field, and it has no Lorentz-force detuning. Its bandwidth was chosen for a
quick simulation, not taken from a real DTL tank. The closed-loop numbers show that the loop
structure, signs and scaling are right; they do not predict the stability of
a real cavity.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -y tb +libext+.sv -Irtl rtl/llrf_pkg.sv tb/tb_llrf_top.sv \
    --top-module tb_llrf_top -Mdir obj_top
./obj_top/Vtb_llrf_top
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Replace the
testbench name to run another one. The full-system test takes well under a
second.

## Changing it

* Widths and gain formats live in `rtl/llrf_pkg.sv`: `IQ_W`, `GAIN_W`,
  `KP_FRAC`, `KI_FRAC`, `LEN_W` and the reset values. The register map is also
  there.
* The capture depth is the top's `CAP_DEPTH` parameter. The buffer read
  window is 0x800–0xFFF, so the depth can go up to 2048.
* A different IF-to-clock ratio needs a new detector. The `x0 − x2`,
  `x3 − x1` scheme only works at exactly four samples per period.
* The PI controller is one module used twice. Feed-forward or other
  algorithms would add their term in `drive_select`.
