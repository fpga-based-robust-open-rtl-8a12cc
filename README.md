# Open-transistor fault diagnosis for a five-phase inverter

A five-phase permanent-magnet motor drive can keep running with one or two
dead phases, but only if it learns quickly which transistor or phase failed.
This RTL does that job on an FPGA. It watches only the five phase currents
the controller already measures, and it reports three things:

* a fault signal `FS` per phase;
* a code per inverter leg: upper transistor open, lower transistor open, or
  the whole phase open;
* an operating-mode code that a fault-tolerant controller uses to switch to
  the right reference currents and machine model.

The main idea is to look at the *angle* of each phase current, not at its
size. Each current sample `i(t)` is paired with the sample of the same phase
taken a quarter of a fundamental period earlier, `i(t - T/4)`. The index is

    D = atan2( i(t), i(t - T/4) )

For a healthy, roughly sinusoidal current, `i(t - T/4)` behaves like a
cosine. D then ramps steadily through -pi..pi once per cycle, whatever the
amplitude, so load and speed-reference steps hardly disturb it. When a
transistor is open, the phase carries no current for about half of each
cycle. During that time one of the two arguments is zero, so D is pinned at
0, +-pi/2 or +-pi. An open phase pins D at 0 all the time. The design
therefore counts how often D sits on one of those values over the last
cycle. When that share exceeds a programmable threshold, the phase is faulty.

## The signal chain

Everything runs from one 2 MHz clock, normally the output of the FPGA's PLL.
Slower "clocks" are one-cycle enables:

```
 adc_code --> adc_capture --> delay_line --> phase_mux --> cordic_atan2 --> phase_demux --+--> D
  (6x12b)     15 kHz regs     (i, i_T/4)     1 of 5        atan2, 17 clk     5 angle regs  |
                                 |                                                        v
                                 |     fault_detector --> moving_average --> comparator --> FS --> fault_code --> mode
                                 |     |D| = 0,pi/2,pi?   count over 1 cycle  x > TH       |
                                 +------------------------------------------------> fault_localizer --> leg codes
 clock_generator: clc_1 15 kHz sample, clc_2 PWM tick, clc_3/4 spare        phase_demux --> pwm_modulator --> pu
```

| Block | What it does |
|---|---|
| `clock_generator` | Fractional accumulators produce the enables. The sampling rate is 2 MHz / 133.33, so samples come alternately 133 and 134 clocks apart. On average the rate is exactly 15 kHz. |
| `adc_capture` | Stores the six 12-bit codes on the sampling enable: currents a..e and the rotor angle. Current codes are offset binary and are stored as two's complement. |
| `delay_line` | One circular buffer per phase, `PERIOD_MAX/4` deep. It is read `period/4` places behind the write pointer, so `i_d` is exactly a quarter period old. `primed` stays low until such a sample exists. |
| `phase_mux` | A sequencer that feeds the five (i, i_d) pairs to the single CORDIC one after another. |
| `cordic_atan2` | Iterative vectoring CORDIC: a +-90 degree pre-rotation, then 15 micro-rotations, one per clock. |
| `phase_demux` | Writes each result into the angle register of its phase and flags when all five are fresh. |
| `fault_detector` | Sets `y = 1` when the magnitude of D is within `ANG_TOL` of 0, pi/2 or pi. |
| `moving_average` | Counts the `y = 1` samples among the last `period` samples. |
| `comparator` | Sets `FS` when that share exceeds `TH`. |
| `fault_localizer` | Identifies the failed device in each faulty leg (next section). |
| `fault_code` | Derives the mode code from the five `FS` bits. |
| `pwm_modulator` | Outputs D as PWM, so that an RC/LC filter and an oscilloscope show it as a voltage. |

### Per-sample schedule

One sample period is 133 or 134 clocks. One sample goes through the chain as
follows, counted from the sampling enable:

| Clock | Event |
|---|---|
| 1 | `adc_capture` registers the codes |
| 2 | `delay_line` presents (i, i_d) |
| 3 | first CORDIC start |
| 3 .. 87 | five CORDIC runs of about 17 clocks each (start, 15 iterations, hand-over) |
| 88 | all five D values are ready (measured in simulation) |
| ~91 | `FS` updated |
| ~92 | mode code updated |

That leaves about 45 clocks of slack. Assertions in `phase_mux` and
`cordic_atan2` fire if a new sample or start arrives while the shared CORDIC
is still busy. Sharing one CORDIC this way costs one angle unit instead of
five. At 2 MHz there is ample time for it.

### Why the average is kept as a count

The fault share is `x = (fault samples in the last T) / T`. Dividing at run
time would need a divider, so `moving_average` outputs the count. The
comparator then tests `count * 4096 > TH * period` instead.

The count itself is also computed without a subtract-the-oldest-bit window.
Each phase keeps a running total `C` of fault samples, modulo 2^13. The
value of `C` after every sample goes into a buffer. The window count is
`C(n) - C(n - period)`. This stays exact when `period` changes from one
sample to the next, as it does while the motor accelerates. A plain sliding
window would keep stale samples forever after the period shrinks.

## Locating the failed device

Once a phase's `FS` is high, `fault_localizer` integrates two quantities
over whole fundamental cycles, counted from the rise of `FS`:

* the current polarity `S(i)`: +1 above +0.1 A, -1 below -0.1 A, 0 in
  between;
* the index D.

At the end of each cycle it decides:

| Condition (means over one cycle) | Leg code | Meaning |
|---|---|---|
| mean S > 0.5 | 1 | lower transistor open: the phase can only source current |
| mean S < -0.5 | -1 (3'b111) | upper transistor open |
| otherwise, \|mean D\| < eps | 2 | open phase: no current, D stays at 0 |
| otherwise | unchanged | no decision this cycle |

When `FS` falls, the code returns to 0. The means are never divided out:
the tests are `2*sum(S) > period`, `2*sum(S) < -period` and
`|sum(D)| < D_EPS*period`.

`fault_code` counts the faulty phases and checks whether two of them are
neighbours. The phases are taken as a ring, a-b-c-d-e-a. It produces:

| `fc` | Mode |
|---|---|
| 1 | healthy |
| 2 | one faulty phase |
| 3 | two adjacent faulty phases |
| 4 | two non-adjacent faulty phases |
| 5 | three or more faulty phases, beyond what the drive tolerates |

## Number formats and parameters

* Currents are 12-bit two's complement. The localization limit of 0.1 A
  assumes 1/256 A per LSB, i.e. a +-8 A range, which gives
  `I_ZERO_TH = 26`. Change it to match your current sensor.
* Angles are 16-bit binary angles: -32768..32767 is -pi..pi and
  16384 is pi/2. Sums and differences wrap correctly modulo 2*pi.
* `TH` is a 12-bit fraction of one cycle (4096 = 1). Healthy sinusoidal
  currents give x of about 3 % with the default `ANG_TOL`. A threshold
  of 0.5 is the conservative setting. To flag an open phase in less than
  a quarter cycle, TH must be below 0.25. The end-to-end test uses 0.2 and
  detects an open phase after 0.17 cycle.
* `period` is the fundamental period in samples. It is a run-time input
  in the range 4..`PERIOD_MAX`, normally supplied by the motor controller
  from the speed.

| Parameter (fd_top) | Default | Meaning |
|---|---|---|
| `CLK_HZ` | 2 000 000 | system clock |
| `SAMPLE_HZ` | 15 000 | current sampling rate |
| `PERIOD_MAX` | 4096 | longest fundamental period, in samples (3.7 Hz at 15 kHz) |
| `I_ZERO_TH` | 26 | 0.1 A zero band of the polarity function |
| `ANG_TOL` | 256 | +-1.4 degree band around 0, pi/2, pi |
| `D_EPS` | 512 | +-2.8 degree limit on the mean of D for an open phase |
| `CORDIC_ITER` | 15 | CORDIC micro-rotations |

With these defaults the buffers hold 5 x 1024 x 12 bits (delay) and
5 x 4096 x 13 bits (running counts), 327 680 bits in total. That fits
the block RAM of a mid-size FPGA such as a 22 k-LE Cyclone IV (608 256
bits).

The method's original FPGA implementation reports 19 pins, 1139 registers
and 4896 memory bits. This design is larger on purpose: it takes the six
ADC codes as a 72-bit parallel bus, and it keeps a full
window of running counts for periods up to 4096 samples. Lowering
`PERIOD_MAX` shrinks both buffers in proportion.

## Interface of `fd_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | 2 MHz clock; synchronous, active-high reset |
| `adc_code[0:5]` | in | 12 each | currents a..e (offset binary), rotor angle |
| `period` | in | 13 | samples per fundamental cycle |
| `th` | in | 12 | fault threshold, 4096 = 1 |
| `fs` | out | 5 | fault signal, bit 0 = phase a |
| `leg_code[0:4]` | out | `leg_code_e` | 0 ok, 1 lower, 3'b111 upper, 2 open phase |
| `fc` | out | `op_mode_e` | operating mode 1..5 |
| `d[0:4]` | out | 16 each | FD index per phase |
| `pu` | out | 5 | PWM images of D |
| `theta` | out | 12 | sampled rotor angle, passed to the controller |
| `clc_aux` | out | 2 | spare enables at 1 kHz and 100 Hz |

The types and constants are in `rtl/fd_pkg.sv`.

## What follows the method and what is this design's own

The following follow the method:

* the quarter-period pairing and the inverse tangent over -pi..pi;
* the three target values 0, pi/2 and pi;
* averaging over one fundamental cycle against a 12-bit threshold;
* the polarity function with a 0.1 A dead band, the +-0.5 limits and the
  mean-of-D test for an open phase;
* the leg codes -1/1/2 and the mode codes 1..4;
* one CORDIC shared through a multiplexer and demultiplexer, and a PWM
  output for D;
* the 15 kHz sampling into 12-bit registers, and the 2 MHz clock derived
  from 50 MHz.

The following are this design's choices, where the method leaves the point
open:

* The tolerance band around the target values. Exact equality would never
  hold with a real measurement.
* The run-time `period` input and `PERIOD_MAX`.
* Clock enables instead of derived clocks.
* Offset-binary ADC codes.
* All word widths and the binary-angle format.
* Returning D = 0 for a zero vector. This is the value the method expects
  for an open phase. A CORDIC without this case returns some fixed angle
  (such as pi/4) there, which would then have to be added to the detector's
  target values.
* The running-count window.
* Integrate-and-dump averaging in the localizer. Judging once per cycle
  matches "localized within one fundamental cycle".
* Mode code 5.
* The start-up guard: no fault samples are counted before the delay line
  holds a real quarter-period-old sample. Without it, every phase raises a
  false alarm in the first quarter cycle after reset.
* All handshakes.

## Limits to keep in mind

* **Noise on a dead phase.** With an open phase, both `i` and `i_d` are
  near zero. Any noise then turns into random angles rather than D = 0.
  The chain relies on clean current samples. The method calls for a
  low-pass filter ahead of it, cut off at about ten times the fundamental
  frequency. That filter is not part of this RTL: add it in the analog
  front end, or as a digital filter between `adc_capture` and `delay_line`.
* **Half-wave currents and the 0.5 limit.** With a purely half-wave
  current, mean S is slightly *below* 0.5, because samples inside the
  0.1 A band count as zero. The leg is then reported as faulty, but no
  device is named. In closed loop the controller shifts the faulty phase's
  current, and the positive or negative part lasts longer than half a
  cycle. The end-to-end test models that shift with a 0.3 offset.
* **`FS` is not latched.** It follows the averaged index. The mode code
  therefore returns to healthy if a fault disappears. Latching, if
  wanted, belongs in the controller.
* **`period` must be right.** A wrong `period` detunes the quarter-period
  delay, and a healthy phase's D stops ramping linearly. How far `period`
  may be off before false alarms appear has not been characterised.
* **Not covered.** The sliding-mode current controller, its disturbance
  observer, the fault-tolerant reference currents and the space-vector
  modulator are outside this RTL. They run on the drive's controller, which
  consumes `fs`, `leg_code` and `fc`. The PLL, the converter chip and the
  inverter are likewise outside.

## Verification

Every block has a self-checking testbench in `tb/`. Each compares against
values computed independently in the testbench and ends with a
`TB_RESULT checks=N failures=M` line:

| Testbench | What it checks |
|---|---|
| `tb_clock_generator` | Enable counts over 0.1 s; 133/134-clock spacing of the 15 kHz enable. |
| `tb_adc_capture` | Offset-binary conversion, hold between enables, `valid` timing. |
| `tb_delay_line` | Delayed samples against a software history, with `period` changing at run time (down to 4, up to the maximum); `primed`. |
| `tb_cordic_atan2` | 4000 random vectors and the axes against real `$atan2`: error at most 6 units (0.03 degree) for vectors of 64 LSB or more; (0,0) gives 0; result exactly 15 clocks after start. |
| `tb_phase_mux` | Order, data and `sel` stability against a stand-in CORDIC with random latency. |
| `tb_phase_demux` | Register steering; completion pulse after phase e only. |
| `tb_fault_detector` | Band decisions against real-valued angles; the `arm` guard. |
| `tb_moving_average` | Window counts against a software history while density and `period` change. |
| `tb_comparator` | Against real division, including x = TH exactly. |
| `tb_fault_localizer` | Random episodes of each current shape against a real-valued model of the rules. |
| `tb_fault_code` | All 32 FS patterns against the ring adjacency. |
| `tb_pwm_modulator` | Measured high time against the duty for random angles and for +-pi. |
| `tb_fd_top` | End to end at the default parameters (below). |
| `tb_fd_workloads` | The reconfigured fundamental-plus-third-harmonic currents of the fault modes (one open phase, two adjacent, two non-adjacent), a dead phase with a lower fault on another, acceleration, deceleration, braking and reversal of rotation. |

`tb_fd_top` simulates 33 fundamental cycles at 50 Hz (300 samples per
cycle, about 1.3 M clocks). Its model of five phase currents, 72 degrees
apart, goes through these segments:

1. healthy;
2. a 50 % current step up, then back down;
3. a lower-transistor fault on phase a, then also an upper-transistor fault
   on b;
4. all faults cleared;
5. an open phase a, then c, then d.

It checks:

* D against the analytic value pi minus the phase, in healthy operation;
* no false alarm in any healthy segment, including the steps;
* every sample's five angles ready within one sample period;
* open-phase detection within a quarter cycle;
* `FS`, the leg codes and the mode code at the end of each segment.

It also counts each mechanism: sampling, shared-CORDIC rounds, load steps,
full windows, FS rises, every leg code, every mode code, PWM edges and the
spare enables. A mechanism that never occurs counts as a failure. For each
module a deliberately broken variant was confirmed to make its testbench
fail.

## Simulating

With Verilator 5 (two-state simulation, so everything read is reset):

```sh
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb --top-module tb_fd_top rtl/fd_pkg.sv tb/tb_fd_top.sv
./obj_dir/Vtb_fd_top
```

Replace `tb_fd_top` with any other testbench name to run that block alone.
The end-to-end run takes a few seconds. For lint, use
`verilator --lint-only -Wall -y rtl rtl/fd_pkg.sv rtl/fd_top.sv`. To
change the drive, edit the parameters of `fd_top` and feed the real
`period` from the speed. Set `TH` at run time.
