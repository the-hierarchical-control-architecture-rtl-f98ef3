# Three-layer control for a cascaded battery energy-storage converter

A cascaded-H-bridge storage converter connects a long chain of battery cells
straight to a medium-voltage grid: each phase is a string of *n* standard
cascaded units (SCUs), each a battery, an isolated dual-active-bridge (DAB)
DC/DC stage and an H-bridge (CHB) inverter cell. One central controller cannot
reach dozens of cells with wires. It runs out of I/O, and the long
lines pick up interference. This RTL splits the control over three layers of FPGAs
joined by point-to-point serial (fiber) links:

```
                 +--> valve A --+--> sub A1 ... sub An  (one per SCU)
   master -------+--> valve B --+--> sub B1 ... sub Bn
  (PWM for all)  +--> valve C --+--> sub C1 ... sub Cn
          commands go down, status bytes come back up on every link
```

* **Master** (`master_controller`): builds the CHB PWM of all 3*n cells by
  comparing each phase's modulation wave with phase-shifted triangular
  carriers. Once per *packet cycle* it samples the leg states into one command
  packet per phase.
* **Valve** (`valve_controller`, one per phase): checks the packet and
  re-sends it, in its own packet cycle, to all cells of its phase at once.
  It gathers the cells' status bytes and passes them up.
* **Sub** (`sub_controller`, one per SCU): takes its own byte from the packet
  and drives the four CHB switches with a dead zone. It also drives the eight DAB switches with
  phase-shift modulation, trips locally on a fault and reports its status.

Because all PWM is generated in one place, no carriers have to be
synchronised between boards. The cost is that the bridges see the PWM only
as often as a packet can carry it. The rest of this file is mostly about that
trade-off.

## Timing model: a PWM sampled by packets

All sizes below assume a 120 MHz clock (every count is a parameter).

| quantity | clocks | time |
|---|---|---|
| bit (`BIT_CLKS`) | 8 | 66.7 ns (15 Mbit/s) |
| frame, 11 bits | 88 | 0.73 us |
| packet, 14 data + 1 check frame | 1320 | 11.0 us |
| packet cycle tau_s (`WINDOW_CLKS`) | 1596 | 13.3 us |
| idle time between packets | 276 | 2.3 us |
| CHB carrier period (`2*CARRIER_HALF`) | 60000 | 500 us (2 kHz) |
| dead zone (`DEAD_CLKS`) | 240 | 2 us |
| DAB period (`2*DAB_HALF_PERIOD`) | 6000 | 50 us (20 kHz) |

Every controller has a free-running packet-cycle counter, and the counters
are not synchronised with each other. A PWM edge made in the master
therefore reaches a bridge after:

1. up to one cycle until the master samples it;
2. one packet time to the valve;
3. up to one cycle until the valve's own window opens;
4. one packet time to the sub controller.

The latency is thus between 2*1320 and 2*1320 + 2*1596 clocks (22 to 49 us).
Two consequences follow.

* **Skew between phases.** The three valves wait different amounts in step
  3, so the same edge reaches phases A, B and C up to one packet cycle
  apart. In `pcs_control_top` the valve counters start at 0, 700 and 1400
  (`VALVE_OFFSET`) to stand for boards that power up at different times.
  The end-to-end test then measures a skew of 896 clocks (7.5 us).
  `tb_interphase_delay` runs four systems with other start offsets and
  measures skews from 84 clocks (0.7 us) to 1296 clocks (10.8 us).
* **No skew within a phase.** A valve has one packet serialiser whose line
  feeds all *n* cell links, and each cell picks its own byte. All cells of a
  phase therefore receive the same packet in the same clock.

Because the bridge sees the PWM sampled every tau_s, a pulse shorter than
tau_s may fall between two samples and vanish. The smallest duty that always
survives is P = tau_s * f_c = 1596 / 60000 = 0.027 at 2 kHz. In the
end-to-end test, pulses of duty 0.2 and 0.5 all arrive. At duty 0.02
(10 us pulses) 3 of 12 are lost. Pulses that arrive have their width
rounded to whole packet cycles.

## Link protocol

A frame is 11 bits on a line that idles high:

| bit | 0 | 1-8 | 9 | 10 |
|---|---|---|---|---|
| value | start (0) | data, MSB first | odd parity | stop (1) |

A packet is `N_FRAMES` data frames (14 by default) followed by one check
frame. The check frame carries, in its data field, the CRC-8 of all data
bytes: polynomial x^8+x^2+x+1 (0x07), initial value 0, MSB first, no
reflection. Frames of a packet follow each other with no gap. For example,
the byte 170 goes on the line as `0 10101010 1 1` and 85 as `0 01010101 1 1`.

The receiver (`packet_rx`, built on `frame_rx`) does two checks:

* every frame must have a correct start bit, stop bit and parity;
* the check frame must match the CRC of the data frames.

A packet that fails either check is dropped whole and the previous data stay
in force. The receiver re-aligns to packet boundaries whenever the line
stays idle for 3 bit times after a frame. `frame_tx`/`packet_tx` are the
sending side. `packet_tx` latches its data at `start` and raises `done` in
the last clock of the check frame.

Byte layouts (`pcs_pkg`):

* command (`cmd_t`), frame *k* of a downward packet, for cell *k*:
  bit 0 left leg (S9 on, else S10), bit 1 right leg (S11, else S12),
  bit 2 run, bit 3 fault reset. Frames past the last cell are 0.
* status (`status_t`), frame 0 of a cell's upward packet (frame 1 holds
  the cell number): bit 0 any fault, bit 1 over-current, bit 2
  over-voltage, bit 3 link lost, bit 4 running. In the valve's upward
  packet, frame *k* is cell *k*'s status.

With one byte per cell, one packet addresses up to `N_FRAMES` = 14 cells per
phase.

## Inside the layers

**`cps_pwm`**: carrier phase-shift PWM for one phase. A counter over
one carrier period yields a symmetric triangle for each cell. Cell *k*'s
triangle is delayed by k/(2n) of a period. Modulation is unipolar: the left
leg compares (H+m)/2 with the triangle, the right leg (H−m)/2, with
m in ±`CARRIER_HALF`. m = 0 gives 50 % on both legs.

**`dead_time`**: one leg. After each change of the command, both gates
stay off for `DEAD_CLKS` clocks before the new side turns on. `en` low kills
both gates combinationally, and an assertion guards against shoot-through.

**`dab_psm`**: single phase-shift modulation of the DAB. The primary
bridge (S1–S4) gets a 50 % square wave. The secondary (S5–S8) gets the same
wave delayed by the signed `phase` input, clamped to ±`DAB_HALF_PERIOD`/2 and
updated once per period. Its sign sets the power direction.

**`local_protection`**: latches over-current, over-voltage and link loss
(no good packet for 3 packet cycles). A comparator fault blocks the gates in
the same clock it appears. The latch clears only on a fault-reset command
with every cause gone.

**`sub_controller`**: packet_rx → own command byte → two `dead_time`
legs (S9–S12). Separately, `dab_psm` → four `dead_time` legs (S1–S8). All twelve
gates share the enable from `local_protection`. The status is sent up once per
packet cycle. Output `gate[i-1]` drives switch Si.

**`valve_controller`**: one `packet_rx` from the master, one shared
`packet_tx` to all cells, *n* `packet_rx` from the cells and one `packet_tx`
to the master. Both transmitters start on the valve's own window tick.

**`master_controller`**: three `cps_pwm`, one shared window counter, and
three `packet_tx` that start together. It also has three `packet_rx` whose
status bytes appear on `status[phase][cell]`, with `any_fault` as their OR.

The master also has a **test-pulse mode** (`test_pulse`). In this mode every cell of
a phase is sent the legs of cell 0, so all bridges of a phase should switch
in the same clock. The mode is there for measuring the link delays.

**`pcs_control_top`**: one master, three valves and 3*n sub controllers.
It also brings out the master's PWM, each cell's applied command and packet
strobe, and the valves' window ticks for observation.

## What is not in the RTL

* The closed-loop grid-current/voltage controller that produces the
  modulation waves, and the AC-side measurement: `modulation` is an input.
* The DAB's local control law: `dab_phase` is an input per cell.
* Optical transceivers: the links are plain wires.
* The power stage itself: battery, DAB, CHB and capacitors.

## Choices made here

The layer structure, the frame and packet formats, the double check (parity
plus CRC), the per-controller packet cycle and the shared packet within a
phase are the architecture this RTL implements. The following are choices
of this implementation and can be changed freely:

* the clock rate and bit rate;
* bit order, odd parity, and the CRC polynomial and initial value;
* the byte layouts;
* the carrier shift and unipolar PWM;
* dead-zone length, DAB frequency and phase range;
* the protection rules and link-loss timeout;
* the receiver's re-alignment rule;
* the valve start offsets.

## Parameters (defaults)

`N_CELLS` 4, `N_FRAMES` 14, `BIT_CLKS` 8, `WINDOW_CLKS` 1596,
`CARRIER_HALF` 30000, `DEAD_CLKS` 240, `DAB_HALF_PERIOD` 3000, `MOD_W` 17,
`PH_W` 13, `VALVE_OFFSET` {0, 700, 1400}, `SUB_OFFSET` 97 (cell *j* starts
its upward cycle at 97*(j+1)). `WINDOW_CLKS` must exceed a packet's length,
(N_FRAMES+1)*11*BIT_CLKS, and `N_CELLS` must not exceed `N_FRAMES`. Both
are asserted at elaboration.

## Simulating

Every module has a self-checking testbench in `tb/`, which prints
`TB_RESULT checks=N failures=M`. The shared helpers are:

* `tb_link_pkg`: reference CRC and frame builder;
* `tb_link_monitor`: reference line decoder;
* `tb_link_driver`: reference line driver.

Example, the full system at default sizes (about 1.2 million clocks, a few
seconds):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_pcs_control_top rtl/pcs_pkg.sv tb/tb_link_pkg.sv \
  tb/tb_pcs_control_top.sv -o sim && ./obj_dir/sim
```

`tb_pcs_control_top` covers the following, and prints the measured latency,
skew and pulse counts:

* packet delivery on every link;
* same-clock delivery within each phase;
* edge latency bounds and interphase skew;
* pulse survival at duty 0.5, 0.2 and 0.02;
* an over-current trip on one cell, with the fault reported to the master
  and then cleared;
* test-pulse mode, in which the S9 gates of a phase's four cells rise in the same clock;
* run = 0 stopping every gate;
* absence of shoot-through.

`tb_interphase_delay` runs four full systems side by side in test-pulse
mode. Their valve boards start at different points of the packet cycle.
It checks that the four cells of each phase switch together and that the
spread between phases stays below one packet cycle.

The block testbenches use reduced sizes (fewer frames, 4 clocks per bit,
short carriers) to keep runs short.
