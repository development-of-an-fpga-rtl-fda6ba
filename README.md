# Gate signal generator for a 5-level modular multilevel inverter

This RTL generates the eight gate signals of a single-phase, 5-level
*modular structured multilevel inverter* (MSMI). That inverter is two H-bridge
modules connected in series. The waveforms follow an optimal PWM scheme: a
DSP computes the switching angles on line for the requested output amplitude
`apl` (0..1 per unit). The DSP does not send those angles, because its board
has too few I/O pins to do so. It sends a 5-bit **case number** instead. Each
case number stands for one set of switching times, and the FPGA holds all the
sets as pre-calculated *count values* in 58 µs samples. The FPGA then
produces the gate pulses with sample accuracy and no further help from the
DSP.

The design is three blocks under one top:

| module | role |
|---|---|
| `counter58us` | ROM: case number `alpha[4:0]` → eight 5-bit counts `COUNTER1..8` (module 1) |
| `ncounter58us` | ROM: one bit `xalpha` → eight 9-bit counts `NCOUNTER1..8` (module 2) |
| `gensig58us` | sample counter and gate logic → `GENSIG[7:0]` |
| `gate_signal_generator` | top, wires the three together |
| `msmi_pkg` | shared widths, constants, `gate_t` |

## The inverter being driven

Module *r* (r = 1, 2) is an H-bridge with its own DC source and four devices.
`S1r` and `S3r` form the left leg, and `S2r` and `S4r` form the right leg.
A module outputs one of three levels:

| devices on | module output |
|---|---|
| S1r, S4r | +VDC |
| S3r, S2r | −VDC |
| S1r, S2r or S3r, S4r | 0 |

The phase voltage is Vo = Vm1 + Vm2, which gives five levels (−2..+2 VDC).
The switching is *hybrid*:

* **Fundamental legs.** `S11/S31` and `S12/S32` switch once per half cycle
  of the 50 Hz output. They set the sign of the half wave.
* **PWM legs.** `S21/S41` and `S22/S42` switch at a higher rate. They decide
  whether their module adds its ±VDC or sits at zero.

In each leg the lower device's gate is the complement of the upper device's
gate. The design inserts no dead time.

The split of work between the two modules follows the amplitude:

* **apl ≤ 0.5.** Module 1 is pulse-width modulated. Module 2 contributes
  nothing: its PWM leg simply follows its fundamental leg.
* **apl > 0.5.** Module 1 is modulated for the remainder (2·apl − 1).
  Module 2 runs one fixed pattern, the one for full module amplitude.

## Interface (`gate_signal_generator`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; with `CLKS_PER_SAMPLE = 1` (default) it *is* the 58 µs sample clock (17.24 kHz) |
| `reset_bar` | in | 1 | synchronous, active low; all gates 0 while low |
| `alpha` | in | 5 | case number (valid 1..25; others give no module-1 pulses) |
| `xalpha` | in | 1 | module 2's fixed set: 0 = idle set, 1 = full-amplitude set |
| `apl` | in | 1 | 1 when apl > 0.5: module 2 switches; 0: module 2 held at zero |
| `gate_signal` | out | 8 | `{g11,g31,g21,g41,g12,g32,g22,g42}`, `g11` in bit 7 (`msmi_pkg::gate_t`) |

`xalpha` and `apl` are separate pins, so the DSP side can drive them
separately. In normal use both are the same "apl > 0.5" flag.

`CLKS_PER_SAMPLE` divides a faster board clock down to the 58 µs sample
rate. For example, a 1 MHz clock would use 58.

## Timing base

All times are counted in 58 µs samples. A switching angle α (degrees) becomes
a count

    count = 0.01 · α / (180 · 58 µs)

One half period (10 ms) is therefore 172.4 samples. The RTL rounds this down
to `HALF_SAMPLES = 172`, so the fundamental period is `PERIOD_SAMPLES = 344`
samples. That gives 50.13 Hz, with one sample equal to 1.047°. The 9-bit
`NCOUNTER` width covers this period.

## How counts become gate edges (`gensig58us`)

A counter `phase` runs 0..343 at the sample rate. Everything else is
combinational on `phase` and on a held copy of the count inputs, and the
result is registered once.

**Fundamental legs.** `g11 = g12 = 1` for `phase < 172` (positive half
wave) and 0 for the second half. `g31`/`g32` are their complements.

**Module 1 PWM leg (COUNTER1..8).** The position inside the current half
period, `hpos = phase mod 172`, is compared against 8 slots. Slot *i* starts
at `floor(i·172/8)`, so the slots are 21 or 22 samples long. `COUNTER(i+1)`
is the width in samples of the one pulse in slot *i*. The pulse is centred in
the slot and clamped to the slot length (a 5-bit count can reach 31). During
a pulse the module is at ±VDC:

    g21 = g11 XOR pulse1,  g41 = NOT g21

In the positive half this turns S21 off and S41 on. Together with S11, that
gives +VDC. In the negative half it gives −VDC.

**Module 2 PWM leg (NCOUNTER1..8).** Here the counts are instants measured
from the period start. Module 2 is at ±VDC while `phase` lies in
[N1,N2), [N3,N4), [N5,N6) or [N7,N8), and only if `apl` is 1:

    g22 = g12 XOR pulse2,  g42 = NOT g22

**When new inputs take effect.** `counter`, `ncounter` and `apl` are copied
into holding registers:

* continuously while `reset_bar` is low;
* otherwise only on the last sample of each period.

A case change from the DSP therefore starts at the next period boundary. It
never cuts a pulse short or breaks the half-wave symmetry. The latency is up
to one period (20 ms) plus one clock.

**Output timing.** `gate_signal` is registered. It shows the state for a
`phase` value one clock after `phase` takes that value. While `reset_bar` is
low, all eight gates are 0 (every device off) and `phase` returns to 0.

An immediate assertion in `gensig58us` checks that each leg's two gates are
complementary whenever the block is out of reset.

## The stored tables

The count tables of the original design are not published. The RTL stores
example tables that are consistent with the scheme above. To use real
switching angles, replace them.

* **`counter58us`.** Case *c* (1..25) stands for a module amplitude
  m = c/25. The counts are those of a sampled sine with 8 pulses per half
  period:

      COUNTER(i+1) = round(21 · m · S_i / 256),  S_i = round(256 · sin((2i+1)·π/16))

  with S = {50, 142, 213, 251, 251, 213, 142, 50}. For every entry this
  equals round(21 · m · sin((2i+1)π/16)). Cases 0 and 26..31 give all-zero
  counts. The table is built at elaboration by the function `case_count`.
  The parameter `FULL_WIDTH` (21) sets the width at m = 1 and the sine peak.
* **`ncounter58us`**, where H = 172:
  * `xalpha = 0` gives {172,172,172,172,344,344,344,344}. These are the
    instants of 180° and 360°. Every interval is empty, so module 2 stays at
    zero.
  * `xalpha = 1` gives {A1, A2, H−A2, H−A1, H+A1, H+A2, 2H−A2, 2H−A1}, a
    quarter-wave symmetric pattern. Here A1 = 10 and A2 = 76 samples (about
    10° and 80°); both are parameters.

The mapping from `apl` to a case number is the DSP's job and is not part of
this RTL. The two worked examples of the original work use case 20 for
apl = 0.4 and case 11 for apl = 0.7, and the top-level testbench replays both.

## What follows the original design and what does not

These come from the original design:

* the three-block structure and its names;
* the pins and widths: `alpha[4:0]`, one-bit `xalpha` and `apl`,
  `COUNTER[4:0]`, `NCOUNTER[8:0]`, `GENSIG[7:0]`;
* 25 case numbers and the 58 µs sample time;
* the count formula and the 50 Hz fundamental;
* which devices switch at the fundamental and which at the PWM rate;
* complementary gate pairs;
* module 2 idle at 180°/360° for apl ≤ 0.5 and fixed for apl > 0.5.

These are this design's own choices:

* The meaning of the 5-bit counts (pulse widths in 8 slots) and of the 9-bit
  counts (on/off instant pairs). The original gives only the widths.
* **Which ROM drives which module.** One description calls module 1's counts
  `ncounter` and module 2's `counter`. The block structure, however, feeds
  the case number to `COUNTER` and a single bit to `NCOUNTER`, and it is
  module 1 whose angles depend on the case. This RTL follows the block
  structure: `COUNTER` → module 1, `NCOUNTER` → module 2.
* All table contents (see above).
* The rounding to 172 samples per half period.
* The bit order of `gate_signal`, the polarity (positive half first) and
  the centring of pulses.
* The period-boundary update, the reset behaviour, the registered output
  and `CLKS_PER_SAMPLE`.

Not included:

* the DSP board, i.e. the polynomial angle computation and the choice of
  case number;
* the inverter's power stage;
* dead-time insertion between complementary devices.

## Verification

Each testbench is self-checking and ends with a `TB_RESULT checks=… failures=…` line.

* `tb_counter58us`: all 32 case numbers × 8 counts against the real-valued
  sine formula, plus hand-worked entries.
* `tb_ncounter58us`: both sets against hand-written values.
* `tb_gensig58us` (`CLKS_PER_SAMPLE = 3`): random counts and modes, changed
  at random points mid-period. A cycle-accurate reference model compares all
  8 gates every clock. It also checks the reset state, the 344-sample period
  and width clamping.
* `tb_gate_signal_generator` runs the top at its default parameters and acts
  as the DSP:
  * apl = 0.4 (case 20, module 2 idle) and apl = 0.7 (case 11, module 2
    switching), then every case number 0..31 with the mode alternating;
  * the gates are decoded into the phase level −2..+2 and compared with an
    independently computed waveform every clock;
  * it counts resets, deferred updates, mode switches, invalid cases and
    each of the five levels, and fails if any of them never occurs.

A full run takes well under a second of simulation time per testbench.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert --top-module tb_gate_signal_generator \
        -y rtl -y tb -Irtl rtl/msmi_pkg.sv tb/tb_gate_signal_generator.sv
    ./obj_dir/Vtb_gate_signal_generator

Substitute `tb_gensig58us`, `tb_counter58us` or `tb_ncounter58us` to run the
block tests. `rtl/msmi_pkg.sv` must come first on the command line; the rest
is found through `-y`.

## Changing the design

* **Real switching angles.** Replace `case_count` in `counter58us` and the
  two sets in `ncounter58us`. Module 1 counts are pulse widths per slot.
  Module 2 counts are sorted on/off instants within 0..343.
* **Different board clock.** Set `CLKS_PER_SAMPLE` to clock frequency ×
  58 µs.
* **Different sample time or output frequency.** Change `HALF_SAMPLES` in
  `msmi_pkg`. `PHASE_W` and the slot boundaries follow from it, but the ROM
  contents do not.
