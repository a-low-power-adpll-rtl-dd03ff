# Low-power ADPLL frequency synthesizer

An all-digital phase-locked loop that multiplies a 50 MHz reference up to
300, 400, 500, 600, 850 or 1000 MHz. Its main idea is a **one-cycle
phase/frequency detector**. At every reference edge the oscillator is
stopped and then restarted in phase with the reference. Its edges are
counted, and at the *middle* of the reference cycle one comparison tells
whether it ran fast or slow. Because the oscillator starts aligned on
every cycle, this single comparison covers frequency and phase together.
The control word is corrected once per reference cycle, and the loop
locks in a handful of reference cycles (the target is at most 16).

The loop has four parts:

| part | module | kind |
|---|---|---|
| digitally controlled oscillator (ring of 8 delay cells + enabling NAND) | `dco`, `dcde` | behavioural model |
| DCO enable pulse generator with replica delay, matched-delay reference | `dco_enable_gen` | behavioural model |
| phase/frequency detector: adjustable-length DCO counter + two synchronizers | `pfd`, `dco_counter`, `pfd_sync` | synthesizable |
| control unit: DCO control register, frequency and phase gain registers, one shared adder/subtractor | `control_unit`, `freq_gain_reg`, `phase_gain_reg`, `addsub`, `full_adder` | synthesizable |

`adpll_synth` is the top and wires the loop together. The oscillator parts
are delay-based circuits, so they are written as timed behavioural models
(`#` delays on `realtime`, in ps). Everything on the digital side is plain
synthesizable SystemVerilog.

## One reference cycle, step by step

This is the part that takes the most thought. Take the 500 MHz setting
(N = 10) with a 20 ns reference period:

1. **Rising reference edge (t = 0).**
   - The control unit registers the new control word, computed from the
     previous comparison.
   - At the same edge `dco_enable_gen` pulls `dco_en` low. The enabling
     NAND then holds the ring at rest with the DCO output high, and the
     counter chain is cleared.
2. **t = d (d ≈ half a DCO period).** `dco_en` rises again.
   - d is the delay of a replica of the oscillator. The model takes the
     longer of the half periods before and after the word change, plus
     1 ps, so the ring is certainly at rest.
   - The DCO's first falling edge comes half a period later. Its k-th
     rising edge comes k periods after `dco_en` rises.
   - The reference seen by the detector, `ref_m`, is the reference
     delayed by the same d. Relative to `ref_m`, the DCO is therefore an
     ideal oscillator started exactly at the reference edge.
   - The generator is just that delay element and a NAND:
     `dco_en = ~(ref_clk & ~ref_m)`, low from the reference edge until
     `ref_m` follows it.
3. **DCO counting.** `dco_counter` shifts a 1 into a chain of 10
   flip-flops on every counted DCO edge, so stage k is high after k edges.
   - For output N × f_ref, N/2 DCO periods must fit into half a reference
     period, so stage N/2 is the one compared.
   - For the odd factor (850 MHz, N = 17) the clock is inverted. The
     counter then counts falling edges, and the 9th of them comes 8.5
     periods after start.
4. **Falling edge of `ref_m` (t = d + 10 ns).** Two synchronizers sample
   the counter.
   - **FAST** = the selected stage is already high: the DCO reached its
     count before the mid-point, so it is too fast.
   - **Lock** = FAST, and the same stage delayed by half a DCO period
     (`late`, captured on the opposite DCO edge) is still low. In other
     words, the counted edge arrived within the last half DCO period
     before the mid-point.
5. **Next rising reference edge.** The control unit uses FAST and Lock to
   update the word. This leaves it about half a reference period (10 ns)
   to settle, which is why a ripple-carry adder is good enough.

One comparison plus one update per reference cycle is the whole loop.
There is no separate phase-acquisition phase.

## The control word and the oscillator

The DCO control word is 11 bits:

- **bit 10, path select (coarse tune).**
  - 0 = all eight delay cells in the ring (low band, 260–635 MHz).
  - 1 = the ring closes after four cells (high band, 500–1150 MHz).
- **bits 9:3** drive the 7-bit binary-weighted device bank of all eight
  cells.
- **bits 2, 1, 0** drive one *extra* smallest device, present in four,
  two and one of the cells respectively.

So with eight cells the whole 10-bit fine code acts as one binary number:
a code step of 1 changes the total drive by exactly one smallest device.
In the four-cell path the three extra bits act with weights 2, 1, 1. That
is still monotonic, though not strictly.

Each delay cell (`dcde`) models a current-mirror delay element. An
always-on device plus the binary-weighted bank set a current, the current
is mirrored into a current-starved inverter, and more current gives less
delay. The model uses delay = 40 ps + 8441 / (44.25 + code) ps, with
code 0…128. The delay falls monotonically with the code, and both edges
see the same delay. The constants are not given by the source design;
they were fitted so that the ring covers the two bands above. The fixed
NAND/multiplexer delay is 77 ps. The resulting step per fine code ranges
from well under 1 ps to about 9 ps of period, depending on band and code.

## Frequency select

One-hot `freq_sel`, bit 0 to bit 5:

| select | output | N | compared counter edge |
|---|---|---|---|
| S300M (bit 0) | 300 MHz | 6 | 3rd rising |
| S400M (bit 1) | 400 MHz | 8 | 4th rising |
| S500M (bit 2) | 500 MHz | 10 | 5th rising |
| S600M (bit 3) | 600 MHz | 12 | 6th rising |
| S850M (bit 4) | 850 MHz | 17 | 9th falling (inverting path) |
| S1G (bit 5) | 1000 MHz | 20 | 10th rising |

If several bits are set, the lowest one wins. If none is set, the counter
behaves as for S1G. Change the select only while the DCO is disabled, or
accept one bad comparison: the loop recovers by itself.

## Control unit: two modes and their gains

- **Path choice.** After reset the word is 0x3FF, the top of the low band.
  The first comparison fixes bit 10 for good: if the DCO is slow even
  there, the high band is chosen. The fine code then restarts at 512.
- **Acquisition: modified binary search.** The frequency gain starts at
  256, held in an 11-bit shift register that only shifts right. At each
  comparison:
  - if FAST changed polarity since the previous comparison, the gain is
    first halved (never below 1);
  - then the word gets gain − when FAST is high, and gain + when it is low.
  - The gain is halved only on a change of direction, not on every step.
    So a target near the end of the range is approached in steps that are
    still large.
- **Switch.** The first comparison with Lock high moves the unit to
  maintenance mode (`locked` output). It stays there until reset.
- **Maintenance: phase-gain strategy.** Steps use the 4-bit one-hot phase
  gain (1, 2, 4 or 8), which starts at 1.
  - Eight successive comparisons with the same FAST polarity shift it left
    (a drift needs a larger correction).
  - A polarity change shifts it right (the loop is dithering around the
    lock point, so a smaller step gives less jitter).

A single adder/subtractor chain (a + b, or a + ~b + 1) serves both
gains. The fine code is clamped at 0 and 1023 inside the chosen band
instead of wrapping into the other band.

## The output clock

`clk_out` is the ring itself. Because the ring is stopped and restarted
once per reference cycle, the output has one stretched high phase, longer by
about half a DCO period per 20 ns. Inside a reference cycle the edges are
evenly spaced. Between reference cycles the loop dithers by one phase-gain
step around the word that places the N/2-th counted edge on the mid-point.

## Timing and reset

- `ref_clk`: the control unit registers on its rising edge.
- `ref_m`: the synchronizers sample on its falling edge.
- DCO clock: the counter chain is clocked by the DCO, or by its inverse for
  N = 17. It is cleared asynchronously while `dco_en` is low.
- Observation outputs of the top: `dco_en`, `ref_m`, and `gain`, the
  step the control unit will apply at the next rising reference edge.
  The testbenches follow the loop through these ports only.
- `rst_n`: asynchronous, active low. It clears the synchronizers and
  returns the control unit to acquisition with word 0x3FF. The first
  comparison after reset is used only once `valid` is high.

## Where this RTL departs from, or adds to, the source design

These are choices made where the source design is silent or gives only a
figure:

- **Lock window: half a DCO period before the mid-point.** The source
  design names two synchronizers that capture the counter output and its
  inversion, but not the window width. This window is generous, so Lock
  comes early (1–5 reference cycles in simulation, against a quoted worst
  case of 16). Maintenance mode then pulls the edge onto the mid-point. A
  narrower window would need a finer delay in `dco_counter`.
- **Where the enable pulse sits.** The source design places the disable
  pulse just *before* the reference edge. Here it starts *at* the edge,
  and the detector's reference is delayed by the same replica delay. The
  phase relation is the same.
- **Start values.** The start word, the start gain of 256, the gain floor
  of 1, clamping, staying in maintenance until reset, and counting the
  first cycle of a run toward the eight-cycle rule are all this design's
  choices.
- **Cell constants and extra devices.** The DCDE delay law and its
  constants, and which cells carry the extra devices, are model choices.
  Supply and temperature enter only as one factor on all delays
  (`dco_model_pkg::delay_scale`). The scaled bands stay within 4 % of the
  oscillator's quoted ranges at 1.1 V and at 75 C, and `tb_dco` checks this.
  The period step per fine code (about 0.6 to 9 ps) spans a narrower range
  than the 0.4 to 20 ps quoted for the circuit. Jitter, noise and power are not
  modelled.
- **Flip-flops and adder cells.** The transistor-level true single-phase
  flip-flops and inverted-output adder cells of the source design are
  ordinary `always_ff` registers and logic-level full adders here.

## Simulating

Every file sets `` `timescale 1ps/1fs ``. The two packages must be
compiled first. Build the end-to-end test:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/adpll_pkg.sv rtl/dco_model_pkg.sv tb/tb_adpll_synth.sv --top-module tb_adpll_synth -o sim
./obj_dir/sim
```

`tb_adpll_synth` runs the top at its defaults, and does the following:

- resets the loop for each of the six frequencies;
- checks lock within 16 reference cycles, the DCO period within 1 % of
  T_ref/N, and the counted edge within one DCO period of the mid-point;
- steps the select from 500 to 600 MHz while locked and checks that
  maintenance mode tracks the step;
- counts gain halvings, mode switches, phase-gain up/down moves, both
  oscillator bands and the odd counting path, and fails if any of them
  never happened.

It finishes in well under a second.

`tb_adpll_corners` repeats the six locks at three delay corners:

- 1.00, the nominal corner;
- 1.08, about the oscillator's 75 C range;
- 1.10, about its 1.1 V range.

At the two slow corners the 600 MHz setting has to take the four-cell
band. The test then drifts the delays by 8 % and back over a few hundred
reference cycles while the loop is locked at 1 GHz and at 850 MHz.
Maintenance mode must keep the period within 1 %, and the eight-cycle
rule must raise the phase gain while it tracks.

Each block has its own self-checking
testbench `tb/tb_<module>.sv`, built the same way with its own
`--top-module`. Every testbench ends with a line
`TB_RESULT checks=N failures=M`.

Typical end-to-end results with the model constants above:

| output | lock after (ref cycles) | period error after 40 cycles |
|---|---|---|
| 300 MHz | 5 | +0.1 % |
| 400 MHz | 4 | +0.3 % |
| 500 MHz | 3 | +0.3 % |
| 600 MHz | 1 | < 0.01 % |
| 850 MHz | 4 | +0.1 % |
| 1 GHz | 5 | +0.05 % |

## Changing things

- Word width, number of cells, counter length and the select table are in
  `rtl/adpll_pkg.sv` (`cnt_cfg`). To add another output frequency, add a
  select bit and its counter stage; to reach higher factors, lengthen the
  chain (`CNT_STAGES`).
- The phase-gain width and the eight-cycle rule are parameters of
  `control_unit` (`PGW`, `RUN_LEN`).
- The oscillator's speed is set entirely by `rtl/dco_model_pkg.sv`.
  Replace `cell_delay` to model another process. Set `delay_scale`, at
  any time during a simulation, for a corner or a drift.
