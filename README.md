# All-digital PLL with adaptive-step frequency search

This is a clock multiplier built entirely from digital standard cells. There is
no charge pump, no analog loop filter and no VCO. The oscillator is a ring of
library cells whose length is set by a 12-bit digital code. A small state
machine finds the right code with a binary-search-like procedure. The search
locks in at most about 46 reference cycles, and the loop then keeps the phase
aligned one fine step at a time.

Two copies of the oscillator are used:

* The **INNER DCO** sits inside the loop and does the tracking.
* The **OUTPUT DCO** produces the output clock. It is driven by a smoothed
  copy of the INNER code, so the loop's constant dithering does not show up
  as jitter on `out_clk`.

The RTL here covers the digital parts as synthesizable SystemVerilog: the
controller, the divider, the loop filter and the DCO's path-select encoder.
The cell-level timing parts (ring oscillator, phase detector, pulse
amplifier) are behavioural models, so the whole loop can be simulated with
Verilator.

```
            +-------+  p_up_n   +------------------+
 ref_clk -->|  PFD  |---------->|    controller    |---> lock
        +-->|       |  p_down_n |  (search, phase) |
        |   +-------+---------->|                  |
        |                       +--+------------+--+
        |                 coarse,fine    dco_restart
        |                          |            |
        |   +---------+      +-----v-----+      |
        +---| divide  |<-----| INNER DCO |<-----+
  div_m --->|  by M   |<-----------------------(restart)
            +---------+      +-----------+
                             coarse,fine
                                   |
                             +-----v-------+  avg_coarse,  +------------+
                             | loop filter |-------------->| OUTPUT DCO |--> out_clk
                             | (max+min)/2 |   avg_fine    +------------+
                             +-------------+
```

## The DCO control code

The code is `{coarse[5:0], fine[5:0]}`, and the controller treats it as a
single unsigned 12-bit number. A larger code means a shorter ring and a
higher frequency.

* **Coarse.** This field picks one of 64 taps on a chain of coarse delay
  cells. The taps sit in 4 groups of 16. A first stage of tristate buffers
  picks a tap inside each group (`en[63:0]`). A second stage picks the group
  (`sep[3:0]`). Splitting the selector this way keeps the load on any one
  node small. `dco_coarse_encoder` makes both enables one-hot:
  `en[c]` and `sep[c/16]`. Tap `c` passes through `63-c` coarse cells.
* **Fine.** This field sets a fine-tuning delay cell whose 64 settings
  together cover one coarse step. The real cell is an AOI and an OAI gate
  shunted by tristate buffers. Its settings are mapped through a lookup
  table that comes from transistor-level simulation. The model makes the
  fine delay linear instead.

Behavioural period of the model (`dco.sv`):

```
T = 1833 ps + (63 - coarse) * 350 ps + (63 - fine) * 350/64 ps
```

This gives 545 MHz at code 4095 and 41.3 MHz at code 0, in 5.47 ps steps.
The coarse step of 350 ps is chosen so that the 64 x 64 codes span that
range. A single coarse cell (rise plus fall delay) is nearer 300 ps in the
original cell library, but 64 steps of 300 ps cannot reach 41 MHz. Change
`T_COARSE_PS` and `T_FINE_PS` to model another library.

The ring starts with a rising edge `T_START_PS` (20 ps) after its `rst` is
released. The acquisition procedure relies on this (see below).

## Frequency acquisition: the adaptive search

The controller (`adpll_controller`) runs on the reference clock. It changes
the code once every `UPDATE_M` (m) reference cycles, which leaves time for
the DCO and the divider to respond. The default is m = 2.

1. After reset the code is `{32,32}` (2080), in the middle of the range. The
   step is n/4 = 1024.
2. At each update the code goes up by the step if the DCO is too slow, and
   down if it is too fast. It saturates at 0 and 4095.
3. Whenever the decision reverses (up after down, or down after up), the
   step is halved first and then applied.
4. When the step reaches 1, acquisition ends and `lock` goes high.

The worst case is 2*(2*log2(4096)-1) = 46 reference cycles. With an ideal
detector, the controller needs at most 21 updates (42 cycles) over all
target codes. For the 200 MHz example (5 MHz x 40) the sequence starts
2080 -> 3104 -> 4095 (saturated) -> 3583 -> ...

**How "too fast" is measured.** A phase detector compares the nearest
edges. Any phase error left over from the previous code would therefore
mislead the search. Without a fix, the code overshoots for many updates and
lock takes hundreds of cycles. The controller avoids this by restarting the
INNER DCO and the divider before every comparison:

```
ref edge   E0 (update)        E1                      E2 (next update)
           code changes       dco_restart falls       sample p_down_n
           dco_restart = 1    DCO + divider start     low  -> too fast -> step down
                              (divided edge ~ E1)     high -> too slow -> step up
```

After the restart, the divided clock's first edge coincides with E1. Its
next edge comes M DCO periods later, either before E2 (the DOWN flag is then
already low) or after it. Each decision therefore compares M DCO periods
with one reference period, which is a clean frequency comparison. The
restart is this design's own mechanism; only the search rule itself comes
from the original description. The detector flags need about 290 ps to
respond. This gives the comparison a small bias, which the phase loop
removes afterwards.

## Phase maintenance

Once the search is done, the controller moves the code by one fine step per
update. It steps up while the detector reports the feedback clock late,
steps down while it reports it early, and does nothing inside the dead zone.
There are no more restarts.

Phase is the integral of frequency. A loop that only integrates the
detector's sign into the code is therefore a double integrator. In
simulation, such a loop oscillated with growing amplitude. So the code sent
to the DCO is the integrated code plus `PHASE_KICK` (default 1) fine steps
in the direction of the last request. This is a bang-bang proportional
term, and it is this design's addition. With it, the INNER code settles into a
small, bounded dither around the ideal value. Set `PHASE_KICK = 0` to get the bare integrating
loop.

Phase-mode steps act on the whole 12-bit code, so they carry across the
fine/coarse boundary. `lock` means "frequency search finished". It stays
high until reset.

## Phase/frequency detector and pulse amplifier

`pfd` models the detector's flip-flops and gates:

* **QU and QD.** QU is set by the reference edge and QD by the feedback
  edge. Both clear when both are set, or during `rst`.
* **Error signals.** `outu_n` is low while only QU is set, and `outd_n`
  while only QD is set.
* **Widening.** Each error signal is widened by a `pulse_amp`.
* **Flags.** The widened pulse clears an output flip-flop (`flag_u_n` or
  `flag_d_n`). That flip-flop is set again by the next edge of its own clock
  (reference for UP, feedback for DOWN).

The flags are active low. A flag stays low from the error until that next
edge, so the controller can simply sample it on the reference edge.

`pulse_amp` is a buffer followed by six two-input AND stages. Each stage
combines its predecessor's output with its predecessor's other input. A low
pulse reaches each stage by two paths of different delay, and the union of
the two is one gate delay wider every second stage: +180 ps with 60 ps
gates. The error gates are inertial with a 50 ps delay. Phase errors below
±50 ps therefore produce no request, which is the dead zone.

All delays are model parameters. The structure follows the original
schematics, but the values do not come from a cell library.

## Loop filter

The loop filter (`loop_filter`) samples the INNER code every reference
cycle. It keeps the maximum and minimum over a window of `K_WIN` cycles and,
at the end of the window, outputs `(max+min)/2`. The output holds until the
next window ends. The window length is not specified in the original
description, so 16 is this design's choice. The filter runs from reset on,
so the OUTPUT DCO follows the search. Its output is only meaningful once
`lock` is high.

## Divider

`freq_divider` is a counter that makes one rising edge every M DCO cycles,
high for floor(M/2) cycles. M is 8 bits (`div_m`). M = 0 and M = 1 act as
M = 2, and a new M takes effect at the next period. After reset, the first
DCO edge produces a rising output edge, which is what makes the restart
align the divided clock.

## Files

| module | kind | role |
|---|---|---|
| `adpll_pkg` | package | code widths, `dco_code_t`, start code, enums |
| `adpll` | top | wiring of the loop; ports `ref_clk`, `rst`, `div_m[7:0]`, `out_clk`, `lock`, plus observation outputs |
| `adpll_controller` | RTL | adaptive search, DCO restart, phase steps, lock |
| `freq_divider` | RTL | divide by M |
| `loop_filter` | RTL | (max+min)/2 over K_WIN cycles |
| `dco_coarse_encoder` | RTL | coarse code to one-hot `en`/`sep` |
| `dco` | behavioural | ring oscillator, period from the code |
| `pfd` | behavioural | detector with dead zone |
| `pulse_amp` | behavioural | pulse widener |

Each file opens with a description of its interface and timing. `rst` is
asynchronous and active high everywhere. All files use
`` `timescale 1ps / 1fs ``.

Not modelled:

* The fine-tuning cell's per-setting delays and their lookup table, which
  exist only as transistor-level simulation results.
* The I/O pads.

## Simulating

Each testbench in `tb/` checks itself and prints
`TB_RESULT checks=N failures=M`. For example, the whole loop at its default
parameters:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/adpll_pkg.sv tb/tb_adpll.sv --top-module tb_adpll
./obj_dir/Vtb_adpll
```

Replace `tb_adpll` with `tb_adpll_controller`, `tb_freq_divider`,
`tb_loop_filter`, `tb_dco_coarse_encoder`, `tb_dco`, `tb_pfd` or
`tb_pulse_amp` to test one block. Each run takes well under a second.
`-Wno-fatal` is needed because Verilator warns about the computed delays in
the behavioural models (`ZERODLY`).

`tb_adpll` runs four operating points: 5 MHz x 40 = 200 MHz, 5 MHz x 9 =
45 MHz, 50 MHz x 9 = 450 MHz and 10 MHz x 51 = 510 MHz. For each it checks
that lock comes within 46 reference cycles, that the divided clock has
exactly one edge per reference cycle, that the output is within 0.5 % of
M x f_ref, and that the output code stays within a narrow band. It also
checks that every loop mechanism happened at least once: search up and
down, halving, saturation, phase steps both ways, dead zone and filter
updates. Typical results:

| point | lock | output |
|---|---|---|
| 200 MHz | 33 cycles | 200.000 MHz, code 3515..3516 |
| 45 MHz | 27 cycles | 45.000 MHz |
| 450 MHz | 35 cycles | 449.5 MHz |
| 510 MHz | 29 cycles | 509.4 MHz |

Near the top of the range, one fine step is 0.25 % of the period. This sets
the frequency error there.

## How far to trust it

The following parts follow the original design closely: the loop
architecture, the code format and start point, the search rule and its
bound, the loop filter's averaging rule, the detector and amplifier
structure, and the coarse selector organisation.

The following are this design's own choices and should be reviewed before
reuse:

* the DCO restart used for frequency comparison;
* the proportional kick in phase mode;
* the loop filter window (16);
* the meaning of `lock`;
* saturation at the code limits;
* all delay values in the behavioural models.

Jitter cannot be judged from this model. The DCO has no noise and no supply
sensitivity, and its delays are idealised.
