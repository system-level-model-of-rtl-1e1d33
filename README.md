# Two-step locking all-digital PLL

A TDC-based all-digital PLL has to trade frequency range against resolution.
A time-to-digital converter (TDC) fine enough for good in-band phase noise
(around 10 ps per step) needs many stages, and so costs area and power, to
cover the phase errors seen while a wide-range oscillator is pulled in. This
design splits the job in two:

* **Coarse locking** uses no TDC at all. A counter steps the oscillator code
  up or down once per reference cycle, following a one-bit early/late signal
  (SIGN). The code swings around the target. Each SIGN toggle marks a turning
  point: the code is recorded as a maximum or a minimum. When the last two
  maxima and the last two minima agree, the code is fixed at their average.
* **Fine locking** starts only then. The residual error is less than half a
  coarse step, so two small TDCs are enough: a 7-stage delay line (176 ps per
  stage) and a 15-stage Vernier line (11 ps per step). The delay-line TDC
  drives an integrator that moves the oscillator in 1 MHz steps. The Vernier
  TDC drives a loop filter and a delta-sigma modulator, which dither it below
  that step.

The example configuration uses a 125 MHz reference. The divider ratio N is
43…50, so the output is 5.375–6.25 GHz (6 GHz for N = 48). The
digitally-controlled oscillator (DCO) covers 5.252–6.344 GHz in 28 coarse
steps of about 40 MHz.

Every digital block is synthesizable SystemVerilog. The delay lines of the two
TDCs and the DCO are analog parts and are written as behavioural models with
real-valued delays. The top level is therefore a simulation model of the whole
loop.

## The loop

```
 ref_clk ──┬──────────────► PFD ◄──────────────── clk_div ◄── divide by N ◄──┐
           │                 │ START, STOP, SIGN                             │
           │        ┌────────┴──────────┐                                    │
           │   delay-line TDC      Vernier TDC ──► CLK_INT                   │
           │     7x3 encoder       15x4 encoder                              │
           │        │ 3                 │ 4                                  │
           │   integrator (±code)   loop filter ─► delta-sigma (≈1 GHz)      │
           │        │ 6                 │ 1                                  │
           └─► coarse control ──row 3/col 6──►  DCO  ── clk_out ─────────────┘
                (on ~ref_clk)        EN_TDC enables the TDCs and the fine path
```

| block | module | kind |
|---|---|---|
| phase frequency detector | `pfd` | RTL |
| delay-line TDC, Vernier TDC | `tdc_delay_line`, `tdc_vernier` | behavioural |
| 7x3 and 15x4 encoders | `thermo_encoder` | RTL |
| coarse control | `coarse_control` = `coarse_counter`, `register_clock`, `minmax_register`, `control_check`, MUX, `row_control`, `column_control` | RTL |
| integrator | `integrator` | RTL |
| loop filter, delta-sigma modulator | `dlf`, `dsm` | RTL |
| DCO | `dco` | behavioural |
| divider (by N, and by 6 for the modulator clock) | `freq_divider` | RTL |
| whole loop | `adpll_top` | simulation top |

Shared widths are in `adpll_pkg`. The reference oscillator is not modelled;
`ref_clk` is a top-level input.

## Coarse locking in detail

This is the least obvious part of the design.

**Counting.** `coarse_counter` holds a 5-bit code. During reset it loads
`coarse_init`. Afterwards, on every rising edge of the delayed reference, it
adds 1 when SIGN = 1 and subtracts 1 when SIGN = 0. SIGN = 1 means the divided
clock was late, so the DCO is too slow and the code must rise. The counter
saturates at 0 and 31.

**Why the code oscillates.** SIGN reports phase, not frequency. The code
therefore keeps moving in one direction until the accumulated phase error
changes sign. This happens only after the frequency has overshot the target.
The code traces a roughly symmetric triangle around the ideal value. With a
start code of 16 and a target of 18.5 (N = 48), the simulated turning points
are maxima 22 and 24 and minima 14 and 12, which average to 18.

**Turning points.** `register_clock` compares SIGN with its previous sample.
- A 1→0 change means the counter has just stopped rising, and gives a
  `clk_max` strobe.
- A 0→1 change gives `clk_min`.

The strobes are one-cycle enables, issued on the clock edge at which the
counter still holds the turning value. `minmax_register` shifts that value
into a two-deep MAX or MIN register and counts how many it holds (up to 2).

**Deciding.** `control_check` raises EN_TDC once two maxima and two minima
are stored and |MAX1 − MAX2| ≤ TOL and |MIN1 − MIN2| ≤ TOL (TOL = 2). At the
same time it latches AVG = ⌊(MAX1 + MAX2 + MIN1 + MIN2) / 4⌋. With the
published example values 23, 22, 15, 16 this gives 19. EN_TDC then:
- stops the counter;
- switches the MUX from the counter to AVG;
- enables the TDCs and the fine path.

It stays high until reset. Lock takes 20–90 reference cycles in simulation.

**To the DCO.** The 3 low bits of the MUX output go to `column_control` (3 to
6 lines) and the 2 high bits to `row_control` (2 to 3 lines).
- Rows use a thermometer code.
- Columns must carry 8 values on 6 lines, so they use a Johnson code:
  0…6 switch on 0…6 lines, and 7 is `111110`.

The DCO decodes index = 8·rows + column and clamps it at 27.

**Pull-in range.** SIGN is the reference level sampled at the divided-clock
edge. It is only correct while the phase error is under half a reference
period (4 ns). Two consequences:
- The top releases its internal reset on a rising reference edge, so the
  divider starts in phase with the reference. If the start phase were random,
  SIGN could alias, and the average could settle on a wrong code.
- The start code must not be too far from the target. Within one coarse swing
  the phase error grows roughly as 53 ps × (sum of code errors). From 16, all
  of N = 44…50 lock. N = 43 (target 3) does not, and needs `coarse_init` near
  4. Hence `coarse_init` is a port rather than a constant.

## Fine locking

**Integrator.** On each CLK_INT edge it adds the delay-line code (0…7, one
count per 176 ps of phase error) when SIGN = 1 and subtracts it when SIGN = 0.
Its 6-bit value drives the DCO at 1 MHz per LSB around mid-scale 32. That is
±32 MHz, enough to cover the ±20 MHz left by coarse locking. It is held at 32
until EN_TDC and saturates at 0 and 63.

**Vernier path.**
- `dlf` signs the Vernier code with SIGN, scales it by 8 and low-pass filters
  it: y ← y + (8e − y) >>> 2, an 8-bit signed result.
- `dsm` is a first-order accumulator modulator clocked at clk_out / 6
  (≈1 GHz). Its output bit has density (y + 128) / 256.
- The DCO shifts by ±0.25 MHz with that bit, so the average tuning step is
  about 2 kHz.

The published description gives only the purpose of these two blocks. Their
structure, widths and order are this design's choices.

**Loop behaviour.** The integrator is a pure integral path with a 176 ps dead
zone, and the Vernier path is weak (±0.25 MHz). The fine loop therefore
settles into a bounded limit cycle, not a quiet lock: the integrator swings by
about ±10 codes with a period of roughly 90 reference cycles. The phase error
stays within a few delay-line stages. There are no cycle slips, and the mean
output frequency equals N × 125 MHz to within 0.02 %. Phase noise is not
modelled.

## TDCs, PFD and CLK_INT timing

The PFD (`pfd`) has two flip-flops with D tied high:
- UP is set by the reference edge and DOWN by the divided-clock edge;
- both are cleared once both are high;
- START = UP | DOWN rises at the first edge and STOP = UP & DOWN at the
  second.

The clear goes out as `rst_req` and comes back as `rst_fb`. The top puts a
150 ps delay between them, standing in for the gate delay that sets the STOP
pulse width in silicon.

The TDC models are built as real delay chains with one capture flip-flop per
stage.
- **Delay-line TDC.** START runs down the line and STOP clocks the flops, so
  the result is ⌊Δt / 176 ps⌋ ones.
- **Vernier TDC.** START runs down 60 ps elements and STOP down 49 ps
  elements. Flop *i* reads 1 while (i+1)·11 ps < Δt.
- **CLK_INT.** STOP taken at the end of its line, plus one more 60 ps
  element. It therefore rises 795 ps after STOP, after every flop has
  captured.

Both TDCs capture only while EN_TDC is high.

## DCO model

```
f = 5252 + idx·1092/27 + (integ − 32)·1 + (dsm ? +0.25 : −0.25)   MHz
```

The model toggles `clk_out` every half period. A change of input takes effect
at the next half period. Output is held low in reset.

## What follows the source and what does not

These come from the published design:
- the block structure and bus widths (4, 3, 6, 6, 3);
- the 176 ps stage, the 11 ps Vernier resolution, and the 7 and 15 stages;
- the 5.252–6.344 GHz range with about 40 MHz coarse and 1 MHz integrator
  steps;
- the 125 MHz reference and N = 43…50;
- the coarse algorithm: count by SIGN, record maxima and minima at SIGN
  toggles, check two of each against a tolerance, average, switch the MUX,
  enable the fine path;
- the start value 16 and the 15/16/23/22 → 19 example.

These are this design's own choices:
- the counting polarity (the published code-versus-SIGN plot shows the
  opposite polarity; the one used here is the one that gives negative
  feedback with the stated SIGN meaning);
- the tolerance value, and averaging over all four values;
- the row and column codes;
- the integrator reset value and saturation;
- the whole loop filter and modulator;
- the TDC element delays;
- the PFD reset delay;
- the reference-synchronous reset release;
- the half-period delayed coarse clock;
- the ≈1 GHz modulator clock taken from the DCO;
- the `coarse_init` port.

The published coarse lock at 6 GHz takes about 22 reference cycles. Here it
takes 38, because the start phase and DCO model differ.

## Simulating

Each testbench in `tb/` checks itself and prints
`TB_RESULT checks=N failures=M`. Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/adpll_pkg.sv \
          tb/tb_adpll_top.sv --top-module tb_adpll_top -o sim && ./obj_dir/sim
```

`-Wno-fatal` is needed because the DCO and TDC models compute their delays at
run time. Verilator warns (ZERODLY) that such a delay cannot be proved
non-zero. The warning is harmless here: it is printed and the build goes on.

`tb_adpll_top` runs the full loop at default parameters for every N from 43
to 50 (about 5 s). For each N it checks:
- coarse lock and the code reached;
- no cycle slips;
- the mean frequency;
- that every mechanism acted at least once: counting up and down, max and min
  capture, lock, MUX switch, both TDCs, integrator add and subtract, and
  modulator toggling.

The unit testbenches compare each block with an independent model. Examples:
- `tb_coarse_control` replays the published 16 → 15 → 23 → 16 → 22 sequence
  and expects 19, then runs 20 closed-loop cases against a cycle-level
  reference model.
- `tb_dco` measures frequencies over 200 periods.

All files use `timescale 1ps/1fs`.
