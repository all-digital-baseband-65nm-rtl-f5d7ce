# All-digital clock multiplier (FPLL) with a tapped-delay-line NCO

A clock multiplier that uses no analog circuitry at all. The output clock
comes from a numerically controlled oscillator (NCO): a ring built from a
64-tap delay line of ordinary gates. An 8-bit code picks the tap and a
quarter-tap output phase, and so sets the period. A digital loop sets the
code so that the output runs at 2x, 2.5x, 4x or 8x the input clock. The
only quantity that has to be tuned for a new process is the gate delay.

The loop is a frequency-and-phase locked loop (FPLL), not a classical PLL.
It first locks frequency by comparing two counters. Once no frequency
correction is needed, it nudges the output phase onto the input edges with
single, one-off steps. This split avoids most of the loop jitter that a
purely digital PLL gets from its delays and its coarse frequency steps.
An open-loop mode hands the code to an external controller, for example
an FPGA. Every register of the loop is triplicated (TMR) for radiation
tolerance.

All blocks are synthesizable SystemVerilog except the NCO. The NCO is a
behavioural timing model, because a chain of gate delays cannot be
written as RTL.

## How the loop locks

### Counters set the ratio

- The input counter always counts 2 input clocks.
- The output counter counts N output clocks: N is 4, 5, 8 or 16, chosen
  by `mult_sel`.
- The loop makes the two counters wrap at the same rate, so
  f_out = (N / 2) * f_in. That gives 2x, 2.5x, 4x or 8x.

| `mult_sel` | ratio | output count | phase loop |
|---|---|---|---|
| 0 | 2x   | 4  | on |
| 1 | 2.5x | 5  | off (frequency lock only) |
| 2 | 4x   | 8  | on |
| 3 | 8x   | 16 | on |

### Frequency detector (`freq_det`)

The detector looks at two events:

- the internal event: the output counter's `done` pulse;
- the external event: the rising edge of the divided input clock. It
  comes from the other clock domain, so it passes through a two-flop
  synchroniser first.

Events that arrive within one output clock of each other give `match`.
An internal event with no external event in that window gives `fast`: the
controller adds one step of delay. A lone external event gives `slow`: the
controller removes one step.

The detector never measures a frequency directly. It acts like a
phase-frequency detector on the divided clocks:

- If the output is too fast, internal events outnumber external ones, so
  `fast` outnumbers `slow` and the code drifts up.
- When the rates are equal but the events are apart, `fast` and `slow`
  alternate. Each `fast` holds the code one step higher until the
  following `slow`, and this pulls the internal event towards the
  external one until they meet.

The code moves at most one step per counter period, so acquisition is
slow. From the reset code (128), lock takes a few hundred to about two
thousand input clocks. This simplicity is deliberate.

The synchroniser delays the external event by a fixed 2-3 output clocks.
That shifts where the divided clocks settle, not the frequency.

### Lock indication and phase loop (`fpll_ctrl`, `phase_det`, `phase_adj`)

After `LOCK_N` (4) matches in a row, `fpll_ctrl` raises `freq_ok`. From then
on the phase path is active:

- `phase_det` samples the output clock on each input rising edge. If the
  output is low, its matching edge has not arrived yet: the output is
  late. If it is high, the output rose within the last half period: it is
  early. The result is carried into the output-clock domain by a toggle
  handshake.
- `phase_adj` turns each result into one request: `retard` when early,
  `advance` when late. It then ignores the next `HOLD` (1) comparisons so
  that it does not act twice on the same error.
- `fpll_ctrl` carries out a request by changing the code sent to the NCO by
  `PH_STEP` (2) for exactly one output clock. The stored code does not
  change. The NCO takes a new code at every output transition, so the
  change lengthens or shortens two half periods. The output edges move by
  one tap (88 ps with the default delays).

The step is one-off rather than a lasting change of the code, so the phase
loop never fights the frequency loop.

For 2.5x, an input edge lines up with an output edge only on every second
input clock. The phase loop is therefore disabled for that ratio, and the
output has frequency lock only. The phase loop is also off in open-loop
mode.

Expect some dither in the locked state:

- The achievable periods are quantised, so the frequency loop hops between
  neighbouring codes.
- The bang-bang phase loop toggles between `advance` and `retard`.

At high output frequencies (372.8 MHz in 8x mode) the frequency loop keeps
correcting, and `freq_ok` is high only now and then. The average ratio is
still exact.

### Open-loop mode

When `open_loop` is high, the detectors are ignored. Each rising edge on
`ext_inc` or `ext_dec` moves the stored code one step up or down. These
inputs are asynchronous and pass through two-flop synchronisers.

An external controller watches `in_mon` and `out_mon`, the two counter
outputs, to measure both frequencies. It can then run its own algorithm,
such as faster convergence or experimental pure-PLL control. Only the
on-chip port is provided here; the off-chip algorithms are not part of
this design.

## The NCO (`nco`, behavioural model)

The delay line is four 16-tap segments in series. Each tap is two gates,
so every tap has the same polarity. The 8-bit code `s` splits into three
fields:

| bits | selects |
|---|---|
| `s[7:6]` | the segment (a decoder enables one input of a 4:1 mux) |
| `s[5:2]` | the tap inside the segment |
| `s[1:0]` | one of four copies of the mux output, loaded with 0-3 units of gate capacitance, for a quarter-tap (half-gate) step |

The output is fed back, inverted, to the line input. Each half period is:

    half = BASE_PS + s[7:2] * TAP_PS + s[1:0] * FINE_PS
         = 1250 ps + 22 ps * s        (defaults, TAP = 4 * FINE)

This gives 400 MHz at code 0 and 72.9 MHz at code 255.

A delay line cannot be retuned safely while an edge is travelling through
it. The model therefore takes a new code only at an output transition.
`en` low stops the oscillator with its output low.

The default delays are this design's choice. They were picked to cover
the 75-400 MHz range and the lowest measured output of 73.6 MHz.

## Triple modular redundancy (`tmr_reg`)

Every flip-flop of the loop is held in three copies and read through a
bitwise 2-of-3 majority vote. This covers:

- the code and lock counter in `fpll_ctrl`;
- both counters;
- the frequency detector, including its synchroniser;
- both clock domains of the phase detector;
- the phase adjustment.

Each module gathers its state into one `tmr_reg` (a packed struct where
there are several fields). The next-state logic reads only the voted
value, so an upset copy is overwritten from voted logic on the next clock.
Each block reports disagreement on its `tmr_err` output, and the top ORs
these flags together.

The combinational logic between registers is single. The NCO model is not
triplicated.

A synthesis tool that merges equivalent registers will fold the three
copies into one. To keep them, stop register merging for `copy_a`,
`copy_b` and `copy_c` in `tmr_reg`, for example with a keep/preserve
attribute or a tool setting.

## Files

The top-level module is `fpll_top`.

| file | contents |
|---|---|
| `rtl/fpll_pkg.sv` | mode enum `mult_e`, output-count table, code width |
| `rtl/fpll_top.sv` | top level: NCO, two counters, detectors, phase adjustment, controller |
| `rtl/nco.sv` | NCO timing model (not synthesizable) |
| `rtl/div_counter.sv` | input/output counter: `done` at the last state, `div` divided clock |
| `rtl/freq_det.sv` | frequency detector |
| `rtl/phase_det.sv` | phase detector on the raw clocks |
| `rtl/phase_adj.sv` | one-off phase step requests |
| `rtl/fpll_ctrl.sv` | code register, lock counter, open-loop port, phase step |
| `rtl/tmr_reg.sv` | triplicated register with voter |
| `tb/tb_<module>.sv` | self-checking testbench for each module |
| `tb/tb_lock_range.sv` | lock behaviour at and beyond the edges of the output range |

### Top-level ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk_in` | in | 1 | input clock |
| `rst_n` | in | 1 | asynchronous active-low reset (code returns to 128) |
| `mult_sel` | in | 2 | ratio: 0=2x, 1=2.5x, 2=4x, 3=8x |
| `nco_en` | in | 1 | oscillator enable |
| `open_loop` | in | 1 | external control of the code |
| `ext_inc`, `ext_dec` | in | 1 | external step requests (rising edge, asynchronous) |
| `clk_out` | out | 1 | multiplied clock |
| `in_mon`, `out_mon` | out | 1 | divided input and output clocks |
| `code` | out | 8 | stored NCO code |
| `freq_ok` | out | 1 | frequency loop idle (phase loop in control) |
| `tmr_err` | out | 1 | a triplicated copy disagrees |
| `adj_count` | out | 8 | phase steps issued (wraps) |

### Clocks and reset

All control logic runs on the NCO output clock. Only the input counter
and the phase detector's first flop run on `clk_in`.

Reset is asynchronous. The NCO keeps running through reset at the reset
code, so the logic on `clk_out` sees clock edges while it is held in
reset.

## Simulation

Testbenches need `--timing` because the NCO and the clock generators use
delays. From the repository root:

    verilator --binary --timing --assert -Wno-fatal \
        rtl/fpll_pkg.sv rtl/*.sv tb/tb_fpll_top.sv \
        --top-module tb_fpll_top -o sim && ./obj_dir/sim

The package must come first on the command line. Verilator accepts it a
second time through the glob. Every testbench ends with a line
`TB_RESULT checks=N failures=M`.

`tb_fpll_top` runs the top at its default parameters, in this order:

1. 4x at 50 MHz
2. 2.5x at 32 MHz
3. 8x at 46.6 MHz
4. 8x at 9.2 MHz
5. 2x at 37 MHz
6. 4x at 18.8 MHz

The inputs are taken from published lock measurements. The modes are
switched without a reset. For each mode it allows 5000 input clocks to
acquire, then measures the output-to-input edge ratio over 400 input
clocks. It then:

- steps the code from the open-loop port;
- upsets one copy of the code register;
- relocks;
- upsets one copy of the output counter while locked, and checks that the
  ratio holds.

It also counts each mechanism (fast, slow, match, lock, advance, retard,
open-loop steps, mode switch, TMR repair) and fails if any of them never
happened. It takes well under a second.

Measured ratios and settled codes:

| mode, input | output | settled code | measured ratio |
|---|---|---|---|
| 4x, 50 MHz | 200 MHz | 57 | 4.000 |
| 2.5x, 32 MHz | 80 MHz | 228 | 2.498 |
| 8x, 46.6 MHz | 372.8 MHz | 4 | 7.998 |
| 8x, 9.2 MHz | 73.6 MHz | 252 | 8.003 |
| 2x, 37 MHz | 74 MHz | 251 | 2.003 |
| 4x, 18.8 MHz | 75.2 MHz | 245 | 4.003 |

`tb_lock_range` probes the edges of the output range, starting from reset
each time:

| case | wanted output | result |
|---|---|---|
| 2x at 52.5 MHz | 105 MHz | locks, ratio 2.00 |
| 2.5x at 30 MHz | 75 MHz | locks, ratio 2.50 |
| 2x at 34 MHz | 68 MHz, below the range | code stays at 255, output too fast |
| 8x at 52 MHz | 416 MHz, above the range | code held at 0-1, output at about 400 MHz |

Each block also has its own testbench:

- `tb_nco` checks the half-period formula on random codes.
- `tb_freq_det` runs directed cases of event timing.
- `tb_phase_det` places the output 300 ps late, then 300 ps early.
- `tb_phase_adj` checks requests, hold-off and the enable.
- `tb_fpll_ctrl` checks stepping and saturation against a model, as well
  as lock, the phase step and the open-loop inputs.
- `tb_tmr_reg` upsets each copy in turn.
- `tb_div_counter` checks every count.

## Where this design makes its own choices

The following parts are described only by what they do, or not at all.
This design fills them in as follows.

- **Frequency detector.** The flops are all in the output-clock domain, and
  the external event is synchronised. The original captures both counter
  events in flops clocked by the events themselves, with cross-clearing.
- **Phase detector.** One sample (the output clock taken at the input edge)
  decides both early and late. The original also samples the input clock
  at the output edge and uses a clear network.
- **Phase adjustment.** The original circuit is not described. Here it is
  a one-clock code offset of `PH_STEP`, with a hold-off of one comparison.
- **Loop details.** The lock rule (`LOCK_N`), the reset code (128), code
  saturation, the edge-triggered open-loop inputs, the counter outputs and
  the mode encoding are all choices of this design.
- **NCO.** The gate delays are assumed. The frequency resolution follows
  from equal delay steps: about 1.8% per step at 400 MHz and 0.3% at
  73 MHz. That is finer than the roughly 5% and 1% quoted for the
  original. An 8-bit code gives 256 delay settings. One description of the
  original speaks of 512 steps, which an 8-bit code cannot give.
- **TMR.** The loop's registers are triplicated register by register, with
  single combinational logic. The original also triplicates the NCO; how
  the original places its voters is not described.
- **Cells.** The original is built from a portable 10-cell library. This
  RTL is technology-independent and does not model those cells.
