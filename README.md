# All-digital PLL with a two-level TDC frequency search

This is a clock multiplier built only from logic-style cells. It takes a slow, clean
reference clock (20 MHz in the reference configuration) and produces N times that frequency
(N = 16 gives 320 MHz) from a digitally controlled ring oscillator (DCO). The loop locks fast
because it does not sweep the frequency. When it is enabled, a time-to-digital converter (TDC)
measures half a reference period in two reference cycles. From that measurement the control
logic works out a DCO code close to the target and starts the oscillator at once. After that,
a two-flip-flop phase detector and a small bang-bang loop only have to trim the fine code and
line up the phase.

The repository also holds a second, unrelated piece from the same source: a word-level phase
error monitor (`phase_locked_loop`). It compares two 32-bit phase words and raises a lock flag.
The two pieces share no signals. `adpll_top` places them side by side.

Everything is SystemVerilog-2017. The control path is synthesizable. The oscillator and the
TDC delay lines are behavioural models with `#` delays, because in silicon they are chains of
standard cells whose delay is the whole point. Simulation therefore needs Verilator's
`--timing`.

## Block diagram

```
                TDC_A_ENABLE / TDC_B_ENABLE                 ENABLE
          +----------------------------------------------+    |
          v                                              |    v
CLK_REF ->[ tdc ]--flash_a/flash_b-->[ tdc_decoder ]--TDC_HPER-->[ adpll_control ]--DCO_ENABLE-->[ dco ]--> CLK_DCO
   |       (2 delay lines + 2 flash registers)                    ^   ^   |  COARSE/FINE_TUNE -->   |
   |                                                              |   |   +-- LOCKED, state         |
   +-------------------------------------------------------------+   |                             |
   |                                                                  | UP/DN                       |
   +-->[ phase_detector ]--UP_PD/DN_PD-->[ digital_filter ]-----------+   (filter clocked by CLK_DCO)
            ^                                                                                       |
            +------------------------ CLK_DIV <------[ divider /N_DIV ]<----------------------------+
```

| Module | Kind | Role |
|---|---|---|
| `adpll_pkg` | package | widths, typical-corner calibration constants, `dco_tune_t`, state enum |
| `tdc_delay_line` | behavioural model | chain of equal delay cells, one tap per cell |
| `tdc_flash` | logic | flip-flop row sampling the taps on the falling reference edge |
| `tdc` | logic + models | coarse line and flash A, tap selection, fine line and flash B |
| `tdc_decoder` | logic | thermometer codes to `TDC_HPER` in picoseconds |
| `adpll_control` | logic | state machine, start-code arithmetic, tracking loop, lock flag |
| `dco` | behavioural model | NAND ring with coarse cells and tri-state fine loads |
| `divider` | logic | CLK_DCO / N |
| `phase_detector` | logic | two D flip-flops with a common AND reset |
| `digital_filter` | logic | glitch rejection and one UP/DN decision per reference cycle |
| `adpll` | structure | the loop above |
| `phase_locked_loop` | logic | word-level phase error monitor |
| `adpll_top` | structure | `adpll` and `phase_locked_loop` side by side |

## Cell delays and code ranges

All times in the ADPLL are in picoseconds. The whole design is sized from one set of cell
delay numbers, given for three process corners:

| corner | coarse step | fine step | operating range |
|---|---|---|---|
| best | 130 ps | 21 ps | 286 – 722 MHz |
| typical | 181 ps | 28 ps | 196 – 498 MHz |
| worst | 306 ps | 62 ps | 113 – 286 MHz |

The DCO model's half period is

    T/2 = HALF_MIN + coarse * COARSE_STEP + fine * FINE_STEP

For the typical corner the terms are 1004 ps (from 498 MHz), 181 ps and 28 ps. The code ranges
follow from this table:

* About 8.5 coarse steps span the typical range: (2551 - 1004) / 181. The coarse code is
  therefore 4 bits, used from 0 to 8. Codes above 8 act as 8.
* One coarse step equals 6.5 fine steps (181 / 28). The fine code is therefore 3 bits (0..7),
  so the fine range (196 ps) overlaps a coarse step.
* The typical range built is 1004 .. 2648 ps half period, i.e. 498 down to 189 MHz.

The control logic always uses the typical values (`COARSE_STEP_PS`, `FINE_STEP_PS` and
`DCO_HALF_MIN_PS` in `adpll_pkg`) as calibration constants. The `CELL_*` parameters of `adpll`
only change the behavioural models, so a corner can be simulated against fixed logic.

## Frequency search: two reference cycles

Cycle by cycle, with the control block running on the rising edge of CLK_REF:

| CLK_REF rising edge | state after it | what happens in that cycle |
|---|---|---|
| k (ENABLE seen high) | `ST_TDC_A` | flash A samples the coarse line at the falling edge |
| k+1 | `ST_TDC_B` | flash B samples the fine line at the falling edge |
| k+2 | `ST_TRACK` | start code loaded, DCO_ENABLE high: the DCO starts on this edge |

**Coarse level.** Every rising reference edge runs down a line of 200 cells. Each cell has the
DCO's coarse-step delay. At the falling edge, flash A records how far the edge got, which is
A = floor(T_high / 181 ps) cells. At 20 MHz the high phase is 25 ns, so A = 138.

**Fine level.** In the second cycle, a one-hot selector picks the tap at the end of flash A's
run of ones. That is the reference edge delayed by A coarse cells. This tap starts an 8-cell
line of fine-step cells. Flash B then measures the remainder in fine cells,
B = floor((T_high - A*181) / 28). In the example B = 0.

**Decoding.** Both codes are decoded as the length of their leading run of ones. This matters at
the slow corner. There the coarse line (200 × 306 ps = 61 ns) is longer than a reference period,
so the previous cycle's edge is still in the far end of the line when it is sampled. Counting
only up to the first zero ignores it. The result is
`TDC_HPER = A*181 + B*28` = 24978 ps.

**Start code.** The target DCO half period is TDC_HPER / N = 1561 ps. Subtracting the fastest
half period leaves 557 ps. That gives coarse = 557 / 181 = 3, and the remainder 14 ps gives fine
= 0. The DCO then runs at 2 × 1547 ps, about 1 % fast. The TDC cells are the same kind as the
DCO's. At another corner the TDC count and the DCO steps therefore scale together, and the
start code stays close even though the logic uses typical numbers. The division by N is a plain
combinational `/`.

## Phase tracking

This is the part that needs care. The loop is a bang-bang loop: it only learns *who was
first* in each reference cycle, never by how much.

**Phase detector.** There are two D flip-flops with D tied high. One is clocked by CLK_REF and
one by CLK_DIV. The AND of their outputs resets both. UP_PD is a pulse as long as CLK_REF leads
(the DCO is too slow). DN_PD is a pulse as long as CLK_DIV leads. The lagging output only
produces a reset glitch, which has zero width in simulation. The AND feedback through the
asynchronous resets is intentional.

**Glitch filter (CLK_DCO domain).** UP_PD, DN_PD and CLK_REF each pass through a two-flop
synchroniser clocked by the DCO output. A pulse counts once it has been high for `GLITCH_CYC`
(2) consecutive samples. It then sets UP (or DN) and clears the other. The synchronised falling
edge of CLK_REF clears both, but a pulse that is still high at that moment keeps its decision.
As a result:

* Glitches, and any phase error below about two DCO periods, give no decision. This is the loop's
  dead zone: about 6 ns at 320 MHz and 10 ns at 200 MHz.
* For a phase error below a quarter reference period, UP/DN are settled well before the falling
  reference edge. They then hold until a few DCO cycles after it.

**Hand-over to the reference domain.** The control block samples UP/DN on the *falling* edge of
CLK_REF. At that instant the filter's outputs are stable, because the filter clears them only
after its own synchroniser, two DCO cycles later. The code changes on the next rising edge. A
comparison made at edge k therefore moves the DCO at edge k+1. An earlier version used a plain
two-flop synchroniser in the reference domain. That added two reference cycles of delay and made
the loop limit-cycle with phase swings over 15 ns.

**Control law** (`adpll_control`, one step per reference cycle in `ST_TRACK`):

* *Integral:* an accumulator `integ` counts in quarter fine steps (`INT_FRAC` = 2). UP
  decrements it and DN increments it. The fine code it stands for is `integ >> 2`.
* *Proportional:* for the current decision only, the fine code sent to the DCO is moved one
  more step (`PROP_STEPS` = 1), clipped to 0..7.
* *Coarse carry:* if UP arrives with `integ` at 0, the coarse code drops by one and `integ` jumps
  up by round(4 × 181/28) = 26. At the top end the mirror move applies. The DCO period changes
  by only a few picoseconds across a carry, and the jump leaves hysteresis against toggling back.
  At coarse 0 or 8 a push past the end is ignored and reported as `pinned`.
* *Lock:* LOCKED is high after `LOCK_CYC` (32) reference cycles in which the coarse code did not
  change and no push was pinned. A target that is out of reach therefore never shows as locked.

With one fine step of frequency error, the phase moves 2 × 16 × 28 ps ≈ 0.9 ns per reference
cycle at N = 16. The loop settles into a small limit cycle: the fine code dithers between the
two codes around the exact frequency, and CLK_DIV stays within the dead zone of CLK_REF. In
simulation at 20 MHz and N = 16, the measured worst phase error after settling is 4–7 ns, and the
DCO makes 510–514 edges in 32 reference periods, against 512. These gains were tuned in
simulation and were not derived analytically. They are parameters of `adpll`.

Dropping ENABLE returns to `ST_IDLE` on the next reference edge. The DCO stops low there, and the
divider, filter and phase detector are held cleared. Raising ENABLE again repeats the search.

## DCO and divider

The `dco` model is a ring closed through a NAND gate by DCO_ENABLE. While disabled its output is
low. Its first rising edge comes one half period after enable, and a code change takes effect
at the next output transition. The `divider` counts DCO rising edges from 0 to N-1. CLK_DIV rises
at the wrap and falls N/2 edges later. Its first rising edge is the N-th DCO edge after the DCO
starts, so the loop begins close to phase alignment. N below 2 is treated as 2.

## Word-level phase monitor (`phase_locked_loop`)

The ports are `clk`, `reset`, `rst_adc`, `ref_word[31:0]` and `feedback_word[31:0]` in, and
`phase_error[31:0]`, `phase_error_abs[31:0]` and `locked` out. On each rising clock edge it
registers:

* `phase_error = ref_word - feedback_word` (signed);
* `phase_error_abs`, the magnitude of that error;
* an update of a 32-bit counter of consecutive zero-error cycles, which any nonzero error clears.

`locked` is high once the counter reaches `LOCK_CYCLES`. The default is 1, so `locked` follows a
zero error one clock later. `reset` is asynchronous and active high. `rst_adc` synchronously
clears the outputs and the counter. With both words at 10, the error is 0 and `locked` is 1.

## Where this RTL goes beyond the source description

The source gives the block set, the signal names, the two-cycle two-level TDC search, the
two-flip-flop phase detector, fine tuning driven by UP/DN, the NAND/tri-state DCO, the cell
table above and the 20 MHz × 16 configuration. It does not give the inside of any block. The
following are this implementation's own choices:

* how the two TDC levels split the work: coarse first, then fine from the selected tap;
* the line lengths (200 and 8 cells) and the leading-ones decoding;
* `TDC_HPER` in picoseconds, and the start-code arithmetic;
* the whole tracking law: filter clocking and dead zone, the falling-edge hand-over, the
  integral/proportional split, the coarse carry, and the lock and pinned rules;
* the LOCKED output and the exported state;
* resets, which are asynchronous active-low for the ADPLL and active-high for the monitor;
* the word monitor's subtraction order, the meaning of `rst_adc` and the zero-error counter as
  lock detector. The source text on this counter is garbled.

The analog-style parts are behavioural models. Their delays are ideal and jitter-free. Real
flash TDCs also see metastability and bubbles, and these are not modelled.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_tdc_delay_line` | tap i follows the input by i cell delays, both edges |
| `tb_tdc_flash` | loads on the falling edge only when enabled, holds, resets |
| `tb_tdc` | A and B counts for six high-phase lengths (90 ps – 28 ns), with old edges still in the line |
| `tb_tdc_decoder` | counts and `TDC_HPER`, with bubbles and stray ones above the run |
| `tb_phase_detector` | UP/DN pulse width equals the edge offset, no width on the lagging side, enable gate |
| `tb_digital_filter` | long pulses decide, short pulses and zero-width glitches do not |
| `tb_adpll_control` | state timing, start codes for five TDC/N cases, 400 tracking steps against a model, carries, clamps, lock and pinned rules |
| `tb_dco` | period of all 128 codes, 498 MHz fastest, below 200 MHz slowest, stop |
| `tb_divider` | first edge, period and high time for N = 16, 14, 2, 7, 255, 1 |
| `tb_phase_locked_loop` | error, magnitude and lock over 300 word pairs, `LOCK_CYCLES` = 3, `rst_adc`, reset |
| `tb_adpll` | search timing, then lock at N = 16 and N = 20 |
| `tb_adpll_corners` | three ADPLLs at the best, typical and worst corners. 320 MHz locks at best and typical; at worst it is out of reach, the code pins at 0/0 and LOCKED stays low. 200 MHz locks at typical and worst and pins at 8/7 at best |
| `tb_adpll_top` | full design at default parameters. Search, lock at N = 16, ratio change to 14 (coarse carry), ratio 6 (out of range, pinned), back to 16, stop and restart. It also runs the monitor. It counts UP, DN, dead-zone cycles, carries both ways, searches, locks, stops and pinned pushes, and fails if any never happened |

Each ADPLL test simulates a few tens of microseconds and runs in seconds.

## Simulating

From the repository root, for example the full test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/adpll_pkg.sv tb/tb_adpll_top.sv \
          --top-module tb_adpll_top -Mdir obj_top
./obj_top/Vtb_adpll_top
```

Any other testbench works the same way: name its file and its module. `-Irtl -Itb` lets Verilator
find each module in the file of the same name. All files use `timescale 1ps/1ps`. `-Wno-fatal` is
needed because Verilator warns (ZERODLY) that the DCO model's code-dependent delay could be
zero. It never is, since the shortest half period is about 700 ps even at the fast corner. To explore a corner or the loop gains, override the `CELL_*`, `GLITCH_CYC`,
`INT_FRAC`, `PROP_STEPS` and `LOCK_CYC` parameters of `adpll`, as `tb_adpll_corners` does.
