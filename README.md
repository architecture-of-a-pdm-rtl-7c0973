# PDM fuzzy logic controller

A Mamdani-type fuzzy controller (MIN/MAX inference, centre-of-gravity
defuzzification) in which membership degrees travel as
**pulse-duration-modulated (PDM) signals**. Every value `v` in 0..255 is
a pulse that starts with a frame of 256 time steps and stays high for
`v` steps. All pulses start together, so the minimum of two degrees is
the AND of their pulses and the maximum is the OR. A whole rule base on
PDM signals is therefore only a net of AND and OR gates.

The controller is a four-stage pipeline. Each stage takes one frame (a
*main clock cycle*) of 256 *system cycles*. One system cycle is four
cycles of the input clock.

This RTL implements the architecture of Ungerling and Goser, "Architecture
of a PDM VLSI Fuzzy Logic Controller with an Explicit Rule Base". Where
that description leaves something open, the choice made here is listed
under [Design choices](#design-choices-and-departures).

## Block diagram and pipeline

```
in_pdm[i] ─► fuzzifier[i] ──(h, w_even, w_odd, PDM)──► rulebase_hw ───┐ alpha*[0..7]
             (2 MF generators,                         rulebase_prog ─┤ (rb_sel)
              MF counter, latches)                                    ▼
                                                  inference_unit ─► cog_accum ─► cog_divider ─► o, o_pdm
                                                  (2 MF generators,  (adders)     (one adder)
                                                   MUX, MIN, MAX)
control_unit: clk/4 → sys_tick, frame position x, frame_start/end, power-up reset
```

| stage | frame | work | result held during the next frame |
|---|---|---|---|
| 1 | n   | fuzzifiers sample each input pulse | `h`, `w_even`, `w_odd` per input |
| 2 | n+1 | rule base (hardwired **or** programmable) | `alpha*_0..7` |
| 3 | n+2 | output MFs clipped by `alpha*`, merged; COG sums | `num`, `den` |
| 4 | n+3 | division `num/den` | `o` (and `o_pdm` in frame n+4) |

So a new result is produced every frame, and `o` holds the result for the
inputs of frame *n* from the end of frame *n*+3. A frame is 4 × 256 = 1024
input clocks. At a 6 MHz input clock that is about 5860 controller
operations per second.

Everything runs on the single clock `clk`. The system clock is the
enable `ctrl.tick`, and every register changes only on a tick. The bundle
`fc_ctrl_t` (`tick`, `frame_start`, `frame_end`, `x`) is handed to all
blocks. Stage registers load on the tick of the last phase (`x = 255`).

## Membership functions: overlap degree 2 and compressed storage

All MF handling rests on one restriction. Each variable has at most 8 MFs
(MF0..MF7), numbered left to right, and at any `x` at most two
neighbouring MFs are non-zero. The even-numbered MFs then never overlap
one another, and neither do the odd-numbered ones. So each variable needs
only two *MF generators*, "even" and "odd", and each one produces one
non-overlapping train of MFs.

A generator (`mf_generator`) stores its train in piecewise-linear form:

| address k | slope memory | position memory |
|---|---|---|
| 0 | start value m0 = y(0) | unused |
| k ≥ 1 | slope m_k | last position x_k of segment k |

and rebuilds it one value per system cycle:

```
y(0) = m0
y(x) = y(x-1) + m_k      for x_{k-1} < x <= x_k   (x_0 = 0)
```

The hardware is a position counter, a comparator that steps an address
counter when the position reaches `pos[addr]`, and an 8-bit adder with its
latch. The adder wraps modulo 256, so a slope byte works as two's
complement: `0xF9` is −7. Give the last segment the breakpoint 255.
Triangles and trapezoids need one word per corner. Both memories have 256
words, which the 8-bit address counter can reach, so arbitrary shapes fit
too.

Example: the even block of 8 equally spaced triangles, peaks 36 apart,
height 252:

```
k     0    1    2    3    4    5    6    7    8
slope 252  -7   +7   -7   +7   -7   +7   -7   0
pos   -    36   72   108  144  180  216  252  255
```

The odd block is the same with the signs swapped and start value 0.

Each generator also outputs `mf_no`, the number of the MF it is producing
within its block. It counts the returns of the output to zero. The
inference unit uses it to select the matching rule strength.

## Fuzzification (`fuzzifier`, `mf_counter`)

The input pulse is high for `v` system cycles. While the two generators
sweep x, the **MF counter** tracks `h`, the number of the lower active MF.
It starts at 0 in every frame. It steps when the generator that holds MF
`h` outputs 0 while the other one does not, which means MF `h` has ended.
In the first phase in which the input is low (x = v), the even value, the
odd value and `h` are latched. These are the degrees of MF `h` and MF
`h+1`: which of them is even follows from the parity of `h`. For example,
with the triangles above, input 183 lies between MF5 (degree 231) and MF6
(degree 21), and `h` = 5. Only `h` is passed on; `h+1` is implied.

At the end of the frame these values move into stage registers. Two D/PDM
converters (`d_pdm`, a comparator `x < v`) turn them back into pulses for
the hardwired rule base.

## Rule bases

Both rule bases produce eight rule strengths `alpha*_j`, one per output
MF, held for one frame. The input `rb_sel` picks which one stage 3 uses
(0: hardwired, 1: programmable). Both run all the time.

### Hardwired, on PDM signals (`rulebase_hw`, `mf_demux`, `pdm_d`)

Per input, `mf_demux` puts the even and odd pulses on wires MF`h` and
MF`h+1` and drives the other six wires low. Rules are gates on these
wires. The whole table is fixed by parameters:

* `RULE_IN[r][i]`: an MF mask for input `i` in rule `r`. The premise is
  the OR (MAX) of the selected wires. An empty mask leaves the input out.
* `RULE_OP[r]`: combines the input premises with AND (MIN, the usual
  "and") or OR (MAX).
* `RULE_OUT[r]`: the output MF of rule `r`.

Rules with the same output MF are ORed, so the strongest one wins. Per
output MF, a PDM/D converter counts the high cycles of the resulting
pulse `alpha'_j` and gives `alpha*_j` at the frame end. The default table
is a diagonal one, "all inputs are MF r → output MF r", and serves only as
a placeholder. A real controller overrides `HW_RULE_IN`, `HW_RULE_OP` and
`HW_RULE_OUT` on `fuzzy_top`.

### Programmable, one rule per system cycle (`rulebase_prog`, `parallel_min`)

A 256-word rule memory is read at address `x`, so up to 256 rules run
per frame. A rule word for two inputs is 10 bits:

```
[9] valid  [8:6] MF of input 0  [5:3] MF of input 1  [2:0] output MF
"if In0 is A1 and In1 is B5 then X3"  ->  10'b1_001_101_011
```

For each input, the premise number selects the latched even or odd
degree if it equals `h` or `h+1`, and 0 otherwise. A parallel MIN gate
gives the rule's truth value α. The LSB of the output MF steers α to the
even or the odd bank of four registers. In that bank, a MAX against the
register addressed by the upper two bits decides whether the register
takes α. At the frame end Reg0..Reg7 are copied to Reg0'..Reg7' (the
output) and cleared.

**Parallel MIN gate.** `parallel_min` finds the minimum of N words from
the MSB down, without a comparator tree. Bit *b* of the minimum is
`AND_k (in_k[b] | out_k)`. Input *k* becomes "out" (known to be larger)
at the first bit where it has a 1 and the minimum has a 0, and it stays
out. The delay grows with the word width but hardly with N, and each
extra input adds one column of gates.

## Inference (`inference_unit`)

The output MFs are stored like the input MFs, in an even and an odd
generator. At each x, each generator's `mf_no` selects the strength of
the MF it is producing through a 4:1 multiplexer (even: α0, 2, 4, 6;
odd: α1, 3, 5, 7). A MIN gate clips the generator value to that strength,
and a MAX gate merges the two clipped trains into the output fuzzy set
μ(x). This costs the same every frame, however many rules fired.

## Defuzzification (`cog_accum`, `cog_divider`)

The centre of gravity is Σxμ(x) / Σμ(x). Stage 3 forms both sums with
adders only. It accumulates `S(x) = Σ_{i≤x} μ(i)` and `T = Σ_x S(x)`,
and since `T = 256·D − Σxμ` (with `D = S(255)`), the numerator is
`256·D − T`. The sums are 24 and 16 bits wide.

Stage 4 divides with one subtractor. It subtracts `den` from the
remainder once per system cycle while the remainder is at least `den`,
and counts. The quotient is a position, at most 255, so one frame of 256
cycles always suffices. The result is rounded down. If no rule fired
(`den = 0`), the output is 0. `o_pdm` presents `o` as a pulse in the
following frame.

## Control unit (`control_unit`)

* `ctrl.tick`: one input clock cycle in every `CLK_DIV` = 4.
* `ctrl.x`: the frame position, counting 0..255 on ticks.
* `frame_start`, `frame_end`, and `main_clk` (high in the first half of
  a frame) for external PDM sources.
* `por_n` is an active-low power-on input. It is synchronised and
  stretched into `rst` for 4 system cycles. The first frame after reset
  is not valid, because the MF generators lock on at the first frame end.

## Top-level interface (`fuzzy_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `por_n` | in | input clock, power-on reset (low active) |
| `in_pdm[NUM_IN]` | in | input pulses; each must rise with `frame_start` |
| `rb_sel` | in | 0 hardwired / 1 programmable rule base |
| `mf_wr` (`we, sel_pos, addr, data`), `mf_gen` | in | write MF memories: `mf_gen` 2i / 2i+1 = even / odd of input i, 2·NUM_IN / +1 = output |
| `rule_we`, `rule_addr`, `rule_data` | in | write the rule memory |
| `sys_tick`, `frame_start`, `main_clk`, `rst` | out | timing for the PDM sources |
| `o`, `o_pdm` | out | crisp output, as a value and as a pulse |

Parameters: `NUM_IN` = 2, `CLK_DIV` = 4, `MEM_DEPTH` = 256, `NRULES` =
256, and the hardwired table (`HW_RULES`, `HW_RULE_IN`, `HW_RULE_OP`,
`HW_RULE_OUT`). The widths of values, positions and MF numbers (8, 8, 3)
and the count of 8 MFs are fixed in `fc_pkg`. Memories can be written at
any time, including during reset. A write takes effect the next time the
generator or rule base reads that word.

## Design choices and departures

The original description gives the block structure. The following points
were decided here:

* The clocks are enables on one clock, not derived clocks. The reset is
  stretched for 4 system cycles.
* The pulse convention is high for `x < v`, starting at frame position 0.
  The fuzzifier latches at the first low phase of the input. An input that
  stays high all frame is latched at x = 255.
* Slopes are added modulo 256. The memories are 256 words per block, far
  more than a typical 8-MF set needs (about 28 bytes per block).
* MF counter rule, and `mf_no` counting the returns to zero: the source
  states what these counters deliver, not how they count.
* Hardwired rule table format: mask per input, a MIN/MAX operator per
  rule, and a diagonal default table.
* The programmable rule word has a valid bit. Its registers are cleared
  every frame.
* COG by running sums; division by repeated subtraction, rounded down,
  with 0 when no rule fires.
* Both rule bases sit in one design behind `rb_sel`. An output D/PDM
  converter is added.
* The analogue voltage/current-to-PDM input converters are outside this
  RTL. Their digital side is `in_pdm`, driven in step with `frame_start`.

## Verification

Each block has a self-checking testbench in `tb/` that compares it with
an independent model. Most of them use the 8-triangle MF set from
`tb/tb_mf_pkg.sv`.

* `tb_fuzzy_top` runs the controller at its default size. It loads all
  six MF memories and a 64-rule table, then sends 40 input pairs: corner
  values, a frame where no rule fires, and random values. It switches
  between the rule bases and compares `o` and the width of `o_pdm` with a
  from-scratch fuzzy computation four frames later.
* `tb_pendulum` runs a pendulum-sized configuration: 7 MFs per variable
  and 19 rules (a placeholder table of that size), loaded into both rule
  bases. It checks the results and that one result comes every 1024
  input clocks.

Simulate one with plain Verilator, for example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/fc_pkg.sv tb/tb_mf_pkg.sv tb/tb_fuzzy_top.sv --top-module tb_fuzzy_top
./obj_dir/Vtb_fuzzy_top
```

Each testbench prints `TB_RESULT checks=N failures=M`.
