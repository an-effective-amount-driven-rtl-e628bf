# ADEM: amount-driven pair coding for a low-power on-chip data bus

In deep-submicron wiring, most of the energy a long on-chip bus burns
goes into the coupling capacitance between neighbouring wires, not into
the capacitance to ground. Coupling is worst when two neighbours switch
in opposite directions at the same time (a *toggle*, `01 -> 10`): that
costs four times the energy of one wire charging its coupling
capacitance. Coding schemes that try to optimise all neighbour
couplings at once get stuck, because fixing one wire gap disturbs the
next.

ADEM (amount-driven encoding method) splits the problem in two:

* **Inside a pair.** The M bus lines are grouped into M/2 disjoint
  pairs `(b[2i], b[2i+1])`. The coder handles the two ground
  capacitances and the one coupling capacitance of each pair.
* **Between pairs.** The gap between neighbouring pairs is physically
  widened (*spacing*), which shrinks the coupling that the code does not
  handle. This is layout and has no logic.

Each pair holds one of four values, its *type* (00, 01, 10 or 11). The
encoder counts how often each type appears in the current word and
ranks the types: **A** is the most frequent, then **B** and **C**, and
**D** is the least frequent. Each pair is then sent as a *change* to
what its two wires already carry. The change costs nothing for rank A,
little for B and C, and most for D. A few extra wires, the *informed
lines*, tell the decoder the ranking so it can undo the mapping.

This repository holds synthesizable SystemVerilog for the encoder, the
decoder and the end-to-end bus. It also has self-checking testbenches,
including a sweep of bus widths and informed-line policies that reports
the bus energy saved.

## Pair transitions and their cost

Energy is counted in units of `C_L*Vdd^2/2`, the cost of one wire
charging or discharging its ground capacitance. `lambda = C_C/C_L` is
the coupling-to-ground ratio, about 3.9 at 90 nm, 5.4 at 65 nm and
7.4 at 55 nm. A pair going from value `p` to value `q` costs:

* **self:** 1 for each wire that switches;
* **coupling:** `lambda * (dx - dy)^2`, where `dx` and `dy` are the
  changes (-1, 0 or +1) of the two wires. This is 0 when both wires do
  the same thing, `lambda` for a charge or discharge, and `4*lambda` for
  a toggle.

So from any starting value, one target costs 0 (stay), one costs 2 or
`2+4*lambda` (both wires flip), and two cost `1+lambda` (one wire
flips).

## The four-state code

Write a pair's type as `{b[2i], b[2i+1]}`. The *previous encoded pair*
is the value the two wires carry now. A pair is transmitted by applying
one of four *states* to it:

| state       | effect on the two wires       | XOR mask on `{b[2i], b[2i+1]}` |
|-------------|-------------------------------|--------------------------------|
| unchange    | nothing                       | `00` |
| even invert | flip the even line `b[2i]`    | `10` |
| odd invert  | flip the odd line `b[2i+1]`   | `01` |
| all invert  | flip both                     | `11` |

The state is chosen from the pair's rank and from whether the previous
encoded pair is a *same* pair (00 or 11) or a *different* pair (01 or
10):

| previous encoded pair | A        | B           | C           | D           |
|-----------------------|----------|-------------|-------------|-------------|
| 00 or 11              | unchange | all invert  | even invert | odd invert  |
| 01 or 10              | unchange | even invert | odd invert  | all invert  |

This is the core of the scheme. Only rank D can ever cause a toggle,
because only all-invert from a different pair (`01 <-> 10`) is a toggle.
From a same pair, all-invert moves between 00 and 11: two self
transitions and no coupling, which is the cheapest non-zero move, so it
goes to B. Averaged over the four possible previous values, the expected
cost is:

| rank | expected cost per pair     |
|------|----------------------------|
| A    | 0                          |
| B    | `(6 + 2*lambda)/4`         |
| C    | `(4 + 4*lambda)/4`         |
| D    | `(6 + 10*lambda)/4`        |

Pairing the most frequent types with the cheapest states minimises the
expected energy of the word. The ranking needs only counts and
comparisons, not an energy calculation over candidate codewords.

**Decoding** inverts the table. The decoder keeps the previous codeword.
For each pair it forms `prev XOR current`, which gives the state. It
finds the rank from the state and whether `prev` is a same or a
different pair, then maps the rank back to a type using the ranking on
the informed lines.

**Worked example** (M = 16, all lines 0 at the start). The pairs of the
word are `01 01 10 01 10 00 00 11` (pair 0 first). The counts are
01:3, 10:2, 00:2 and 11:1, so A=01, B=10, C=00 and D=11. From the
all-zero lines, A stays `00`, B is all-inverted to `11`, C is
even-inverted to `10` and D is odd-inverted to `01`. The codeword pairs
are therefore `00 00 11 00 11 10 10 01`. The informed lines (5-line
policy) carry `A=01, B=10, csel=0`.

### Ties

Equal counts are broken in favour of the type that comes later in the
fixed sequence 00, 01, 10, 11. The example above relies on this: 10
beats 00 for rank B. Any rule works, because the decoder receives the
ranking and never recomputes it. This one just has to be applied the
same way in every cycle.

## Informed lines: three policies

The informed lines cost energy too, so the ranking can be sent in full
or in part. The `MODE` parameter selects one of three policies:

| `MODE`      | lines | line code (MSB first)      | ranks the decoder derives itself |
|-------------|-------|----------------------------|----------------------------------|
| `ADEM_FULL` | 5     | `{A[1:0], B[1:0], csel}`   | C and D: `csel=0` makes C the earlier of the two remaining types, `csel=1` the later |
| `ADEM_4L`   | 4     | `{A[1:0], D[1:0]}`         | B and C: the earlier and the later of the two remaining types |
| `ADEM_2L`   | 2     | `{D[1:0]}`                 | A, B and C: the three remaining types in sequence order |

"Earlier" and "later" refer to the fixed sequence 00, 01, 10, 11. The
5-line code spans the 24 possible rankings and the 4-line code the 12
(A, D) pairs. In the reduced policies the encoder does not use its true
B/C (or A/B/C) ranking. It uses the order the decoder will rebuild, so
the two always agree. Both sides compute that order with the same
function, `adem_pkg::order_from_info`.

The default is `ADEM_4L`. It gives the best balance between the saving
on the data lines and the cost of the informed lines, and it measured
best in the sweep below for M >= 16.

## Timing and interface

`adem_bus_top` (defaults: `M = 32`, `MODE = ADEM_4L`):

| port        | dir | width  | meaning |
|-------------|-----|--------|---------|
| `clk`       | in  | 1      | clock |
| `rst_n`     | in  | 1      | synchronous, active low |
| `in_valid`  | in  | 1      | an original word is presented this cycle |
| `in_data`   | in  | M      | original word |
| `out_valid` | out | 1      | recovered word valid |
| `out_data`  | out | M      | recovered word |
| `bus_valid` | out | 1      | bus strobe (for observation) |
| `bus_data`  | out | M      | encoded data lines (for observation) |
| `bus_info`  | out | 5/4/2  | informed lines (for observation) |

* One word per clock, with no back-pressure.
* A word presented with `in_valid` is on the bus after the next rising
  edge. It appears on `out_data`, with `out_valid`, one edge later: a
  latency of 2 clocks.
* When `in_valid` is low, the bus lines keep their value, so they cause
  no transitions, and the decoder ignores the cycle.
* Counting, ranking and pair encoding form one combinational stage in
  front of the bus register. The longest path is counter, comparator,
  rank lookup, then the state XOR.
* Reset clears the bus lines and the decoder's stored codeword to zero.
  Encoder and decoder must be reset together.
* Simulation assertions check the bus rules. The encoder checks that
  an idle cycle leaves every line untouched, and that a pair toggles
  only when it carries the type ranked D. The decoder checks that every
  valid word carries a well-formed informed code, meaning distinct
  types for A and B (or A and D).

## Spacing

Spacing is the physical half of the scheme. Lines within a pair sit at
minimum pitch `d_min`. The gap between neighbouring pairs is
`d_min*(1+alpha)`, which divides the inter-pair coupling capacitance by
`1+alpha` (parallel-plate estimate). In RTL the bus is plain wires from
encoder to decoder. Implementing spacing means keeping `bus_data[2i]`
and `bus_data[2i+1]` adjacent and routing the pairs with extra spacing;
the informed lines can be placed anywhere.

## Source files

| file | contents |
|------|----------|
| `rtl/adem_pkg.sv` | types (`pair_t`, `order_t`, `adem_mode_e`, `rank_e`), the encoding and decoding tables as functions (`state_mask`, `state_rank`), and informed-line code handling (`info_width`, `order_from_info`, `info_valid`) |
| `rtl/pair_type_counter.sv` | counts of the four pair types in a word (combinational) |
| `rtl/pair_rank_decider.sv` | ranks the types from the counts (six pairwise comparisons) and forms the informed-line code and the order the encoder must use (combinational) |
| `rtl/adem_encoder.sv` | counter + ranker + per-pair state logic + bus register |
| `rtl/adem_decoder.sv` | per-pair state detection and table lookup, previous-codeword register, output register |
| `rtl/adem_bus_top.sv` | encoder and decoder connected by the bus |
| `tb/adem_ref_pkg.sv` | independent reference model (literal tables, bubble-sort ranking) and a transition counter for energy |
| `tb/tb_*.sv` | testbenches, one per module, plus the two listed below |

`M` must be even. Any width elaborates; the count width is
`$clog2(M/2+1)`. Synthesis of the default top yields roughly 600
word-level cells and 102 flip-flops: 37 in the encoder (bus lines,
informed lines and strobe) and 65 in the decoder (stored codeword,
output word and valid).

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -y rtl +libext+.sv \
  rtl/adem_pkg.sv tb/adem_ref_pkg.sv tb/tb_adem_bus_top.sv \
  --top-module tb_adem_bus_top -Mdir obj && obj/Vtb_adem_bus_top
```

Swap in any other testbench name. Each one ends by printing
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it shows |
|-----------|---------------|
| `tb_pair_type_counter` | counts against a bit-by-bit reference, M = 32 and 8 |
| `tb_pair_rank_decider` | codes and orders of all three policies against a reference sort, many ties, the worked example |
| `tb_adem_encoder` | codeword, informed lines and valid against the reference every cycle, five configurations, idle cycles, reset in mid-stream, the worked example |
| `tb_adem_decoder` | recovery of reference-encoded streams, five configurations |
| `tb_adem_bus_top` | end to end at M = 8, 32 and 64 with all policies; 2-clock latency; checks that each of the four states, ties, informed-line changes, idle cycles and reset all occur; reports energy |
| `tb_adem_bus_top_full` | the default top, no parameter overrides, 2000 words |
| `tb_adem_workloads` | widths 8 to 64 and all three policies on media-like sample streams; energy saving for lambda = 3.9/5.4/7.4 and alpha = 0/1/3 |

## Measured energy

These numbers come from `tb_adem_workloads`. The data are synthetic
8-bit sample streams (random walks, some with jumps), not real media
files. Energy counts every data line with its coupling to its
neighbours, plus the informed lines. It is compared with the plain
un-encoded bus of the same width without extra spacing.

| M = 32, lambda = 3.9 | alpha = 0 | alpha = 1 | alpha = 3 |
|----------------------|-----------|-----------|-----------|
| 5 informed lines     | -18 %     | +10 %     | +24 %     |
| 4 informed lines     | -12 %     | +14 %     | +28 %     |
| 2 informed lines     | -34 %     | 0 %       | +18 %     |

The trends are the ones the scheme is built around:

* The 4-line policy is best.
* Savings grow with bus width: for 4 lines at alpha = 1 they run from
  -14 % at M = 8 to +17 % at M = 64.
* Savings grow with lambda and with spacing.

On the pair transitions alone, the energy inside pairs, the 5- and
4-line policies always beat the plain bus; the testbench checks this at
every width. Without spacing, the uncontrolled coupling between pairs
and the informed lines can cost more than the code saves on this data.
So spacing is part of the design, not an option. How much is saved on
real media data depends on the data and was not measured here.

## Choices not fixed by the scheme itself

* **Which line "even" and "odd" invert flip.** "Even" flips `b[2i]` and
  "odd" flips `b[2i+1]`, for every previous pair. After a previous pair
  of 00, swapping C and D's single-line flips would cost exactly the
  same (`1+lambda` each), so that row could be defined either way; the
  decoder only has to agree with the encoder.
* **Tie-breaking:** the later type in the sequence wins.
* **Bit layout of the informed-line codes:** `csel` for the 5-line
  policy, and the field order of all three codes.
* **Bus protocol:** the valid strobe, register placement (latency 2),
  and synchronous reset to all-zero lines.
* **Counter and comparator structure:** popcounts and six pairwise
  comparisons.

The energy figures above are a testbench measurement under the stated
model. They are not a property of the RTL.
