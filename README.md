# Fast parallel multipliers: TDM reduction tree, compressor trees and a profile-matched final adder

A parallel multiplier forms all N x N partial-product bits at once. It reduces
them to two rows with a tree of counters (full adders) or compressors. A
carry-propagate adder then adds the two rows. Nearly all the delay is in the
tree and in that final adder. This collection implements the ways of building
that tree that are usually compared, plus the one that gives the fastest tree:

* **TDM (Three-Dimensional Method)**: the tree is wired column by column
  from the arrival time of every signal. Signals that arrive early are put
  on the slow inputs of a full adder and late signals on its fast input. The
  tree comes out without a regular level structure, and it is faster than
  trees built from larger compressors. The result rows do not arrive
  together: low and high bits arrive early, middle bits late. The final
  adder is therefore split into regions to match that *arrival profile*.
* **Compressor-row trees and Dadda's tree**: a Wallace tree of 3:2
  counters, trees of 4:2 and 9:2 compressors, a single row of 24:2
  compressors, and Dadda's column reduction, which uses the fewest
  counters.
* **The sequential shift-and-add multiplier**: all of these trees flatten its
  digit recurrence into one parallel array.

All parallel units are unsigned and purely combinational. There is no Booth
recoding and there are no pipeline registers.

## Units

| Module | What it is | Default size |
|---|---|---|
| `vlsi_multipliers_top` | all units side by side, each with its own ports | N = 24, SEQ_N = 6 |
| `tdm_multiplier` | multiply-add P = X·Y + Z: AND array, TDM tree with the addend injected, hybrid final adder | N = 24, 49-bit result |
| `tdm_tree` | the TDM reduction tree (wiring computed at elaboration) | N = 24 |
| `hybrid_final_adder` | ripple / one-level carry-skip / carry-select adder | W = 49, regions at 16 and 32 |
| `pp_array` | N x N AND array | N = 24 |
| `compressor_tree_multiplier` | multiplier with a tree of K:2 compressor rows, K = 3 (Wallace), 4, 9 or any larger K | N = 24, K = 4 |
| `compressor_row` | one level of such a tree: one compressor per bit position | |
| `compressor_9_2`, `compressor_4_2`, `full_adder` | the compressor cells | |
| `compressor_n_2` | generic NIN:2 compressor (13:2, 24:2, 53:2 ...) | NIN = 13 |
| `dadda_multiplier` | multiplier with a Dadda column-reduction tree | N = 24 |
| `seq_multiplier` | radix-2^k shift-and-add multiplier with a start/busy/done handshake | N = 6, radix 2 |
| `mult_pkg` | the cell delay model and full-adder functions | |

## The TDM reduction tree

### Delay model

Delays are counted in XOR-gate delays and stored in half-XOR units, so
every number in the model is an integer (`mult_pkg`):

| cell | path | delay |
|---|---|---|
| full adder | A or B → Sum | 2 XOR |
| full adder | Cin → Sum | 1 XOR |
| full adder | any input → Carry | 1 XOR |
| half adder | any input → Sum | 1 XOR |
| half adder | any input → Carry | 0.5 XOR |

The full adder's inputs are therefore not interchangeable. A signal wired
to Cin reaches the sum one XOR delay sooner than one wired to A or B.

### Wiring rule

Column *i* of the partial-product matrix (the bits of weight 2^i) starts as a
list of min(i+1, 2N-1-i) signals, all ready at time 0. Columns are processed
from the least significant upward. For each column:

1. Columns that hold at most two signals, and get no final carry from below
   (columns 0 and 1), go straight to the final adder.
2. Keep the list sorted by arrival time, with ties kept in insertion order.
   If the list has an even number of signals, a half adder takes the two
   earliest.
3. While more than three signals remain, a full adder takes the three
   earliest: the earliest two on A and B, the latest of the three on Cin. Its
   sum goes back into this column's list at its computed arrival time. Its
   carry goes into the next column's list.
4. The last three signals go to one full adder. Its sum is bit *i* of the
   first final-adder row (`row_a`). Its carry is bit *i+1* of the second
   row (`row_b`). If only one signal is left, it goes to `row_a[i]`
   directly.

So each column passes exactly one sum to the final adder and one carry to the
column above. All other carries join the next column's list and are reduced
there, together with that column's own bits.

### How the RTL realises it

The rule depends only on arrival times, not on data, so `tdm_tree` runs it
once at elaboration. The constant function `build_schedule()` simulates the
algorithm and records the input nets of every cell, in creation order. It
also records which net drives each final-adder input and the arrival time
of each. An `always_comb` block then evaluates the cells in that order,
and creation order is a topological order. The synthesised logic is
therefore a fixed tree of full and half adders. Net numbering:

* net 0 is constant 0;
* nets 1..N² are the partial products;
* the addend bits come next;
* cell *k* drives net NB+2k (sum) and net NB+2k+1 (carry).

The arrival profile can be read from `arr_a`/`arr_b`, and the critical
path, in half-XOR units, from the localparam `MAX_DELAY`. Building the
schedule costs elaboration time. At N = 24, Verilator lint takes a few
seconds and the yosys/slang front end takes about a minute.

### What it achieves

Critical path of the generated tree, in XOR delays, against the published
TDM figures for the same word lengths (checked by `tdm_tree_tb`):

| N | 3 | 4 | 6 | 8 | 9 | 11 | 12 | 16 | 19 | 24 | 32 |
|---|---|---|---|---|---|---|---|---|---|---|---|
| this tree | 2 | 3 (2.5) | 4 | 5 | 6 | 7 | 7 | 8 | 9 | 10 | 11 |
| published TDM | 2 | 3 | 5 | 5 | 6 | 7 | 7 | 8 | 9 | 10 | 11 |
| published 4:2 tree | 2 | 3 | 6 | 6 | 8 | 9 | 9 | 9 | 12 | 12 | 15 |
| published Wallace | 2 | 4 | 6 | 8 | 8 | 10 | 10 | 12 | 14 | 16 | 18 |

The two TDM rows agree everywhere except N = 6, where this implementation
of the rule is one XOR delay faster. Beyond 32 bits, running the same rule
on arrival times alone gives 12, 13, 14 and 15 XOR delays for
N = 42, 53, 64 and 95. These also match the published values. The
testbench does not cover these sizes: at N = 53 the elaboration-time
schedule already takes Verilator several minutes (N = 32 takes about 25 s).

## Arrival profile and the hybrid final adder

For the 24-bit multiply-add tree the arrival times at the final adder,
per column, in half-XOR units, are:

```
col  0..11 :  0  4  4  6  8  8 10 10 12 12 13 14
col 12..23 : 14 16 16 16 16 16 18 18 18 18 18 20
col 24..35 : 20 20 20 20 20 20 20 20 20 18 18 18
col 36..48 : 18 16 16 16 14 14 12 12 10  8  8  4  0
```

A single fast adder would wait for the slowest column. `hybrid_final_adder`
splits the adder at two bit positions instead:

* **[0, S1) ripple carry.** The low-order inputs arrive one after another,
  so a rippling carry meets inputs that are only just arriving.
* **[S1, S2) one-level carry skip.** These are blocks of `SKIP` bits. Each
  block ripples internally. Its carry-out is the block's carry-in when all
  bits of the block propagate (a ⊕ b = 1); otherwise it is the carry
  rippled inside the block. This region covers the plateau of latest
  arrivals.
* **[S2, W) carry select.** These inputs arrive early again, so both sums
  (carry-in 0 and 1) are formed in advance. The carry arriving at S2 only
  drives a multiplexer.

Defaults: `S1` = W/3 = 16, `S2` = 2W/3 = 32, `SKIP` = 4. They bound the
plateau (columns 23 to 32) of the profile above. For other sizes, take the
cut points from the profile of the tree you build, in the same way. The
split into these three adder types is the method's. The equal block size
and the rule for the defaults are this implementation's. The optimal
adder has variable-size skip blocks fitted to the exact profile, and that
is not reproduced here. The simpler variants are the same module with
other cut points: `S2 = W` gives a hybrid ripple / carry-skip adder without
the select region, and `S1 = 0, S2 = W` gives a plain one-level carry-skip
adder.

## Multiply-add in the multiply time

`tdm_multiplier` computes X·Y + Z, with a 2N-bit Z and a (2N+1)-bit result.
The addend bits are not added after the product. They enter the column
lists of the tree at time 0, like one more partial-product row, and the TDM
rule places them where the tree has slack. For N = 24 the critical path
stays at 10 XOR delays, the same as for the plain product. For smaller N
the addend costs one XOR delay (for example 5 → 6 at N = 8). With Z = 0
the unit is a plain multiplier.

## Compressor-row trees

`compressor_tree_multiplier` treats the N partial-product rows (x AND y_i,
shifted by i) as 2N-bit operands. At each level the rows are split into
groups of K. A group of three or more rows goes through a `compressor_row`,
with missing rows fed as zeros, and comes out as two rows. A group of one or
two rows passes to the next level unchanged. Levels repeat until two rows
remain, and a `+` adds them.

| K | cell | rows per level for N = 24 | levels |
|---|---|---|---|
| 3 | `full_adder` (Wallace) | 24→16→11→8→6→4→3→2 | 7 |
| 4 | `compressor_4_2` | 24→12→6→4→2 | 4 |
| 9 | `compressor_9_2` | 24→6→2 | 2 |
| 24 | `compressor_n_2` (24:2) | 24→2 | 1 |

The Wallace tree's 7 levels equal the minimum stage count for
19 < N ≤ 28. The table of minimum stages for N bits is:

| N | 3 | 4 | ≤6 | ≤9 | ≤13 | ≤19 | ≤28 | ≤42 | ≤63 |
|---|---|---|---|---|---|---|---|---|---|
| stages | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |

**4:2 compressor.** Two full adders in series. The first takes x1..x3 and
produces the lateral carry-out `co`. The second takes that sum, x4 and the
lateral carry-in `ci`. Because `co` never depends on `ci`, a row of 4:2
compressors has no carry ripple. It reduces four rows to two in two
full-adder delays.

**9:2 compressor.** Seven full adders in four levels, with six lateral
carries:

| level | full adders | inputs |
|---|---|---|
| 1 | 3 | x[8:0] |
| 2 | 2 | the three level-1 sums; ci[2:0] |
| 3 | 1 | the two level-2 sums and ci[3] |
| 4 | 1 | the level-3 sum, ci[4] and ci[5] |

Every lateral carry-out is produced one or more levels before the level
where the neighbouring compressor uses it. A row of 9:2 compressors
therefore has no ripple either. The cell balances the count (9 inputs + 6
carries in = 2 outputs + 6 carries out + 7 adders). In levels 3 and 4 the
latest signal goes to the fast carry-in, which makes the longest path 7 XOR
delays. The published optimised cell reaches 6.

**Larger compressors (`compressor_n_2`).** A NIN:2 compressor has NIN−2
full adders and NIN−3 lateral carries. It is built level by level:

1. At each level, the available signals go three at a time into full
   adders. The available signals are the unused inputs, the previous
   level's sums, and the carry-ins that pair with the previous level's
   carry-outs.
2. One or two signals left over pass to the next level.
3. Each level's carries leave as lateral carry-outs, in creation order.

This simple greedy rule gives exactly the published full-adder level
counts of the compressor family:

| compressor | 4:2 | 6:2 | 9:2 | 13:2 | 18:2 | 24:2 | 53:2 |
|---|---|---|---|---|---|---|---|
| levels | 2 | 3 | 4 | 5 | 6 | 7 | 9 |

Published optimised cells have fewer XOR gates on their paths than this
plain-adder construction.

## Dadda tree

`dadda_multiplier` reduces the columns in stages. The allowed column
heights are d = 2, 3, 4, 6, 9, 13, 19, 28, 42, 63 …, each term being
⌊3/2 × previous term⌋. Each stage targets the largest height below the
current one. Going up the columns, it places only as many full adders
(height −2) and half adders (height −1) as needed. The count includes the
carries that arrive from the column below in the same stage. After the
stage with target 2, a `+` adds the two rows. The number of stages is
therefore the minimum-stage figure in the table above (7 for N = 24). Like
`tdm_tree`, the wiring is computed at elaboration and evaluated in an
`always_comb` block.

The difference from TDM: Dadda's tree is organised in stages and ignores
which adder input is fast. TDM drops the stages and wires each column by
arrival time.

## Sequential multiplier

`seq_multiplier` implements the digit recurrence

p(0) = 0,  p(j+1) = (p(j) + rⁿ · X · y_j) / r,  j = 0 … n−1,  p(n) = X·Y

with r = 2^LOG2R and n = N / LOG2R. The register pair {hi, lo} holds p(j).
Each clock adds X·y_j into `hi`, which is N+LOG2R bits wide so the sum
cannot overflow. It then shifts the pair right by one digit, so the digit
leaving `hi` becomes a finished product digit in `lo`.

Timing:

* A `start` pulse while `busy` is low captures `x` and `y`.
* `busy` stays high for n clocks.
* `done` pulses for one clock after the last step.
* `p` then holds the product until the next start.

Reset (`rst_n`) is active low and asynchronous. An assertion checks that
the overflow bits of `hi` are zero when `done` pulses.

## Verification

Each module has a self-checking testbench in `tb/` named `<module>_tb`. Each
prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog.

* `full_adder_tb`, `compressor_4_2_tb`, `compressor_9_2_tb`: exhaustive.
  They check the counting identity and that lateral carry-outs do not
  depend on lateral carry-ins.
* `pp_array_tb`: every bit, and the weighted sum against x·y.
* `hybrid_final_adder_tb`:
  * random and directed sums on the default adder;
  * an 11-bit adder with uneven regions;
  * counts of skip-path and carry-select events (each must occur).
* `tdm_tree_tb`: the eleven word lengths of the table above.
  * Products are checked for every length.
  * Each critical path is checked against the published TDM figure.
  * The 24-bit tree with addend must keep the plain tree's critical path.
* `tdm_multiplier_tb`: the 24-bit multiply-add on corner and random
  operands, and an 8-bit instance exhaustively over X and Y.
* `compressor_tree_multiplier_tb`: 24-bit K = 3, 4, 9 and 24 units on
  random operands, with their level counts, and 5-bit units exhaustively.
* `compressor_n_2_tb`: the 4:2 … 53:2 family. It checks the level counts
  above and the counting identity on random inputs.
* `dadda_multiplier_tb`: N = 3 … 24. It checks products and stage counts
  against the minimum-stage table.
* `seq_multiplier_tb`: all 6-bit operand pairs with the 6-cycle latency, and
  a radix-4 8-bit unit with 4-cycle latency.
* `vlsi_multipliers_top_tb`: the whole collection at default sizes. It
  checks every result each cycle. It counts multiply-adds with a non-zero
  addend, carry-skip and carry-select events, 4:2, 9:2 and 24:2 lateral
  carries, and completed sequential multiplies, and fails if any of them
  never happened.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -y rtl +libext+.sv rtl/mult_pkg.sv tb/tdm_tree_tb.sv \
  --top-module tdm_tree_tb -o sim
./obj_dir/sim
```

Verilator lint reports a few expected warnings:

* the wide `'0` of the schedule vector;
* the carry out of the top bit, dropped in compressor rows;
* the profile signals of `tdm_tree`, which only testbenches read.

## Limits and departures

* Unsigned operands only. Booth recoding and two's-complement correction
  are not included.
* The cell delay model is in XOR units. Nothing here predicts nanoseconds;
  real-cell timing depends on the library.
* The 4:2 and 9:2 compressors are built from plain full adders. Faster
  gate-level cells (for example a 4:2 with three XOR delays) have the same
  function and could replace them.
* Trees of 4-bit carry-propagate adders, generalized multi-column counters,
  Booth-recoded multipliers and circuit-level designs such as
  pass-transistor multiplexers are not implemented.
* The compressor-row and Dadda trees use a behavioural `+` as their final
  adder. Only the TDM unit has the profile-matched adder.
* Final adder cut points and skip block size are fixed parameters, not
  derived automatically from the tree's profile.
