# Combination sorter: sorting by rank counting on a mesh of cube emulators

This is a sorting network that finds each word's final position by counting
instead of by a chain of compare-exchange passes. Take m sorted sequences
S_0 .. S_m-1. If every pair (S_i, S_j) is merged, the merge tells each
element s_i(l) how many elements of S_j come before it. Adding those counts
over all j gives the element's rank in the combined sequence. The element can
then go straight to that output position. One such step is a **combination**
(m sequences of t words in, one sequence of m*t words out). A sort is a
cascade of combinations of growing size, called **COMBINE-SORT**. With three
well-chosen stages, n words of about log n bits are sorted in O(log n) time.
The layout area is O(n^2), the least that any sorter this fast can have.

The RTL in `rtl/` implements the whole O(log n) sorter: the combiner and its
parts, the coalescer (a row of combiners), and the three-stage cascade. It
also includes the mesh of CCCs, a second network for sorters that trade time
for area. The
default size is n = 256 words of 12 bits. The data paths are word-parallel
(see "Where this RTL departs from the architecture"). Everything is
synthesizable SystemVerilog-2017.

## Structure

```
combination_sorter            three coalescers in cascade
 └─ coalescer  (x3)           n / t_k combiners side by side
     └─ combiner              one (m,t)-combiner
         ├─ combiner_ctrl     instruction sequencer (one per combiner)
         ├─ merging_module    m x m of them: M_ij merges S_i with S_j
         ├─ row_tree          m*t of them: RT_i(l), bit-serial rank adder + broadcast
         │   └─ serial_adder  full adder with carry feedback, one per tree node
         └─ column_tree       m*t of them: CT_j(l), broadcast and output collection
mccc                          mesh of CCCs, beside the sorter with its own ports
csort_pkg                     instruction encoding shared by the combiner blocks
```

Sizes follow the usual notation: m = 2^mu sequences of t = 2^tau words,
N = m*t, and word length q (parameter `Q`).

## How one combination runs

A combiner is an m x m mesh of merging modules. The modules in a row share
m*t row trees RT_i(l), and the modules in a column share m*t column trees
CT_j(l). This is the orthogonal-trees arrangement, with merging modules at
the leaves. Module M_ij has 2t columns. Columns 0..t-1 (the "left half")
receive S_i, and columns t..2t-1 (the "right half") receive S_j.

One controller, `combiner_ctrl`, issues one instruction per clock to every
module at once. An instruction is an operation plus a cube dimension E_h. The
sequence for a (2^mu, 2^tau)-combiner is:

| phase | instructions | cycles | what happens |
|---|---|---|---|
| A | `LOAD_L` | 1 | row trees broadcast s_i(l) into column l of every M_ij |
| A | `COPY_DIAG` | 1 | diagonal modules M_jj copy their left half into the right half |
| A | `LOAD_R` | 1 | column tree CT_j(l) picks s_j(l) from M_jj and broadcasts it to column t+l of every M_ij |
| B | `REVERSE` E_0..E_tau-1 | tau | the right half is reversed, making the row bitonic |
| B | `MERGE` E_tau..E_0 | tau+1 | bitonic merge; every comparator records whether it exchanged |
| B | `RANK_INIT` | 1 | column k of the merged row gets rank k |
| B | `RETRACE` E_0..E_tau | tau+1 | the recorded exchanges run backwards and carry key and rank home |
| C | `SUM` | 1 + (mu+tau) + depth + 1 | row trees add the partial ranks C_ij(l) = rank - l bit-serially |
| C | `LOAD_TOT` | 1 | each module gets the total ranks C_i(l) and marks its *active* elements |
| D | `CONC` E_0..E_tau-1 | tau | active elements are packed into the leftmost columns |
| D | `EXP` E_tau-1..E_0 | tau | they are spread out to column C_i(l) mod t |
| D | `TRANSFER` | 1 | they cross to column t + (C_i(l) mod t) |
| D | `OUTPUT` | 1 | CT_j(l) collects its single valid leaf, which is s(j*t + l) |

An element of S_i is active in M_ij when the top mu bits of its total rank
equal j. So each module in row i delivers the elements of S_i that belong to
output block j. Each column tree then has exactly one valid leaf in `OUTPUT`.
The combiner asserts this.

### Why the routing in phase D cannot collide

The active elements of a module are consecutive in S_i. Their ranks increase
and differ from each other. Packing them into columns 0, 1, 2, ... and then
spreading them to their targets are both monotone routings. Monotone
routings go through a binary cube without conflict if the dimensions are used
in ascending order for packing (concentration) and descending order for
spreading (expansion). At each step, a pair of columns swaps its contents
when an element in the pair must cross that dimension. `merging_module`
asserts that two active elements never compete for one column.

### Equal values

Counting ranks only gives a permutation if every key is distinct. Before a
word enters a combiner, it is extended with a tag {i, l} below its value
bits: the sequence index and the position. Inside a module, a further side
bit (0 for the left copy, 1 for the right copy) sits below the key. The
effect:

- For i < j, an equal element of S_j does not count as "before" s_i(l).
- For i > j, it does.
- In a diagonal module, C_ii(l) = l.

The tags are dropped at the output. Within a combiner, equal values come out
in the order of their input sequences. Since every stage keeps that order,
the whole sort is stable.

## The row trees

Each node of a row tree is a `serial_adder`: a full adder whose carry goes
back through a flip-flop. The sum bit is registered, so a tree of depth d
adds d cycles of latency. The leaf buffer registers load the partial ranks on
`start` and shift them out least significant bit first. The root collects the
W = mu + tau bit total. From start to `done` takes W + depth + 1 cycles.

`COMB = 1` builds a **comb-tree**: a chain of m-1 adders instead of a
balanced tree. It is deeper (m-1 instead of mu) but has constant layout
width. Leaf k joins the chain k-1 stages down, so its bits are issued k-1
cycles later to stay aligned. The architecture uses comb-trees where m is
small compared with the word length.

The row trees also carry the root-to-leaf word broadcasts. These are
single-cycle fan-outs here.

## The three-stage sorter

Stage k of COMBINE-SORT has n / t_k combiners, each with parameters
(m_k, t_{k-1}). Here t_0 = 1 and t_k = m_1 ... m_k. The optimal O(log n)
sorter uses the factorization

    m_1 = n / log^2 n,   m_2 = log n,   m_3 = log n

It uses full binary trees in the first two stages and comb-trees in the last.
The last stage is then O(log n) fast, because its m is only log n. The
smallest n for which all factors are powers of two is 256:

| stage | combiners | (m, t) | mu, tau | trees | key bits (Q+mu+tau) | latency (cycles) |
|---|---|---|---|---|---|---|
| 1 | 64 | (4, 1) | 2, 0 | full | 12+2+1 | 16 |
| 2 | 8 | (8, 4) | 3, 2 | full | 12+3+2 | 30 |
| 3 | 1 | (8, 32) | 3, 5 | comb | 12+3+5 | 52 |

For stage 1, tau = 0 still needs a one-bit position tag field.

A combiner's latency from `start` to `done` is

    5*tau + 11 + (mu + tau) + depth + 1     depth = mu (full) or 2^mu - 1 (comb)

Stage k+1 starts in the cycle in which stage k raises `done`, so a full sort
takes 16 + 30 + 52 = **98 cycles**. Sorts do not overlap.

Parameters of `combination_sorter` are `Q` (word length, default 12), `MU1`,
`MU2` and `MU3` (log2 of m per stage, default 2, 3, 3), and `COMB1..3`
(default 0, 0, 1). `SIGMA` and `RHO` (default 2, 4) size the mesh of CCCs
placed beside it: s = 2^SIGMA, r = 2^RHO. Each MU must be at least 1. The last stage holds
m_3^2 merging modules of 2*t_2 words each, that is 2*n*m_3 keys (4096 at
the defaults).

### Interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-cycle pulse while `busy` is low; `in_val` is sampled in the next cycle |
| `in_val` | in | Q x n | words to sort, in any order |
| `out_val` | out | Q x n | ascending; valid from the `done` cycle until the next sort ends |
| `busy` | out | 1 | a sort is in progress |
| `done` | out | 1 | one-cycle pulse |
| `stage_done` | out | 3 | `done` pulse of each coalescer |
| `mccc_start`, `mccc_busy`, `mccc_done` | in, out, out | 1 | the same protocol for the mesh of CCCs |
| `mccc_in`, `mccc_out` | in, out | Q x 2^(2 SIGMA + RHO) | its words, in processor order; ascending after a sort |

`combiner` and `coalescer` can be used on their own with the same
start/busy/done protocol. `combiner` numbers its inputs s_i(l) = `in_val[i*t+l]`.

## The mesh of CCCs

`mccc` is the second network of the architecture, meant for sorters that
trade time for area. It is an s x s mesh of small cube emulators (CCC
modules) with r words each, n = s^2 * r words in total. For each word
position k, the modules' words form their own s x s mesh. Together the
network emulates a binary cube of n processors:

- Processor P_t is word k of the module at mesh position (i, j), where
  t = t' * r + k.
- t' interleaves the bits of i and j: bit 2l of t' is j_l, and bit 2l+1 is
  i_l.
- Cube dimensions below log2 r stay inside a module.
- The higher dimensions alternate between the row and column directions of
  the mesh. Dimension rho + 2l (or rho + 2l + 1) connects modules 2^l hops
  apart.

The interleaving keeps the mesh distances of bitonic sorting short. Most
steps of the schedule use low dimensions, and the long hops come only in the
last phases.

The module runs a full bitonic sort (phases p = 1 .. log2 n, dimensions
E_p-1 .. E_0) on its own words. The step costs are:

- A step inside a module: 1 compare clock plus 1 sequencing clock.
- A mesh step over 2^l hops: 1 clock to load an upward and a downward lane,
  2^l clocks of one-hop shifts, 1 compare clock, and 1 sequencing clock.
- `done` takes one further clock.

At the default s = 4, r = 16 (n = 256), a sort takes 96 cycles.

In the architecture, this mesh is placed after a combination sorter for
n/s words. That sorter delivers s sorted sequences, and the mesh then
performs only the last merging phases. This RTL builds the mesh and the
combination sorter as separate units with separate ports, side by side in
`combination_sorter`. It does not build the cascade between them.

## Where this RTL departs from the architecture

- **Word-parallel steps.** In the architecture, every element moves bit-serially
  through the rows of a cube-connected-cycles array. Each micromodule holds an
  MSB-first serial comparator that latches its exchange decision at the first
  differing bit. Here each cube step compares and moves whole keys in one
  clock. The order of the cube steps and what each step does are unchanged.
  The bit-level pipelining, and the CCC cycle links that bring items to row h
  before dimension E_h is used, are not modelled. Only the row-tree adders are
  bit-serial.
- **Column trees** are word-wide and combinational, not one bit wide and
  pipelined.
- **Concentration and expansion** swap on per-element destinations: a prefix
  count of the active elements for packing, and rank mod t for spreading.
  They do not precompute Benes-style switch settings with a separate adder
  tree.
- **No idle step.** The reversal of S_j does not issue the idle step on
  dimension E_tau.
- **Tie-breaking** by appended tags, as described above.
- **Assumed sizes.** The architecture keeps n and q symbolic. n = 256 and
  Q = 12 (about 1.5 log n) are choices made here. The three-stage
  factorization was worked out from the stage areas the architecture states
  for its optimal sorter.
- **Control is this design's own.** There is one FSM per combiner, a
  start/busy/done handshake, an asynchronous reset, and a registered output
  at the column-tree roots.
- **Mesh of CCCs.** It runs a complete bitonic sort of its own words rather
  than only the final merging phases, with whole-word steps. The cascade
  with a smaller combination sorter (the trade-off sorter) is not built.
- **Layout is not modelled.** The area results depend on the layout (comb-trees,
  the square arrangement of combiners in a coalescer). RTL does not capture
  this. `COMB` changes only the adder topology and the timing.

## Verification

Every block has a self-checking testbench in `tb/` that compares against
independently computed results and checks cycle counts:

| testbench | what it checks |
|---|---|
| `tb_serial_adder` | 200 random 10-bit serial additions, carry out included |
| `tb_row_tree` | 8-leaf full and comb trees: sums, broadcast, latency W+depth+1 |
| `tb_column_tree` | one-hot and empty leaf patterns, root and broadcast |
| `tb_merging_module` | diagonal and off-diagonal modules driven step by step: partial ranks against direct counts, then phase D routing for random increasing ranks |
| `tb_combiner_ctrl` | the full instruction stream for tau = 3 against the phase table |
| `tb_combiner` | (4,4)-combiners, full and comb, 40 inputs (half with many equal values) against a software sort, and latency |
| `tb_coalescer` | four (2,2)-combiners side by side, block boundaries, latency |
| `tb_mccc` | meshes of 2 x 2 (r = 4) and 4 x 4 (r = 2) sorting random, repeated and reversed words; cycle count per step type; one- and two-hop mesh steps both exercised |
| `tb_combination_sorter` | the whole sorter at n = 32 (m = 2, 4, 4; comb-trees last) on random, repeated-value, sorted and reverse-sorted inputs; latency; each stage runs once per sort; the mesh of CCCs beside it (n = 32) sorts too |

Each unit testbench was also run against a copy of its block with one
deliberate bug, and it caught the bug.

At its default size (n = 256) the sorter lints cleanly in Verilator and
elaborates in Yosys/slang. Verilator, however, turns that size into several
hundred megabytes of C++, and compiling it is estimated at close to an hour. The
largest configuration simulated end to end is therefore n = 32
(`tb_combination_sorter`). To run the defaults, set `MU1`, `MU2`, `MU3` and
`Q` in that testbench to 2, 3, 3 and 12, and allow for the build time.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/csort_pkg.sv tb/tb_combiner.sv \
          --top-module tb_combiner
./obj_dir/Vtb_combiner
```

Replace `tb_combiner` with any testbench name. Each testbench prints
`TB_RESULT checks=<n> failures=<k>`. Every testbench has a watchdog that
ends a hung run with a failure. To try other sizes, change the
`localparam`s at the top of a testbench. For the combiner, `MU`/`TAU` choose
(m,t) and `COMB` the tree shape. For the sorter, `MU1..3` choose the
factorization.
