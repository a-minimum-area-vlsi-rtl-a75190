# Combination sorter: parallel sorting in O(log n) steps

This RTL implements a parallel sorting network that sorts *n* words in a
number of steps proportional to log *n*. It does so by a generalised
enumeration sort. The input is first cut into small groups and each group is
sorted. Groups are then repeatedly *combined*, *m* sorted runs at a time,
into longer sorted runs. A combination never moves data through a
comparison network that is as long as the output. Instead, every element
works out its final **rank**:

    rank of s_i(l) in the output  =  sum over j of  C_ij(l)
    C_ij(l) = number of elements of run S_j that are smaller than s_i(l)

and is then sent straight to the output position given by that rank. The
counts C_ij come from merging every pair of runs (S_i, S_j) at the same
time, in an m × m mesh of small merging units.

Three such combination stages in a row sort *n* words:

| stage | operation (n; run in : run out) | combiners | trees |
|---|---|---|---|
| 1 | (n; 1 : n/log²n)         | log²n of size (n/log²n, 1)    | full binary |
| 2 | (n; n/log²n : n/log n)   | log n of size (log n, n/log²n) | full binary |
| 3 | (n; n/log n : n)         | one of size (log n, n/log n)   | comb |

At the default size n = 256 these are 64 combiners (4,1), 8 combiners (8,4)
and one combiner (8,32). The notation (m,t) means m input runs of t words.

## Files

| file | module | what it is |
|---|---|---|
| `rtl/sorter_pkg.sv` | package | command encoding, tree and combiner latencies |
| `rtl/combination_sorter.sv` | top | the three-stage sorter |
| `rtl/coalescer.sv` | stage | n/(m·t) combiners side by side |
| `rtl/combiner.sv` | (m,t)-combiner | m × m merging modules, row and column trees, controller |
| `rtl/merge_module.sv` | M_ij | 2t-cell cube: merge, rank, activate, route |
| `rtl/bin_tree.sv` | tree | broadcast and sum tree, full binary or comb |
| `rtl/prefix_adder_tree.sv` | adder tree | prefix counts for concentration |

Each file opens with a description of its interface and timing.
`tb/tb_<module>.sv` is a self-checking testbench for each module.
`tb/combiner_checker.sv` is a helper that drives one combiner with random
runs and checks it.

## The (m,t)-combiner

This is the heart of the design and the part that takes the most effort to
follow. Its input is m sorted runs S_0 … S_{m-1} of t words each, and its
output is one sorted run of mt words.

**Layout.** There are m² merging modules M_ij, with i the mesh row and j the
mesh column. Each module has 2t word cells. Cells 0 … t-1 are the *left
half* and cells t … 2t-1 the *right half*. For every row i and position l,
a **row tree** RT_i(l) links cell l of M_i0 … M_i,m-1. For every column j
and position l, a **column tree** CT_j(l) links cell t+l of
M_0j … M_m-1,j. So this is an orthogonal-trees network whose leaves are
merging modules. Each tree broadcasts a value from its root to all leaves,
or adds all its leaf values up to the root. When only one leaf is non-zero,
the sum *selects* that leaf, and this is how elements are routed out.

**Inside a module.** The 2t cells are wired as a binary cube of dimension
τ+1, where τ = log₂ t. Along dimension h, cell k is paired with cell
k xor 2^h. The controller broadcasts one command and one dimension per
cycle to every module of the combiner, SIMD fashion (`mm_cmd_e` in the
package).

**Phase A: distribute.** Word s_i(l) enters at the root of RT_i(l) and is
broadcast, so every module of row i holds S_i in its left half
(`LOAD_LEFT`). The diagonal module M_jj copies S_j into its right half
across dimension τ (`COPY_DIAG`). It sends that copy up CT_j(l), and the
other modules send 0. The root sends the copy back down, and every module
of column j loads S_j into its right half (`LOAD_RIGHT`).

**Phase B: rank.**
1. `REVERSE`: τ exchange steps reverse the right half. The 2t cells then
   hold a bitonic sequence.
2. `MERGE`: τ+1 compare-exchange steps, from dimension τ down to 0, merge
   the two runs. Every cell records whether it swapped at each dimension.
3. `RETRACE`: the same exchanges are undone from dimension 0 up to τ. Each
   element returns to its starting cell and brings back a token that holds
   the cell it reached in the merge. That cell number is its rank in
   MERGE(S_i, S_j).
4. `RANK`: the rank minus l is C_ij(l), which goes onto the row-tree leaf.
   The row tree sums the C_ij(l) of row i into the total rank of s_i(l) and
   broadcasts it back along the row.

**Phase C: route.** Let r be the total rank of s_i(l). Its output position
r splits into r = j·t + l′: the top log₂ m bits of r give the column j it
must leave through, and the low τ bits give the position l′.
1. `ACTIVATE`: M_ij keeps the elements of S_i whose rank has j in its top
   bits and inhibits all others.
2. `CONC`: τ steps at dimensions 0 … τ-1 pack the active elements into the
   leftmost cells, in order. Each element's target is the number of active
   elements to its left, from `prefix_adder_tree`.
3. `EXPAND`: τ steps at dimensions τ-1 … 0 move each element on to cell
   l′ = r mod t.

   Order is preserved throughout, which is why these bit-fixing steps never
   put two elements in one cell. An assertion checks this.
4. `TRANSFER` moves the left half across dimension τ into the right half.
   Exactly one module in column j now holds output word j·t+l′ in cell
   t+l′. The column tree CT_j(l′) adds up its leaves, so that word arrives
   at the root.

**Equal keys.** Keys are compared as {value, run index, position, half}.
That makes every element distinct, and so ranks never collide. An element
of a lower-numbered run counts as smaller than an equal element of a
higher-numbered run. The two copies of S_i in a diagonal module differ in
the `half` bit, which gives C_ii(l) = l.

## Timing

Every command takes one cycle. A tree crossing, in either direction, takes
log₂ m cycles for a full binary tree and m cycles for a comb tree, because
every tree node is a register. One combination takes:

    latency(m, t) = 6·L + 5·τ + 9,   L = tree latency, τ = log₂ t

`sorter_pkg::combiner_latency` holds the same count, state by state. The top
adds one cycle per stage hand-over:

| stage | latency (cycles) |
|---|---|
| (4,1) full | 21 |
| (8,4) full | 37 |
| (8,32) comb | 82 |
| whole sort of 256 words | 142 |

Comb trees in the last stage cost 8 cycles per crossing instead of 3. In
exchange they use far less wiring, which is why the last stage uses them:
their depth log n is no more than the word length.

**Handshake.** `start` is a one-cycle pulse, accepted only while `busy` is
low, and `in_data` is sampled on that edge. `done` is a one-cycle pulse,
and `out_data` then holds the result until the next run. Reset is
asynchronous and active low.

## Where this RTL departs from the underlying design

* **Word-parallel, not bit-serial.** In the original design, every tree
  line and every cube link is one bit wide. A merging module is a
  cube-connected-cycles network of 1-bit cells, and words are pipelined
  through it bit by bit. Here each of the 2t CCC columns is one word-wide
  cell, and a cube step takes one cycle. The area argument (O(n²) area)
  therefore does not carry over to this RTL. The sequence of operations
  and the O(log n) step count do carry over.
* **Right-half reversal.** The merge is preceded by τ steps that reverse S_j
  so that the bitonic merge applies. This is this design's choice.
* **Rank distribution.** Total ranks go back down the row trees to every
  module of the row. The original text leaves this step implicit.
* **Column-tree attachment.** The column-tree leaves and the transfer
  target are cell t+l of each module.
* **Tree shapes.** The comb tree is a spine of m registers, each with one
  leaf.
* **Configurable sizes.** Only the three-stage configuration is built. The
  general d-stage cascade is the same coalescer repeated and is easy to
  add. The mesh-of-CCCs network for the area–time trade-off (a smaller
  sorter followed by a mesh of CCC modules) is not built.
* **Chosen sizes.** N = 256 and Q = 10 are this design's choices. Q = 10 is
  a word length a little above log₂N, which is the case the design targets.
  N, M1 = N/log²N and M2 = log N must all be powers of two.

## Parameters

`combination_sorter #(N, Q, M1, M2)`: M1 and M2 default to N/log²N and
log N, and M3 = N/(M1·M2) is derived. Any powers of two with M1, M2, M3 ≥ 2
work, for example N = 64, M1 = 2, M2 = 4 (M3 = 8) as in the end-to-end testbench.
`combiner #(M, T, Q, COMB)` and `coalescer #(N, M, T, Q, COMB)` can be
used on their own.

## Simulating

With Verilator 5, from the repository root:

    verilator --binary --timing --assert -y rtl +libext+.sv \
        --top-module tb_combination_sorter rtl/sorter_pkg.sv tb/tb_combination_sorter.sv
    ./obj_dir/Vtb_combination_sorter

The package is listed first. Verilator finds the other modules in `rtl/` by
their file names. Replace the testbench name to run another one.

Every testbench ends with `TB_RESULT checks=N failures=F`.

* `tb_combination_sorter` (N = 64) checks the sorted output and the latency.
  It also counts how often each mechanism fires: diagonal copies, swapping
  exchanges, inhibited elements, concentration and expansion moves, equal
  keys, and full- and comb-tree stages. It fails if any of them never
  happens.
* `tb_combiner` runs five combiner shapes. Two of them, (4,1) and (8,4)
  with full trees, are the stage-1 and stage-2 combiners of the default
  sorter. `tb_combiner_stage3` runs the last stage of the default sorter
  on its own: one (8,32) comb-tree combiner, which combines 8 runs of 32
  words in 82 cycles. Every combiner of the default design has therefore
  been simulated at its full size. Only the three stages wired together
  at N = 256 have not been simulated.
* The largest whole sorter simulated is N = 64. At the default N = 256 the design
  has 1600 merging modules, and 144 of them have distinct parameters.
  Verilator's C++ output is then over 400 MB and takes more than an hour to
  compile, so no testbench runs the default size. Verilator lint and slang
  elaborate the default size cleanly.
* The module testbenches compare against values computed independently in
  the testbench. For example, `tb_merge_module` counts C_ij(l) directly.
