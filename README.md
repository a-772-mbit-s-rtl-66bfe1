# Soft-input soft-output single-tree-search sphere decoder

A MIMO receiver that iterates between detector and channel decoder needs a detector that
accepts a-priori LLRs from the decoder and returns extrinsic LLRs for every coded bit. This RTL
implements such a detector as a depth-first sphere decoder that finds, in one pass over the
search tree, the max-log maximum-a-posteriori solution together with the best
counter-hypothesis for every bit (single tree search, STS). It examines one tree node per clock
cycle. It follows the architecture of the paper "A 772 Mbit/s 8.81 bit/nJ 90 nm CMOS
Soft-Input Soft-Output Sphere Decoder": hybrid enumeration, column-wise M_C enumeration with two
metric units and a cache, concurrent pruning checks with shared comparators, and LLR clipping.
The chip top holds three cores, for 4-, 16- and 64-QAM. Word widths, number formats,
handshakes and several internal mechanisms are not given by the paper and are choices of this
design; they are listed below.

## The detection problem

For `M_T` transmit antennas, the channel `H = QR` is QR-decomposed outside this design.
`R` is upper triangular with a real positive diagonal. The core receives `y~ = Q^H y = R s + n'`,
`R` and the a-priori LLRs `L^A[i][b]` of the `Q` bits of each antenna's symbol `s_i`. Symbols are
searched in a tree with one level per antenna. Level `M_T-1` is the top, level 0 holds the
leaves, and each node has `2^Q` children. A node on level `i` adds to its parent's metric:

* `M_C(s_i) = |b_i - R_ii s_i|^2 >> MC_SHIFT`, where `b_i = y~_i - sum_{j>i} R_ij s_j` cancels
  the symbols already fixed above it;
* `M_A(s_i)`, the sum of `|L^A[i][b]|` over the bits of `s_i` that disagree with the sign of
  their prior. The symbol given by the prior signs has `M_A = 0`.

A leaf's metric is that of a full candidate vector. The decoder tracks `lam_map`, the smallest
leaf metric found, and its bits `x_map`. For every bit `(j,b)` it also tracks `lam_bar[j][b]`,
the smallest metric of a leaf whose bit `(j,b)` differs from `x_map`. The output is
`L^E = ±(min(lam_bar, lam_map + clip) - lam_map) - L^A`, with the sign taken from `x_map`
(positive favours bit 1). `clip` is the run-time LLR clipping level. A small `clip` lets the
search prune much more, at some loss of LLR quality. This is the main run-time knob that
trades complexity against error rate.

### Number formats (this design's choice)

| quantity | format |
|---|---|
| `y~`, `R` entries | signed `W_Y` = 12 bit integers, pre-scaled by `1/sqrt(N0)` so that `M_C` is in LLR units |
| LLRs in and out | signed `W_L` = 8 bit, outputs saturate at ±127 |
| metrics | unsigned `W_M` = 20 bit, saturating (all ones = infinity) |
| `M_C` scaling | `|e|^2 / 2^MC_SHIFT`, `MC_SHIFT` = 6 |

Constellations are square QAM with Gray labelling per axis. Axis index `n` (0..P-1,
`P = 2^(Q/2)`) stands for the amplitude `2n-(P-1)`. A symbol index is `{im_idx, re_idx}`. Bits
`0..Q/2-1` of a symbol carry the real-part Gray code and bits `Q/2..Q-1` the imaginary one.

## One examined node per cycle

This is the part that matters most for understanding the RTL (`sd_core.sv`). The search state
is made of:

* the current path, `path_sym`/`path_pm` per level;
* the level `cur` of the current node (`cur = M_T` is the root);
* `vpend`, set while the current node's first child has not been examined;
* `act`, one bit per level, set while that level's sibling enumeration is open.

In every search cycle, three kinds of unit work side by side:

1. The **vertical step** (`sd_vstep`) proposes the first child of the current node. It finds
   the two candidates of hybrid enumeration without sorting:
   * the slice point, the nearest constellation point to `b_i / R_ii`, found by comparing `b_i`
     against `R_ii` times the decision thresholds;
   * the prior hard decision, the symbol whose `M_A` is 0.

   Two `M_C` units evaluate both, and the one with the smaller partial metric is the child.
   The unit also hands `b_i`, the slice point and the zig-zag directions to the horizontal
   step, which stores them for the level, so those values are not computed again.
2. The **horizontal step** (`sd_hstep`) proposes, for every open level, the next unvisited
   sibling on that level. It also gives a lower bound `lb` on the metric of every sibling
   still left.
3. The **pruning checks** (`sd_prune`) test the child and each level's sibling at once:
   `M_T,max + 1` checks.

The next node is then chosen in this order:

| condition | action |
|---|---|
| child passes its test | descend to it (`A_GO_V`) |
| child fails, but the level bound passes | open the child's level with the child marked visited (`A_OPEN_V`) |
| otherwise | take the deepest open level whose bound passes: move to its sibling if it passes (`A_GO_H`), else mark that sibling visited (`A_PRUNE_H`) |
| no level left | done (`A_DONE`) |

Levels deeper than the chosen one are closed. Reaching a leaf updates the STS metrics at the
end of that cycle. The checks in the next cycle already use the updated values.

A vector therefore needs at least `M_T + 2` cycles, including the load cycle:

* one load cycle;
* `M_T` cycles down to the first leaf (nothing is pruned before a leaf exists);
* one cycle in which every remaining sibling on every level fails.

With back-to-back input this gives `Q*M_T / (M_T+2)` bits per cycle: 4 bits/cycle for 4x4
64-QAM. At the published 193 MHz this is the 772 Mbit/s peak. At 244 and 330 MHz the 16- and
4-QAM cores give 651 and 440 Mbit/s. Clock frequencies are properties of the 90 nm
implementation and cannot be checked at RTL.

## Hybrid enumeration on a level

`sd_hstep` keeps two candidate lists and offers whichever candidate has the smaller `M_P`:

* **M_C list.** Columns of constant real part are visited in zig-zag order of their real part
  around the slice point. Inside each column, points follow a zig-zag over the imaginary part;
  this is exact `M_C` order because the real part is fixed. A column that is not yet open
  cannot beat the next column to open (the frontier), so the cache holds one head metric per
  open column plus the frontier. Consuming from column `k` needs only two new metrics:
  * unit 1 computes the next point of column `k`;
  * unit 2 computes the head of the new frontier, if `k` was the frontier.

  The list candidate is the minimum over the cache. This is how two `M_C` units suffice
  whatever `Q_MAX` is.
* **M_A list.** A minimum search over the stored `M_A` of all unvisited symbols of the level. A
  third `M_C` unit evaluates its candidate.

Both lists can reach the same symbol. A symbol already visited through the `M_A` list is
skipped when it reaches the head of the `M_C` list. The skip happens in the same cycle in which
the `M_A` candidate is consumed, so it costs no extra cycle.

A level's candidate changes only when that level is opened or consumed, and at most one level
is touched per cycle. So the enumeration state (visited mask, column counters, cache, `b_i`) is
stored per level, but one datapath serves all levels: the minimum searches and the three `M_C`
units. In the cycle after a level was touched, the datapath computes that level's candidate,
offers it directly and stores it. The other levels offer their stored candidates. The
candidate of the touched level is therefore ready in the very next cycle, and one node per
cycle is kept.

`lb = M_P(parent) + min cached M_C + min M_A` bounds every remaining sibling from below. That
is what makes it safe to close a whole level even though hybrid enumeration does not offer
siblings in exact metric order.

## Pruning rule and comparator sharing

A node on level `l` with metric `M` is kept when `M < lam_eff(j,b)` for at least one bit it
can still change. Those bits are:

* every bit of the levels below `l`;
* the bits of level `l` that differ from `x_map`;
* the bits of the levels above `l` in which the path differs from `x_map`.

Here `lam_eff = min(lam_bar, lam_map + clip)`. Until the first leaf is found nothing is pruned.

The rule needs a maximum over up to `M_T*Q` metrics for every check. The unit builds two
references per level once per cycle and shares them among all checks:

* `A_j`, the maximum of the level;
* `D_j`, the maximum over the bits where the current path differs from `x_map`.

Each check then ORs one comparison per level. The candidate's own level uses a reference masked
with the candidate's own bits. The level test compares `lb` against `A_j` for `j <= l` and
`D_j` above.

Leaf update: a leaf below `lam_map` becomes the new map solution, and the old `lam_map` becomes
the counter-hypothesis metric of every bit that flips. Any other leaf lowers `lam_bar` of the
bits in which it differs from `x_map`. With this rule the outputs equal those of an exhaustive
max-log search followed by clipping, bit for bit. The testbenches check exactly that.

## A-priori metric storage

`sd_ma_storage` holds `M_A` of all `2^Q_MAX` symbols of every level. It fills one row per cycle,
from the top level down, starting in the load cycle. The search cannot reach a level before its
row exists; an assertion in `sd_core` checks this.

## Interfaces and timing

`sd_core` ports, all synchronous to `clk`, with `rst_n` an asynchronous active-low reset:

* input handshake `in_valid`/`in_ready`. In the accepting cycle the core samples:
  * the configuration: `in_mt` (1..`MT_MAX`), `in_q` (2..`Q_MAX`, even), `in_clip` and
    `in_max_cyc`;
  * the data: `in_y_re/im[MT_MAX]`, `in_r_re/im[MT_MAX][MT_MAX]` (upper triangle and the real
    diagonal are used) and `in_la[MT_MAX][Q_MAX]`.
* output `out_valid`/`out_ready`. `out_le[MT_MAX][Q_MAX]`, `out_xmap[MT_MAX]` and `out_cycles`
  are held until taken. Unused levels and bits read as 0.
* `in_ready` is high only while the core is idle and its output register is free or being read.
* `in_max_cyc` (0 = off) stops the search after that many search cycles, once a leaf exists.
  The LLRs found so far are then returned. This is a run-time constraint; the paper mentions
  run-time constraints but not their form.

`sd_asic` is the chip: three `sd_core` instances with `Q_MAX` = 2, 4 and 6 and `MT_MAX` = 4. They
share clock and reset and nothing else. Their ports carry the prefixes `c2_`, `c4_` and `c6_`.
Every core accepts every modulation up to its own `Q_MAX`.

## Where this departs from the paper or fills gaps

* QR decomposition, noise scaling and the channel decoder are outside the design. The inputs
  are assumed pre-scaled by `1/sqrt(N0)`.
* The paper removes most compare-select units of the `M_A` minimum search by exploiting
  relations among the `M_A` values, and does not give those relations. Here it is a plain
  minimum over all `2^Q_MAX` entries, which costs more area.
* The horizontal step shares one datapath among all levels and keeps a candidate register per
  level, as described above. The paper states that two cache `M_C` units suffice but does not
  describe how the levels share them. The third `M_C` unit for the `M_A` candidate is this
  design's choice.
* The pruning checks add, for the candidate's own level, a reference masked by the candidate's
  bits. There is also a separate level test on `lb` that closes a level at once. The paper says
  only that the vertical and horizontal criteria differ.
* The interference cancellation `b_i` is recomputed combinationally from the whole path. The
  critical path is therefore longer than in a timing-optimised design.
* The handshakes, the reset, the word widths, the labelling, the tie rules (the `M_C` candidate
  wins ties) and the cycle limit are this design's own.
* The chip's pads, clocking and test access are not modelled.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For example, with
Verilator 5:

    verilator --binary --timing -Irtl -Itb rtl/sd_pkg.sv tb/sd_ref_pkg.sv tb/tb_sd_asic.sv \
        --top-module tb_sd_asic && ./obj_dir/Vtb_sd_asic

| testbench | what it checks |
|---|---|
| `tb_sd_mc_unit` | metric unit against 64-bit arithmetic, including saturation |
| `tb_sd_ma_storage` | every `M_A` entry, and the row-per-cycle fill order |
| `tb_sd_vstep` | slice point against a brute-force nearest point, and child choice and bound |
| `tb_sd_hstep` | every symbol offered once, exact metrics, valid lower bound, list skips, stored candidates of the other levels left unchanged |
| `tb_sd_prune` | all concurrent tests and the LLRs against the pruning rule evaluated bit by bit |
| `tb_sd_core` | 64-QAM core at default parameters: random channels in six `M_T`/`Q` configurations compared exactly with an exhaustive search (`tb/sd_ref_pkg.sv`); the `M_T+2` cycle minimum; the cycle limit; back-pressure |
| `tb_sd_asic` | the whole chip at default parameters, all three cores at once |
| `tb_sd_workload` | 4x4 64-QAM on the default core at three noise levels, without clipping, with `clip = 6` and with a 40-cycle limit; reports the average cycles per vector |

`tb_sd_asic` checks results against the exhaustive search. For 4x4 64-QAM vectors, which
that search cannot cover in reasonable time, it uses noise-free inputs with `clip = 0` instead:
the result is then known in closed form and must take exactly 6 cycles. It counts each
traversal step, map replacements, clipped LLRs, cycle-limit hits and back-pressure, and fails
if any of them never occurs.

`tb_sd_workload` shows the cost of soft output. Its channels are random, with uniform noise of
amplitude 8, 30 and 70 in the scaled receive domain. It runs a handful of 4x4 64-QAM vectors at
each level and measured these averages:

| noise | no clipping | `clip = 6` | limit 40 cycles |
|---|---|---|---|
| 8 | about 22,000 cycles | 13 cycles | 41 cycles |
| 30 | about 13,000 cycles | 27 cycles | 41 cycles |
| 70 | about 28,000 cycles | 48 cycles | 41 cycles |

Exact max-log LLRs are far too expensive. The LLR clipping level or the cycle limit sets the
operating point. At 193 MHz, 13 to 48 cycles per vector means 95 to 356 Mbit/s. These numbers
come from a few random vectors and are not the paper's simulation setup.

The exhaustive reference enumerates every leaf with the same integer arithmetic and
saturation as the hardware. It is independent of the search order and of the pruning, so exact
agreement is a strong check. When two leaves tie for the best metric, only `x_map` may
legitimately differ, and only the LLRs are compared.

## Files

* `rtl/sd_pkg.sv`: zig-zag order, Gray code and bit-label helpers
* `rtl/sd_mc_unit.sv`: `M_C` unit
* `rtl/sd_ma_storage.sv`: a-priori metric table
* `rtl/sd_vstep.sv`: vertical step
* `rtl/sd_hstep.sv`: horizontal step, shared by all levels
* `rtl/sd_prune.sv`: pruning checks, metric update, LLR output
* `rtl/sd_core.sv`: one decoder core
* `rtl/sd_asic.sv`: three-core chip top
* `tb/`: the testbenches and the reference model package `sd_ref_pkg`
