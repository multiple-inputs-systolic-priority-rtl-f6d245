# Multiple-input systolic priority queue (MISPQ)

A stack-algorithm sequential decoder for convolutional codes spends most of its
time finding the node with the best path metric. A systolic priority queue
removes that search. It is a row of small processors (registers with
comparators and switches) that keeps its contents partly sorted, so the best
entry always sits in the first processor. It can be read out in constant time,
whatever the queue's length. For a code of rate k/n, each extended node has
N = 2^k children, so the queue must take N new metrics per cycle and still give
out the best one in the same cycle.

This repository holds synthesizable SystemVerilog for two such queues:

* **Type II MISPQ** (`mispq_t2_queue`). Each slice is split into a *top* and a
  *bottom* half. Each half sorts only N/2 + 1 metrics, so the per-slice logic
  grows with (N/2)² instead of N². The two halves exchange metrics only when a
  slice's best metric moves toward the output. This architecture is meant for
  many inputs (N ≥ 16).
* **Modified type I MISPQ** (`mispq_t1_queue`). This is a single-group slice in
  which each side processor has only two possible sources, so it needs 3N + 1
  switches instead of (N + 1)². It suits N ≤ 8.

`mispq_top` places both queues side by side (N = 4, 16 slices each). They share
only the clock and reset.

## The slice and its invariant

Number the slices 1, 2, … from the output. In the type I queue, slice *i* has a
**top** processor P(i,0) and N **side** processors P(i,1..N). The queue
maintains one invariant:

> the k-th best entry in the queue is somewhere in slices 1..k, and if it is in
> slice k it is at that slice's top.

It follows that the best entry is always at P(1,0), and that an entry sitting
in a side processor of the last slice ranks below the queue's length in slices.
Such an entry can be dropped when the queue overflows, and nothing that could
be extracted in time is lost.

One queue cycle has two phases. Each phase is one rising clock edge:

| phase | what moves | then |
|---|---|---|
| 1 (insert) | the N inputs enter slice 1's side positions; every side metric P(i,j) moves to P(i+1,j); tops stay | each slice puts the best of its N+1 metrics on top |
| 2 (extract) | P(1,0) is extracted; every other top P(i+1,0) moves to P(i,0) | each slice puts the best of its N+1 metrics on top |

The sort inside a slice does not reorder the whole slice. It only finds the
winner among the side metrics and the one incoming or resident top. The winner
goes to the top. The metric the winner displaced takes the winner's old side
slot, and every other side metric keeps its own slot. Every processor therefore
has just two sources: its fixed neighbour, or the displaced top.

### Comparison groups

The comparisons are owned by `mispq_group`. A group is formed by the K side
processors of slice *i* plus the top of slice *i+1*. The same group serves both
phases:

* **Phase 1:** its winner becomes the new top of slice *i+1*. The old top of
  slice *i+1* takes the winner's side slot in slice *i+1*. The other side
  metrics shift straight across.
* **Phase 2:** its winner becomes the new top of slice *i* (the old top has
  just left). The top of slice *i+1* takes the winner's side slot.

All pairs are compared in parallel, and the results are ANDed into one-hot
"member j is best" selects. Ties are broken in one fixed order:

* among side processors, the lower-numbered one wins;
* the top candidate wins only when it is strictly larger than every side
  metric.

Any consistent order would keep the invariant. This one is the order the
four-input slice's control conditions define.

The inputs act as the side processors of a "slice 0": a group built from the N
inputs and the top of slice 1 feeds slice 1 in phase 1.

## Type II: two half-queues that meet in phase 2

This is the part that takes the most care. In slice *i*:

* the top half has T(i,0) and T(i,1..N/2);
* the bottom half has B(i,0) and B(i,1..N/2);
* inputs 0..N/2−1 feed the top halves, and inputs N/2..N−1 feed the bottom
  halves.

**Phase 1.** The two halves run as two independent type I queues of N/2
inputs. The slice's T-versus-B comparator has an output stage that forces both
of its flags low in this phase, so no path between the halves is enabled.

**Phase 2.** The flags become live. `TLE = T(i,0) ≥ B(i,0)` and
`BL = B(i,0) > T(i,0)`; T wins a tie. The better of the two tops is the slice's
*pseudo top*. Three things happen:

1. Every slice's pseudo top leaves toward the output. In slice 1 an output
   switch, driven by slice 1's TLE, sends it to `best_o`.
2. Slice *i* refills only the half whose top left. That half's group compares
   its side metrics with the *incoming* metric, which is the pseudo top of
   slice *i+1*. The winner goes to the half's top, and the incoming metric
   takes the winner's slot.
3. The other half of slice *i* holds all of its metrics.

The incoming metric can come from either half of slice *i+1* and go into
either half of slice *i*. That gives four cases (T→T, T→B, B→T, B→B). The
crossing cases are the only exchange between the halves.

The incoming metric is max(T(i+1,0), B(i+1,0)), and working out that maximum
before comparing would lengthen the critical path. Instead, each side
processor is compared with *both* next-slice tops by two comparators in
parallel (`mispq_cmp3`). The result is picked afterwards with slice *i+1*'s
TLE/BL flag. In phase 1 the pick is forced to the half's own operand (T for the
top half, B for the bottom half).

If T(i,0) and B(i,0) are taken as one pseudo top, and the 2·(N/2) side
processors as one group, the type II queue makes the same moves as a type I
queue. So it keeps the same invariant and always extracts the true best.

## Comparator

`mispq_cmp` is a ripple comparator running from the most significant bit
down. Each one-bit cell carries a two-bit state:

* **00**: equal so far;
* **01**: first operand larger;
* **10**: first operand smaller.

A cell in state 00 decides on the first bit pair that differs. After that the
state is passed through unchanged. Metrics are two's complement, and the sign
bit is inverted on entry so that the unsigned chain orders signed values. The
same 00/01/10 code is used throughout the groups.

## Interface and timing

Both queues have the same ports. In the table, `entry_t` is a packed struct
{signed 16-bit `metric`, 16-bit `tag`} from `mispq_pkg`.

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset (empties the queue, next edge is phase 1) |
| `in_i[N]` | in | new entries, sampled on the phase-1 edge; `EMPTY` for an unused input |
| `phi1_o` | out | high when the next rising edge is a phase-1 edge |
| `best_o` | out | entry extracted on the last phase-2 edge (held until the next one) |
| `best_valid_o` | out | high for the one clock cycle after each phase-2 edge |

The timing works like this:

* A queue cycle is two clocks. It accepts N entries and delivers one.
* An entry that is the best one in the queue is extracted on the edge right
  after the edge that inserted it. `best_valid_o` rises one clock after
  insertion.
* `EMPTY` (the most negative metric, tag 0) marks an idle processor and is what
  an empty queue returns.
* Use real metrics above `EMPTY`.
* The `tag` rides along unchanged with its metric. It is meant for the address
  of the node's information bits in an external RAM, so that only metric and
  pointer travel through the queue.
* When more entries are live than the queue can hold, entries fall off the end
  of the last slice without notice. By the invariant they are never among the
  best `SLICES` entries.

Parameters:

| module | parameter | default | meaning |
|---|---|---|---|
| `mispq_t2_queue`, `mispq_t1_queue` | `N` | 4 | inputs per queue cycle (even for type II) |
| | `SLICES` | 16 | slices; capacity SLICES·(N+2) for type II, SLICES·(N+1) for type I |
| `mispq_pkg` | `METRIC_W`, `TAG_W` | 16, 16 | entry field widths |

## Where this design makes its own choices

* **Two clock phases on one clock.** The architecture uses two clock phases.
  Here each phase is one rising edge of a single clock, with a phase register
  alternating them. Non-overlapping phase clocks are not modelled.
* **Switches and processors.** Transmission gates are multiplexers in front of
  registers, and a processor is a register.
* **Widths and reset.** The metric and tag widths, the `EMPTY` encoding, the
  reset behaviour and the queue length (16 slices) are this design's choices.
* **Signed metrics.** Handling signed metrics by inverting the sign bit is an
  addition to the plain bit comparator.
* **Comparator count.** Each type II subslice has C(N/2,2) side-side
  comparators and N top-side comparators, plus one T/B comparator per slice:
  11 per slice for N = 4. A count that also duplicates the side-side
  comparisons gives 4·C(N/2+1,2)+1 = 13. The comparisons made are the same.
* **No comparator sharing.** The halves could share comparators, because half
  of them are idle in each phase. That sharing is not built.
* **Phase-1 forcing.** The phase-1 forcing of the T/B flags lives in the slice
  (`mispq_t2_slice`), next to where the flags are used, not in the comparator.
* **Not included.** The sequential decoder itself (tree extension, metric
  computation, node RAM) is not part of this RTL. Neither are queues split into
  more than two halves.

## Files

| file | contents |
|---|---|
| `rtl/mispq_pkg.sv` | widths, `entry_t`, `EMPTY`, comparator code, phase type |
| `rtl/mispq_cmp.sv` | ripple comparator |
| `rtl/mispq_cmp3.sv` | max(T,B)-versus-z comparison with two comparators |
| `rtl/mispq_group.sv` | comparison group and one-hot winner select |
| `rtl/mispq_t1_slice.sv`, `rtl/mispq_t1_queue.sv` | modified type I slice and queue |
| `rtl/mispq_t2_slice.sv`, `rtl/mispq_t2_queue.sv` | type II slice and queue |
| `rtl/mispq_top.sv` | both queues side by side |
| `tb/tb_*.sv` | self-checking testbenches (below) |

## Verification

Every testbench prints `TB_RESULT checks=… failures=…` and has a watchdog. The RTL also carries assertions that are checked whenever it is simulated with assertions enabled (`--assert` in Verilator). One checks that every group's winner select is one-hot. The others check that the T/B flags of a type II slice are both low in phase 1 and exactly one is set in phase 2.

| testbench | what it checks |
|---|---|
| `tb_mispq_cmp` | signed corner values and random pairs against the simulator's compare |
| `tb_mispq_cmp3` | random operands (many ties) against a direct compare |
| `tb_mispq_group` | one-hot winner and tie order for K = 3 (two top candidates) and K = 2 (one) |
| `tb_mispq_t1_slice`, `tb_mispq_t2_slice` | each register update of one slice against a model of the phase rules, with random neighbours; the type II bench also checks the TLE/BL flags and that both halves and cross transfers occur |
| `tb_mispq_t1_queue`, `tb_mispq_t2_queue` | the queue against a reference priority queue (`tb_pq_scoreboard`) under light, overflowing and draining load |
| `tb_mispq_top` | both queues at default sizes, end to end, with mechanism counters |
| `tb_mispq_sizes` | type II at N = 8 and N = 16, type I at N = 8 |

More detail on the queue-level benches:

* The reference queue (`tb_pq_scoreboard`) holds every live entry in a list.
  Every extraction must be the best entry in the list. Every entry that falls
  off the tail must have at least `SLICES` entries as good as itself.
* `tb_mispq_t2_queue` also replays a three-cycle search on a quaternary tree
  (inputs 5,2,3,1 / 4,2,3,7 / 2,4,5,8). After each phase it checks slice 1's
  six processors against a hand-worked trace. It expects the outputs 5, 7 and
  8, and it checks the placement of two equal metrics.
* `tb_mispq_top` fails if any of the following never happened:
  * extraction from the top half and from the bottom half;
  * a T = B tie;
  * a transfer between the halves;
  * an input winning and a resident top winning its input group;
  * tail drops;
  * extraction from an empty queue.

To run one with Verilator, from the repository root:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module tb_mispq_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/mispq_pkg.sv tb/tb_mispq_top.sv
./obj_dir/Vtb_mispq_top
```

`tb_mispq_top` runs the default-size design and finishes in seconds.
`tb_mispq_sizes` takes about a minute.
