# On-line fault diagnosis in a bidirectional linear array

A systolic linear array has no test access to its interior cells: data enter
and leave only at the two ends. This design makes such an array check its own
arithmetic while it works and, when a check fails, tells the host *which cell
in which time step* saw the error, using nothing but one tag bit that travels
with each data word.

The array computes a band matrix-vector product y = A·x. Items of x flow to
the right, partial sums of y flow to the left, and every cell performs the
inner product step `y ← y + a·x` on the pair of items it holds. In the plain
array of this kind every cell is idle every other cycle. Here the idle slots
are used: every data item is entered twice, so that each inner product step
is computed at the same time by two neighbouring cells, and one step later one
of them compares the two results. An extra cell, P0, sits at the left end so
that the leftmost working cell has a checker too.

What each cell does is selected by the tag on the y item it receives:

* **tag 1, compute-and-store** — do the inner product step and also keep the
  result in a local register L;
* **tag 0, compare-and-compute** — compare the incoming y value (computed by the
  right neighbour in the previous step) with L (computed by this cell for the
  same inner product step in the previous step), and do the inner product step.

On a mismatch the cell turns the y tag from 0 to 1 and sets the *error tag* of
the x item it holds from 0 to 1. Both tags then ride out of the array with
their items: the y tag at the left end, the x tag at the right end. A y item
whose tag has become 1 is treated as compute-and-store by every later cell,
so it is not checked again (its error would be seen by every later comparison
anyway). The number of tag bits, two per cell, does not grow with the array.

## The schedule

The default configuration is the three-diagonal (tridiagonal) case: cells
P1..P3 hold the upper, main and lower diagonal, P0 is the checker added at the
left, M = 3 outputs. The host enters, one item per cycle,

* on the left, into P0: x1.1, x1.2, x2.1, x2.2, … (two copies of each x_j, error
  tag 0);
* on the right, into P3: y1.1, y1.2, y2.1, … (two copies of each y_i, initial
  value, tag 1 on the first copy and tag 0 on the second).

Both streams start in step 0 and every cell adds one step. The table shows
what each cell does; S is compute-and-store, C is compare-and-compute, and the
C entry always checks the S entry one row up and one column to the right
(same inner product step, other cell, now arriving as the y input):

| step | P0 | P1 | P2 | P3 |
|---|---|---|---|---|
| 0 | x1.1 passes |  |  | S: y1.1, no x |
| 1 | x1.2 passes | x1.1 passes | S: y1.1, no x | C: y1.2, no x |
| 2 | x2.1 passes | S: y1.1 + a11·x1.2 | C: y1.2 + a11·x1.1 | S: y2.1, no x |
| 3 | S: y1.1 + a12·x2.2 | C: y1.2 + a12·x2.1 | S: y2.1 + a21·x1.2 | C: y2.2 + a21·x1.1 |
| 4 | C: y1.2 + 0·x3.1 | S: y2.1 + a22·x2.2 | C: y2.2 + a22·x2.1 | S: y3.1 + 0·x1.2 |
| 5 | S: y2.1 + a23·x3.2 | C: y2.2 + a23·x3.1 | S: y3.1 + a32·x2.2 | C: y3.2 + a32·x2.1 |
| 6 | C: y2.2 + 0·x4.1 | S: y3.1 + a33·x3.2 | C: y3.2 + a33·x3.1 | x2.2 passes |
| 7 | S: y3.1 + 0·x4.2 | C: y3.2 + 0·x4.1 | x3.2 passes | x3.1 passes |
| 8 | C: y3.2 + 0·x5.1 | x4.2 passes | x4.1 passes | x3.2 passes |
| 9 | x5.2 passes | x5.1 passes | x4.2 passes | x4.1 passes |


Rules that fall out of the schedule and that the host must respect:

* The first copy of a y item always meets the *second* copy of an x item and
  vice versa, so every inner product step appears once with each pairing.
  The second y copy with the first x copy is the checked computation; the
  first y copy with the second x copy is the duplicate.
* The coefficient is supplied per cell and per cycle on `a_in[p]`. In cycle c
  cell p holds x item u = c − p and y item v = c − (N_PE − 1 − p) (counting
  copies from 0); if both exist it needs a(i, j) with i = ⌊v/2⌋ + 1 and
  j = ⌊u/2⌋ + 1, and 0 outside the band. The testbenches contain this host as a
  two-line function (`coef`).
* x items are needed beyond x_n, up to x_(M+P0) = x5 by default, with value 0:
  they compute nothing but carry the error tags of the compares in P0 and P1
  late in the run.
* The two copies of every y_i leave P0 one cycle apart; without faults they
  are equal.

The cells are identical; the array is built for any `N_PE`, and the tag
monitors for any number of items. The locator's time formula assumes the
schedule above (both streams starting in step 0) and an even `N_PE`.

## Reading the diagnosis

Two monitors watch the tags as the items leave. Each numbers the items of its
stream in arrival order, compares every tag with the value the host assigned
on entry (`y_t0`, `x_t0`) and sets bit i of an error vector when item i comes
back with a changed tag: `e_y` for y (left end), `e_x` for x (right end).
`err` rises with the first changed tag, so an error is signalled while the
computation is still running.

In the space-time plane the x items and the y items are two families of
parallel lines, and every (cell, step) is the crossing of one x line with
one y line. The reporting cell is therefore found from the position x of the
first 1 in `e_x` and the position y of the first 1 in `e_y`:

    t = x + y + (P0 − 2)          step in which the mismatch was found
    p = y − x + P0                cell that found it (P0 = 2 by default)

The faulty cell is P_p or P_p+1: a compare step in P_p disagrees either
because P_p's stored result was wrong (P_p is faulty) or because the value
from P_p+1 was wrong. Which one is left to the host, which can inspect the two
copies of the result.

Example (default size): P2 computes y2.2 wrongly in step 4. In step 5 P1
compares it with its own y2.1 result from step 4, finds the mismatch and sets
the tags on y2.2 and on x3.1. The host reads `e_y = 010`, `e_x = 00100`, so
y = 2, x = 3, t = 5 and p = 1: the pair P1/P2 disagreed in step 4.

If the fault persists, the faulty cell produces a second report one step
later (t' = t + 1), which appears as a second 1 in one of the vectors:

* a 1 at y + 1 in `e_y` (same x): the next report came from P_p+1, and the
  faulty cell is **P_p+1**, the one the two pairs share;
* a 1 at x + 1 in `e_x` (same y): the next report came from P_p−1, and the
  faulty cell is **P_p**.

`fault_locator` outputs `found`, `x_pos`, `y_pos`, `t_det`, `p_det`, and
`resolved`/`faulty` when exactly one of these two patterns is present. When
both vectors show a following 1 the pattern is ambiguous — a later report by
the same cell two steps on also produces x + 1 and y + 1 — and the locator
leaves the pair unresolved rather than guess. The testbench checks across all
cells and start steps that a resolved answer always names the faulty cell.

## What is covered and what is not

The testbenches inject a fault into every cell at every step that holds a y
item. The outcomes, which follow from the schedule:

* A fault in a compute-and-store step is reported by the same cell one step
  later; a fault in a compare-and-compute step is reported by the left
  neighbour one step later.
* P0's compare-and-compute steps are checked by nobody: P0 is the last cell.
  Such a fault shows only as the two copies of y_i disagreeing at the output.
* Compare steps in which no x item is in the cell (P3 in step 1 with the
  default schedule) set the y tag but have no x item to carry the error
  tag: `err` rises, but the locator finds no position.
* Only the arithmetic result is protected. A fault on the x path (an x value
  corrupted while passing through) is outside the fault model.

## Observation point

Because a tag change is all that signals an error, the tag can also be read
before the item reaches the end of the array. `fdla_top` has one extra y-tag
monitor on the link leaving cell P_OBS_POS (default P2), output as `obs_e`
and `obs_err`. Reports made by P_OBS_POS or cells to its right reach it two
steps (by default) before they reach the left end; reports made by cells to
its left never pass it. More observation points would be further
instances of `tag_monitor` on other links of `bla_array`, which are all
exported.

## Unchecked items

Checking is chosen per y item by the host. A y pair entered with both tags 1
is never compared: its two copies are simply two independent computations,
each meeting its own x copy and its own coefficients, so an unchecked pass
computes two matrix-vector products at the throughput of both slots. Checked
and unchecked items can be mixed in one run; the host sets `y_t0` to the tags
it entered so that the monitors do not flag the unchecked ones. A fault in
an unchecked item is not reported.

## Modules

| module | role |
|---|---|
| `fdla_pkg` | data width (`DATA_W` = 16) and the tagged item type `item_t` {valid, tag, data} |
| `ips_pe` | one cell: inner product step, latch L, comparator, tag update |
| `bla_array` | `N_PE` cells in a row, all links exported |
| `tag_monitor` | error vector of one stream, from the tags and their preassigned values |
| `fault_locator` | leading-1 positions → step, reporting cell, and the faulty cell when resolved |
| `fdla_top` | array, y monitor (left end), x monitor (right end), observation-point monitor, locator |

`fdla_top` parameters: `N_PE` = 4 cells, `M` = 3 y items, `P0` = 2 (the cell in
which the main diagonal is computed), `OBS_POS` = 2, `NX` = M + P0 x items
watched.

Interface timing (all synchronous to `clk`, active-low synchronous `rst_n`):
`x_in` and `y_in` are taken in the cycle they are driven, together with that
cycle's `a_in`; `y_out` and `x_out` are the registered outputs of P0 and of the
last cell; the error vectors update one cycle after a tag leaves; the locator
outputs are combinational on the vectors and are final once `done` is high.
`clear` restarts the monitors for the next computation; the array itself
needs no clearing, because every cell's first y item of a computation is a
store.

`fault_mask[p]` is XORed onto cell p's result. It exists to inject
stuck-at-like or transient faults in simulation and must be 0 in use; the
port could be removed for a product. `pe_det` (per-cell "mismatch found")
is likewise test access: the scheme itself uses only the boundary tags.

## Choices made in this implementation

* 16-bit words with wrap-around arithmetic; a valid bit with every item to
  mark empty slots (a comparison happens only on a valid tag-0 y item, an x
  error tag is set only on a valid x item).
* Each cell registers its outputs: one clock cycle per systolic step.
* Only the result is stored in L and compared; the x operand met one step
  later is a different item, so there is nothing to compare it with.
* The monitors number items by arrival order, two consecutive items being the
  two copies of one data item; bit i of an error vector is set if either copy
  came back with a changed tag.
* The locator's handling of the second report follows t' = t + 1 and leaves
  the two-sided pattern unresolved (see above).
* Not built: the host (stream and coefficient generation, selecting the
  correct copy of a result once the faulty cell is known). The testbenches
  play the host.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=F` and stops by itself.
With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl rtl/fdla_pkg.sv rtl/ips_pe.sv \
        rtl/bla_array.sv rtl/tag_monitor.sv rtl/fault_locator.sv rtl/fdla_top.sv \
        tb/tb_fdla_top.sv --top-module tb_fdla_top
    ./obj_dir/Vtb_fdla_top

| testbench | what it checks |
|---|---|
| `tb_ips_pe` | one cell against a reference of its rules, random items, matched and mismatched compares |
| `tb_tag_monitor` | error vector, `err` timing, `done`, `clear`, items beyond the last |
| `tb_fault_locator` | the worked example and every one- and two-report pattern of the default size |
| `tb_bla_array` | an 8×8 tridiagonal product in checked and unchecked mode, and a one-cycle fault in every cell and step: reporting cell, step, tags, untouched copy |
| `tb_fdla_top` | the whole design at default size: products, the worked example with its detection latency, every one-cycle fault, persistent faults, observation point, unchecked and mixed items; counts how often each mechanism occurred |

| `tb_fdla_top_w5` | the same at six cells, a five-diagonal band and six outputs (p0 = 3), checking the general form of the locator equations |

`tb_fdla_top` runs the top with all parameters at their defaults and finishes
in well under a second.
