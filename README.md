# Reduced Wakeup Width dynamic scheduler

An out-of-order core's scheduler has two parts that share one clock cycle. Wakeup marks
the instructions whose operands have become available. Select picks the ready
instructions that go to the functional units (FUs). In the usual design every issue slot
drives its own result tag across the whole instruction window. So a 6-wide machine needs
6 tag-lines and 6 tag comparators per source operand in every window entry. Those long
tag-lines and match-lines set the cycle time, energy and area of the wakeup logic.

Most cycles do not produce that many tags. Branches and stores produce none, and many
cycles issue only a few instructions. This scheduler therefore decouples the *wakeup
width* (the number of tag-lines, `WAKE_W`) from the *issue width* (`ISSUE_W`). The FUs are
split into FU-groups of `ISSUE_W / WAKE_W` units. The units of a group share one tag-line,
and at most one tag per group is broadcast each cycle. A tag that loses the line waits in
its FU's tag latch and goes out in a later cycle. The window needs only `WAKE_W`
comparators per operand. The cost is a little IPC, lost when a tag waits that a
dependent instruction needed at once.

The default configuration is **I6W3**: issue width 6, wakeup width 3, a 128-entry window
and 8-wide dispatch. Both enhancements are on: RWIS and RTD with a limit of 1 (RTD-1).
Setting `WAKE_W = ISSUE_W` gives the conventional scheduler.

## One scheduling cycle

Everything below happens in one clock cycle, `t`.

1. **Tag-line arbitration** (`tagline_ctrl`, one per FU-group). Each FU has a tag
   latch and a 1-bit indicator latch. The indicator is set when a tag is latched.
   Among the group's latches whose indicator is set, one gets its driver enabled,
   chosen round-robin. Its tag goes on the group's tag-line. The others keep their tags.
2. **Wakeup** (`issue_queue`). Every source tag in the window is compared with the
   `WAKE_W` tag-lines. A source is ready if its stored ready bit is set or a tag-line
   matches it now. An entry with both sources ready requests an FU.
3. **Select** (`select_logic` → `fu_arbiter` → `arbiter_cell`). Each FU has an
   arbiter that picks the oldest request it may take. The arbiters are stacked: FU 1
   chooses among what FU 0 left, and so on.
4. **Clock edge** (`fu_issue_latch`). The chosen instruction of each FU is latched and
   is presented on `fu_issue[k]` in cycle `t+1`. If it produces a tag, the tag goes into
   the FU's tag latch and the indicator is set. It can then be broadcast in `t+1` at the
   earliest. A latch whose tag was driven in `t` clears its indicator. The window drops
   the issued entries, closes the holes and appends the newly dispatched instructions.

An instruction whose producer's tag is driven in cycle `t` can be selected in the same
cycle `t`. If no tag is delayed, dependent instructions issue back to back, one cycle
apart, as in a conventional scheduler.

## Waiting tags and the blocking bit `a`

This is the subtle part of the design. A tag latch holds only one tag. If an FU whose
tag is still waiting were given another tag-producing instruction, the waiting tag would
be overwritten and its dependants would never wake. Every FU arbiter therefore gets a
blocking bit `a`:

    a[k] = waiting[k] | rtd_block[group(k)]
    waiting[k] = indicator[k] & ~drive[k]

* `waiting` is computed after this cycle's tag-line arbitration. A latch whose tag is
  being driven right now is already free: it may receive a new tag at the same clock
  edge. Only a tag that lost arbitration blocks its FU. The driver enables depend only on
  the indicator latches, so they are known before wakeup finishes. They are therefore
  ready in time for select.
* **Basic RWW** (`RWIS_EN = 0`). An FU with `a` set takes no instruction at all, and
  its issue slot is lost.
* **RWIS**, reduced issue-slot wastage (`RWIS_EN = 1`). Each window entry carries a type
  bit: 1 for tag-producing, 0 for branches, stores and other instructions without a
  result. At each leaf of the arbiter tree the request is masked with `~(a & type)`. An
  FU with a waiting tag still takes a non-tag-producing instruction, which leaves the
  tag latch untouched. The mask is applied to the request before priority is resolved. A
  blocked older tag-producing request therefore does not stop a younger
  non-tag-producing one from using the FU.
* **RTD**, reduced tag delays (`RTD_LIMIT > 0`). Tags pile up when several
  tag-producing instructions land in the same group. Counting them and limiting them
  within the select cycle would lengthen the critical path. Instead, `rtd_limiter`
  registers the number of waiting tags of each group every cycle. In the next cycle, if
  that count is at or above `RTD_LIMIT`, it raises `rtd_block`. This sets `a` for every
  FU of the group, so non-tag-producing instructions can still go there. Because the
  count is one cycle old, a group can briefly hold more waiting tags than the limit.
  `RTD_LIMIT = 0` turns the mechanism off.

`fu_issue_latch` asserts that a waiting tag is never overwritten.

## FU-groups

FU `k` belongs to group `k % WAKE_W`. In I6W3 the pairs are FU0/FU3, FU1/FU4 and
FU2/FU5. The stacked select fills FU 0, 1, 2, … in that order. When a cycle issues only
three instructions, they therefore land in three different groups and none of their tags
waits. Pairing neighbours (FU0/FU1, …) would put the two oldest instructions on one
tag-line in every cycle. On the synthetic program below, pairing neighbours cost about
10% more IPC in I6W3.

## Select tree

`fu_arbiter` is a binary tree of `arbiter_cell`s over the window entries, built in heap
order. Requests are OR-ed towards the root. The root is enabled when the FU can accept an
instruction (`fu_enable[k]`). Each cell passes the grant to its higher-priority child:

    grant0 = req0 & enable
    grant1 = ~req0 & req1 & enable

Window index 0 is the oldest entry, so the arbiter is oldest-first. The RWW/RWIS gating
exists only at the leaves, so the path from root to leaf is the same as in a
conventional arbiter. The window size must be a power of two.

## Instruction window

`issue_queue` is a collapsing queue. Valid entries occupy indices `0 … count-1` in age
order. Each clock edge, every surviving entry moves down by the number of issued entries
below it. That is at most `ISSUE_W`, so each slot chooses from `ISSUE_W + 1` sources.
Newly dispatched instructions are appended behind the survivors. Their source tags are
also compared with the tag-lines of their arrival cycle, so that a broadcast in that
cycle is not lost. Dispatch is accepted as a whole: `disp_ready` is high when at least
`DISP_W` entries are free at the start of the cycle. Any subset of the `DISP_W` slots may
be valid, and the slots keep their order.

## Parameters

| parameter   | default | meaning |
|-------------|---------|---------|
| `IQ_SIZE`   | 128 | window entries (power of two) |
| `ISSUE_W`   | 6   | FUs / issue slots per cycle |
| `WAKE_W`    | 3   | tag-lines (wakeup width); must divide `ISSUE_W` |
| `DISP_W`    | 8   | dispatch slots per cycle |
| `RWIS_EN`   | 1   | let non-tag-producing instructions use FUs with waiting tags |
| `RTD_LIMIT` | 1   | RTD limit on waiting tags per group (0 = off) |

Tags are 8 bits wide: one tag space covers 128 integer and 128 floating-point physical
registers. The payload is 16 bits that the scheduler carries through untouched, for
example a reorder-buffer index. Both widths are set in `rww_pkg`.

## Interface of `rww_scheduler`

| port | dir | type | meaning |
|------|-----|------|---------|
| `clk`, `rst_n` | in | | clock; asynchronous active-low reset |
| `disp_valid` | in | `[DISP_W]` | dispatch slot holds an instruction |
| `disp_entry` | in | `iq_entry_t [DISP_W]` | `src1, src1_rdy, src2, src2_rdy, produces_tag, dest, payload` |
| `disp_ready` | out | | all slots offered this cycle are taken |
| `fu_enable` | in | `[ISSUE_W]` | FU can accept an instruction this cycle |
| `fu_issue` | out | `fu_issue_t [ISSUE_W]` | `valid, produces_tag, dest, payload` for each FU this cycle |
| `tagline` | out | `tagline_t [WAKE_W]` | the wakeup broadcast (`valid, tag`), e.g. for result forwarding |
| `tag_waiting` | out | `[ISSUE_W]` | FU holds a tag that did not get its line this cycle |
| `rtd_block` | out | `[WAKE_W]` | RTD limit active for the group this cycle |
| `iq_count` | out | | occupied window entries |

A source that needs no operand is given with its ready bit set. Rename must not reuse a
tag until its previous owner has been broadcast in an earlier cycle.

## Behaviour on a synthetic program

`tb_rww_configs` runs one fixed 5000-instruction program through ten configurations. In
the program, 30% of the instructions produce no tag, and sources depend mostly on the
last one or two results. This is much more parallel code than typical integer programs,
so it is a harsh case for a reduced wakeup width.

| config | IPC | vs I6W6 |
|--------|-----|---------|
| I6W6 (conventional) | 3.93 | 100% |
| I6W3 RWW | 3.27 | 83% |
| I6W3 RWIS | 3.37 | 86% |
| I6W3 RTD-1 (default) | 2.96 | 75% |
| I6W3 RTD-2 | 3.37 | 86% |
| I3W3 (same wakeup width) | 2.80 | 71% |
| I6W2 RWW | 2.57 | 65% |
| I6W2 RWIS | 2.61 | 66% |
| I6W2 RTD-1 | 2.20 | 56% |
| I2W2 (same wakeup width) | 1.99 | 51% |

Two trends hold here. A reduced-wakeup scheduler beats the narrow scheduler with the
same number of tag-lines. W2 loses more than W3. The losses are far larger than the
under-2% reported for real benchmarks, whose IPC and tag rate are much lower. On this
program RTD-1 is the slowest I6W3 variant. Each waiting tag bars its group from
tag-producing work for a cycle, and this program almost always has tag-producing work
ready. RTD-2 gives the same result as RWIS for groups of two.

## Departures and own choices

* Interleaved FU-groups, round-robin tag-line arbitration, the stacked select, the
  collapsing window, the dispatch handshake and the reset behaviour are choices of this
  design.
* The arbiter leaf masks the request with `~(a & type)` before priority, as described
  above. Masking only the grant would let a blocked older tag-producing instruction hold
  the FU idle, which defeats the purpose of RWIS.
* The scheduler assumes single-cycle execution for wakeup timing: a tag is broadcast as
  soon as its latch wins the line. Multi-cycle units need the broadcast delayed in front
  of `fu_issue`/`tagline`.
* The issue ports are identical. Matching instruction classes (ALU, multiply/divide,
  load/store, FP) to unit types is left to the core: use `fu_enable` to keep a port idle.
* Instructions woken by a delayed tag read the value from the register file or the
  bypass network one or more cycles after it was produced. The forwarding-control change
  this needs is not part of this RTL. `tagline` is brought out for it.
* There is no flush or squash input. Recovery after a branch misprediction must drain or
  reset the scheduler.

## Verification

Each module has a self-checking testbench in `tb/`, printing
`TB_RESULT checks=… failures=…`:

* `tb_arbiter_cell`: exhaustive.
* `tb_fu_arbiter`, `tb_select_logic`: random requests, type bits, blocking bits and
  enables, checked against a scan for the oldest allowed request.
* `tb_fu_issue_latch`, `tb_tagline_ctrl`, `tb_rtd_limiter`: random traffic checked
  against cycle models.
* `tb_issue_queue`: a 16-entry window checked against a queue model. It covers wakeups,
  compaction, a full window and same-cycle dispatch wakeups.
* `tb_rww_scheduler`: the full default configuration. A 20 000-instruction program
  alternates dependence chains, wide code and branch/store-heavy code. A scoreboard
  checks that:
  * dependences are respected;
  * every instruction issues exactly once and every tag is broadcast exactly once, on
    its own group's line;
  * no line is idle while its group holds a tag;
  * no waiting tag is overwritten;
  * the RTD rule holds;
  * the status outputs are correct.

  It also fails if any mechanism never happens: delayed tags, RWIS issue past a waiting
  tag, RTD blocking, a full window, disabled FUs, back-to-back wakeup and wakeup in the
  dispatch cycle.
* `tb_rww_configs`: the configuration comparison above. It also checks correctness of
  every run.
* `tb_rww_latency`: directed cycle counts at the default configuration. A dependence
  chain must issue one instruction per cycle, with each tag broadcast in the cycle after
  its selection. Six tag-producers issued together must share the three lines: in each
  group one tag goes out in the next cycle and the other one cycle later. Each consumer
  must issue in the cycle its producer's tag appears.

To simulate with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_rww_scheduler \
        -y rtl -y tb +libext+.sv rtl/rww_pkg.sv tb/tb_rww_scheduler.sv
    ./obj_dir/Vtb_rww_scheduler

Replace the top module and file name to run any other testbench. To lint the RTL:

    verilator --lint-only -Wall -y rtl +libext+.sv rtl/rww_pkg.sv rtl/rww_scheduler.sv

## Files

| file | content |
|------|---------|
| `rtl/rww_pkg.sv` | tag and payload widths, entry, tag-line and FU structs |
| `rtl/rww_scheduler.sv` | top: window, select, tag latches, FU-groups |
| `rtl/issue_queue.sv` | instruction window with wakeup comparators |
| `rtl/select_logic.sv` | stacked per-FU arbiters |
| `rtl/fu_arbiter.sv` | arbiter tree with the RWW/RWIS leaf gating |
| `rtl/arbiter_cell.sv` | two-input tree node |
| `rtl/fu_issue_latch.sv` | tag latch, indicator latch, FU instruction latch |
| `rtl/tagline_ctrl.sv` | per-group tag-line driver enables |
| `rtl/rtd_limiter.sv` | RTD waiting-tag counter and group block |
| `tb/rww_run.sv` | harness used by `tb_rww_configs` |
