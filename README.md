# COSMOS: an 8-way superscalar core built for short cycle times

A wide out-of-order core spends its cycle time in a few structures that grow
badly with size: the associative wakeup of a large instruction window, fetch
that stops at every taken branch, and an execution stage that has to hold both
the ALU and the bypass network. The COSMOS microarchitecture attacks each of
them separately:

* **Fetch past taken branches** with a non-consecutive basic block buffer (NCB),
  a small trace store that sits next to the branch target buffer and holds only
  sequences that cross a predicted-taken branch.
* **A large window without a large scheduler**: a small scheduling window issues
  micro-ops, and a much larger in-order instruction buffer holds every micro-op
  until commit so that value-mispredicted work can be reissued from it.
* **Wakeup without tag comparison** (the EDF window): a table indexed by physical
  register remembers which window slots wait for each register, so a completing
  result reads one RAM row instead of broadcasting its tag to every slot.
* **Variable latency ALUs** (VLP): a fast adder that is right unless a carry
  runs a long way, backed by a pipelined two-cycle adder and a detector that
  picks between them.
* **Value prediction** lets consumers start before their producer has finished
  and is repaired by reissue from the instruction buffer.

This repository gives synthesizable SystemVerilog for all of these, at the
sizes of the evaluated machine: an 8-wide, single-cluster core with a 256-entry
scheduling window, a 512-entry instruction buffer, 2 DMT references per
register, a 4096-entry stride value predictor, 8 VLP ALUs and a 32 KB NCB.

## Block map

```
                 +-------------+   traces   +-----------+
  I-cache  --->  | fetch_unit  | <--------- |    ncb    | <--- fill_unit
  + predictor    |  (selects   |            +-----------+          ^
  (outside)      |  I$ or NCB) | --- every delivered block ---------+
                 +-------------+
                       | f_*  (to a decoder/renamer, outside)

  renamed micro-ops (in_*)
        |
        v
  +--------------------+    alloc/commit    +----------------------+
  |  cosmos_top entry  | -----------------> |  instruction_buffer  |  512, in order
  |  (in-order accept) |                    |  reissue pipeline    |
  +--------------------+                    +----------------------+
        |   value_predictor (look-up at entry, training at completion)   ^  |
        v                                                                 |  | reissue
  +------------------------------- cluster --------------------------+   |  |
  |  edf_window (256 slots) + dmt (register -> waiting slots)         |   |  |
  |  regfile (544 x 32)     8 x vlp_alu     change check -> reissue --+---+  |
  +-------------------------------------------------------------------+<----+
```

`cosmos_top` holds both halves. The front end (`fetch_unit`, `ncb`,
`fill_unit`) and the back end (`instruction_buffer`, `value_predictor`,
`cluster`) are not joined: there is no decoder or renamer, so renamed
micro-ops enter the back end through their own ports.

## Fetch: the NCB and its fill unit

The instruction cache, the NCB and the branch predictor are all looked up with
the fetch address. The cache returns eight sequential words. If the predictor
marks one of them as a taken branch, a plain fetch would have to stop there;
instead, if the NCB holds a trace that starts at this address, that trace is
delivered. It holds the instructions up to the taken branch followed by
instructions from its target, up to eight in all, and fetch continues where the
trace ends. If there is no taken branch, or no trace, the cache block is used,
cut after its first predicted-taken branch.

Traces are built off the critical path by `fill_unit`, which watches the
blocks that fetch delivers from the cache:

1. a block with a predicted-taken branch starts a trace: the instructions up
   to and including that branch go into a line buffer;
2. the following blocks are appended;
3. the trace is finished when the line buffer (eight slots) is full or when it
   takes in a second predicted-taken branch, and is then written into the NCB
   one cycle later.

Traces are built from predicted, not resolved, branch outcomes, so the NCB
needs nothing from the back end. A trace may start in the middle of a basic
block, and one basic block may be split across two traces. The NCB here is
direct mapped with 1024 entries of eight instruction slots (32 KB), tagged with
the full start address.

## The decoupled window and reissue

Every micro-op enters the scheduling window and the instruction buffer in the
same cycle. It leaves the window as soon as it is dispatched, so the window only
holds micro-ops still waiting for operands. The buffer keeps it until it
commits, in order, up to eight per cycle.

Values are predicted at entry. A confident prediction is written into the
destination register right away and the register is marked ready, so consumers
can dispatch without waiting. When the producer finishes, the cluster compares
the real result with what the register holds. If they differ, the register is
corrected and the instruction buffer marks every micro-op that reads it and has
already been dispatched. Micro-ops still in the window just read the corrected
value later. A reissued micro-op whose result changes triggers the same check
in turn.

Marked micro-ops are reissued from the buffer through a two-stage pipeline
(select, then read). They use the last ALU, which the window does not use in
that cycle. Only one reissue is in flight at a time. The next one is selected,
oldest first, when the previous one has completed. Each reissued micro-op
therefore sees final values for everything older than itself. Each entry has a
2-bit generation count, which is bumped at every reissue. A completion whose
generation does not match is ignored, so a superseded execution can never mark
an entry done. An entry commits only when it is done and not marked.

**Limitation worth knowing.** Invalidation is not propagated down a dependence
chain ahead of execution. It travels with the reissued results, about three
cycles per link. Suppose a misprediction occurs near the head of a long serial
chain. Consumers that enter later still dispatch with the stale values, and
each of them is then reissued in turn. The results stay correct, but in the
end-to-end test such a chain drops throughput to well under one micro-op per
cycle.

## The EDF window and the DMT

The scheduling window is a RAM of 256 slots. Each slot holds a micro-op and a
ready bit for each operand. There are no tag comparators. Instead the
dataflow management table (`dmt`) has one row per physical register, with two
reference slots per row. Each reference names a window slot and an operand side
(A or B).

* **Entry.** Each source operand that is not ready registers a reference in the
  row of its source register. A source produced earlier in the same group
  counts as not ready unless that producer was value-predicted. A source whose
  result completes in the same cycle counts as ready.
* **Completion.** The row of the result register is read and cleared. Each
  reference found sets one ready bit.
* **Dispatch.** Up to eight slots with both bits set are dispatched, lowest slot
  first.

Entry is in order and partial. Micro-op *i* of a group enters only if it, and
every micro-op before it, find a free window slot and free DMT references.
The DMT check counts the references taken by earlier micro-ops of the same
group. A register that already has two waiting readers therefore holds up the
third reader, and everything behind it, until the register's value arrives.
The `dmt_stall` output reports this case.

The DMT keeps four checkpoints. Taking one copies the table as it stood at the
start of the cycle, and restoring one brings that copy back. Every wakeup also
clears its row in every checkpoint, so a restored table cannot wake a slot whose
operand has already been delivered. Checkpoints are driven from ports, because
branch resolution lies outside this design.

## VLP ALU

Each `vlp_alu` computes ADD, SUB, AND, OR, XOR and SLT on 32-bit operands:

* **Circuit A** is an adder in which the carry into bit *i* looks back over at
  most 16 positions. Its result is exact unless a carry runs through 16 or more
  propagate positions.
* **Circuit B** adds in two 16-bit halves over two pipelined cycles and is always
  exact.
* **The completion detector** runs in the second cycle. It checks whether a
  carry (a generate bit, or the carry-in for SUB) meets 16 consecutive
  propagate bits on its way to a result bit. Such an operation takes its result
  from circuit B one cycle later and raises `out_slow`.

There is one result port. When an operation leaves through B, the operation
behind it is also taken from B, one cycle after entering. This keeps
throughput at one operation per cycle and results in order. Logic operations
are always one cycle.

## Interfaces and timing

Shared types are defined in `cosmos_pkg`: the renamed micro-op `uop_t` and the
execution record `exec_uop_t`, which adds the buffer index, generation,
prediction flag and reissue flag. The package also defines the trace format.

`cosmos_top`:

* **Front end.**
  * `ic_pc` goes to an external instruction cache and branch predictor. They
    answer combinationally on `ic_instr`, `ic_is_branch`, `ic_target` and
    `bp_taken`.
  * The fetch group appears on `f_*`. It advances when `f_ready` is high.
  * `redirect_*` restarts fetch.
* **Back end.**
  * Up to eight renamed micro-ops are offered on `in_valid`/`in_uop`, packed
    from slot 0.
  * `in_accept[i]` marks those that enter in this cycle, always a prefix of the
    group. The rest must be offered again, first in line.
  * Sources and destinations are physical registers 0–543. Register 0 is the
    constant zero.
  * The caller owns renaming. A physical register may be reused only after the
    micro-op that redefined its architectural register has committed.
* **Commit.** `cm_valid`, `cm_uop` and `cm_value` report up to eight committed
  micro-ops per cycle, in program order, with their final values.
* **Status.** `win_occupancy`, `ib_count`, `dmt_stall` and `reissue_valid`.

Latencies:

| Path | Latency |
|---|---|
| Entry to earliest dispatch | 1 cycle |
| Fast ALU result | 1 cycle |
| Slow ALU result | 2 cycles |
| Change report to first reissue | 3 cycles |

## Where this design goes beyond the description it follows

These parts come from the architecture description:

* the structures themselves;
* the sizes listed above;
* the two ID slots per DMT row;
* the 16-bit carry threshold;
* NCB selection and trace-building rules;
* the 2-cycle pipelined buffer.

These choices are this design's own:

* **Micro-ops:** the micro-op format and its small ALU operation set.
* **Registers:** 544 physical registers.
* **Sizes:** four DMT checkpoints.
* **NCB:** direct mapping with full-address tags.
* **Value predictor:**
  * a stride predictor with a 2-bit confidence counter and threshold 2;
  * no tags;
  * it predicts every micro-op with a destination.
* **Instruction buffer:**
  * the register-match search for dependents;
  * the generation counts;
  * one reissue in flight at a time.
* **Scheduling:**
  * lowest-slot-first select;
  * in-order partial entry.
* **ALU pipeline:**
  * the B-follows-B rule that keeps the single ALU result port free of collisions;
  * giving the last ALU to reissue.

Not built:

* the instruction cache and branch predictor (a behavioural model stands in for
  them in the tests);
* the decoder, renamer and steering logic;
* memory, load/store, branch, multiply and divide units;
* the second cluster of the dual-cluster drawing (the evaluated machine has
  one);
* moving operands between clusters.

## Tests

Every block has a self-checking bench in `tb/`. Each bench drives the block
with random traffic from `$urandom`, compares it with a model written in the
bench, and ends by printing
`TB_RESULT checks=<n> failures=<n>`. Each also has a watchdog. The benches
check cycle counts where the architecture fixes them:

* one or two ALU cycles, decided by the 16-bit carry rule;
* the three-cycle path from a change report to the first reissue.

`tb_cluster` drives a small cluster with a renamer of its own. It checks every
result against a golden model, and checks that `c_changed` flags exactly the
wrong predictions.

`tb_cosmos_top` runs the whole core at its default sizes. The bench:

* renames a looping program itself, with a free list and in-order freeing;
* checks every committed value against an in-order golden model;
* drives the front end with a synthetic program through `icache_model`, a
  behavioural cache and predictor in `tb/`;
* checks that the fetched stream follows the predicted path.

It counts each mechanism and fails if any of them never happens:

* value predictions and value mispredictions;
* reissues;
* two-cycle ALU results;
* DMT stalls;
* full window and full buffer;
* checkpoint restores;
* NCB hits and NCB fills.

A run takes a few seconds.

To run a bench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cosmos_pkg.sv tb/tb_prog_pkg.sv tb/tb_cosmos_top.sv --top-module tb_cosmos_top
./obj_dir/Vtb_cosmos_top
```

Replace `tb_cosmos_top` with any other bench name to run that block's test.
The parameters of each module default to the sizes above. The unit benches
override them with small sizes so that full and stall cases happen often.
