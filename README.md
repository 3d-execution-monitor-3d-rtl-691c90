# A 3D execution monitor for a ZPU-class processor

A processor bought from an untrusted foundry may carry a hardware trojan: a
small addition that, once triggered, makes the core do something its
designers never specified. This RTL implements a defence against one class of
such trojans, those that change the processor's control flow. The idea
comes from 3D die stacking: the untrusted processor sits on one die and a
small monitor, made in a trusted process, sits on a second die bonded on top.
Die-to-die vias carry the processor's internal control state and a handful of
control signals up to the monitor. Every clock cycle the monitor checks the
step the processor just took against a table of every legal step. If the
step is not in the table, or if it changed a signal the table does not allow
it to change, the monitor drops its `predicate` output.

The monitor is a security automaton: an acceptor for the set of legal
control-signal traces. It knows nothing about data. It catches a trojan only
if the trojan shows up in the monitored control state or signals.

## Where this design comes from

The monitor follows a published experiment in which a monitor of this kind
was attached to the ZPU, a small open-source 32-bit stack processor. That
work gives the following, and this RTL keeps it:

* the monitor's two checks, and the outputs `predicate`, `valid_transition`,
  `valid_changes` and `match_index_signal`, with index 0 meaning "no legal
  transition" and 0 at start-up;
* 23 control states and a table of 112 transition records;
* a crossing between the dies that takes one full clock cycle, and roughly
  50 posts between them;
* eight of the state names (RESYNC, RESYNC2, RESYNC3, FETCH, DECODE, DECODE2,
  EXECUTE, INTERRUPT) and the legal edges between them, plus a no-op state;
* some of the monitored signals: memory read enable, memory write enable,
  interrupt, operand-immediate and in-interrupt;
* two deliberate deviations of the processor used to show that the monitor
  works. In the first, every sixth no-op raises in-interrupt. In the second,
  the no-op state jumps straight to RESYNC.

The published work does not give the table itself, the rest of the state
names or the record format. This RTL therefore brings its own, which is
described below. The ZPU core and the rest of its system (timer, I/O unit,
DRAM) are not part of this RTL: the core's monitored signals are the inputs
of the top module.

## The monitored sample

Each clock cycle the target core presents one sample (`em_sample_t` in
`zpu_em_pkg`):

| field            | bits | meaning                                         |
|------------------|------|-------------------------------------------------|
| `state`          | 5    | control state, one of 23 (`zpu_state_e`)        |
| `sig.mem_busy`   | 1    | memory not ready (an input of the core)         |
| `sig.irq`        | 1    | interrupt request (an input of the core)        |
| `sig.mem_read`   | 1    | memory read enable                              |
| `sig.mem_write`  | 1    | memory write enable                             |
| `sig.idim`       | 1    | operand-immediate: the last instruction was IM  |
| `sig.in_interrupt` | 1  | an interrupt is being serviced                  |
| `sig.brk`        | 1    | a break instruction was just executed           |
| `sig.op`         | 4    | decoded opcode class (`zpu_op_e`, 12 classes)   |

Along with a valid bit, this makes 17 of the link's 50 posts. `mem_busy`,
`brk`, the opcode classes and the 14 states not named above belong to this
design's reconstruction of a ZPU-like control graph. They are not taken from
the real ZPU source.

## The transition table

A step is a pair of consecutive samples: state A with signal set S, then
state B with signal set S'. A record (`trans_rec_t`) describes one legal step:

* `from_state`, `to_state`: A and B;
* `pre_mask`, `pre_val`: a precondition on S, `(S & pre_mask) == pre_val`.
  It selects, for example, the record for "FETCH stays in FETCH" only while
  `mem_busy` is set, and the EXECUTE record that belongs to the decoded
  opcode;
* `post_mask`, `post_val`: signals that must take a fixed value in S'. Every
  record fixes the memory strobes of B and clears `brk`;
* `hold_mask`: signals of S' that must equal S. By default `idim`,
  `in_interrupt` and `op` must hold. Only the records that may change them
  release or set them: DECODE→DECODE2 frees `op`, DECODE→INTERRUPT sets
  `in_interrupt`, and the POPPC record clears it.

Records must be deterministic: no (A, S, B) may match two records.
`em_transition_lookup` enforces this rule twice. At elaboration it rejects a
table in which two valid records share A and B unless they disagree on a bit
that both preconditions test. In simulation an assertion checks that at most
one record matches.

`zpu_em_pkg::zpu_table()` builds the table as a constant from a few rules:

* a state that drives a memory strobe has two records, one that loops while
  `mem_busy` is set and one that moves on to its successor when it is clear;
* DECODE has three records: take the interrupt (irq set and none in service),
  or go to DECODE2, either with no irq or with one already in service;
* EXECUTE has one record per opcode class (NOP, IM, LOADSP, STORESP, ADDSP,
  LOAD, STORE, POPPC, BINOP, UNOP, EMULATE, BREAK);
* every other state has a single record to its successor.

This fills entries 1 to 49 in state-code order (RESYNC 1–2, RESYNC2 3–4,
RESYNC3 5, FETCH 6–7, DECODE 8–10, DECODE2 11, EXECUTE 12–23, INTERRUPT
24–25, NOP 26, and so on). The other 63 of the 112 entries are invalid. To
monitor a different core, or a more complete ZPU graph, replace the
function or pass another `TABLE` parameter. Nothing else depends on the
contents.

## The two checks

`em_monitor` keeps the previous sample and, for each new one:

1. **valid_transition** (`em_transition_lookup`): compares (A, S, B) against
   all records in parallel and takes the matching one. Its 1-based number is
   `match_index_signal`, or 0 if no record matches.
2. **valid_changes** (`em_postcond_check`): tests S' against the chosen
   record's `post_mask`/`post_val` and `hold_mask`. `viol` has one bit set
   for every signal that failed. If the first check failed, this one fails
   too.

`predicate` is the AND of the two. This design adds a start rule of its own:
the first sample after the core leaves reset must show RESYNC, the state the
core enters from reset. Otherwise the monitor reports an illegal transition
with index 0.

The two deviations show the difference between the checks:

* **No-op straight to RESYNC.** No record goes from NOP to RESYNC. Both valid
  signals drop and the index is 0.
* **in_interrupt raised on the sixth no-op.** EXECUTE→NOP is a legal record,
  so `valid_transition` stays high and the index is that record's (12). But
  `in_interrupt` is in the record's hold mask, so `valid_changes` and
  `predicate` drop and `viol` names `in_interrupt`. The published waveform
  for this case shows both valid signals low at its cursor. With the record
  format used here, only the second check fails.

## Timing

```
cycle t     core drives sample t
cycle t+1   sample t is on the monitor side of tsv_link; compared with t-1
cycle t+2   predicate / valid_* / match_index_signal / viol for step t-1 -> t
```

The one-cycle crossing comes from the published work. The output register
is this design's own choice: it keeps the 112-way compare off any path
back to the core. The published work reports that adding the monitor did not
lower the system's maximum clock rate on its FPGA. `checked` is high in
cycles whose outputs judge a sample. When `checked` is low, the valid
outputs and `predicate` are high and the index is 0.

Reset (`rst_n`) is synchronous and active low. `core_valid` must be low
while the core is in reset.

## Modules

| file | role |
|------|------|
| `rtl/zpu_em_pkg.sv` | types, sizes (23 states, 112 entries), record format, table builder |
| `rtl/tsv_link.sv` | die-to-die crossing, one register per post, `WIDTH` = 50 |
| `rtl/em_transition_lookup.sv` | first check: parallel match, priority select, determinism assertion |
| `rtl/em_postcond_check.sv` | second check: forced values and held signals |
| `rtl/em_monitor.sv` | previous-sample register, both checks, start rule, output register |
| `rtl/zpu_em_top.sv` | top: link plus monitor; the core's signals come in, the verdict goes out |
| `tb/zpu_ctrl_model.sv` | testbench-only model of the ZPU-like control path, with both deviations |

The top has parameters `DEPTH` (table entries, default 112) and `IDX_W`.
After synthesis of the top: about 340 word-level cells and 54 flip-flops.
The table is a constant, so synthesis folds it into the comparators.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`.

* `tb_tsv_link`: zero after reset, and exactly one cycle of delay on 1000
  random words across all 50 posts.
* `tb_em_transition_lookup`: 20 hand-worked cases, every filled entry hit
  by a query built for it, and 20 000 random queries compared with a plain
  search.
* `tb_em_postcond_check`: hand cases plus 20 000 random records and signal
  sets, checked against a bit-by-bit reference.
* `tb_em_monitor`: a directed walk with entry numbers worked out by hand.
  It covers stalls, interrupt entry and return, break, POPPC, both
  deviations, a wrong strobe, a gap in `sample_valid` and a wrong start
  state.
* `tb_zpu_em_top`: end to end at the default sizes. The control model drives
  the top with random opcodes, memory stalls and interrupts for three runs
  of 20 000 cycles: unmodified, deviation 1 and deviation 2. Every report
  is compared, two cycles late, with the model's own record of the step.
  The test also counts stalls, interrupts, breaks, returns to RESYNC, every
  opcode class, every state and both detections, and fails if any of them
  never occurred. A typical run sees about 7500 stalls, 240 interrupts,
  30 detections of deviation 1 and 260 of deviation 2.

Simulating with Verilator, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/zpu_em_pkg.sv tb/tb_zpu_em_top.sv --top-module tb_zpu_em_top -Mdir obj
./obj/Vtb_zpu_em_top
```

Use the same command with another testbench name to run the unit tests.

## Limits and departures

* The table describes a reconstructed ZPU-like control graph, not the real
  ZPU core's. Its 49 records and the 14 added states are this design's own.
  Only the states and edges listed in the first section come from the
  published monitor.
* The published monitor's waveform for deviation 1 shows the first check
  failing too. Here only the second check fails (see above).
* One published waveform shows `predicate` high while both checks are low.
  This RTL follows the written description instead: `predicate` is low
  whenever a check fails.
* The published work draws the link between monitor and core with arrows in
  both directions, but describes only monitoring. Nothing here goes back to
  the core: no mitigation and no disabling of core circuits.
* The ZPU core, its timer, I/O unit and DRAM are not included. The physical
  stack (vias, heat spreader) appears only as the one-cycle link.
* The other protections that the same line of work proposes only by name
  (keep-alive protection, datapath integrity, load/store and arithmetic
  verification) are not included.
