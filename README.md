# Multiscalar task predictor

A Multiscalar processor runs one sequential program on a ring of processing
units. The program is cut by the compiler into *tasks* (groups of basic blocks
with arbitrary internal control flow). A *global sequencer* walks from task
to task, each step predicting which task comes next, and hands every task to
the next free unit; the units run them in parallel and retire them strictly
in order. A wrong guess costs all the work started after it, so the quality
of this inter-task prediction sets how large a useful window the machine
has.

This RTL is that global sequencer and its task predictor, following the
design in *Control Flow Speculation in Multiscalar Processors*:

* a **path-based exit predictor**: a 16K-entry table of
  *last-exit-with-hysteresis* automata, indexed by a folded hash of the
  addresses of the last seven tasks and the current one;
* address generation per exit type: the **task header** for branches and
  calls, a **return address stack** for returns, and a **correlated task
  target buffer** (CTTB, 2K entries, same kind of path index) for indirect
  branches and calls;
* the ring of processing units as a circular queue, FIFO retirement,
  squash-and-redirect on a misprediction, with full repair of the
  speculative history and stack;
* one bimodal branch predictor per processing unit for branches *inside* a
  task.

## Tasks, headers and exits

Every task starts with a header (`task_pkg::task_header_t`) that describes up
to four exits. Each exit has

| field      | bits | content |
|------------|------|---------|
| `spec`     | 5    | exit type, one-hot: BRANCH, CALL, RETURN, INDIRECT_BR, INDIRECT_CALL; all-zero = slot unused |
| `target`   | 32   | target address when the compiler knows it (BRANCH, CALL) |
| `ret_addr` | 32   | address to resume at after a CALL / INDIRECT_CALL |

Predicting the next task is therefore a two-stage job: pick one of four
exits (a four-way branch), then find that exit's address:

| exit type              | next-task address comes from |
|------------------------|------------------------------|
| BRANCH, CALL           | header `target` |
| RETURN                 | top of the return address stack |
| INDIRECT_BR, INDIRECT_CALL | CTTB entry selected by the path index |

A CALL or INDIRECT_CALL exit also pushes its `ret_addr` on the stack; a
RETURN exit pops. A task with a single populated exit always takes it, and
its outcome is not written into the exit table (fewer updates, less
aliasing). When the exit table names a slot that is empty in this task's
header, the first populated slot is used.

## The path index: D-O-L-C (F)

The exit table and the CTTB are both indexed by `path_index`, which hashes
*where the program came from* together with *where it is*. Five parameters
describe it:

* **D** – number of preceding tasks in the path;
* **C** – bits taken from the current task's start address;
* **L** – bits taken from the last task (current − 1);
* **O** – bits taken from each older task (current − 2 … current − D);
* **F** – number of folds.

The chosen bits are concatenated into an *intermediate index* of
`(D−1)·O + L + C` bits (current task at the least significant end, then the
last task, then the older ones by age), which is cut into F equal pieces that
are XORed together. The index is `((D−1)·O + L + C) / F` bits wide; the
intermediate length must be a multiple of F (checked at elaboration).

Two ideas are built in: recent tasks get more bits than old ones, and a long
intermediate index folded down carries more path information than a short
unfolded one, because the informative low-order bits of different tasks land
on different index bits. Address bits are taken from bit 2 upward (bits 1:0
of an instruction address are always zero).

| table | D-O-L-C (F) | intermediate | index | entries | entry | size |
|-------|-------------|--------------|-------|---------|-------|------|
| exit predictor | 7-4-9-9 (3) | 42 bits | 14 bits | 16384 | 2-bit exit + 2-bit counter | 8 kB |
| CTTB           | 7-4-4-5 (3) | 33 bits | 11 bits | 2048  | 30-bit word target + 2-bit counter | 8 kB |

Worked example for the exit predictor: bit 0 of the last task's field sits at
intermediate bit 9 and lands on index bit 9; bit 0 of the task two back sits
at intermediate bit 18 and lands on index bit 4 (18 − 14); bit 3 of the
seventh task back is intermediate bit 41, index bit 13.

The history itself (`path_history`) keeps 9 low-order address bits of each
of the last seven tasks, enough for both index generators.

## Prediction automata

**Exit table (`leh_pht`).** Each entry stores the exit seen last and a 2-bit
counter. The stored exit is the prediction. When the real exit is known:
same exit → counter + 1 (saturating at 3); different exit and counter 0 →
store the new exit; different exit and counter > 0 → counter − 1. An exit
that has been right several times survives up to three wrong outcomes. The
counter stays 0 after a replacement.

**CTTB (`cttb`).** Same rule with a target address in place of the exit. It
has no tags; every lookup uses whatever the entry holds. It is written only
when the committed exit is an indirect one.

## Speculation, commit and repair

The sequencer is always ahead of execution, so the structures are updated at
two different times:

* **at prediction** (speculative): the path history shifts in the task just
  left, and the return address stack pushes or pops for the *predicted* exit;
* **at commit** (non-speculative): when the head unit reports the exit it
  took and the real next address, the exit table and the CTTB are updated
  with the index that was used for that task's prediction (stored in its
  queue record). Predictions made meanwhile may read stale entries.

The history register and the return address stack each exist twice: a
speculative copy used for prediction and a committed copy that follows only
retired tasks. If the head's real successor differs from the predicted one,
the queue is flushed behind the head, both speculative copies are overwritten
with the committed ones (including the commit of that same cycle) and the
sequencer restarts from the real address. Wrong-path tasks thus leave no
trace in history or stack; a header fetch still in flight at that moment is
discarded when it returns.

The stack is circular (16 entries): a 17th nested call overwrites the oldest
entry, and the corresponding deep return is then mispredicted, detected at
commit and repaired like any other misprediction.

## Sequencer timing and interfaces (`global_sequencer`)

A state machine handles one task at a time:

1. `hdr_req` for one cycle with `hdr_addr` = current task;
2. wait for `hdr_rsp_valid` (any latency; exactly one response per request);
3. compute both path indexes and read the two tables (synchronous read);
4. select exit and address; if a processing unit is free, raise
   `disp_valid` with `disp_addr` and `disp_unit`, shift the history, update
   the stack, and make the predicted address current.

Dispatch comes two cycles after the header response and stalls while all
units are busy, so the sequencer starts at most one task every four cycles
plus header latency. `head_valid`/`head_unit` name the unit holding the
oldest task; that unit reports completion with a one-cycle `cmpl_valid`,
`cmpl_exit` (0–3) and `cmpl_target`. `squash` is high in the cycle of a
mispredicted commit. `ready` goes high when the tables have been cleared
after reset: each table clears one entry per cycle, so this takes 16384
cycles at the default size.

`task_queue` is the ring of units: slot *i* is unit *i*; the tail receives
the next task, the head retires; after a squash the next task goes to the
unit after the old head.

## Intra-task branch prediction

Inside a task each processing unit predicts its own branches with a bimodal
predictor (`bimodal_predictor`): 1024 two-bit saturating counters indexed by
branch address, combinational lookup, update at the next edge, reset to
weakly not taken. `multiscalar_top` holds one per unit, with its ports
brought out as arrays indexed by unit.

## Files

| file | content |
|------|---------|
| `rtl/task_pkg.sv` | header and exit types, helper functions |
| `rtl/path_index.sv` | D-O-L-C (F) index generator |
| `rtl/path_history.sv` | speculative and committed path history |
| `rtl/leh_pht.sv` | exit prediction table |
| `rtl/cttb.sv` | correlated task target buffer |
| `rtl/ras.sv` | return address stack with committed copy |
| `rtl/task_queue.sv` | processing-unit ring as circular queue |
| `rtl/global_sequencer.sv` | sequencer and task predictor |
| `rtl/bimodal_predictor.sv` | intra-task branch predictor |
| `rtl/multiscalar_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tfg_prog_pkg.sv`, `tb/tfg_env.sv` | test programs (task flow graphs with a reference behaviour), header store and processing-unit model |

## Parameters

Defaults are the sizes of the main configuration of the source design where
it gives them; the rest are choices made here.

| parameter | default | origin |
|-----------|---------|--------|
| `NUM_PU` | 4 | source (four processing units) |
| `XP_D/O/L/C/F` | 7/4/9/9/3 | source |
| `TB_D/O/L/C/F` | 7/4/4/5/3 | source |
| `HYST_W` | 2 | source |
| `RAS_DEPTH` | 16 | own choice ("reasonably deep"); power of two |
| `BP_IDX_W` | 10 | own choice |
| `ADDR_LSB` | 2 | own choice |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5, for example the end-to-end test at full size:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/task_pkg.sv tb/tfg_prog_pkg.sv tb/tb_multiscalar_top.sv \
    --top-module tb_multiscalar_top
./obj_dir/Vtb_multiscalar_top
```

(`-Wno-fatal` keeps lint warnings, such as unused upper address bits, from
stopping the build.) The block testbenches are built the same way with their own top module
(`tb_path_index`, `tb_leh_pht`, …); only the sequencer tests need
`tb/tfg_prog_pkg.sv`.

What they cover:

* unit tests compare each block cycle by cycle with a model written in the
  testbench, plus hand-worked cases (index bit placement, the automaton's
  replace/hold sequence, stack overflow wrap, reset sweep length);
* `tb_global_sequencer` runs a small loop nest (a function with a counted
  loop, an inner while loop, an early return and a break) and checks that
  every retired task is the correct next task, the two-cycle dispatch
  latency, that single-exit tasks never mispredict, and that the predictor
  improves after warm-up; after a reset it runs a short periodic program
  with a three-exit task and an indirect branch whose every decision is
  identified by the last seven tasks, and requires zero mispredictions over
  1000 tasks once trained (which fails if the tables are updated anywhere but
  at the entries used for prediction);
* `tb_multiscalar_top` runs, at default sizes, a program with direct and
  indirect calls, a path-dependent indirect branch, a four-exit task, exits
  in non-leading header slots and a recursion 20 deep, checks every retired
  task, requires the misprediction rate to fall below one in three, checks
  the four bimodal predictors against a model, and counts each mechanism
  (dispatch, commit, squash, dropped header, full-ring stall, stack push,
  pop and overflow, CTTB prediction, hit, hold and replace, exit-table
  prediction, hold and replace, single-exit bypass, empty-slot fallback,
  exits 2–3, returns predicted by the stack, taken intra-task predictions),
  failing if any never happens.

The test programs are synthetic. No benchmark traces are included, so the
misprediction rates reported for real programs have not been reproduced.

## Departures and open points

* The source gives the predictor's organisation, automaton, indexing scheme
  and sizes, but not its pipeline, handshakes, reset or repair logic. The
  state machine, its timing, the header and completion handshakes, the
  reset sweep and the committed-copy repair are choices made here.
* The field order inside the intermediate index, the use of address bits
  from bit 2 up, the one-hot exit encoding, the stack depth and overflow
  behaviour, the empty-slot fallback and the CTTB storing word addresses
  without tags are also own choices.
* "No update for single-exit tasks" is applied to the exit table only; the
  path history still records those tasks.
* The exit table is 8 kB (14 index bits × 4 bits). One passage of the source
  speaks of a 16 kB table; the 8 kB number matches its own arithmetic and the
  16 kB total given for exit table plus CTTB.
* The register create-mask of the header is not carried: it plays no part in
  control-flow prediction.
* Not included: the processing units themselves (pipelines, local register
  files, instruction caches), register forwarding around the ring, the
  memory disambiguation buffer, data banks and interconnect. They appear only
  as ports. The header-less "CTTB-only" predictor and the GLOBAL/PER history
  schemes, which the source uses as comparison points, are not built.
