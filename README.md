# A distributed SAT solver: one control unit, many implication units

Davis–Putnam style SAT search spends most of its time on *implication*
(unit propagation). After each assignment, every clause that mentions the
variable has to be revisited to see whether it has become unit. That work is
parallel across clauses. The rest of the search is inherently sequential:
choosing a variable, detecting a conflict and undoing assignments.

This design splits the two jobs:

* A **control unit (CU)** runs the search. It splits the instance into
  sub-instances, makes decisions, spots conflicts and backtracks.
* Several **implication units (IUs)** each hold one sub-instance in a local
  clause memory. They all propagate the current assignment over their own
  clauses at the same time.

The clauses are data in memories, not logic. A new instance is therefore just
a reload: nothing has to be synthesised per problem. The number of IUs is a
parameter. This RTL implements the CU/IU architecture published as
"Hardware/Software Co-modeling of SAT Solver Based on Distributed Computing
Elements using SystemC". It uses that work's configuration: three IUs and a
9-bit variable index, so at most 512 variables.

```
   clock_cu          |                  clock_iu
                     |     iu_cmd (command bus, broadcast)
   +------+ cu_out +--------+ ------+-----------------+-----------------+
   |  CU  |------->|        |       v                 v                 v
   |      |        |        |   +-------+         +-------+         +-------+
   |      |        | cu_iu_ |   | IU 0  |         | IU 1  |         | IU 2  |
   |      |<-------| bridge |<--+-------+---------+-------+---------+-------+
   |      | cu_in  |        |   iu_rsp (return bus, oe-selected by iu_logic)
   |      |<-------|        |<-------- iu_logic <---- stsout cfgout busy (each IU)
   +------+ status +--------+   iu_stsin, iu_config_n, iu_all_idle
```

The CU and the IUs run on separate clocks, `clock_cu` and `clock_iu`, which
need not be related. `cu_iu_bridge` joins them (see below).

## Inside an implication unit

An IU (`implication_unit`) is made of five blocks:

| block | module | job |
|---|---|---|
| ADIB | `iu_adib` | Input buffer and address decoder. It registers every command word and steers it by type. Literals and CFG_DONE are taken only when they carry this IU's address. CLEAR and variable writes are broadcasts. |
| LCM | `iu_lcm` | Clause memory. Each clause has one row of `ROW_LITS` literal slots; a short clause leaves slots empty. A length table records how many slots each row uses. The row is read whole. |
| LVM | `iu_lvm` | Variable memory. It holds the value and status of every variable: free, assigned (by a decision) or implied. It has one write port for the CU, one for the IU's own implications, and one registered read port. CLEAR frees every variable in one cycle. |
| FSM | `iu_fsm` | Implication scheduler (described below). |
| OPB | `iu_opb` | Output buffer: a FIFO of implications plus a sticky conflict flag. `stsout` is high while either holds something. |

**The scan.** Any write to the LVM starts a pass over all clause rows:

1. Read the row, then read the LVM entry of each literal in turn.
2. Count the free literals and note whether any literal is already true.
3. At the end of the clause:
   * If it is not satisfied and has exactly **one** free literal, it is unit.
     The FSM writes that variable into the LVM as *implied*, with the value
     that makes the literal true, and pushes it into the OPB.
   * If it is not satisfied and has **no** free literal, it is a conflict.
     The OPB's conflict flag is set and the FSM stops until the next CLEAR.

A pass that implied something, or during which the CU wrote the LVM, is
followed by another pass. An IU therefore goes quiet only at a local fixpoint
of unit propagation.

A clause of `len` literals costs `len + 3` cycles:
* 1 cycle to read the row;
* `len` cycles of pipelined LVM reads;
* 1 cycle to evaluate the last literal;
* 1 cycle to decide.

The implication write lands before the next clause reads the LVM. A pass
therefore always sees its own earlier implications.

`busy` is high from the cycle a command enters the input buffer until the FSM
is idle with nothing pending.

## The control unit and its protocol

`control_unit` implements the CU's algorithm as one state machine.

**Loading and partitioning.** A host writes the instance as a flat list of
literals into the CU's instance memory (`ld_we`, `ld_addr`, `ld_data`, all on
`clock_cu`); a flag marks the last literal of each clause. The host then sets `num_vars` and `num_lits` and pulses `start`. The
CU deals clauses out round-robin: clause *i* goes to IU *i* mod N, one literal
per cycle. It then sends CFG_DONE to every IU, and each IU raises `cfgout`.
`config_n` falls once all IUs have raised it.

**Search loop.**

1. Broadcast CLEAR. This frees all variables and lets the IUs find unit
   clauses of the instance itself.
2. Wait `SETTLE` cycles, then until `iu_idle`.
3. If `cu_stsin` is high, read every IU in turn. Each implication is checked
   against the CU's variable database:
   * an implication that contradicts a known value is a conflict, and so is
     an IU's conflict flag;
   * a new implication is pushed on the trail.

   Then broadcast the new trail entries to all IUs, so that each IU sees what
   the others found, and go to step 2.
4. If `cu_stsin` is low, decide. The lowest-numbered free variable gets the
   value 0 and is broadcast. If no variable is free, the instance is SAT.
5. On a conflict, backtrack chronologically. Pop the trail back to the most
   recent decision that has not yet been flipped, and flip it. Then broadcast
   CLEAR and re-broadcast the whole remaining trail. If no decision is left to
   flip, the instance is UNSAT.

The CU re-sends the trail after CLEAR rather than un-assigning variables one by
one. The reason is that the IUs may hold implications the CU never recorded,
for example those found after the first conflict of a read round. Starting
from CLEAR resynchronises every IU exactly.

**Command word** (`cu_word_t`, 20 bits): `{cmd[2:0], addr[3:0], last, stat[1:0], value, var[8:0]}`.

| cmd | addressed? | meaning |
|---|---|---|
| LIT | yes | Append literal (`value` = negated, `last` = end of clause). |
| CFG_DONE | yes | Sub-instance complete; raise `cfgout`. |
| CLEAR | broadcast | All variables free; empty the OPB; clear the conflict flag; rescan. |
| VAR | broadcast | Write one variable's status (assigned/implied) and value. |
| READ | yes | Stream out the OPB. |

**Response** (`iu_word_t`, 12 bits): `{last, conflict, value, var[8:0]}`.
* Words with `last = 0` are implications.
* Each read ends with exactly one word with `last = 1`; its `conflict` bit is
  the IU's conflict flag.
* The first word appears two cycles after the IU has decoded READ.
* The IU drives `oe` with each word. `iu_logic` ORs the buses of all IUs
  together, gated by `oe`. Only the addressed IU ever drives, and an assertion
  checks this.

**Glue (`iu_logic`),** in the IU clock domain:
* `config_n = !(all cfgout)`
* `cu_stsin = any stsout`
* `iu_idle = !(any busy)`

## Crossing between the two clocks

`cu_iu_bridge` carries every signal between the CU and the IUs. Either
clock may be the faster one.

* **Commands.** The CU's words enter an 8-word dual-clock FIFO (Gray-coded
  pointers, `async_fifo`). On the IU side the oldest word is broadcast to
  every IU and removed in the same `clock_iu` cycle; when the FIFO is empty
  the IUs see NOP. `cmd_ready` is high while at least two entries are free.
  When it is low the CU freezes in its current state and sends NOP, except in
  its idle and done states. This keeps a slow IU clock from losing words.
* **Responses.** The return bus enters a 1024-word dual-clock FIFO. A read
  response is at most one word per variable plus the end word, and the IUs
  cannot be stalled, so this FIFO never fills. The CU sees the oldest word as
  `cu_in`/`cu_in_valid` and takes it with `cu_in_pop`.
* **Status.** `config_n` and `cu_stsin` are registered on the IU side and
  pass through two synchronising flip-flops.
* **Idle.** The IU side registers "all IUs idle and no command waiting". The
  CU sees `iu_idle` only when that signal, after the synchronisers, and "every
  command written has been read out" have both held for `IDLE_HOLD` CU
  cycles. A command still in flight, or a status change still inside a
  synchroniser, therefore never reads as "finished".

`rst_n` is asynchronous. `reset_sync` releases it separately in each clock
domain.

## Parameters and capacity

| parameter | default | where | meaning |
|---|---|---|---|
| `VAR_W` | 9 | `sat_pkg` | Variable index width: 512 variables (0..511). From the published model. |
| `N_IU` | 3 | top, CU, `iu_logic` | Number of IUs. From the published model. The command address field allows 16. |
| `ROWS` | 512 | top, CU, IU | Clause rows per IU. |
| `ROW_LITS` | 8 | top, CU, IU | Literal slots per row, i.e. the longest clause. |
| `INST_DEPTH` | 8192 | top, CU | Literals in the CU's instance memory. |
| `SETTLE` | 3 | CU | Cycles the CU waits after a command burst before it trusts `iu_idle`. |
| `CMD_AW` | 3 | `cu_iu_bridge` | The command FIFO holds 2^3 = 8 words. |
| `RSP_AW` | 10 | `cu_iu_bridge` | The response FIFO holds 1024 words. |
| `IDLE_HOLD` | 3 | `cu_iu_bridge` | CU cycles for which the idle conditions must hold. |
| `DEPTH` | 512 | `iu_opb` | OPB entries: one per variable. It cannot overflow, because a variable is implied at most once between CLEARs. |

The top reports `error` when a clause is longer than `ROW_LITS`, when there
are more than `N_IU*ROWS` clauses, or when a variable is `>= num_vars`.

At the defaults these benchmarks fit: hole6, the aim-50/aim-100 family,
par8-1-c and par16-1-c. par16-1-c has 317 variables and 1264 clauses, so it
needs about 422 rows per IU. The sizes come from the standard DIMACS
benchmark set. The par instances fit only if no clause has more than 8
literals.

## What is this design's own

The published architecture gives the block structure, the per-clause
free-literal counter rule, the status signals and the CU's algorithm. The
following are choices made here:

* **The clock crossing.** The architecture draws separate CU and IU clocks
  but does not say how they meet. The FIFOs, `cmd_ready` and the idle
  hand-off are this design's own.
* **The CU is a circuit.** The architecture intends firmware on a processor
  and allows a custom circuit instead. A processor-based CU would replace
  `control_unit` and drive the same bus.
* **`busy` / `iu_idle`.** The architecture lets the CU test the "implications
  present" status right after an assignment, but names no "finished" signal.
  Without one, "no implications" cannot be told from "not done yet", so
  `busy` was added.
* **Word formats, the command set and the read framing** are this design's
  own.
* **Clause memory layout.** Fixed-width rows with a length table. Longer
  clauses are not split across rows.
* **Search policies.** Round-robin partitioning; decide the lowest free
  variable, value 0 first; backtrack by CLEAR and replay.
* **IU conflicts.** An IU reports an all-false clause as a conflict flag, in
  addition to the CU's own check for two IUs implying opposite values.
* **No advanced search.** There is no clause learning and no non-chronological
  backtracking.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. To
run one with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl rtl/sat_pkg.sv tb/tb_sat_solver_top.sv \
    --top-module tb_sat_solver_top -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_iu_adib` | Decoding of random words, addressed and broadcast. |
| `tb_iu_lcm` | Row storage and read-back; refusal of clauses that are too long or do not fit. |
| `tb_iu_lvm` | Both write ports, port priority, clear, read latency, against a reference array. |
| `tb_iu_fsm` | A fixed chain with an exact cycle count: two passes of `len + 3` cycles per clause, plus one start cycle; 300 random instances against a reference fixpoint; hold after a conflict. |
| `tb_iu_opb` | FIFO order, end word and conflict flag, latency, `stsout`, clear. |
| `tb_implication_unit` | A whole IU driven only through its command bus: loading, `cfgout`, and implications or a conflict against a reference. |
| `tb_iu_logic` | The reductions and the return-bus selection. |
| `tb_control_unit` | The CU against behavioural IUs, with `cmd_ready` low at random. It checks the partition, CFG_DONE, the verdict against brute force and the model against the clauses. |
| `tb_cu_iu_bridge` | A 5 ns CU clock against a 13 ns IU clock. Commands under `cmd_ready` back-pressure and response bursts under random pops, both checked word for word and in order; `iu_idle` never high while a command is in flight; status crossing. |
| `tb_sat_solver_top` | End to end at the default size: unit chains, a conflict without decisions, pigeonhole 2 and 3, random 12-variable instances checked by brute force, a 50×80 instance and an instance that does not fit. It also checks that every mechanism occurs at least once: decisions, implications, IU conflicts, opposite implications from two IUs, backtracking, replay, repeated passes, reads, SAT, UNSAT, error, and the CU held by a full command FIFO. The CU clock has a 10 ns period and the IU clock 13 ns. |
| `tb_sat_workloads` | Benchmark-sized runs at the default size: hole6 (exact) and random 3-SAT with the aim-50/aim-100 sizes. |

`tb_sat_workloads` runs both clocks at 10 MHz with a quarter-period phase
offset. Results, in `clock_cu` cycles:

| instance | result | cycles | decisions | backtracks |
|---|---|---|---|---|
| hole6 | UNSAT | 5.53 M | 3245 | 3246 |
| random 50 vars × 80 clauses | SAT | about 12 k | | |
| random 50 × 100 | SAT | about 14 k | | |
| random 100 × 160 | SAT | about 41 k | | |

At 10 MHz, 5.53 M cycles is 0.55 s.

Each pass costs time proportional to the number of literals in an IU's share
of the clauses. Adding IUs therefore shortens every pass roughly in
proportion. The remaining cost is the sequential traffic on the shared
command bus: broadcasts, and the replays after each backtrack. The clock
crossing adds a few cycles to every wait for `iu_idle`.
