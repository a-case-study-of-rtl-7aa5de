# PLIC: a partitioned loop instruction cache for multitasking embedded processors

Most instruction fetches of an embedded program come from a few small loops.
Each of those fetches reads the L1 instruction cache, which costs far more
energy than a read from a tiny buffer. When several tasks share one processor,
they also evict each other's lines from the shared I-cache at every context
switch. The partitioned loop instruction cache (PLIC) fixes both problems. It
is a small loop cache in the ID stage that holds the encoded instructions of
the running loop. The first iteration of a loop is copied into the PLIC while
it runs from the I-cache. From the second iteration on, instructions come only
from the PLIC and instruction fetch is stalled. The PLIC's two tables are
split into one partition per task, so a task's cached loop survives the other
tasks running in between. A small task state table saves the running task's
position in its loop at a context switch and restores it when the task comes
back.

This repository holds synthesizable SystemVerilog for the PLIC and for the
five-task evaluation platform around it: a round-robin task scheduler, the
switching logic and the shared 8 KB I-cache. It also holds self-checking
testbenches, with behavioural models of the processor cores and program
memories. The design follows the PLIC of *"A Case Study of Energy-Efficient
Loop Instruction Cache Design for Embedded Multitasking Systems"*. That
publication gives the block structure, the table sizes and the context-switch
procedure, but it leaves the loop-control details to earlier work. Those
details are this implementation's own and are listed under
[Departures and own choices](#departures-and-own-choices).

## Structure

```
                 From OS / task scheduler: task ID, switch request
                               |
   +---------------------------v----------------------------------------------+
   | plic                                                                     |
   |  plic_task_state_table  task ID -> partition ID, saved L-PC/loop state   |
   |        | partition descriptor (table bases and sizes)                    |
   |  plic_index_table       128 x (branch flag + 64-bit instruction)         |
   |  plic_branch_target_table 32 x (branch L-PC, target L-PC)                |
   |  plic_branch_addr_logic base addr, mem-target addr, subtractor           |
   |  plic_local_pc          L-PC register, +1 adder, next-L-PC multiplexer    |
   |  plic_controller        NONLOOP / FIRST / FOLLOW, IF stall, table loads  |
   |  ID multiplexer:        IF instruction  or  index table line  -> ID      |
   +--------------------------------------------------------------------------+

   plic_platform (top)
     task_scheduler --- core_en[4:0], cs_req/cs_task ---> plic, switch_fabric
     switch_fabric:  running core  <-> plic
                     running core   -> icache (fetch, gated by IF stall)
                     icache         -> task memory named by the address
     icache: 8 KB, 2-way, 32-byte lines, 1-cycle hit
     cores P0..P4 and memories M0..M4: outside the RTL, on the top's ports
```

| File | What it is |
|---|---|
| `rtl/plic_pkg.sv` | sizes, `loop_op_e`, `plic_mode_e`, partition and interface structs |
| `rtl/plic.sv` | the PLIC: the six parts below plus the ID multiplexer |
| `rtl/plic_controller.sv` | loop state machine and context-switch save/restore |
| `rtl/plic_task_state_table.sv` | task state table (TST) and partition descriptors |
| `rtl/plic_index_table.sv` | PLIC index table (PIT), tagless, one instruction per line |
| `rtl/plic_branch_target_table.sv` | PLIC branch target table (PBTT), associative within a partition |
| `rtl/plic_branch_addr_logic.sv` | turns absolute branch targets into local PCs |
| `rtl/plic_local_pc.sv` | local PC (L-PC) register and next-value multiplexer |
| `rtl/icache.sv` | shared L1 I-cache |
| `rtl/task_scheduler.sv` | round-robin scheduler, one core enabled at a time |
| `rtl/switch_fabric.sv` | the three scheduler-controlled switches of the platform |
| `rtl/plic_platform.sv` | top level |

## Local PCs and partitions

Inside a loop the PLIC does not use memory addresses. It counts a **local
PC** (L-PC), which is 6 bits wide. L-PC 0 is the first instruction after the
`slp` (start loop) instruction, and the L-PC goes up by one per instruction.
A loop can therefore hold at most 64 instructions.

The operating system gives each task a partition when the program starts. It
writes two things, through the `cfg_*` and `pmap_*` ports:

- one task state table entry per task: the task ID and a partition ID;
- one descriptor per partition ID: the base and size of the partition in the
  index table, and the base and size in the branch target table.

Partition sizes come from static loop profiling before run time. The hardware
never resizes them. A task's instruction at L-PC *n* sits in index-table line
`pit_base + n`. Its branch entries sit in branch-target entries
`[pbtt_base, pbtt_base + pbtt_size)`. A task with no entry in the task state
table never uses the PLIC. Its loops simply run from the I-cache.

## The life of a loop

The controller keeps each task in one of three operation states.

**NONLOOP.** Instructions flow from IF (the I-cache) to ID, and the PLIC is
idle. When ID takes an `slp` and the task owns a partition, the controller
does four things:

- it loads the base register with the address after the `slp`;
- it clears the task's branch-target partition;
- it sets the L-PC to 0;
- it enters FIRST.

**FIRST** (first iteration). Every instruction that passes from IF to ID is
also written into the index table at the current L-PC. A loop branch sets the
line's branch flag. The loop branches are `elp` (end of loop, the conditional
branch back to the start), `brb` (backward) and `brf` (forward). For a loop
branch, the memory-target register takes the decoded target address. One
cycle later the subtractor's output, `(target − base) / 8`, is written into
the branch target table together with the branch's L-PC. Until EX reports the
outcome, IF is stalled and ID gets nothing. The L-PC then moves to the target
(taken) or to L-PC + 1 (not taken). The core redirects its own fetch.

- A taken `elp` ends the first iteration. The task enters FOLLOW.
- An untaken `elp` means the loop ran only once. The task returns to NONLOOP.
- A taken `brf` skips index-table lines that have not been filled. The PLIC
  then runs one more fill iteration before it trusts the table ("refill").
- A loop that needs more lines than its partition has, or more branch entries,
  or that has a branch target outside the loop, is abandoned ("abort"). It
  runs from the I-cache until the next `slp`.

**FOLLOW** (second to last iteration). IF is stalled and the I-cache is not
read. ID receives index-table line `pit_base + L-PC`, one per cycle. When a
flagged line is taken, the PLIC waits one cycle for the EX outcome. A taken
branch loads the L-PC from the branch target table entry that matches the
branch's L-PC. An untaken `elp` ends the loop. The PLIC pulses `resume` with
`resume_pc = base + 8·(L-PC + 1)`, the address after the `elp`, and fetch
restarts there. If a taken branch finds no table entry, the loop is left at
the branch's own address, so the core fetches the branch again. That cannot
happen after a complete fill. An assertion checks that no EX outcome arrives
in FOLLOW unless a branch is pending.

Timing summary for the running core:

| Situation | Cycles per instruction to ID |
|---|---|
| FOLLOW, non-branch line | 1 |
| FOLLOW, loop branch | 2 (one wait for EX) |
| FIRST, loop branch | ID blocked from the branch until the cycle after its outcome, at least 1 extra |
| NONLOOP | whatever IF delivers |

## Context switches

The task scheduler raises `cs_req` with the ID of the preempting task. The
PLIC acknowledges (`cs_ack`) in the first cycle in which no loop branch waits
for its outcome. Meanwhile it blocks ID and stalls IF. In the acknowledge
cycle:

- The preempted task's operation state, L-PC, loop base address and refill
  flag are written into its task state table entry.
  - *Case 1*: the task was in FIRST or FOLLOW, so a real loop position is
    saved.
  - *Case 2*: the task was in NONLOOP, so only that state is saved.
- The preempting task's entry is read. Its partition descriptor, state, L-PC
  and base are restored.
- The scheduler moves the clock enable to the preempting core.

A task switched out in the middle of a cached loop resumes in FOLLOW. Its next
instruction comes from the PLIC, because no other task can have overwritten
its partition. This isolation is what the partitioning buys.

## The evaluation platform

The platform emulates a multitasking uniprocessor with one core and one
program memory per task (five of each). Exactly one core has its clock enable
(`core_en`) at a time. Every `interval` cycles (5000, 10000 or 20000 in the
reference experiments) the scheduler switches to the next task in round-robin
order. `switch_fabric` joins the running core to the PLIC and the I-cache,
and it returns each I-cache answer to the core that asked for it. It also
drops a fetch request while the PLIC stalls IF, so an instruction supplied by
the PLIC costs no I-cache access.

The I-cache address is `{task, pc}`: 3 bits of task and 26 bits of byte
address, since each memory is 64 MB. The five programs are therefore distinct
and compete for the same sets. A miss refills a whole 32-byte line from the
memory named by the task field.

### Core interface

The cores are not part of this RTL. A core connects through `plic_pkg`
structs. It must behave as follows:

- offer each fetched instruction on `if_valid`/`if_instr`/`if_pc` until ID
  takes it;
- take the instruction on `id_instr` whenever `id_valid && id_ready`;
- return the decode of that same instruction combinationally on
  `dec_op`/`dec_target`: one of `OP_SLP`, `OP_ELP`, `OP_BRB`, `OP_BRF`, or
  `OP_OTHER`, plus the target address;
- report the outcome of a loop branch on `ex_valid`/`ex_taken`, in a later
  cycle;
- not fetch while `if_stall` is high;
- restart fetch at `resume_pc` when `resume` pulses.

Each core needs a decoder that recognises the four loop instructions. Their
binary encoding is left to the instruction set.

## Parameters

| Parameter | Default | Reference value | Where |
|---|---|---|---|
| `PIT_DEPTH` × width | 128 × (1+64) | 128 × (1+64) bits | `plic_pkg` |
| `PBTT_DEPTH` × width | 32 × (6+6) + valid | 32 × (6+6) bits | `plic_pkg` |
| `TST_DEPTH` | 8 | 8 entries | `plic_pkg` |
| TST fields | 3 + 3 + 6 + state 2 + base 26 + flag 1 | 3 + 3 + 6 bits | `loop_state_t` |
| `INSTR_W` | 64 | 64 | `plic_pkg` |
| `PC_W` | 26 | 64 MB memories | `plic_pkg` |
| I-cache | 8 KB, 2-way, 32 B lines, 1-cycle hit | same | `icache` |
| `N` cores/tasks | 5 | 5 | `plic_platform` |
| switch interval | run-time input | 5K/10K/20K cycles | `task_scheduler` |

Every default is the reference value. Nothing is scaled down.

## Departures and own choices

The reference design describes the five PLIC components, the table sizes, the
three operation states and the two context-switch cases. It refers to earlier
work for how loops are controlled. This implementation adds or chooses the
following:

- **Loop instruction semantics.** `slp` marks the start of a loop, `elp`
  closes it, and `brb`/`brf` are branches inside it. The core decodes them.
  Other control transfers inside a cached loop (calls, returns, ordinary
  branches) are not supported. A compiler must express in-loop branches as
  `brb`/`brf`.
- **Where branches are kept.** A loop branch is stored in the index table
  like any other instruction, with its flag set. The branch target table
  keeps only the branch's L-PC and its target L-PC. The reference text says
  the branch target table holds the flow-control instructions. But its entry
  is only 6+6 bits wide, too narrow for a 64-bit instruction, so this design
  follows the table widths.
- **Wait for the branch outcome.** Every loop branch is resolved before the
  next instruction enters ID. This avoids speculation inside the PLIC and
  costs one cycle per loop branch.
- **Refill and abort rules** (see above). The index table has no per-line
  valid bits. So a fill pass in which a `brf` was taken is always followed by
  another fill pass. A loop whose `brf` is taken in every iteration therefore
  never reaches FOLLOW. It still runs correctly, from the I-cache.
- **Extra saved state.** The task state table also saves the operation state,
  the loop base address and the refill flag. The reference entry width
  (3+3+6 bits) counts only task ID, partition ID and L-PC. The operation state
  must be saved according to the context-switch procedure. The base is needed
  to finish a loop that was interrupted in its first iteration.
- **Partition descriptors.** The mapping from partition ID to table lines is
  held in 8 descriptor registers beside the task state table.
- **Valid bits.** Each branch target table entry has a valid bit.
- **Handshakes.** The switch handshake `cs_req`/`cs_ack`, the `resume`
  output, `resume_pc` and the core interface above are this design's own.
- **I-cache details.** LRU replacement, blocking whole-line refill, and reset
  of all valid bits.
- **Reset.** An asynchronous active-low reset, `rst_n`, is used everywhere.
  The index table and the cache data arrays are not reset.
- **Clock gating.** The core clock enable is an output. The gating cell
  belongs to the core side.

Not included: the processor cores (a 6-stage PISA pipeline in the reference
platform), the SDRAM memories and the operating system. Energy per access
depends on the technology and cannot be derived from RTL. The testbench uses
56.3 / 227.3 / 6332.5 pJ per PLIC / I-cache / memory access, taken from
circuit-level estimates for a 65 nm process.

## Verification

Each block has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_plic_index_table` | all 128 lines against a reference array, random rewrites |
| `tb_plic_branch_target_table` | insertion, overwrite, full, lookup, partition isolation, clear, random fill against a model |
| `tb_plic_branch_addr_logic` | target L-PC, in-loop flag and resume address against arithmetic |
| `tb_plic_local_pc` | 2000 random cycles against a reference register |
| `tb_plic_task_state_table` | configuration, save, lookup by task ID, reconfiguration |
| `tb_plic` | one core through three partition set-ups: fill, refill, FOLLOW, exit, both aborts; one instruction per cycle from the PLIC; no fetch while stalled |
| `tb_plic_controller` | two cores and 150 randomly timed switches: case 1 and case 2, no switch while a branch waits |
| `tb_icache` | 3000 random fetches against an LRU model, hit latency 1, miss latency 32, one refill per miss |
| `tb_task_scheduler` | round-robin order, slice length, enables, switch count |
| `tb_switch_fabric` | every routing rule under random stimulus |
| `tb_plic_platform` | whole platform at default size (see below) |

The behavioural core model (`tb/tb_core_model.sv`) keeps its own
architectural PC. It checks every instruction that reaches ID against the
program, whether the instruction came from the I-cache or from the PLIC, and
it checks every resume address. Any wrong line, wrong L-PC or badly restored
state therefore fails a test. The test programs (`tb/tb_prog_pkg.sv`) are
computed from (task, address). Each has two loops: a 12-instruction loop with
a `brf` and a `brb`, and a 40-instruction loop.

`tb_plic_platform` runs all 15 configurations of the reference experiments:
switch intervals of 5000, 10000 and 20000 cycles, each started from each of
the five tasks. Each configuration runs for 10 time slices, once without
partitions (the baseline; the PLIC stays idle) and once with them. The
partitions are set so that some loops do not fit. Every mechanism must occur
at least once: fill, refill, cached loop, exit, abort, case 1 and case 2
switches, and I-cache misses. Counted per executed instruction on these
synthetic programs, the PLIC removes about 50% of I-cache accesses and 31% of
I-cache misses. The energy model gives about 66% of baseline energy. The
reference experiments report 50.8% fewer accesses and 63.5% of baseline energy
on real benchmarks. The similarity is partly a property of the synthetic
programs, so it is not evidence of matching those results.

| Interval | I-cache accesses | I-cache misses | Energy vs. baseline |
|---|---|---|---|
| 5000 | −50.6% | −31.0% | 65.9% |
| 10000 | −50.4% | −30.9% | 65.6% |
| 20000 | −50.3% | −30.8% | 65.5% |

As in the reference experiments, the figures do not depend on which task
starts. Each test program is about 530 bytes. Because the task field lies
above the index bits, all five programs compete for the same 17 cache sets.
The misses therefore come from interference between tasks. The PLIC removes
part of them by keeping loop fetches away from the I-cache.

### Running a testbench

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl rtl/plic_pkg.sv tb/tb_prog_pkg.sv \
  rtl/plic_index_table.sv rtl/plic_branch_target_table.sv rtl/plic_branch_addr_logic.sv \
  rtl/plic_local_pc.sv rtl/plic_task_state_table.sv rtl/plic_controller.sv rtl/plic.sv \
  rtl/icache.sv rtl/task_scheduler.sv rtl/switch_fabric.sv rtl/plic_platform.sv \
  tb/tb_core_model.sv tb/tb_mem_model.sv tb/tb_plic_platform.sv \
  --top-module tb_plic_platform -Mdir obj
./obj/Vtb_plic_platform
```

The whole-platform run takes a few seconds. For a unit testbench, list
`rtl/plic_pkg.sv`, the block's file and `tb/tb_<block>.sv`. Add
`tb/tb_prog_pkg.sv`, `tb/tb_core_model.sv` and the PLIC files for
`tb_plic`/`tb_plic_controller`. The testbenches initialise everything they
read, so they run on a two-state simulator.
