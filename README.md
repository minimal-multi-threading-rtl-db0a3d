# Minimal Multi-Threading (MMT) additions for an SMT core

Threads of an SPMD program (one program, many threads or many instances with
different inputs) spend much of their time at the same PC, and many of the
instructions they run there compute the same value from the same inputs. An
ordinary SMT core fetches and executes each of them once per thread. MMT
changes a few parts of an SMT core so that:

* threads at the same PC fetch **once** for all of them,
* a fetched instruction executes **once** for every group of threads whose
  source registers are known to hold identical values, and
* threads that went down different branch paths are **brought back together**
  by noticing that one thread is now running code the other already ran, and
  letting the thread that is behind fetch first until they meet.

This repository holds synthesizable SystemVerilog for those additions: fetch
synchronisation, the split stage with its register sharing table and load
predictor, an ITID-aware rename stage, register merging at commit and the
load/store expansion for multi-execution programs. They are wired together in
`mmt_core`. The rest of the SMT core (trace cache, branch prediction, issue
queue, execution units, register file, reorder buffer, caches) is not here; it
connects through `mmt_core`'s ports, and the end-to-end testbench models it.

Default configuration: 4 threads, 32-entry fetch history buffers, a 4096-entry
load predictor, 50 architected and 256 physical registers, 64-bit data.

## The ITID

Every instruction in flight carries a 4-bit **ITID**, one bit per hardware
thread: the threads for which it is executed. A fetch produces one ITID (all
threads fetched together). The split stage turns it into 1 to 4 ITIDs that
partition it. Each of these is one uop, executed once, with its result
belonging to every thread in its ITID.

## Fetch synchronisation (`fetch_sync`, `fhb`)

Every pair of threads is in one of three modes:

| mode    | meaning |
|---------|---------|
| MERGE   | the two threads fetch together whenever they are at the same PC |
| DETECT  | they have split up; each records the targets of its taken branches in its own Fetch History Buffer (FHB) and searches the other's FHB for them |
| CATCHUP | a thread found its branch target in the other thread's FHB, so it is *behind* on the same path; it gets the highest fetch priority and the other the lowest |

Transitions:

1. MERGE → DETECT: the two threads fetched an instruction together and their
   next PCs differ (a branch went two ways).
2. DETECT → CATCHUP: one of them takes a branch whose target is in the other
   thread's FHB. The thread that took the branch is *behind*.
3. CATCHUP → DETECT: the behind thread takes a branch whose target is not in
   the ahead thread's FHB. The common path was too short, so the hit was false.
4. CATCHUP → MERGE: the two reach the same PC. Being in CATCHUP, they are
   then fetched together, and they stay merged if they continue to the same
   next PC. In DETECT, equal PCs alone do not merge two threads; only a
   history-buffer hit leads towards MERGE.

The core is built for four threads. The two-thread rules above apply to each
of the six pairs. The fetch group of a thread is all threads linked to it by
pairs that are at the same PC and not in DETECT, following links transitively.
One group is fetched per cycle. The candidate with the highest class is chosen
(behind, then normal, then ahead), with round-robin within a class. A thread
writes its taken-branch targets into its FHB while it is not merged with some
other active thread.

The FHB is a 32-entry CAM of 32-bit PCs. Writes go to a circular pointer, so
the oldest entry is replaced. It has one combinational search port per
thread, so all threads of a fetch group search in the same cycle.

The frontend answers a fetch in the same cycle. For `fetch_pc` it returns the
decoded fields. For each thread of `fetch_itid` it returns the next PC and
whether a taken branch led there (`fe_next_pc`, `fe_taken`). This keeps
branch prediction out of the MMT logic. A real frontend would register these
answers.

## Splitting: register sharing table, splitter, LVIP (`split_stage`, `rst`, `inst_split`, `lvip`)

The **register sharing table (RST)** has one row per architected register. A
row holds one bit per thread pair: 6 bits for 4 threads. A 1 means the two
threads' copies of the register are known to be identical.

For a fetched instruction, the rows of both sources are read and ANDed. A
group of threads can execute together when every pair inside it shares both
sources. The **splitter** filters the candidate groups down to the subsets of
the ITID. It then picks the largest group that shares, removes those threads
and repeats. This gives the fewest uops, at most 4. Among equally large groups
it picks the one with the lowest thread numbers. Single threads always
qualify.

The destination row is then updated. For each pair with at least one thread
in the fetched ITID, the bit becomes 1 if one resulting uop holds both
threads, and 0 otherwise. Pairs with no thread in the ITID are unchanged.

Initial state, on `init`:

* Multi-execution programs (`multi_exec=1`, separate address spaces) start
  with all registers identical.
* Multi-threaded programs start identical except the stack pointer
  (register 29 here). Each thread gets its own physical register for it, and
  its RST row is 0.

**Loads of multi-execution programs.** The same address in different address
spaces can hold different values, and the split decision cannot wait for the
data. The **load values identical predictor (LVIP)** stores the PCs of loads
that were mispredicted. It predicts "identical" for any PC it does not hold.
A load predicted "different" executes once per thread.

The LVIP is direct-mapped: 4096 entries indexed by PC bits [13:2], with the
full PC kept as the tag. Multi-threaded programs share memory, so their loads
are never checked.

The split stage is one pipeline register with a valid/ready handshake. An
assertion checks that the uop ITIDs always partition the fetched ITID.

## Rename (`rat`, `preg_state`)

There is one map table per thread. A uop reads its sources once, from the
lowest thread of its ITID. It gets one new physical register, which is written
into the map of **every** thread of its ITID.

`preg_state` keeps, for each of the 256 physical registers, the set of threads
that map to it. A register is free when that set is empty. When a uop
commits, each of its threads releases the register it previously mapped
(`cm_old_pdst`). All uops of one fetched instruction are renamed in the same
cycle, or none are.

## Register merging (`reg_merge`)

Threads that went down different paths often write the same value to the same
architected register. Their RST bits are still 0, which would stop later
instructions from merging. Register merging finds such cases at commit, for
instructions fetched in DETECT or CATCHUP mode.

It keeps a copy of the rename maps and, per thread and register, an
"idle" bit: no uncommitted instruction writes the register. The bit is cleared
at rename and set at commit. A committing uop qualifies when both hold:

* Its mapping is still valid: the destination still maps to its physical
  register in all its threads.
* No instruction waiting between the RST and rename writes the same register.

For each other thread whose register is idle, that thread's physical register
is read through a register-file read port (`rf_req`, `rf_gnt`) and compared
with the committed value. The read is skipped if the port is not granted.
Pairs that compare equal are set to 1 in the RST.

## Loads and stores (`lsq_split`)

For multi-execution programs, a shared load or store has the same address in
every thread but touches a different address space per thread. It is
therefore performed once per thread, one after another.

For a shared load predicted "identical", the values are compared. If they
differ, `rollback` pulses and the load's PC is written into the LVIP. From
then on that load is split.

Multi-threaded loads and stores are performed once. The loaded value goes to
all threads of the uop.

## The top, `mmt_core`, and its timing

```
fetch_sync -> decode register -> split_stage -> rat (+ preg_state) -> ren_* out
                                     ^                                  |
                  rst bits <---- reg_merge <------- cm_* (commit) <-----+
                  lvip update <- lsq_split <------- ls_* / mem_*
```

Fetch, split and rename each handle one instruction per cycle. An instruction
fetched in cycle n is offered on `ren_*` in cycle n+3 if nothing stalls. A
full decode register stalls fetch. Commits come in one uop per cycle on
`cm_*`.

When `rollback` pulses, the surrounding core must restart the program: assert
`init` without `lvip_clear` so that the LVIP keeps what it learned.
`ev_fetch`, `ev_merge_check` and `ev_merge_hit` report events for counting.

## Where this departs from the MMT proposal

* **Width.** The proposal evaluates an 8-wide out-of-order core. Here one
  fetched instruction (1–4 uops) per cycle goes through fetch, split and
  rename, and one uop commits per cycle.
* **Rollback.** The proposal only says a misprediction triggers a rollback.
  Recovery is left to the surrounding core. The testbench restarts the
  program.
* **RST storage.** The proposal also mentions an optimised table that stores
  all 11 multi-thread groups per register. This design stores the 6 pair bits
  and derives the groups with AND gates.
* **More than two threads.** Re-merging is described for two threads. It is
  applied here to every pair, and fetch groups are built by transitivity.
* **Own choices.** The following are not specified by the proposal:
  * the stack-pointer register number (29);
  * LVIP indexing and tag;
  * FHB replacement order;
  * tie-breaking in the splitter and fetch priority;
  * the handshakes;
  * one memory access in flight in `lsq_split`;
  * 64-bit data.
* **Not built.** The following parts of the baseline core are not here:
  * the instruction window (its ITID field is the `itid` carried with each
    uop);
  * the trace cache and branch prediction;
  * issue, the ROB, execution units and caches;
  * operating-system gang scheduling.

## Testbenches and how to simulate

Each block has a self-checking testbench in `tb/` that compares against an
independent model and prints `TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_fhb` | writes, wrap-around, clear, every search port against a reference list |
| `tb_fetch_sync` | 2 and 4 threads on a looping program whose branches differ between threads; every thread must see exactly its own PC sequence whatever groups form, the ahead thread must not fetch while the behind one is ready, all four transitions must occur and shared fetch must save fetches |
| `tb_rst` | random reads, updates and merges against a reference table, both initial states |
| `tb_inst_split` | random sharing patterns for every ITID; each step's group is compared with the largest sharing subset found by enumeration |
| `tb_lvip` | random lookups and updates against an associative-array model |
| `tb_split_stage` | the stage with output stalls against a reference table, predictor and splitter, in both workload kinds |
| `tb_rat`, `tb_preg_state` | maps, allocation and release against reference models |
| `tb_reg_merge` | commits, idle bits and read-port grants against a reference; merges must occur |
| `tb_lsq_split` | multi-execution expansion, multi-threaded pass-through, misprediction detection |
| `tb_mmt_core` | end to end, default parameters (below) |
| `tb_fhb_sweep` | the same end-to-end test with 8, 16, 32, 64 and 128-entry history buffers; prints shared-fetch share, CATCHUPs, false CATCHUPs and re-merges per size |

`tb_mmt_core` runs four threads through a loop program twice: first as a
multi-execution program (per-thread memories that differ above address 0x100),
then as a multi-threaded one (shared memory, private stack pointers).

* **Branches.** Two branches in the loop go different ways in different
  threads and iterations.
* **Modelled core.** The testbench models the frontend, an in-order engine
  with a 256-entry register file, and memory.
* **Checking.** Every committed uop is checked, for every thread of its ITID,
  against a separate per-thread instruction-set model: PC and result.
* **Rollback.** A load at 0x11c reads values that differ between instances.
  Its first shared execution must cause a rollback, followed by a restart.
* **Coverage.** The test fails unless each of these happens at least once:
  * divergence, CATCHUP, CATCHUP→DETECT and re-merge;
  * shared fetch, split and shared execution;
  * a merge check and a successful merge;
  * rollback;
  * per-thread store expansion;
  * a fetch stall.
* **Latency and savings.** It also checks the 3-cycle fetch-to-rename latency,
  and that fewer uops ran than thread-instructions.

With plain verilator, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    --top-module tb_mmt_core rtl/mmt_pkg.sv tb/tb_mmt_core.sv
./obj_dir/Vtb_mmt_core
```

Replace `tb_mmt_core` by any testbench name. Helper modules
(`tb_fetch_sync_run`, `tb_fhb_sweep_run`) are found through `-y tb`; the two
end-to-end testbenches share `tb/tb_mmt_common.svh` through `-Itb`. All testbenches finish in
seconds.

To change the configuration, override the parameters of `mmt_core`:

* `NT` (threads);
* `FHB_ENTRIES`;
* `LVIP_ENTRIES` (a power of two);
* `NUM_AREGS` and `NUM_PREGS`;
* `XLEN`;
* `SP_REG`.
