# Runahead threads for an SMT core

In a simultaneous-multithreading (SMT) core, all threads share the reorder
buffer, the issue queues, the physical registers and the functional units.
A thread whose oldest instruction is a load that missed in the L2 cache
cannot retire anything until memory answers, hundreds of cycles later. While
it waits it keeps everything it has allocated, and the other threads run
short of resources.

A *runahead thread* handles this by running ahead instead of waiting. When a
thread's oldest instruction is an L2-missing load, the thread saves its
architectural registers and marks the load's result as invalid. It then goes
on speculatively. Instructions that depend on the missing value are not
executed: they are marked invalid and retired at once. Independent
instructions execute, and their loads go to memory early, which turns them
into prefetches. Floating-point work is dropped, because addresses are
computed with integer arithmetic. So the thread holds few resources and
releases them quickly. When the blocking load's data returns, the thread
throws away everything it did in runahead mode, restores its registers and
re-executes from the load. Its later misses now tend to hit in the cache.

This repository has the logic that runahead threads add to an SMT core. It
does not include the core. The defaults describe a 4-thread, 8-wide core with
320 integer and 320 FP physical registers, 32 + 32 architectural registers
per thread, a 512-entry shared reorder buffer and a 400-cycle memory latency.

## Blocks

| module | role |
|---|---|
| `ra_pkg` | instruction classes (`iclass_e`), decode actions (`daction_e`), controller states (`ra_state_e`) |
| `runahead_ctrl` | one per thread: NORMAL → RUNAHEAD → RESTORE → NORMAL |
| `inv_vector` | one INV bit per integer physical register, per thread; marks and spreads invalidity |
| `arch_checkpoint` | per-thread copy of the 64 architectural registers; frozen during runahead, streamed back on exit |
| `ra_decode_filter` | decode-time treatment of runahead threads: FP drop, ignoring locks, invalidating critical sections |
| `icount_fetch` | ICOUNT fetch selection, unchanged for runahead threads |
| `preg_pool` | shared pool of physical registers of one register file; the top has one for INT and one for FP |
| `smtra_runahead_unit` | top: the above wired together, with ports towards the core |

## One runahead episode, cycle by cycle

For thread *t*:

1. **Entry (cycle E).** `head_*_i[t]` shows a load with `head_l2_miss_i`
   set, and its miss does not return in this same cycle. `enter_o[t]` then
   pulses, combinationally, and in this cycle:
   * the controller records the load's miss identifier and PC;
   * the INV bit of the load's physical destination is set at the edge;
   * the architectural checkpoint stops accepting this thread's retirements.
     It then holds exactly the state in front of the load.

   The core must pseudo-retire the load. From E+1, `ra_mode_o[t]` is high.
2. **Runahead (E+1 … F).** The core keeps fetching, decoding and issuing for
   the thread, with these differences:
   * `dec_action_o` says, per decoded instruction, whether to dispatch
     normally, dispatch it as invalid, drop it, or execute only its address
     (see below);
   * at issue, `iss_inv_o` flags lanes whose instruction reads an INV
     register or was marked invalid at decode. The core must not execute
     them and must send them straight to pseudo-retirement. Their
     destination's INV bit is set at the next edge, so a consumer issuing
     one cycle later is flagged too;
   * a valid result written back clears its register's INV bit;
   * a load that misses in L2 while the thread runs ahead is reported on
     `ra_miss_*`. Its destination becomes invalid, and the miss remains only
     as a prefetch;
   * retirements (`cm_*`) still arrive, but they no longer reach the
     checkpoint. The core must also keep them out of memory.
3. **Exit (cycle F).** `fill_valid_i` arrives carrying the blocking load's
   miss identifier, and `exit_o[t]` pulses. Fills of other misses are
   ignored. The core must flush the thread and redirect its fetch to
   `restart_pc_o[t]`, which is the load. At the same edge:
   * the thread's INV vector is cleared;
   * its ICOUNT counter is cleared;
   * its checkpoint restore is queued.
4. **Restore (F+1 …).** `restoring_o[t]` is high, and the ICOUNT selector
   does not fetch for the thread. The checkpoint streams 8 registers per
   cycle on `rs_*`, 8 cycles per thread, beginning at F+1 if the sequencer
   is idle. The core writes these values into the physical registers that
   its rename map assigns to the architectural ones. With the last beat the
   controller returns to NORMAL.

Several threads can be in runahead mode at once. Each has its own
controller, INV vector and checkpoint. Simultaneous restores are served one
thread after another, lowest thread number first, with no gap between them.

## Invalid bits

`inv_vector` holds one vector of 320 bits per thread, indexed by physical
register number. It has:
* 8 issue lanes with 2 sources each;
* 8 writeback lanes;
* a set of direct set ports. The top uses one per thread for the blocking
  load and one for runahead L2 misses;
* a per-thread clear.

When several of these touch the same bit at one edge, a thread clear beats a
set, and a set beats a writeback clear.

Only the integer registers carry INV bits. FP computation never executes in
runahead mode, so no FP value can be consumed there.

## Checkpoint

Only the architectural registers need to be saved, never the whole physical
register file. This design keeps them in a separate copy per thread that
every normal-mode commit updates. That is the same as copying the registers
at entry, but it needs no 64-register copy in the entry cycle.

The architectural index is 6 bits. Its top bit selects the FP file. When two
commit lanes of one cycle write the same register, the later lane wins.

## Decode filter

For a thread in runahead mode:

| class | outside a critical section | inside a critical section |
|---|---|---|
| `IC_FP` | `DA_DROP` | `DA_DROP` |
| `IC_ACQUIRE`, `IC_RELEASE` | `DA_DROP`, lock depth +1 / −1 | same |
| `IC_FP_LOAD`, `IC_FP_STORE` | `DA_NODEST`: address only, no FP register | `DA_INVALID` |
| everything else | `DA_NORMAL` | `DA_INVALID` |

A thread in normal mode always gets `DA_NORMAL`. Dropping means the
instruction takes no queue entry, register or unit.

Lock depth is tracked in two counters per thread:
* committed acquires and releases of normal mode keep a committed depth;
* on entry, that depth is copied into a speculative depth, which decoded
  acquires and releases then move.

A thread that enters runahead while holding a lock therefore starts inside
the critical section. Within a decode group, each lane sees the depth the
earlier lanes leave behind.

## Register pools

Each register file has a fixed total of 320 physical registers. Every
thread context always holds 32 of them for its architectural registers, so
with 4 threads 320 - 32 x 4 = 192 registers form one rename pool shared by
all threads. Nothing is reserved per thread.

`preg_pool` keeps a free bit vector. At reset, physical register
t x 32 + a holds architectural register a of thread t, and all others are
free. A rename group of one thread asks for up to 8 registers, one per lane.
The lanes get the lowest-numbered free registers in lane order. If too few
are free, the group gets none and must stall. The top couples the two
files: a group is renamed (`ren_ok_o`) only when both the INT and the FP
pool can serve it, and otherwise neither takes anything. Up to 8 registers
per file are returned per cycle on `rel_int_*` and `rel_fp_*`. A returned
register can be handed out from the next cycle on. `int_used_o` and
`fp_used_o` count the registers each thread holds.

This is where runahead helps the other threads. The invalid instructions of
a runahead thread pseudo-retire at once, so the core can return their
registers quickly, and the pool refills for everyone.

## Fetch

`icount_fetch` counts, per thread, the instructions fetched minus those that
left decode and the issue queues. Each cycle it grants the fetch slot to the
active, non-stalled thread with the smallest count. Ties go round robin,
starting after the last thread granted. One thread is granted per cycle and
fetches up to 8 instructions.

Runahead threads get no special priority. Their invalid and dropped
instructions leave the queues at once, so their counts stay low and they are
fetched often without hurting the other threads.

## Parameters of the top

| parameter | default | meaning |
|---|---|---|
| `THREADS` | 4 | hardware threads |
| `WIDTH` | 8 | decode, issue, writeback and commit lanes; also restore lanes |
| `NPREG` | 320 | physical registers per file (INT and FP) |
| `NAREG` | 32 | architectural registers per register file |
| `XLEN` | 64 | register width |
| `PCW` | 64 | PC width |
| `MIDW` | 6 | L2 miss identifier width |
| `CW` | 10 | ICOUNT counter width |

`WIDTH` must divide `2*NAREG`, which is checked by an elaboration
assertion.

## What is a choice of this design

The runahead mechanism itself follows the published scheme:
* entry on an L2-missing load at the head, with a checkpoint and an invalid
  destination;
* INV bits per physical register and per thread;
* pseudo-retirement of invalid instructions;
* rollback when the miss returns;
* FP instructions dropped, and locks and critical sections handled as
  above;
* ICOUNT used unchanged.

The following are this design's own decisions:
* the three-state controller, and the miss identifier used to recognise the
  blocking load's return;
* restarting at the load's own PC;
* no entry when the data returns in the same cycle;
* the commit-time checkpoint copy and its 8-per-cycle restore sequencer;
* holding fetch during the restore;
* `DA_NODEST` for FP memory operations;
* lock-depth counters to recognise critical sections;
* the free-vector register pool, lowest register first, and all-or-nothing
  allocation of a rename group across both files;
* port counts, priorities, widths and the asynchronous active-low reset.

Known limits:
* The speculative lock depth is not repaired after a branch misprediction
  inside runahead mode.
* Stores in runahead mode are only required not to reach memory. No
  runahead store forwarding is provided.
* The core itself is not here: ROB, rename map, queues, functional units,
  perceptron branch predictor, caches (64 KB L1s, 1 MB L2) and memory. The
  comment at the head of `rtl/smtra_runahead_unit.sv` lists what the core
  must do with each port.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with one line,
`TB_RESULT checks=N failures=M`, and has a watchdog.

* `tb_runahead_ctrl`: no entry on a hit, on a non-load, or when the data
  returns in the same cycle; unrelated fills are ignored; the runahead
  period equals the 400-cycle memory latency; restore handshake.
* `tb_inv_vector`: a directed propagation chain, then 3000 random cycles on
  all ports against a reference model.
* `tb_arch_checkpoint`: commits are ignored while frozen; the later lane
  wins a collision; two threads restore back to back; the data, order and
  done pulse of every beat are checked.
* `tb_ra_decode_filter`: every action in the table above, critical sections
  spanning decode groups, an inherited lock, and 4000 random cycles against a
  reference model.
* `tb_icount_fetch`: minimum selection, round robin, stall, inactive
  threads, flush, and 5000 random cycles against a reference model.
* `tb_preg_pool`: 192 free registers after reset, lowest registers in lane
  order, a stall when the pool is short, reuse in the next cycle, a held
  group, and 4000 random cycles against a reference model.
* `tb_smtra_runahead_unit`: the whole unit at its default size. The
  testbench models memory with a 400-cycle latency and a simple fetch
  stream. Three threads run ahead, two of them entering together. The test
  checks:
  * INV propagation and the decode actions;
  * that a runahead L2 miss invalidates its load;
  * that pseudo-retired junk never reaches the checkpoint;
  * that restored values equal the committed ones;
  * that no thread is fetched during its restore;
  * rename groups drawing on both register pools, including a stall when
    one pool is short.

  It counts each mechanism and fails if one never happened.
* `tb_smtra_workloads`: the whole unit at its default size under six thread
  mixes: ILP2, MIX2 and MEM2 with two threads running, and ILP4, MIX4 and MEM4
  with four. An ILP thread rarely has an L2-missing load at the head of its
  window. A memory-bound thread has one every 40 cycles on average, and a
  MIX workload pairs the two kinds. Everything else the core would do is
  random:
  * rename groups and register releases, which are faster for runahead
    threads;
  * decode groups, and issue lanes with dependences;
  * writebacks and commits;
  * prefetching misses in runahead mode.

  Every cycle the outputs are compared with reference models of the
  controllers, INV bits, decode table, register pools, ICOUNT and
  checkpoint. Per mix it prints the number of episodes, their mean length,
  the cycles with several threads running ahead, the prefetches and the
  rename stalls. It also prints the mean number of INT rename registers a
  thread holds per cycle in normal and in runahead mode, read from
  `int_used_o`. Those numbers come from the release rates the testbench
  plays, not from real programs.

Run one with Verilator 5, for example:

```
verilator --binary --timing --assert -y rtl rtl/ra_pkg.sv \
    tb/tb_smtra_runahead_unit.sv --top-module tb_smtra_runahead_unit
./obj_dir/Vtb_smtra_runahead_unit
```

For a single block, name its testbench instead; `-y rtl` finds the modules. All testbenches finish in seconds.
