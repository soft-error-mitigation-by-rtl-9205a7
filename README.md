# LBRA: soft-error protection from a master thread, a slave thread and a log

A soft error can flip a bit anywhere in a core's pipeline or L1 cache. LBRA
(Log-Based Redundant Architecture) catches such errors by running every
thread twice. Recovery reuses the machinery of an eager transactional memory
(LogTM-SE). The **master** copy runs ahead at full speed, and its stores go
straight to memory. It splits its instruction stream into
*pseudo-transactions* (**p-XACTs**) of about 50 memory instructions. The
**slave** copy re-executes each p-XACT later, and its inputs are replayed
from a log that the master wrote.

Each thread hashes its results into a CRC-32 **verification signature**.
When the two signatures of a p-XACT match, the p-XACT is **consolidated**:
it is known to be correct. When they differ, the hardware undoes the core's
unverified p-XACTs from the log. It also makes every other core that
consumed their data undo its own, and then both threads resume from the
last good register checkpoint.

Three features keep this cheap:

- **The master never waits for the slave in the common case.** Up to five
  p-XACTs can be committed but not yet verified. The master only stalls
  when all five contexts, or the log, are full.
- **Memory is updated in place and shared before verification.** Producer
  and consumer relations between p-XACTs of different cores are recorded,
  so that consolidation happens in dependence order and a rollback
  follows the data.
- **The slave never touches coherent memory.** Its loads read the values
  the master logged, so both copies see the same inputs even under data
  races. In the decoupled configuration the slave sits on another core. It
  fetches the log through a three-block prefetching **log buffer**, using
  non-coherent block reads.

This repository contains synthesizable SystemVerilog for the LBRA hardware of
one node (one master/slave pair). It also contains self-checking
testbenches, including an end-to-end environment that plays the rest of the
system. The pipelines, the caches, the coherence protocol and the network
are not included. Each exchange with them is a port of the top module
`lbra_node`.

## Parts of the design

| File | Part |
|---|---|
| `rtl/lbra_pkg.sv` | constants, p-XACT id / core / dependence types, event struct |
| `rtl/pxact_table.sv` | the in-flight p-XACT contexts; commit, forced commit, forward requests |
| `rtl/crc32_sig.sv` | verification signature (one per context plus one for the slave) |
| `rtl/dbs_signature.sv` | read and write signatures (Bloom filters), two per context |
| `rtl/circular_log.sv` | Master Log Pointer, log writes, wrap, free space, full |
| `rtl/slave_unit.sv` | Log Slave Pointer, load redirection, store address check, slave signature |
| `rtl/log_buffer.sv` | slave-side FIFO of log blocks with next-block prefetch |
| `rtl/consolidation_unit.sv` | signature compare after the verification latency, in-order consolidation, look-ups |
| `rtl/consolidated_ids.sv` | last consolidated p-XACT id of every core |
| `rtl/recovery_controller.sv` | youngest-first rollback, rollback requests and acknowledgements |
| `rtl/watchdog_timer.sv` | recovery when nothing consolidates for too long |
| `rtl/checkpoint_regs.sv` | register checkpoint taken at consolidation |
| `rtl/lockstep_checker.sv` | drain and lockstep mode around I/O |
| `rtl/lbra_node.sv` | top: everything above wired together |

## The life of a p-XACT

1. **Open.** The first instruction the master commits after the previous
   commit opens a p-XACT in a free context. The context records:
   - a 4-bit id (ids wrap modulo 16);
   - the Begin PC;
   - the log position;
   - a cleared verification signature.

   If no context is free, the master stalls (`m_stall`).
2. **Execute.** Every committed instruction's 64-bit result goes into the
   context's CRC-32. Memory instructions also do two more things:
   - They are logged. A load writes one word, the loaded value. A store
     writes two words: its address, then the value it overwrites.
   - Their block address goes into the read or write signature.

   The log is a ring in the master's cache, and the Master Log Pointer
   wraps at its end. If fewer than three words are free, the master
   stalls.
3. **Commit.** The p-XACT closes when it holds `PXACT_SIZE_P` (50) memory
   instructions. Closing freezes the signature and the instruction count.
   Two other events also close it: a forced commit (see *Dependences*) and
   the drain before I/O.
4. **Slave execution.** The slave works on the oldest p-XACT, and only once
   that p-XACT is committed.
   - Each slave load is served from the log at the Log Slave Pointer.
     `s_ld_data` returns in the same cycle when the word is in the log
     buffer. Otherwise `s_ready` stays low until the block arrives.
   - Each slave store reads its two-word entry. The logged address must
     equal the slave's own store address; a mismatch is an `addr_fault`.
   - The slave hashes its own results.
   - It knows where the p-XACT ends from the committed instruction count.
5. **Verification.** `VERIF_LAT_P` (10) cycles after the slave's last
   instruction, the two signatures have been compared.
   - If they differ, a fault is raised in that cycle.
   - If they match and every producer this p-XACT depends on is already
     consolidated, the p-XACT is consolidated in that same cycle.
   - If they match but some producer is not yet consolidated, the p-XACT
     waits for it (see *Dependences*).
6. **Consolidation.** Consolidation has four effects:
   - the context is freed;
   - the log space before its end is released;
   - its id becomes this core's last consolidated id;
   - the slave's registers are copied into the checkpoint.

## Input replication: the log and the log buffer

The slave must see exactly the values the master saw, so nothing reaches
the slave except through the log.

`circular_log` produces word writes (`lw_*`) toward the master's L1. The
environment turns these into ordinary cache writes. `log_buffer` holds three
64-byte blocks of the log on the slave side:

- **Misses.** A slave read that misses asks for the block with a
  non-coherent read (`lb_req_*`).
- **Prefetch.** Whenever an entry is free, the buffer also requests the
  next block in log order.
- **Consumed blocks.** A block is dropped as soon as the Log Slave Pointer
  has moved past it.

The master may still be writing the block the slave will need next. The
buffer therefore handles stale data in two ways:

- It never requests a block beyond the end of the youngest committed p-XACT
  (`commit_ptr`).
- A block fetched while only partly written is kept only up to the part
  that was valid. If the slave later needs a word past that point, the
  block is dropped and fetched again (`ev.stale_flush`).

Both rules are this design's own. Without them, the slave could read log
words the master had not written yet.

## Dependences between cores and in-order consolidation

Memory is shared before verification. If p-XACT *q* of another core read a
block written by our p-XACT *p*, then *q* must not be consolidated before
*p*. If *p* turns out to be faulty, *q* must be undone as well.

**Tracking (`pxact_table`).** Dependences are recorded in two registers per
context, each with one entry per core (16 entries of a valid bit and a
4-bit id):

- **Producer register.** A forward request (`fwd_*`) from another core is
  tested against the write signatures of all active p-XACTs. On a hit,
  the node answers with the producing p-XACT's id (`fwd_prod_id`), and
  that context's Producer register notes the requester's core and
  p-XACT id.
- **Consumer register.** A data response (`cresp_*`) that was produced by
  an in-flight p-XACT elsewhere fills the Consumer register of the open
  p-XACT. The response also carries the supplier's last consolidated id,
  which updates `consolidated_ids`.

**Cycle avoidance.** A p-XACT is never both a producer and a consumer, so
the dependence graph stays acyclic and consolidation cannot deadlock:

- When the open p-XACT is already a producer and receives produced data, it
  is force-committed. The dependence goes into the next p-XACT.
- When the open p-XACT is a consumer and a forward request hits it, it is
  force-committed. The node answers with the id of the next p-XACT, which
  becomes the producer.

**Consolidation (`consolidation_unit`, `consolidated_ids`).** After the
signature compare, the Consumer register of the oldest p-XACT is checked
against the Consolidated-IDs register. An entry is satisfied when the
producer id is not younger than that core's last consolidated id. For
cores still pending, the unit sends look-up requests (`lk_req_*`),
re-asking a core every `RETRY_P` cycles. The answers (`lk_resp_*`) update
the register until everything is satisfied.

## Recovery

This is the most involved part. A recovery has two triggers:

- A **local fault**: a signature mismatch, a store address mismatch or a
  watchdog time-out.
- A **rollback request** (`rb_in_*`) from another core, for one of this
  node's in-flight p-XACTs.

`recovery_controller` then undoes **every** in-flight p-XACT of the core,
youngest first. For each p-XACT:

1. If its Producer register names consumers, send each one a rollback
   request (`rb_out_*`, one per cycle) for the consumer p-XACT recorded.
   Then wait until all of them have acknowledged (`ack_in_*`).
2. Ask the software undo handler to undo the p-XACT's log range
   (`undo_req`, `undo_from`, `undo_to` as byte addresses, ended by
   `undo_done`). The handler walks the store entries backwards and writes
   the old values back.
3. Remove the context and rewind the Master Log Pointer to the p-XACT's
   start. If another core had asked for this p-XACT to be rolled back,
   acknowledge that core now (`ack_out_*`).

When no context is left, the controller sends any acknowledgements still
owed. It then writes the register checkpoint back (`restore_valid`,
`restore_regs` one cycle later). It also reports the Begin PC of the oldest
undone p-XACT (`resume_valid`, `resume_pc`), which is where both threads
restart.

Ordering consumers before producers is what keeps memory consistent. A
consumer core has finished undoing everything that saw the faulty data
before the producer undoes its own stores. The dependence graph is acyclic,
so these waits always end.

While a recovery runs, the node does the following:

- the master is stalled;
- the slave is held and its partial p-XACT abandoned;
- the log buffer is flushed;
- the consolidation unit is cancelled.

**Watchdog.** If the slave dies, no consolidation ever happens and the
master would wait forever. `watchdog_timer` counts cycles during which
p-XACTs are in flight and none is consolidated. After `WDT_LIMIT_P` such
cycles it raises a local fault.

## I/O: drain and lockstep

The effects of I/O cannot be undone, so I/O runs only on verified state.
`io_req` puts the node into **drain**:

- the open p-XACT is committed;
- the master takes nothing new;
- the slave finishes.

When nothing is left in flight, the node enters **lockstep**. Master and
slave present the same instruction in the same cycle (`m_valid` and
`s_valid` together). If the two results are equal, the instruction commits
(`ls_commit`). If they differ, both re-execute it (`ev.ls_reissue`).
`io_done` returns the node to normal mode and takes a new checkpoint.

## Top-level interface (`lbra_node`)

All handshakes are single-cycle valid pulses, with a ready where the other
side may refuse.

| Group | Signals | Meaning |
|---|---|---|
| control | `init`, `my_core`, `cfg_log_base` | start of redundant execution, core number, log region |
| master commit | `m_valid m_kind m_pc m_addr m_wdata m_res` / `m_stall m_cur_id` | one instruction per cycle; `m_wdata` is the loaded value or the old value of a store |
| log writes | `lw_valid[1:0] lw_addr lw_data` | to the master's L1 |
| slave commit | `s_valid s_kind s_addr s_res` / `s_ready s_ld_data` | valid/ready; load data comes back in the accepting cycle |
| log block reads | `lb_req_*`, `lb_resp_*` | 64-byte non-coherent reads, answered in order |
| coherence | `fwd_*`, `my_cons`, `cresp_*` | forward request checks, data-response fields |
| look-ups | `lk_req_*`, `lk_resp_*` | last consolidated id of a producer core |
| rollback | `rb_in_*`, `rb_out_*`, `ack_in_*`, `ack_out_*` | global recovery messages |
| undo | `undo_req undo_from undo_to` / `undo_done` | software undo handler |
| checkpoint | `s_arch_regs` / `restore_* resume_* rec_busy` | register state in and out |
| I/O | `io_req io_done` / `lockstep ls_commit` | |
| status | `n_inflight`, `ev` | p-XACTs in flight; one pulse per mechanism event |

Parameters and their defaults:

| Parameter | Default | Origin |
|---|---|---|
| `NPX_P` | 5 | in-flight p-XACTs, best configuration in the evaluation |
| `PXACT_SIZE_P` | 50 | memory instructions per p-XACT |
| `SIG_BITS_P` | 2048 | read/write signature bits (64 to 2048 were evaluated) |
| `LOGBUF_P` | 3 | log buffer blocks |
| `VERIF_LAT_P` | 10 | cycles from the slave's last instruction to consolidation |
| `LOG_WORDS_P` | 1024 | log ring, 4 KB (own choice) |
| `WDT_LIMIT_P` | 100000 | watchdog limit (own choice) |
| `NREGS_P`, `XLEN_P` | 32, 64 | checkpointed register file (own choice) |
| `NCORES` (package) | 16 | cores tracked by the dependence registers |

## Where this design departs from, or adds to, the published description

- **Signature and checkpoint sizes.** The verification signature is 32
  bits (CRC-32), and the checkpoint is a full 32 x 64-bit register file.
  The published storage table lists 128 bytes for the signature and
  4 bytes for the checkpoint. Those numbers contradict the text, which
  calls the signature CRC-32 and calls the checkpoint one of the two
  largest structures.
- **CRC polynomial.** The reflected IEEE 802.3 polynomial is assumed.
- **Read/write signatures.** The hash scheme (two bits per block address
  from two address fields) is assumed.
- **Recovery scope.** Every recovery undoes all in-flight p-XACTs of the
  core, even when a rollback request names a younger one. Only then is the
  checkpoint, taken at the last consolidation, valid.
- **Checkpoint timing.** The checkpoint is taken from the slave's registers
  at every consolidation, at `init` and at the end of lockstep. When it is
  taken is not specified.
- **Store check.** The slave checks store addresses against the log. Load
  addresses and store values are not checked; faults there are caught by
  the signature compare.
- **Log buffer.** The commit-pointer limit and the stale-block refetch are
  additions.
- **Log entry types.** The log has no type bits. The undo handler must tell
  load entries from store entries itself; the testbench keeps that
  information on the side.
- **Read signatures.** They are kept and tested (`fwd_rd_hit`), but only
  write-signature hits create dependences.
- **Message formats.** The message formats, ready/valid handshakes, id
  width (4 bits, comparisons within a window of 8) and look-up retry
  interval are this design's own.
- **Log size.** The log size is this design's own. At the defaults the log
  can never fill: five p-XACTs need at most 500 of the 1024 words.

## Simulating

All files are plain SystemVerilog. The package must come first. With
Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal \
    rtl/lbra_pkg.sv $(ls rtl/*.sv | grep -v lbra_pkg) \
    tb/lbra_node_harness.sv tb/tb_lbra_node.sv --top-module tb_lbra_node
./obj_dir/Vtb_lbra_node
```

Replace the last testbench and the top module name to run another test.
Only the two `tb_lbra_node*` tests need `tb/lbra_node_harness.sv`. Every
testbench ends with a line `TB_RESULT checks=N failures=M`.

- **`tb_<block>`.** One testbench per part. Each checks its part against
  an independent model: a bit-serial CRC, a set model of the signatures, a
  word-by-word log model, and so on. It also checks the stated latencies,
  for example consolidation exactly 10 cycles after the slave's last
  instruction.
- **`tb_lbra_node`.** Runs two environments side by side: one at the
  default parameters, and one with a 128-word log and a 2,000-cycle
  watchdog, so that the log-full stall also happens. Each environment
  (`lbra_node_harness`) works as follows:
  - It runs a 4,000-instruction synthetic program on the master and the
    slave. Instruction *i* is a pure function of *i*.
  - It models memory, the log cache and the block reads, three remote
    cores (forward requests, produced data, look-ups, acknowledgements,
    two rollback requests) and the software undo handler.
  - It injects one fault of each kind: a wrong slave result, a wrong slave
    store address, a slave that stops (watchdog), and a wrong result in
    lockstep.
  - It checks that every slave load sees the master's value and that each
    restored checkpoint matches the resume point.
  - It checks that rollback requesters get their acknowledgement. A request
    for a p-XACT that is no longer in flight must be acknowledged at once,
    with no recovery.
  - At the end it checks that memory equals a golden copy with every store
    applied exactly once. This shows that undo and re-execution left no
    trace.

  The testbench prints how often each mechanism happened and fails if any
  never did.
- **`tb_lbra_node_full`.** The default-parameter environment alone (about
  110,000 cycles, most of it waiting for the watchdog).
- **`tb_lbra_node_configs`.** The same scenario at the other sizes the
  evaluation varies: 25- and 100-instruction p-XACTs, four in-flight
  p-XACTs, and 64-bit read/write signatures.

## Not included

The following are not part of the design: the cores, the L1/L2 caches, the
MESI directory protocol and the mesh network, the software undo handler and
the operating-system support. Only their side of each exchange appears, as
ports of `lbra_node`. The testbench environment contains simple behavioural
stand-ins for them.
