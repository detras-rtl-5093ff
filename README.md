# DeTraS store buffer: delayed transactional stores in SystemVerilog

Best-effort hardware transactional memory (HTM) of the Intel RTM kind detects
conflicts through cache coherence and resolves them in favour of the
requester. Under contention this leads to *friendly fire*: transaction A's
write invalidates a line that B has read, so B aborts. B restarts, and its
own write then kills A. Neither makes progress, and in the end both fall back
to a global lock. The exposure comes from transactional writes reaching the
cache early. From that moment the written line sits speculatively modified
in the private cache, and any remote access to it kills the writer.

DeTraS ("delayed transactional stores") fixes this inside the core, in the
store buffer that every out-of-order x86 core already has. Committed
transactional stores that are likely to conflict are simply *not written to
the cache yet*. They wait in the store buffer until `xend` is ready to retire
(or until the buffer runs out of room), and then all go out together at the
end of the transaction. A transaction that keeps its contended writes in the
store buffer behaves much like one under a lazy, committer-wins policy. Yet
the coherence protocol stays as it is, apart from one extra *conflict* bit
in its responses.

This repository holds RTL for one core's DeTraS store buffer subsystem in its
full configuration (selective delay + reordering + compaction). It follows
the published DeTraS design. Where the published description leaves a detail
open, the choice made here is stated in the module headers and in
[Departures and choices](#departures-and-choices).

## Block structure

```
            core commit stage                         L1 data cache
   xbegin / xend_req / abort_req                  (SM bits, MSHRs, coherence)
              |                                           ^      |
      +-------v--------+   drain / abort          creq    |      | cresp
      | detras_tx_ctrl |-------------+         (store,    |      | (tx, conflict,
      +-------+--------+             |          SCH idx)  |      |  SCH idx)
              | commit / abort       v                    |      |
      +-------v----------+   delay?  +--------------------+-+    |
      | detras_predictor |---------->|      detras_sb       |<---+
      |  GCH  SCH  OT    |<----------|  56-entry circular   |
      +------------------+ occupancy |  buffer + sb_snoop   |<--- load snoop
              ^                      +----------------------+
              +------------ cache completions (conflict bit) ---------+
```

| module | role |
|---|---|
| `detras_top` | wires the three blocks together; hashes the store PC; marks stores transactional while a transaction is open |
| `detras_sb` | the store buffer: entries, delay bits, issue to cache, drain, overflow handling (compaction / head resume), coalescing, abort squash, load forwarding |
| `sb_snoop` | the associative search shared by load forwarding and the committing-store snoop |
| `detras_predictor` | global conflict history (GCH), per-PC store conflict history (SCH), offending-transaction bit (OT) |
| `detras_tx_ctrl` | transaction open/close, drain request while `xend` waits, `xend` retirement, events for the predictor |
| `detras_pkg` | widths, the store/entry/cache-port structs, overlap helpers, PC hash |

## The life of a store

Every committed store gets an entry at the tail of the circular buffer. Each
entry holds the store (word address, byte mask, data, transactional bit), the
8-bit SCH index of its PC, and five state bits:

| bit | meaning |
|---|---|
| `delay` | hold the store; it is not written even when it is the head |
| `issued` | the write has been sent to the cache (or is no longer needed) |
| `completed` | counts in *completedStores*; the entry only waits to be freed |
| `pinned` | a younger store partly overlaps this one |
| `coalesced` | a younger store overwrites every byte of this one |

The buffer sends one write per cycle to the cache: the oldest entry that is
neither delayed nor already issued.

* **Plain (non-transactional) stores** keep x86-TSO order. A plain store is
  sent only from the head and only when no other plain write is in flight.
  Its entry is freed when the cache reports completion.
* **Transactional stores may go out of order.** The writes of a transaction
  become visible to other cores only when it commits, and then all at once,
  so their order among themselves cannot be observed. A transactional store
  therefore counts as completed as soon as its write is sent. If it is the
  head, its entry is freed in that same cycle. If it is behind a delayed
  store, it stays completed in place until the head reaches it. A
  transactional store never overtakes an older plain store that has not
  completed.

A store committed in cycle *t* can be sent to the cache in cycle *t+1*. When
the head holds a completed entry, it is freed in the next cycle, one entry
per cycle.

## Deciding what to delay

`detras_predictor` gives a verdict for each committing transactional store,
in the same cycle:

```
if GCH == 0                         -> do not delay   (no recent contention)
else if SB occupancy < SB size / 2  -> delay          (small transactions fit whole)
else                                -> delay iff SCH[hash(PC)] == 1
```

* **GCH** is a 4-bit saturating counter of recent contention. It jumps to 15
  when a transactional store completes with the conflict bit set, or when the
  transaction aborts because of a conflict. It counts down by one for each
  transaction that commits without having caused a conflict.
* **SCH** is a 256 x 1-bit table indexed by the hashed store PC. Every
  transactional completion writes its conflict bit into its PC's entry, so
  the table remembers which stores hurt other cores last time.
* **OT** (offending transaction) marks a transaction whose writes caused a
  conflict. It blocks the GCH decrement at commit and is cleared when the
  transaction ends.

Under contention, the first half of the buffer is spent delaying every
transactional store. Above that, only stores with a conflict history are
held, so that large transactions do not fill the buffer with harmless writes.
Delaying costs little; a store wrongly let through early can cost an abort.

## Keeping overlapping stores in order

Reordering is safe only between stores to different bytes. The buffer
enforces that with a snoop by the committing store. The snoop runs through
the same search that loads use (`sb_snoop`) and compares the store with
every older transactional entry that has not been written:

* If the store overlaps a **delayed** entry, it is delayed too, whatever the
  predictor said. Two overlapping stores are therefore either both held or
  sent oldest first.
* An older entry whose bytes are **all** rewritten by the new store is marked
  `coalesced` and `completed`. Its write is dropped, and the entry is freed
  without a write when it reaches the head.
* An older entry that is **partly** overlapped is marked `pinned`. Such an
  entry may not be moved by compaction (below).

Two flags save snoop energy. `delayedStores` is set by the first delayed
store. `needSnoop` is set when a store that is not delayed finds
`delayedStores` already set. Both are cleared when the buffer drains. A store
committed while `delayedStores` is clear cannot overlap a delayed store, so
it skips the snoop (`ev.snoop_elided`).

Loads and committing stores share the search port. A load always wins, and
the committing store waits a cycle (`commit_ready` low).

## Overflow: compaction and head resume

This is the subtle part. Entries are freed only from the head. A delayed
store at the head therefore pins down every entry behind it, even those whose
writes have already completed. The buffer *overflows* when it is full and its
head is delayed. The design then does one of two things in that cycle:

1. **Compaction.** The head is moved into the completed entry closest to the
   tail, and the head pointer advances. This needs a completed transactional
   entry somewhere in the buffer, and the head must not be pinned. The moved
   store stays delayed.
2. **Head resume.** Otherwise only the head's delay bit is cleared. The head
   is then written, and the buffer frees entries from there on. The other
   delayed stores stay held.

Why compaction is safe: the head is the oldest store, and every store behind
it is younger. If any of them overlapped the head, the head would be marked
`pinned` or `coalesced`. A coalesced head is completed and is not moved. So a
head that is neither pinned nor coalesced shares no byte with anything behind
it, and can be placed anywhere among them. The entry it lands on has already
been written, so no information is lost. Choosing the slot nearest the tail
frees the most entries: every completed entry between the old head and that
slot can then leave, one per cycle.

```
before:  [D0][c ][c ][D3][c ][D5][c ][D7]   full, head D0 delayed, c = completed
          ^head
after:   [  ][c ][c ][D3][c ][D5][D0][D7]   D0 copied over the last completed entry
              ^head                          then c, c leave from the head
```

## Drain, commit and abort

* **xend.** While `xend_req` is high inside a transaction, `detras_tx_ctrl`
  raises `drain`. Every delay bit is flash-cleared, and the held stores go
  out oldest first, one per cycle, overlapping ones in order. `xend_commit`
  pulses in the first cycle in which the buffer is empty, no transactional
  write is still outstanding in the cache, and no abort is signalled. `xend`
  acts as a full fence.
* **Abort** (`abort_req`). Delay bits are cleared and every transactional
  entry is dropped. Plain stores are always older than the transaction's
  stores, so the buffer is cut back to them. GCH saturates if the abort was a
  conflict. The cache (outside) throws away its speculatively written lines.

## Store-to-load forwarding

`ld_valid` with a word address and byte mask searches the entries whose write
has not completed. The result is taken from the youngest overlapping entry:

| `ld_hit` | `ld_fwd_ok` | meaning |
|---|---|---|
| 0 | 0 | no pending store touches these bytes; read the cache |
| 1 | 1 | `ld_data` holds every requested byte (byte lanes as in the mask) |
| 1 | 0 | the youngest overlapping store lacks some bytes; the load must wait |

## Interfaces and timing

All blocks are synchronous to `clk`, with an asynchronous active-low reset
`rst_n` that clears all state (empty buffer, GCH = 0, SCH all 0, no
transaction open).

| group | signals (top) | protocol |
|---|---|---|
| transaction | `xbegin` (pulse), `xend_req` (level), `xend_commit` (pulse), `abort_req`/`abort_conflict` (pulse), `tx_active` | a store is transactional if it commits while `tx_active` is high |
| commit | `commit_valid`/`commit_ready`, `commit_pc`, `commit_waddr`, `commit_mask`, `commit_data` | valid/ready; taken on a clock edge with both high |
| load | `ld_valid`, `ld_waddr`, `ld_mask` -> `ld_hit`, `ld_fwd_ok`, `ld_data` | combinational, same cycle |
| cache request | `creq_valid`/`creq_ready`, `creq` (`cache_req_t`: store + SCH index) | valid/ready; one write per cycle |
| cache response | `cresp_valid`, `cresp` (`cache_resp_t`: tx, conflict, SCH index) | one per cycle, any order; the SCH index is echoed from the request |
| observation | `gch`, `ot`, `sb_occupancy`, `completed_stores`, `delayed_stores`, `need_snoop`, `sb_drained`, `ev` | `ev` (`sb_events_t`) pulses once per cycle a mechanism acts |

Addresses are word addresses of aligned 8-byte words (45 bits for a 48-bit
byte address). A store writes the bytes set in its 8-bit mask and never
crosses a word boundary.

## Parameters

| parameter | default | source |
|---|---|---|
| `SB_ENTRIES` (`N` in `detras_sb`) | 56 | the evaluated core's store buffer |
| `SCH_ENTRIES` | 256 | published predictor size (1 bit each) |
| `GCH_W` | 4 | published counter width |
| `OUT_W` (`detras_sb`) | 8 | own choice: up to 255 transactional writes outstanding |
| `ADDR_W`, `PC_W`, `DATA_W` (package) | 48, 48, 64 | own choice |

The added state matches the published budget of about 50 bytes: 3 bits per
entry (168 bits), 256 SCH bits, the 4-bit GCH, the 6-bit completedStores,
and a few flags. The `issued`/`completed` bits are state that any store
buffer keeps anyway.

## Departures and choices

Where the published description is silent or leaves room, this RTL does the
following:

* **Snoop enable.** In the published description, `needSnoop` enables the
  committing-store snoop. Here the snoop runs whenever `delayedStores` is
  set. Consider delayed stores that commit before the first non-delayed one.
  With the published enable they would not snoop, so they would not pin or
  coalesce older delayed stores to the same bytes, and a later compaction
  could move a store past an overlapping one. `needSnoop` is still kept and
  exported.
* **Forwarding skips completed entries.** Compaction overwrites a completed
  entry. If an older completed entry to the same bytes remains, it would
  otherwise become a stale forwarding source. Completed data is in the
  cache, so nothing is lost.
* **Plain stores: one in flight.** The usual TSO cache pipeline squashes and
  retries after a miss. Here the next plain store simply waits for the
  previous one to complete. The order is the same; throughput for plain
  stores is lower.
* **Threshold** compares the total buffer occupancy with half its size. The
  published text describes it both as "SB below half capacity" and as
  "delayed stores fill the SB above half"; the first reading is used.
* **Overflow** resumes only the head, as in the full design. The simpler
  variant that drains the whole buffer on fill-up is not built.
* **completedStores** is a register reloaded every cycle with the number of
  completed entries, not an up/down counter, because coalescing can complete
  several entries in one cycle.
* **PC hash** is the XOR of the 8-bit slices of the PC.
* **Cache port** is an own design: a valid/ready request and an unordered
  response that echoes the SCH index, so that the predictor can be updated
  after the entry is gone.
* One write is issued, and one entry is freed, per cycle.
* Nested `xbegin` is flattened into the open transaction.

Not part of this RTL: the out-of-order core and its not-yet-committed store
queue, the L1 data cache with its speculatively-modified bits and MSHRs, the
shared L2 and its MESI directory, the on-chip mesh, DRAM, and the software
fallback-lock path. All of them connect through the top's ports. The
always-delay variants and the compared memory-side schemes are not included
either.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_sb_snoop` | 4000 random buffers and queries against an independent age-ordered search |
| `tb_detras_predictor` | directed GCH/SCH/OT rules and threshold edges (27/28 of 56), then 5000 random cycles against a reference model |
| `tb_detras_tx_ctrl` | random xbegin/xend/abort/drained sequences against a reference model |
| `tb_detras_sb` | 11 directed scenarios on an 8-entry buffer: in-order issue one cycle after commit, hold until drain, reordering, overlap delay and pinning, coalescing (one write instead of two), compaction, head resume, pinned head blocking compaction, forwarding and load priority, abort squash, plain-store ordering; the cache image is compared after each |
| `tb_detras_friendly_fire` | full default size; one transaction (read x, write x, read y, read z, write t) with idle work between accesses, run twice. The first run has no contention history, and the write of x reaches the cache over 30 cycles before `xend`. The first run's conflict on x saturates GCH, and in the second run the same write is held until `xend` is waiting. Loads of x are then served by forwarding |
| `tb_detras_top` | full default size; 400 random transactions of 1-110 stores (half of them larger than the buffer), plain stores between them, random aborts, random loads |

`tb_detras_top` checks every forwarded or cache-read load against a
program-order image. It checks that `xend` retires only with nothing
outstanding. It compares the cache with the committed image after every
commit and every abort. It also counts how often each mechanism acts, and
fails if any of them never does: GCH delay, SCH delay and no-delay, snoop
delay, pin, coalesce, compaction, head resume, reorder, xend drain,
forwarding, load priority, snoop elision, squash, GCH saturate and
decrement. A run takes about 51,000 cycles and well under a second.

`tb/l1_store_model.sv` is a behavioural model of the L1 store port, for
testbenches only. It applies writes when it accepts them and answers hits
after 1 cycle and misses after 4-20 cycles, out of order. It sets the
conflict bit for writes to words marked as contended, and rolls back
transactional writes on abort.

Running a testbench with Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal \
  rtl/detras_pkg.sv rtl/sb_snoop.sv rtl/detras_sb.sv rtl/detras_predictor.sv \
  rtl/detras_tx_ctrl.sv rtl/detras_top.sv tb/l1_store_model.sv tb/tb_detras_top.sv \
  --top-module tb_detras_top -Mdir obj_top -o sim
./obj_top/sim
```

For a unit testbench, list `rtl/detras_pkg.sv`, the block's file(s) and the
testbench, and name the testbench with `--top-module`. Lint with
`verilator --lint-only -Wall` on the same file lists. The only warning left
comes from the assertions in `detras_sb`, which sample the reset
synchronously (`SYNCASYNCNET`).

## How far to trust it

The behaviour was checked in simulation only. There is no formal proof and
no check against a cycle-accurate model of the published processor, so
performance numbers (cycles per drain, abort rates) are not claimed to match
any published figures. The mechanisms are exercised thoroughly at full size
against an end-to-end memory-image reference. The departures listed above
are deliberate. At 56 entries the buffer synthesizes to about 7,700
flip-flops, most of them store data and addresses. The associative search and
the issue, destination and abort scans are wide combinational loops over all
entries; they are written for clarity, not timing closure.
