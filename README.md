# A speculative-multithreading memory system for a four-core CMP

A sequential program can be sped up on a chip multiprocessor by cutting
it into short threads of a few dozen instructions each. The threads run
at the same time on different cores, even though a later thread may
depend on an earlier one through memory. The memory system has to make
that safe. It keeps every speculative store inside the thread that made
it. It gives each load the value that program order calls for. It
notices when an older thread stores to a word that a younger thread has
already read (a dependency violation), so that the younger thread can be
squashed and run again.

This RTL builds that memory system for four processing units (PUs). The
private L1 data caches do the speculation work. They are kept coherent
over a shared split-transaction bus, and every 32-bit word carries its
own coherence and speculation state. Five coherence protocols can be
selected, from plain invalidation to update with read-broadcast. The
design also has the parts around the caches: thread ordering,
commit/squash control, a next-thread predictor, register forwarding
between neighbouring PUs, instruction caches, and an ideal L2. The
out-of-order cores are not included. They connect through ports on the
top module `smt_cmp`.

## Threads, ranks and the head

Threads are handed to the PUs round-robin in program order. The PU that
runs the oldest thread is the *head*. Its thread is the only one that is
not speculative. Every PU has a *rank*, `(p - head) mod 4`: 0 for the
head and 3 for the most speculative thread. All ordering decisions in
the design compare ranks: which version of a word a reader should see,
who wins the bus, and who must be squashed.

`thread_ctrl` owns the head pointer.

- **Commit.** When the head's PU reports `done`, the head's cache gets
  `commit`. The cache finishes its commit walk and answers `commit_done`.
  The head then moves on: the next PU receives `nonspec`, and the old
  head receives `start` for a new, most speculative thread.
- **Violation.** A violation reported by the cache of PU *p* squashes
  *p* and every more speculative PU. They see `flush` one cycle later and
  `restart` one cycle after that.
- **Misprediction.** A PU reports a mispredicted thread with `flush_req`,
  which has the same squashing effect.
- **The head** is never squashed.

## Per-word state in the data cache

Each word of an L1 data cache line has a MOESI state (I, S, E, O, M) and
four flags:

| flag | meaning |
|---|---|
| U | this thread stored to the word speculatively (its own, uncommitted version) |
| V | this thread loaded the word before storing to it; a later store by an older thread to this word is a violation |
| C | committed data that L2 does not yet have (an owned word of a retired thread) |
| D | a more speculative thread has stored to the word; the version here is older than the newest one |

`coh_rules` is a purely combinational table. It maps (current word
state, event, protocol) to the next state, the bus operation to issue,
whether to write back, and whether a violation happened. It covers
these events:

- processor read and write;
- fill after a read or write miss;
- snooped read and snooped store.

The table has parameters for the five protocols and for whether E/M
exclusivity is managed:

| `PROT` | stores to shared words | read-broadcast |
|---|---|---|
| `PROT_INV` | invalidate (BusUpg / BusRdX) | none |
| `PROT_INV_ROBR` | invalidate | on read misses |
| `PROT_UPD` | update (BusUpd) | none |
| `PROT_UPD_ROBR` | update | on read misses |
| `PROT_UPD_RWBR` (default) | update | on read and write misses |

*Read-broadcast* ("snarfing") means a cache watching another cache's
miss takes the line as well. It takes it when its own copy is invalid,
and also when it has no copy at all. In that case it allocates the line,
but only into an empty way or a clean, non-speculative LRU way. Threads
run nearby code and data one after another, so the next threads then
find the line already present.

`l1_dcache` holds:

- the tags;
- the per-word states, in flip-flops so that a whole line can be
  updated in one cycle;
- an LRU bit per set;
- a line-wide data array.

Its behaviour:

- **Access pipeline.** Request in cycle 0, tag lookup in cycle 1, answer
  in cycle 2 on a hit.
- **Misses** use BusRd or BusRdX. A fill writes only the words that are
  invalid here, so the thread's own stores survive a refill.
- **Victims** are chosen in this order: an empty way, then the LRU way,
  then the other way. A line holding U or V words is never evicted: the
  access waits instead. The head has no such words, so the wait always
  ends.
- **Snooping.** Every transaction of another PU is applied to the
  matching line in the cycle it takes effect. Stores update or
  invalidate the words that are *version matched* (see below). They set
  D when the writer is more speculative, and raise `violation` when a
  matched word has V set.
- **flush** invalidates U words and clears V.
- **nonspec** clears U and V, because the thread's data is now the
  architectural data.
- **commit** first writes back owned words that carry D. It then
  invalidates D words and turns owned words into C.

## Version identification (`version_unit`)

Several caches can hold different versions of one word. The bus spends
a transaction's Ctrl stage working out, for each word, which version
applies. `version_unit` does this combinationally, from the snoop
responses of all caches and the ranks.

- **Data for a reader of rank r.** The version of the nearest holder with
  rank below r. If no such holder exists, a committed (C) copy. Failing
  that, the L2.
  - A D mark on that holder does not disqualify it. If the more
    speculative writer still exists, its rank is between, so it is the
    nearer holder. If it was squashed, the holder's version is correct
    again.
- **Store by rank r to word w.** For every other cache it works out two
  flags:
  - `by_more_spec`: the writer is more speculative, so the cache marks
    D.
  - `ver_match`: the writer is less speculative, and no cache between
    them owns its own version of w. Only matched caches take the update
    or invalidation and check V.
- **Snarf masks.** A cache more speculative than the requester may take
  word w from the broadcast line only if no thread from the requester up
  to that cache owns a version of w.
- **Shared indication.** The requester is told the line is shared when
  another cache holds it or may snarf it in the same transaction. A
  reader therefore never takes a line exclusive while another cache gets
  a copy, which would let a later store skip the bus and hide a
  violation.
- **L2 writes.** These come from BusWb. Also, when a store overwrites a
  committed (C) word held in another cache, that word is written to L2
  in the same transaction.

## The bus (`spec_bus`, `addr_arbiter`)

The bus is split into an address path and a data path.

**Address tenure: Arb, Addr, Fin, one cycle each, pipelined.**
`addr_arbiter` grants the requester with the lowest rank, so an older
thread always wins. A granted transaction enters a waiting queue of 8
entries.

**Data tenure.** Each queued transaction first waits out its overhead
cycles (Ovh, the L2 access). It then competes for the data path; the
oldest ready transaction wins. It then runs its Arb, Ctrl, Data and Fin
stages. Because of this, short transactions overtake a long read.

| operation | Ovh | Arb | Ctrl | Data | Fin | grant to effect |
|---|---|---|---|---|---|---|
| BusRd / BusRdX | 6 | 1 | 4 | 4 | 1 | 15 cycles |
| BusWb | 0 | 1 | 4 | 4 | 1 | 9 cycles |
| BusUpd | 0 | 1 | 1 | 1 | 1 | 3 cycles |
| BusUpg | address only | | | | | 2 cycles |

- **When a transaction takes effect.** In the last Data cycle, or at the
  address Fin for BusUpg. In that cycle the snoops, the version unit, the
  L2 write and the requester's fill all happen together.
- **One effect per cycle.** If a BusUpg and a data transfer would take
  effect in the same cycle, the BusUpg waits one cycle.
- **Squashed requests.** When a PU is squashed, its queued transactions
  are dropped, except write-backs.
- **Timing of a read.** Grant to the end of Data is 16 cycles for a
  read, which matches the 16-cycle L2 latency.

## Around the caches

- **`l2_cache`.** The shared L2 is ideal (always hits). It is modelled as
  a 4096-line array (256 kB) with combinational reads and word-masked
  writes. Higher addresses alias onto it.
- **`l1_icache` and `ifill_unit`.**
  - Each PU has a 16-kB, 2-way, 64-byte-line instruction cache. It
    answers a 16-byte fetch block (four instructions) one cycle after a
    hit.
  - Misses go to `ifill_unit`. It serves them one at a time, round-robin,
    with 16 cycles of latency each. It then broadcasts the line to all
    instruction caches, and with `RB=1` caches that lack the line install
    it too.
  - The instruction side has no bus contention model.
- **`thread_predictor`.**
  - Components: two path-based predictors, with path lengths 1 and 4,
    each with a 2048-entry table of next-thread start addresses. A
    4096-entry table of 3-bit counters chooses between them.
  - Speed: one prediction per cycle, with speculative path history.
  - Training is lazy: the tables learn only when a thread commits, using
    the committed path.
  - On a misprediction, the newest entry of the speculative path is
    replaced by the true start address.
  - The hash functions are this design's own.
- **`reg_comm_ring`.**
  - Register values go from each PU to the next in thread order, one
    value per link per cycle, with one cycle per hop.
  - A PU can forward a value it received (`prop`) and add its own values
    (`send`). Both go through a 4-entry queue per PU, and a value that
    enters an empty queue leaves on the same edge.
  - The link out of the most speculative PU into the head is cut.
  - A flush empties the PU's queue.

## Top-level interface (`smt_cmp`)

All per-PU signals are packed arrays indexed by PU number.

| group | signals |
|---|---|
| data cache | `d_req_valid/ready/we/addr/wdata`; `d_resp_valid/rdata` two cycles after acceptance on a hit |
| instruction fetch | `i_fetch_valid/ready/addr`; `i_resp_valid/data` (128 bits) |
| threads | `done`, `flush_req`, `thread_addr` (start address of the running thread) in; `rank`, `flush`, `restart`, `start`, `start_addr` (predicted), `violation` out |
| registers | `rc_send_valid/ready/reg/val`, `rc_recv_valid/reg/val`, `rc_prop` |
| activity | bus address/data busy and operation, per-PU hit, miss, snarf, eviction write-back, stall, I-cache snarf, commit |

Parameters are `PROT`, `EXCL`, `DC_BYTES`, `IC_BYTES` and `L2_LINES`. The
number of PUs (4), the line size (64 B) and the word and address widths
(32 bits) are fixed in `smt_pkg`.

## Where this design departs from the original description

- **Blocking data cache.** The data cache handles one request at a time.
  The described cache is non-blocking.
- **Line transfers.** A line moves as one transfer. The 4-cycle Data
  stage stands for the 16-byte beats.
- **Committed data.** When a store hides committed data in another
  cache, that data goes to L2 inside the same transaction, not in a
  BusWb of its own.
- **Snarfing.** Only caches more speculative than the requester snarf,
  and only into empty or clean, non-speculative ways.
- **L2 size.** The L2 is a finite 256-kB array, not an unbounded one.
- **Instruction fills.** They are served one at a time.
- **Own choices** where the description is silent:
  - the predictor hashes and selection rule;
  - the register-ring queue;
  - the 5-bit register numbers;
  - LRU replacement;
  - the victim and commit-walk details;
  - all handshakes.
- **Sweeps.** The line-size and PU-count sweeps of the original study are
  not built. Only 64-byte lines and four PUs exist.
- **Cores.** The cores themselves are outside the design.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

- **`tb_coh_rules`.** Protocol table rows for four protocol and
  exclusivity variants.
- **`tb_spec_bus`.** The latencies of 15, 9, 3 and 2 cycles. Short
  transactions overtaking a read (write-back, then update, then read).
  Rank priority, back-to-back write-backs, and squash.
- **`tb_version_unit`, `tb_addr_arbiter`, `tb_l2_cache`,
  `tb_thread_ctrl`.** Directed and random checks of each block.
- **`tb_thread_predictor`.** A simple loop, plus a pattern that only the
  length-4 path can predict.
- **`tb_reg_comm_ring`.** One-cycle hops, one value per cycle,
  forwarding, the cut into the head, and flush.
- **`tb_l1_icache`.** One-cycle hits, misses, snarfing, and random
  fetches checked against a memory model.
- **`tb_smt_cmp`.** The whole system at its default parameters, with
  four behavioural PUs running a loop of 48 threads. Each thread:
  1. fetches its code;
  2. loads a shared counter S;
  3. waits a random time;
  4. stores S+1;
  5. stores a private word (conflicting in one cache set);
  6. reads a shared table;
  7. forwards a register.

  Every committed thread k must have loaded S == k, and the thread after
  the last one must read S == 48. The test also counts hits, misses,
  snarfs, eviction write-backs, violations, mispredictions, correct
  predictions, commits, register transfers and each bus operation. It
  fails if any of these never happens. A typical run shows about 75
  violations and restarts, all resolved correctly.
- **`tb_l1_dcache`.** The same workload with the `inv-robr` protocol and
  2-kB caches. It adds BusUpg and frequent replacement, and checks the
  two-cycle hit latency.

To simulate, with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/smt_pkg.sv \
  $(ls rtl/*.sv | grep -v smt_pkg) tb/tb_smt_cmp.sv --top-module tb_smt_cmp
./obj_dir/Vtb_smt_cmp
```

The package must be read first. The system test takes a few seconds.
