# Hybrid sorted table for order books

An exchange's market data generator has to keep an order book per instrument
and side: the resting volume at every price, ordered by price, with the best
price on top. Traders, the matching engine and the market data feed only ever
look at the top few levels, yet the book as a whole can be large. This design
splits every book side into two sorted tables whose concatenation is the whole
side:

* a **cache table** of `CACHE_SIZE` (default 50) slots in on-chip RAM that
  always holds the best prices, and is re-sorted by a bitonic sorting network
  after every change;
* a **master table** on the host CPU (for instance a balanced tree) that holds
  every price behind those.

Every price lives in exactly one of the two tables, and every key in the cache
is smaller than every key in the master. The hardware therefore answers
"best price" and "top five levels" straight from the head of the cache, and
changes a level in a few tens of clock cycles, while the host stores
everything else. Items move between the two tables only when the cache
becomes full or runs low. The design follows the published hybrid-table
design for the market data generator of the China Financial Futures Exchange,
*A Nanosecond-level Hybrid Table Design for Financial Market Data Generators*.
Where that description stops, this RTL makes its own choices, listed in
[Departures and own choices](#departures-and-own-choices).

## Keys, tables and the split point M_s

* A table item is a (key, volume) pair with a valid bit (`entry_t` in
  `mdg_pkg`). Keys and volumes are 32 bits wide. Volume is signed, so that a
  deletion may overshoot to zero or below.
* Each book has two tables, bid and ask: table index = `2*book + side`.
  Ask keys are the price. Bid keys are the bitwise inverse of the price. Both
  tables are therefore ascending with the best price first, and one sorter
  serves both sides. Results convert keys back to prices. The host link
  carries stored keys.
* Per table the FPGA also keeps **M_s**, the smallest key known to be in the
  master table, plus a *master empty* flag. An insertion or deletion with key
  `< M_s`, or any order while the master is empty, belongs to the cache. Any
  other order is forwarded to the host. M_s may lag behind the host (be
  smaller than the true minimum) without harm: such a key simply goes to the
  master, which keeps the ordering rule intact.

## The routines

| message | what happens | latency (cycles, handshake to result pulse) |
|---|---|---|
| insert, key < M_s | every slot compares its key in parallel; a hit adds the volume, a miss writes the item into the last slot; the table is re-sorted | 3 + sorter layers = **24** for 50 slots |
| delete, key < M_s | a hit subtracts the volume, and a slot left at ≤ 0 becomes invalid and sorts to the end; re-sort | **24** |
| insert/delete, key ≥ M_s | forwarded to the host master table, cache unchanged | **2** |
| select | best level of the side | **2** |
| publish | top `PUB_DEPTH` (5) levels | **2** |

### Periodic snapshot

Market data feeds broadcast the top of every book twice a second. While
`pub_enable` is high, `publish_scheduler` counts `PUBLISH_PERIOD` cycles
(80,000,000, which is half a second at 160 MHz). It then walks all
`2*NUM_BOOKS` book sides and requests one publish per side. These requests
share the engine with the order input. When both are waiting, they take
turns. Snapshot results come out on the normal `res_*` port with
`res_auto = 1`. If a walk is still running when the next period ends, one
further walk follows straight after it; missed periods are not queued
beyond that. At the defaults a walk takes 400 publishes of 2 cycles each. That is
800 cycles, or 5 µs, about 0.001 % of the engine's time.

The sorter is a full bitonic network on the next power of two (64 lanes for
50 slots). Unused lanes carry constant invalid entries. It has
`log2(64)·(log2(64)+1)/2 = 21` compare-exchange layers with a register after
each, so its latency is exactly 21 cycles. Reading the table, the
search-and-modify pass and the write-back add 3 more. The engine handles one
message at a time. It accepts the next message in the cycle in which the
previous result appears.

Every message produces one result pulse (`res_valid`). The pulse carries the
message's op, book and side, whether it went to the master (`res_to_master`),
whether the key was found (`res_found`), and the levels of the side after the
message, best first, as prices. For select, only level 0 is valid.

## Synchronisation with the master table

This is the subtle part of the design. The cache must keep the head of the
book, so items move both ways. The engine never waits for the host, except in
the stall cases below.

**Spill (cache → master).** An insertion can bring the table to `CACHE_SIZE`
items. The upper half (25 items) then goes to the host as one batch, and M_s
becomes the smallest key sent. The batch enters a FIFO (`TX_FIFO_DEPTH`
batches), and a serializer sends it one item per beat. The message completes
without waiting.

**Refill (master → cache).** After a change, if the table holds fewer than
`REFILL_LEVEL` (10) items and the master is not empty, a *refill request* for
25 items is queued and the table is marked *refill pending*. Processing goes
on. The host answers by removing its 25 smallest items and sending them in
ascending order. The last beat also carries the new M_s and a master-empty
flag. `refill_buffer` collects the reply. Between messages the engine gives
priority to merging it. The items are written into slots 25..49 and the
table is sorted once. M_s and the master-empty flag then take the host's
values. The request goes out early, while 10 items are still there, so that
under normal traffic the reply arrives before the table runs dry.

**Stall.** While a refill is pending, two kinds of message are held, not
processed, and retried until the reply has been merged:

* a deletion that finds the table at `STALL_LEVEL` (5) items or fewer. This
  is a run of deletions outrunning the host;
* any insertion or deletion that would go to the master table. Its key could
  be one of the items in flight, which the host no longer has and the cache
  does not yet have.

Select and publish never stall. Everything behind a held message waits too,
because messages are handled in order.

**Replies that no longer fit.** A reply can arrive after insertions have
brought the table back to 25 items or more. It can also arrive after the
table spilled in the meantime; the master then holds keys smaller than the
reply's. In both cases the reply is not merged. Its items go straight back to
the host as an insert batch, and M_s stays at its (smaller) value. Either way
every cache key stays below every master key.

### Host link format

FPGA → host (`tx_*`, valid/ready, one beat per cycle at most):

| `tx_op` | beats | `tx_key` / `tx_vol` |
|---|---|---|
| `H_INSERT` | 1 per item, `tx_last` on the last | item to add to the master (volumes add up on equal keys) |
| `H_DELETE` | 1 | key and volume to remove (the level is dropped at ≤ 0) |
| `H_REFILL_REQ` | 1 | `tx_vol` = number of smallest items wanted |

Host → FPGA (`rx_*`, valid/ready): the refill reply for one table, at most 25
items, ascending, `rx_item` set on beats that carry an item, `rx_last` on
the final beat. The final beat also carries `rx_ms` (the master's new
smallest key) and `rx_master_empty`. A reply with no item is one beat with
`rx_item = 0`. One reply is buffered at a time, and `rx_ready` is low until
it is merged. The host must process `tx` beats in order. It must send replies
in the order of their requests, and must not interleave two replies.

## Module map

```
mdg_hybrid_table_top            top: engine + host FIFO + serializer + refill buffer
├── publish_scheduler           twice-a-second snapshot requests (shares the engine input)
├── hybrid_table_engine         routine controller (filter, insert/delete, select/publish,
│   │                           spill, refill request and merge, stall)
│   ├── table_mem               one word per table: 50 slots, M_s, flags
│   ├── table_update            parallel key search and volume update
│   └── bitonic_sorter          21-layer pipelined bitonic network
├── sync_fifo                   batches waiting for the host link
├── host_tx_serializer          batch -> one item per beat
└── refill_buffer               collects a refill reply
mdg_pkg                         shared types (entry_t, item_t, op_e, side_e, host_op_e)
```

All routines are shared by all books. Only `table_mem` grows with
`NUM_BOOKS`: 400 words of about 3,300 bits at the defaults.

Engine states: `S_INIT` clears every table after reset (`init_done` rises
after `2*NUM_BOOKS` cycles). `S_IDLE` picks a pending refill reply first,
then a held message, then a new message, and issues the memory read.
`S_EXEC` decides from the table that was read. `S_SORT` waits for the sorter.
`S_POST` spills or requests a refill, writes the table back and sends the
result.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `CACHE_SIZE` | 50 | slots per cache table; spill at full, refill size `CACHE_SIZE/2` |
| `NUM_BOOKS` | 200 | order books (two tables each) |
| `REFILL_LEVEL` | 10 | request a refill when fewer items remain |
| `STALL_LEVEL` | 5 | with a refill pending, deletions stall at this count or below |
| `PUB_DEPTH` | 5 | levels in a result |
| `TX_FIFO_DEPTH` | 16 | batches buffered toward the host |
| `PUBLISH_PERIOD` | 80,000,000 | cycles between snapshots (top only) |

Parameters after `PUB_DEPTH` / `PUBLISH_PERIOD` in the module headers are
derived widths. Do not override them. Keep `STALL_LEVEL < REFILL_LEVEL <
CACHE_SIZE/2`. Sizes 50, 200, 10 and 5 are those of the published design's
main configuration. Its experiments also use tables of 20 to 80 slots and up
to 220 books, which need only a parameter change. A table of 65 to 128 slots
gets a 128-lane, 28-layer sorter.

Size at the defaults, after generic (technology-independent) synthesis with
yosys:

| part | word-level cells | flip-flop bits | memory bits |
|---|---|---|---|
| `bitonic_sorter` | 8,659 | 80,231 | 0 |
| `hybrid_table_engine` (with sorter and table RAM) | 9,846 | 83,957 | 1,314,000 |
| `mdg_hybrid_table_top` | 10,000 | 85,663 | 1,339,856 |

The pipeline registers of the sorter make up almost all of the flip-flops:
21 ranks of 64 lanes, less the constant padding lanes. The table RAM is 400
words of 3,285 bits. On an FPGA it maps to block RAM as a wide, shallow
memory. Mapping these to a particular device was not done.

## Departures and own choices

* **Throughput and latency accounting.** The published figures (a few tens
  of cycles per routine, rising with table size) come from a high-level
  synthesis implementation. Here an insertion or deletion takes 24 cycles at
  50 slots. Select and publish take 2 cycles, because they read the sorted
  head without sorting again.
* **Filter direction.** The published text states the cache/master filter
  both ways ("less than M_s goes to the cache" and "larger than M_s is
  inserted to the cache"). This design uses *less than*. That is the only
  reading consistent with the cache being the head of an ascending table.
* **Refill threshold.** The published text gives both "fewer than ten" and
  "25% of the table" for the refill trigger. This design uses
  `REFILL_LEVEL = 10`, which is also the stall diagram's value.
* **Own additions.** The published description does not give any of the
  following, and this design adds them: stalling master-bound orders during
  a refill, returning replies that no longer fit or are stale, M_s carried in
  the refill reply, the bid-key inversion, the link formats and the 16-batch
  on-chip FIFO.
* **Not included.** The host master table (software), the PCIe/DMA
  transport, the large off-chip FIFO in card memory and the network
  interface and message parser that feed orders in. The design has stream
  ports where they connect.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_bitonic_sorter` | random, empty and duplicate-key tables against a reference sort; items preserved; latency 21; back-to-back inputs |
| `tb_table_update` | hits, misses, volume to exactly zero, stale invalid slots |
| `tb_table_mem` | random traffic against a shadow copy, read-during-write |
| `tb_sync_fifo` | order and flags against a queue, fill and drain phases |
| `tb_host_tx_serializer` | beat stream of random batches under random `tx_ready` |
| `tb_refill_buffer` | replies of 0..25 items, back-pressure while full |
| `tb_publish_scheduler` | snapshot timing, walk order, handshake under back-pressure, at most one owed walk, enable |
| `tb_hybrid_table_engine` | directed walk through spill, forward, select/publish, refill request, stalled deletion and merge, bid ordering, returned reply, with exact latencies |
| `tb_mdg_hybrid_table_top` | end to end at 16 slots, 4 books, with a snapshot every 1500 cycles |
| `tb_mdg_full_size` | end to end at the default parameters (50 slots, 200 books) |
| `tb_rate_replay` | default parameters; one ~780-message session replayed at a low and a high message rate (see below) |

The two end-to-end testbenches share `mdg_tb_harness`. It contains a golden
copy of every book and a model of the host master table, which answers
refills after a programmable delay. Every result is compared with the golden
book, and the latency of every message that did not stall is checked. The
workload has five phases:

1. build-up;
2. delete bursts against a slow host;
3. regrowth while a refill is in flight;
4. a random mix;
5. a drain of every book through select + delete of the best level.

The drain proves that cache and master together held exactly the golden
book. The harness counts forwards, spills, refill requests, merges, returned
replies, stalls, selects, publishes, additions to an existing level and
emptied levels, and fails if any of them never happened. When the
snapshot runs, every snapshot result is checked for shape: no gaps, best
level first, positive volumes. A snapshot that arrives while no order is in
flight must also match the golden book exactly. Every book side must have
been published at least once.

`tb_rate_replay` reproduces the behaviour the synchronisation scheme is
built for. A session-shaped sequence makes the table grow to a spill,
shrink to a refill and end in a burst of pure deletions. At a low rate (150
idle cycles between messages, host answering in 60) no message stalls, and
the worst latency is the 24 cycles of a sorted update. At a high rate
(messages back to back, host answering in 600) the deletion burst reaches
the stall level, and a few results come out late (worst about 580 cycles).

Run a testbench with Verilator 5, from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal rtl/mdg_pkg.sv rtl/*.sv \
    tb/mdg_tb_harness.sv tb/tb_mdg_full_size.sv --top-module tb_mdg_full_size -o sim
./obj_dir/sim
```

For a unit testbench, list `rtl/mdg_pkg.sv`, the module's file (and, for the
engine, `table_mem.sv`, `table_update.sv` and `bitonic_sorter.sv`), and
`tb/tb_<module>.sv`. The full-size test runs in about a second after a
compile of under a minute.

Lint notes: Verilator reports `SYNCASYNCNET` because the assertions sample
the asynchronous reset synchronously (`disable iff`). It also reports unused
bits in the package's compare function, which ignores the volume field.
Neither is a circuit problem.
