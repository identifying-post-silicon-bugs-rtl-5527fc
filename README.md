# Hardware introspection engine for bus deadlock detection

A system-on-chip can lock up when a request on its interconnect never gets an
answer. An address may fall into a hole of the memory map, or a peripheral may
stop responding in the middle of a clock-gating sequence. By the time anyone
notices, the request that caused the hang has scrolled out of every trace. This
engine sits beside the bus, watches every request and response, and measures how
long each request waits. From those measurements it learns, without being
programmed, which address ranges answer fast and which slowly. It then records
the transactions that do not fit:

* a request that is never answered (**deadlock**),
* a response far slower than what its address range usually needs (**delay**),
* a response that came back with an error flag (**response error**).

The first deadlock freezes the record buffer, so the transaction that hung the
system is still there for the debug engineer to read out. Two interrupt lines
announce deadlocks and delays.

The RTL is SystemVerilog-2017 and is written to be synthesized. It is
parameterized, and the defaults are the configuration described below.

## Data flow

```
 snooped bus (request + response channels)
        |
        v
 +-------------------+   timed-out request / error response
 | transaction buffer|-----------------------------------------+
 |  hie_xb  (stage 0)|                                         |
 +-------------------+                                         |
        | completed transaction + response time                |
        v                                                      v
 +-------------------+                                 +----------------+
 | queue  hie_fifo   |                                 | trace buffer   |
 +-------------------+                                 | hie_trace_buf  |
        |                                              |                |
        v                                              |                |
 +-------------------+   slow response (delay anomaly) |                |
 | range entry table |-------------------------------->|                |
 |  hie_ret (stage 1)|                                 +----------------+
 +-------------------+                                   irq_deadlock, irq_delay
```

`hie_top` wires these together. The engine never stalls the bus. When a
structure is full, the transaction is lost, and a status output reports the loss:

* `xb_req_drop`: a request arrived while all transaction-buffer entries were busy.
* `q_overflow`: a completion arrived while the queue in front of the range table was full.

## Bus view

The snooped bus is TileLink-like. A request (`req_t`) carries opcode, param,
size, an 8-bit source ID, a 48-bit address and a 4-bit byte mask. A response
(`rsp_t`) carries opcode, source and an error flag; the error flag is TileLink's
*denied* or *corrupt*. At most one request and one response are observed per
cycle. Opcodes are split into three command classes, and each class gets its
own latency statistics:

| class | request opcodes |
|-------|-----------------|
| read  | Get |
| write | PutFullData, PutPartialData |
| misc  | everything else (atomics, hints, acquires) |

Addresses are kept as 36-bit 4 KB page numbers everywhere inside the engine.

## Transaction buffer (`hie_xb`)

The buffer has 64 entries by default. Each entry holds one outstanding
request and a 13-bit cycle counter.

* **Allocation.** A request goes into the highest-numbered free entry. Its
  counter starts at 1 in the next cycle and counts up every cycle. It stops at
  its maximum value.
* **Matching.** Each entry stores an 11-bit tag: the response opcode that the
  request expects, plus the source ID. Grant and GrantData are treated as one
  opcode. Every response is compared with all tags at the same time. The
  matching entry is freed.
  * If the error flag is clear, the request's fields and its response time
    (the counter value) go to the queue. A response seen *k* cycles after its
    request reports *k*.
  * If the error flag is set, the transaction goes to the trace buffer instead.
    An error response would skew the learned latencies.
* **Timeout.** An entry whose counter reaches `TIMEOUT` (1500 cycles) is
  freed and reported to the trace buffer as a deadlock.
  * Only one timeout is reported per cycle, lowest entry first.
  * No timeout is reported in a cycle where an error response already uses
    the trace-buffer path. A timed-out entry that has to wait is reported one
    cycle later.
  * If a response matches in the same cycle that its counter reaches
    `TIMEOUT`, the response wins and the transaction goes to the range table.
* **Unmatched responses** are ignored and raise `xb_rsp_unmatched`. They
  include responses to requests that were dropped or had already timed out.

## Range entry table (`hie_ret`)

The range table does most of the work and is the hardest part to follow. It is
a small, fully associative table of address ranges (16 entries by default).
The ranges never overlap. Together they form the engine's own guess at the
system memory map. Each entry holds:

| field | width | meaning |
|-------|-------|---------|
| start, end page | 36 + 36 | the range, inclusive |
| valid | 1 | |
| updated | 1 | the entry has been through at least one periodic update |
| LRU | 32 | table operations since this entry was last used |
| per class: avg | 13 | average response time |
| per class: variance | 32 | allowed distance from the average |
| per class: sum | 17 | sum of accepted response times since the last update |
| per class: errsq | 32 | sum of approximate squared errors since the last update |
| per class: cnt | 5 | accepted transactions since the last update |

### What happens to one completed transaction

Let *P* be the transaction's page, *c* its class and *t* its response time.

1. **Lookup** (1 cycle). All entries are checked in parallel for `start <= P <= end`.
2. **Miss → insert** (18 cycles in total).
   * The new range starts at *P*.
   * It ends one page below the lowest start page above *P*, or at the last
     page of the 48-bit space if there is none. That way one entry covers as
     much unmapped space as possible.
   * The new entry gets the initial average and variance for all three
     classes. Class *c* then takes `avg = sum = t, cnt = 1`.
3. **Hit, `|t − avg[c]| <= variance[c]` → update** (3 cycles).
   * `sum += t`
   * `errsq += sq(|t − avg|)`
   * `cnt++`

   When `cnt` reaches `UPDATE_PERIOD` (16), the statistics of class *c* are
   refreshed and restarted:
   * `avg = sum / 16` and `variance = max(errsq / 16, initial variance)`. Both
     divisions are right shifts.
   * The sums and the count are cleared, and the entry is marked *updated*.
   * The variance floor stops a perfectly regular device from reaching a
     variance of 0. With a variance of 0, the next response that is one
     cycle different would split the entry.
4. **Hit, outside the variance → split** (3 cycles).
   * The entry is cut at *P*: the old entry keeps `[start, P−1]`, and a new
     entry `[P, end]` is initialised like an insert.
   * If *P* is already the entry's first page, there is nothing to cut. The
     entry is then re-initialised in place.
   * If `t > AVG_ANOM_MULT × avg[c]` (12 by default), the transaction is
     also reported to the trace buffer as a **delay** anomaly. A split alone
     is not an alarm. Responses that are only somewhat slower, or faster, just
     teach the table a new range.

Every insert, update or split resets the LRU counter of the entry it uses or
creates, and adds one to the counter of every other valid entry. After a split,
the old half therefore shows LRU 1 and the new half LRU 0.

The squared error uses no multiplier. The error is shifted left by its own bit
length: `sq(e) = e << bitlen(e)`. For example, `sq(30) = 30 << 5 = 960`. The
result is always between `e²` and `2e²`, and it goes into `hie_sq_approx`.

### Sorting without a sorter (`hie_sort_rank`)

Insert and merge both need the entries in address order. The table does this
in *N* cycles with *N* comparators and one adder, not a full sort:

1. Pick one entry, the "analysed" entry.
2. Compare its end page with the start page of every valid entry.
3. Count the comparisons that are true. Because ranges do not overlap, the
   count is the number of ranges that start at or below the analysed one.
4. The analysed entry belongs at position `count − 1` of an *index table*,
   which holds entry IDs in ascending address order.

Stepping through all *N* entries fills the index table in *N* cycles. Example:
an analysed range ending at page 0x85000 is compared against start pages
0x80000, 0x82001, 0x80011 and 0x85001. Three comparisons are true, so the
entry's ID goes to slot 2.

For an insert, after the 16 sort cycles, the first index-table entry whose
start is above *P* gives the end of the new range. The new entry is then
written in the same cycle. Lookup, 16 sort cycles and the write make 18 cycles.

### Merge and evict

Splits create ranges that later turn out to be the same device. So whenever an
operation leaves the table full, a merge pass runs:

1. The table is sorted (16 cycles).
2. The ranges are walked from the lowest upwards, two cycles per range. Each
   range is tested against the current *base*, the nearest surviving range
   below it.
3. The upper range is merged into the base if any of these holds. Merging
   stretches the base over it and invalidates the upper range.
   * **Case 1:** for all three classes, the difference between the two
     averages is within either entry's variance.
   * **Case 2:** the upper range has been idle for more than `LRU_THRESH_MIN`
     (25) operations and has never been through a periodic update. This
     covers a range split off by one unusual transaction and never used again.
   * **Case 3:** the upper range has been idle for more than `LRU_THRESH_MAX`
     (100) operations.
4. If the upper range is not merged, it becomes the new base.
5. If nothing merged in the whole pass, the entry with the largest LRU count
   is evicted. On a tie, the lowest address is evicted.

A full pass takes 48 cycles. In the worst case, an insert that fills the table
keeps the range table busy for 18 + 48 cycles. The queue in front of it
(`QUEUE_DEPTH` = 16) absorbs completions during that time. After any operation
at least one entry is free, so a split or insert never has to wait for space.

### Range-table handshake

* `in_valid` / `in_ready` take one transaction when the table is idle.
* `anom_valid` / `anom_rec` / `anom_ready` hand delay records to the trace buffer.
* `ev_insert`, `ev_update`, `ev_split`, `ev_merge`, `ev_evict` and `ev_period`
  pulse once per operation. `ev_merge` pulses once per merged range.
* A combinational debug port (`rd_idx` → `rd_entry`) exposes every entry.

## Trace buffer (`hie_trace_buf`)

The trace buffer is a circular store of 128 records.

* **Record contents.** Each record holds opcode, source, page, mask, size,
  param, command class and anomaly kind. That is a transaction-buffer entry
  without its valid bit and counter, plus 2 bits for the kind.
* **Two write ports.** Port A comes from the transaction buffer and is always
  accepted. Port B comes from the range table and waits while port A writes.
* **Interrupts.**
  * A deadlock record raises `irq_deadlock` and **halts** the buffer. Nothing
    is written after that until reset.
  * A delay record raises `irq_delay`.
  * Response-error records raise nothing. The requester saw the error itself.
  * Both interrupts stay set until `irq_clear`.
* **Read port.** `tb_rd_addr` → `tb_rd_data` has one cycle of latency. It
  suits a block RAM and any debug-access bridge. `tb_wr_ptr` is the next slot
  to be written, and `tb_n_rec` is the number of valid records.

## Parameters of `hie_top`

| parameter | default | meaning |
|-----------|---------|---------|
| `XB_ENTRIES` | 64 | outstanding requests tracked |
| `TIMEOUT` | 1500 | cycles before an unanswered request is a deadlock |
| `QUEUE_DEPTH` | 16 | completions buffered in front of the range table |
| `RET_ENTRIES` | 16 | address ranges learned |
| `UPDATE_PERIOD` | 16 | accepted responses per periodic update (power of two, at most 16) |
| `LRU_THRESH_MIN` | 25 | merge-case-2 idle threshold |
| `LRU_THRESH_MAX` | 100 | merge-case-3 idle threshold |
| `AVG_ANOM_MULT` | 12 | delay anomaly if response > this × range average |
| `INIT_AVG`, `INIT_VAR` | 40, 40 | initial average and variance of a new range, in cycles |
| `TB_DEPTH` | 128 | trace records (power of two) |

The initial average and variance should match the typical latency of the
target system. A value of 0 is a poor choice: the first write to a range that
so far has only seen reads would then always split it. `hie_ret` also accepts
separate read, write and misc values.

The defaults come from a design study in which these sizes were chosen:

* **Range-table size.** 8 entries evicted too often. 16 entries were a good
  trade against area, and 24 or more brought little.
* **LRU thresholds.** Lower thresholds caused fewer evictions.
* **Update period.** Short update periods caused slightly fewer splits.
* **Anomaly multiplier.** Values of 11–12 balanced sensitivity against
  false alarms. 16 gave the fewest false alarms but missed more.
* **Timeout.** Timeouts above 1500 cycles did not reduce false deadlocks.

## Departures and open points

* The source design leaves these numbers open: the initial averages and
  variances, and the anomaly multiplier (it names a range of values). The
  values above are this implementation's.
* Source ambiguities, and the readings used here:
  * **Entry field widths.** The source's tables disagree on the widths of
    the variance, sum and error-sum fields. This implementation uses
    32/17/32 bits, which hold every value that can arise.
  * **Transaction-buffer size.** 64 entries are used. One synthesis figure
    of the original suggests a 16-entry build.
  * **Variance bound.** The variance is compared directly with the latency
    difference, as described, even though it is a mean *squared* error.
    The initial-variance floor keeps this usable.
* Unusually *short* responses split a range but are never reported as
  anomalies. The source design mentions short responses as anomalies but only
  defines a test for long ones.
* A merge pass takes 48 cycles here: 16 to sort, then two per range. The
  source quotes "up to 50 cycles" for merge and evict.
* Each entry's 4-bit ID lives in the index table rather than in the entry.
* The per-entry "timer" field shown in the source's entry layout has no
  described function and is not built.
* The source design reads the trace buffer over JTAG. This implementation
  provides a plain read port instead.
* Policies the source does not specify, chosen here:
  * Requests that find the transaction buffer full are not tracked.
  * Completions that find the queue full are dropped.
  * The error response and the timeout share the trace-buffer path. Port A
    has priority over port B.
  * Interrupts are sticky and cleared by `irq_clear`.
  * The halt lasts until reset.
* Reset is synchronous and active low (`rst_n`).

## Resource notes

* Per range-table entry: 403 bits (2 × 36 + 1 + 1 + 32 + 3 × (13 + 32 + 17
  + 32 + 5)). The whole table is 6448 bits.
* Trace buffer: 128 × 61 bits.
* Transaction buffer: 64 × (59 + 13) bits.
* Most of the logic is in the range table: the parallel range comparators, the
  16-input rank adder, and the wide multiplexers that read entries through
  the index table.

## Files

| file | contents |
|------|----------|
| `rtl/hie_pkg.sv` | widths, opcodes, request/response/transaction/trace/entry types, opcode pairing |
| `rtl/hie_xb.sv` | transaction buffer |
| `rtl/hie_fifo.sv` | stage-0 to stage-1 queue |
| `rtl/hie_ret.sv` | range entry table |
| `rtl/hie_sort_rank.sv` | comparators + adder of the sort |
| `rtl/hie_sq_approx.sv` | shift-based square |
| `rtl/hie_trace_buf.sv` | trace buffer and interrupts |
| `rtl/hie_top.sv` | the engine |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench checks its module against values worked out independently. Each
ends with a line `TB_RESULT checks=N failures=M`.

* `tb_hie_sq_approx`: all 8192 13-bit errors, plus the 30 → 960 example.
* `tb_hie_sort_rank`: the four-entry example above, plus 200 random tables
  of non-overlapping ranges in random slots.
* `tb_hie_fifo`: random push/pop against a queue model, including full,
  overflow and empty.
* `tb_hie_trace_buf`:
  * wrap-around, port priority, record contents and interrupt rules;
  * halting on a deadlock.
* `tb_hie_xb`: random traffic against a scoreboard of issue cycles.
  * exact response times, error routing and timeout latency;
  * a full buffer and a dropped request;
  * the response-at-timeout rule.
* `tb_hie_ret`: runs a reference model of the whole range-table algorithm
  next to the RTL.
  * After each of 3000 transactions, every entry is compared field by field.
    The traffic includes memory-like, peripheral-like and random traffic.
  * Predicted delay anomalies and the cycle count of every operation are
    checked: 3 for update/split, 18 for insert, 48 more for merge/evict.
  * It also replays the two-transaction example in which zero initial values
    split a range.
  * A final phase holds `anom_ready` low most of the time. A waiting delay
    record must stay unchanged, keep new transactions out, and be taken once.
* `tb_hie_top`: the whole engine at its default parameters, in a modelled
  system with memory (~40 cycles), UART (~300), GPIO (~100) and an error
  device.
  1. The engine learns the traffic.
  2. Scattered bursts force merges, evictions and queue overflow.
  3. A burst of requests overfills the transaction buffer.
  4. Finally the UART stops answering.

  The test checks:
  * the deadlock interrupt arrives exactly `TIMEOUT` cycles after the lost
    UART request;
  * the last trace record is that request;
  * the trace stays frozen;
  * every error response was recorded;
  * every delay record is a deliberately slowed response;
  * every mechanism (insert, update, split, merge, evict, periodic update,
    queue overflow, buffer full, unmatched response) occurred.
* `tb_hie_unmapped`: the same engine with the other lock-up cause. One
  request goes to an address that no device decodes and is silently dropped,
  while the rest of the system keeps running. The deadlock record must be
  exactly that request.

To run one with plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl --top-module tb_hie_top \
    rtl/hie_pkg.sv rtl/*.sv tb/tb_hie_top.sv
./obj_dir/Vtb_hie_top
```

Swap in any other testbench name; the package file must come first. All
testbenches finish in seconds.

The range-table reference model in `tb_hie_ret.sv` is the most complete
statement of the algorithm's exact behaviour. Change it together with
`hie_ret.sv` when changing a policy.
