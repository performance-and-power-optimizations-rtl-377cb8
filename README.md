# Reliable and low-leakage L1 data caches

This RTL implements two cache ideas from the thesis *Performance and Power
Optimizations for Highly Reliable Caches*:

1. **An L1 data cache built from 8T SRAM cells.** The cache keeps the 8T cell's
   stability but hides most of the cost of its awkward write path. It does this
   with a one-set write buffer: **Write Grouping (WG)**, optionally extended with
   **Read Bypassing (WG+RB)**. The cache is meant to be built from
   **dual-threshold 8T cells**, whose only visible effect on the logic is one
   extra cycle of write latency.
2. **A data cache with drowsy mode per word (ASL).** Each 8-byte word is put
   into a low-leakage drowsy state on its own, instead of a whole 64-byte line
   at a time.

The two are separate designs, for different processor setups. The top level
`hr_caches_top` puts them side by side. They share only clock and reset.

## Why an 8T array needs Read-Modify-Write

An 8T cell adds a separate read port to the 6T storage cell: a read word line
and a single read bit line. A read therefore never disturbs the stored value.
This makes the cell much more stable than a 6T cell at low voltage.

Writes are the weak point. SRAM rows are bit-interleaved, so one word is spread
over the whole row. A 6T array can write only the selected columns, because the
other cells on the row just see a harmless dummy read. An 8T cell is sized for
writing, so it cannot sit safely on an active write word line unless it is being
written. Every write therefore has to rewrite the **whole row**:

1. read the row into latches at the bottom of the columns;
2. merge the new data into the selected columns;
3. write the whole row back.

This is Read-Modify-Write (RMW). It costs one extra array read for every store,
plus a full-row writeback.

`sram8t_array` models such an array. It offers exactly two operations, a
whole-row read into read latches and a whole-row write. Each takes a fixed
number of cycles, and the two ports are independent.

## Write Grouping: the Set-Buffer and the Tag-Buffer

In this cache one array row is one cache set (4 ways × 32 B = 128 B). Two small
structures sit next to the array:

* **Set-Buffer** (`set_buffer`, 1024 bits): a copy of one set. It sits between
  the column write-back multiplexers and the write drivers. A store changes the
  bytes it selects in the buffer. A comparator on each of the 128 byte columns
  reports whether the store changes anything. A store that writes the value
  already there is a **silent** write.
* **Tag-Buffer** (`tag_buffer`): holds which set the Set-Buffer contains, that
  set's four tag entries, a valid flag and the **Dirty** bit. Dirty means the
  Set-Buffer differs from the array row.

The row read that a store needs is kept in the Set-Buffer, and its writeback is
postponed. The controller (`wg_ctrl`) probes the Tag-Buffer for one cycle on
every request. There are four cases:

| request | Tag-Buffer | WG | WG+RB |
|---|---|---|---|
| write | hit (same set) | merge into the Set-Buffer, no array access | same |
| read | miss | normal array read | same |
| write | miss | write the buffer back **only if Dirty**, read the new set into the buffer, then merge | same |
| read | hit | write back if Dirty, then read the array | answer from the Set-Buffer through the bypass multiplexers |

A run of stores to one set therefore costs one row read and at most one row
writeback. If every store in the run was silent, Dirty stays clear and the
writeback is skipped too. In WG+RB the Data-out of each column has a 2:1
multiplexer (`bypass_mux`) that selects either the Set-Buffer or the read bit
lines. A read of the buffered set then needs no array access at all.

The controller handles one request at a time. Cycles from the request handshake
to `resp_valid`, with RD = 4 and WR = 4 + 1:

| case | cycles | default |
|---|---|---|
| write hitting the Tag-Buffer; read bypassed (WG+RB) | 2 | 2 |
| read missing the Tag-Buffer; WG read hit with Dirty clear | 2 + RD | 6 |
| WG read hit with Dirty set | 3 + WR + RD | 12 |
| write or fill missing the Tag-Buffer, Dirty clear | 3 + RD | 7 |
| write or fill missing the Tag-Buffer, Dirty set | 4 + WR + RD | 13 |

The one-cycle probe, one-cycle modify and one-cycle bypass steps follow the
thesis. So does the 4-cycle array access.

### A worked request stream

The testbench replays the thesis's example. Sets *a* and *b*; the last write to
*a* is silent; the buffer starts empty:

```
requests : Ra Wb Wb Rb Rb Wb Wa Rb Ra
RMW      : 13 array accesses (one extra read per write)
WG       : Ra Rb Wb Rb Rb Wb Ra Rb Ra        (9)
WG+RB    : Ra Rb Wb Ra Rb                    (5)
```

`tb_wgrb_cache` checks that the array sees exactly these sequences.

## Request interface of the 8T cache (`wgrb_cache`)

* `req_valid`/`req_ready` handshake. The request must stay stable while it
  waits; an assertion checks this. Requests:
  * `READ`: one 64-bit word.
  * `WRITE`: one word, with byte enables.
  * `FILL`: installs `req_fill_line` and the address tag into way
    `req_fill_way`.
* Address: 48 bits = tag 34 | set 9 | byte offset 5.
* The response is a one-cycle `resp_valid` pulse with no back-pressure. It
  carries:
  * `resp_hit` and `resp_way`;
  * the read word;
  * for a fill, the line previously held in that way, with its valid bit,
    modified bit and tag. This is the victim to write to the next level.
* A write to a line that is not present changes nothing and returns
  `resp_hit = 0`. Choosing a victim, refilling from L2 and retrying are the
  requester's job.
* Tags live in a second 8T array of the same depth. A tag row holds the
  `{valid, modified, tag}` entries of the four ways. It is read and written back
  together with the data row, and cached in the Tag-Buffer. A non-silent write
  sets the line's modified bit, so a line that only received silent writes is
  still clean when it is evicted.
* After reset the controller clears the tag array with one row write per set,
  about 3,070 cycles at 512 sets. `req_ready` stays low until this is done.
* `ev_*` outputs pulse once per array read, array write, grouped write, silent
  write, bypassed read, and skipped writeback. They let a testbench or
  performance counters measure array traffic.

Parameters: `SETS`, `WAYS`, `LINE_BYTES`, `WORD_BYTES`, `ADDR_W`, `RD_LAT`,
`WR_LAT_BASE`, `WR_EXTRA` and `READ_BYPASS` (1 = WG+RB, 0 = WG).

## Dual-threshold 8T cells

The proposed cell uses high-threshold transistors for the six storage and write
transistors. The two read-port transistors keep a regular threshold. Leakage
drops and the read path is unchanged; writes become slower. The thesis counts
this as one extra write cycle in the optimistic case and two in the pessimistic
case. In the RTL this is `WR_EXTRA`, default 1, added to the 4-cycle array
write. The cell itself is analog and is not modelled.

## Word-granularity drowsy cache (`asl_cache`, `asl_ctrl`)

A drowsy word runs from a lower retention supply. It keeps its data but must not
be accessed. Its word line is gated, and waking it takes `WAKE_LAT` cycles.

The **periodic drowsy signal** comes every Update Window (`UW`, default 128
cycles) and sets the drowsy bits:

* **B-ASL** (`PERF_AWARE = 0`): every word goes drowsy.
* **P-ASL** (`PERF_AWARE = 1`, the default): each word has a status bit that
  records an access during the window that just ended. Words with the bit set
  stay awake and all others go drowsy. Then all status bits are cleared. A word
  therefore stays awake for one window after the last window in which it was
  used.

An access to a drowsy word wakes that word only; the rest of the line stays
drowsy. The access is granted `WAKE_LAT` cycles later. Latency from the request
handshake to the response:

* 3 cycles (the cache latency) for an awake word;
* 3 + `WAKE_LAT` for a drowsy word.

The `lowvolt` output (one bit per word, 4,096 bits) is the control of the analog
VDD/VDDLow supply switches. Words start drowsy after reset. A word being
accessed in the cycle a window ends stays awake.

The array holds 512 lines × 8 words × 64 bits (32 KB). The requester supplies
the line index after its own tag lookup: tags and miss handling are not part
of this block.

## Where the RTL goes beyond or departs from the thesis

* **Request handshake and response format.** The thesis gives neither. The
  valid/ready handshake, one request at a time, and the FILL operation with
  victim return are this design's.
* **Tag array.** Tags sit in a separate 8T array, and the Tag-Buffer holds
  valid and modified bits as well as tags. The Tag-Buffer also gets a valid
  flag, because it is empty after reset. A Tag-Buffer entry is 36 bits per way.
* **Word width and comparators.** The word is 64 bits. Silent-write comparators
  and bypass multiplexers work on byte columns: 128 per set, which matches the
  thesis's count of 128 comparators and 128 multiplexers.
* **Bit interleaving.** It is a layout matter and is not modelled; the row is a
  flat vector.
* **Fills.** A fill always sets Dirty, even if it happens to install identical
  contents.
* **When status bits clear.** The thesis says a status bit returns to zero at
  the end of the next window. Here every status bit is cleared at each window
  end, right after it has been used to decide which words stay awake. A word
  used in one window thus stays awake through the next window only.
* **Latency split.** The thesis gives a 4-cycle L1 latency and one-cycle
  probe, modify and bypass steps, but not how they add up. Here the array itself
  takes 4 cycles and the probe comes before it.
* **Not built (analog).** The cells themselves (6T, 8T, dual-threshold 8T,
  drowsy cell), the VDD/VDDLow switches, precharge and sense amplifiers. The
  line-granularity drowsy cache and plain RMW are baselines in the thesis and
  are not built either. The plain RMW cost appears only in the testbench's
  comments.

## Files

| file | contents |
|---|---|
| `rtl/hrc_pkg.sv` | request opcodes and controller state encodings |
| `rtl/sram8t_array.sv` | whole-row 1R1W 8T array model with read latches |
| `rtl/set_buffer.sv` | Set-Buffer with byte merge and silent-write detection |
| `rtl/tag_buffer.sv` | Tag-Buffer: valid, Dirty, set index, tag entries |
| `rtl/bypass_mux.sv` | Data-out bypass multiplexers and column select |
| `rtl/wg_ctrl.sv` | WG / WG+RB controller |
| `rtl/wgrb_cache.sv` | the 8T L1 data cache |
| `rtl/asl_ctrl.sv` | drowsy bits, status bits, window counter, wakeup |
| `rtl/asl_cache.sv` | ASL word array with word-line gating |
| `rtl/hr_caches_top.sv` | both caches side by side |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the top |

## Simulating

All testbenches are self-checking and print
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/hrc_pkg.sv tb/tb_wgrb_cache.sv --top-module tb_wgrb_cache
./obj_dir/Vtb_wgrb_cache
```

Replace `tb_wgrb_cache` with any other testbench.

* `tb_hr_caches_top` runs both caches at their full default sizes. It requires
  every mechanism to occur at least once: grouped writes, silent writes,
  bypassed reads, skipped and performed writebacks, Tag-Buffer misses, cache
  misses, modified victims, word wakeups, window ends, and words kept awake by
  their status bit.
* `tb_wgrb_cache` runs six full-size instances side by side: WG+RB and WG,
  with 0, 1 or 2 extra write cycles and with array latencies of 1, 2 and 4
  cycles. Each replays the worked example and then 1,500 random requests
  against a reference model, with exact latency and array-traffic checks.
* `tb_asl_cache` runs six full-size instances: P-ASL and B-ASL, wakeup
  latencies 1 to 4, and Update Windows of 64, 128 and 1,024 cycles. It checks
  data, every access latency and the window length.

Each run takes well under a minute.

## How far it can be trusted

Every testbench passes under Verilator with registers started at random
values. Each testbench also fails when a deliberately broken copy of its module
replaces the real one. The checks cover the logic only: cycle counts, array
traffic and data. Leakage savings and cell stability are analog results. The
RTL does not model them, and it holds none of the benchmark traces the thesis
measures with. Timing closure has not been attempted: the 128 byte comparators
and the 1024-bit merge sit in a single cycle.

Nothing here has been synthesized to gates beyond a generic logic mapping. The
arrays are written as memories: a real implementation would replace
`sram8t_array` and the ASL word array with SRAM macros that have the same
ports.
