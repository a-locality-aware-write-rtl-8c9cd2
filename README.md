# Write-filter cache for an STTRAM L1 data cache

STTRAM bit cells leak far less than 6T SRAM and read at least as fast, which
makes them attractive for an L1 data cache. Their weak point is the write: in
the cell configuration assumed here an L1 read takes 2 cycles but a write takes
4, and a write costs several times the energy of a read. In a data cache most
writes are stores, and stores tend to hit the same few lines again and again.

This design puts a tiny, fully associative SRAM cache, the **write-filter (WF)
cache**, between the core's load/store queue and the STTRAM L1. A store that
finds its line in the WF cache is written there in one cycle. The L1 sees that
line again only once, when the dirty line is evicted from the WF cache. The
key idea is to fill the WF cache *lazily*:

* lines never enter on an L1 miss;
* under **WF_WR** (the default) a line enters only when a store hits in the
  L1, so the WF cache holds lines that are being written;
* under **WF_RD** a line also enters on an L1 load hit; this filters more
  loads, but loads churn the small cache and push out lines that are being
  written.

The WF cache is always a subset of the L1 (strict inclusion). It keeps two
MESI bits per line, and it has a duplicate set of tags so that snoop
invalidations from other cores can be checked without using the core-side
lookup.

All RTL is SystemVerilog (IEEE 1800-2017) in `rtl/`. Self-checking testbenches
are in `tb/`.

## Access flow and latency

The core side is one request at a time. A request is a 64-bit load or store
with byte enables. Latency is counted from the cycle the request is accepted
(`req_valid && req_ready`) to the cycle `resp_valid` is high.

| Case | Latency | What happens |
|---|---|---|
| WF hit, load | 1 | word read from the WF line |
| WF hit, store | 1 | word merged into the WF line, line becomes dirty and M; store also queued for L2 |
| WF miss, L1 hit, load | 3 = 1 + 2 | 2-cycle STTRAM read; under WF_RD the line is copied into the WF cache in the same cycle |
| WF miss, L1 hit, store | 5 = 1 + 4 | 4-cycle STTRAM write; the updated line is copied into the WF cache (both policies) |
| L1 miss | 1 + tag check + L2 round trip | the miss is known after 2 cycles for a load, 1 for a store; the line is fetched from L2, the response is given in the cycle after L2 answers, and the 4-cycle block fill into L1 runs in the background |

WF lookups are combinational on the incoming address, and the response is a
registered output. Allocation into the WF cache never delays the response: the
line the L1 just returned is written into the WF cache in the same cycle that
the response is registered.

## The L1 write engine, background writes and stalls

This is the part that needs the closest reading. It is also where the timing
of the design comes from.

`stt_l1d` has two independent engines:

* The **read engine** returns a line `RD_LAT` = 2 cycles after it accepts a
  read.
* The **write engine** performs one of three operations in `WR_LAT` = 4
  cycles:
  * `L1W_WORD`: a store from the core.
  * `L1W_LINE`: a dirty line written back from the WF cache.
  * `L1W_FILL`: a block fill from L2.

  The data array is written in the operation's last cycle.

Write-backs and block fills are *background* work: the core is not made to
wait for them. The controller in `wf_l1d_top` works as follows:

* A dirty WF victim goes into a one-line **write-back register** in the cycle
  it is replaced. From there it is handed to the write engine as soon as that
  engine is free. The write-back register has priority over the controller's
  own use of the write engine.
* A clean victim is dropped. The L1 already holds the same data.
* A block fill is handed to the write engine after the core has been answered.

The only cost the core sees is when it touches a line that is being written.
The L1 read port refuses (`rd_ready` low) a read of the line held by the write
engine until that write ends. So a load of a line whose write-back started one
cycle earlier takes 3 + 4 = 7 cycles instead of 3. A load of any other line
proceeds beside the background write. A load that misses in the WF cache also
waits while its line is still in the write-back register, before it has
reached the L1.

A store that misses in the WF cache needs the write engine itself. It
therefore waits for *any* write in progress, not only for one to the same
line. This is a simplification: a finer design could queue the store.

## Coherence, inclusion and the write buffer

Stores are **write-through** to L2. Every store the core completes is pushed
into `write_buffer` on its way to L2, whether it hit in the WF cache or in the
L1. Consequences:

* L1 lines are never dirty with respect to L2. A line evicted from the L1 by a
  fill is simply dropped, and its WF copy is invalidated to keep inclusion
  (`evict_valid` → WF `inv`), even if that copy is dirty: L2 already has every
  store.
* Before a line is fetched again from L2, the controller waits until the write
  buffer holds no store to that line (`probe_match`). Otherwise the refetch
  could return stale data.
* A store that finds its line in state S sends an invalidation on `snp_out`
  and the line becomes M. This applies to a store in the WF cache or in the
  L1. A store miss does the same when L2 reports the line as shared.
* An invalidation arriving on `snp_in` clears the line in the WF cache
  (matched in the duplicate tags, `wf_dup_tags`) and in the L1. If a
  write-back of that line is still pending, it finds no line in the L1 and is
  dropped.
* Snoops are accepted only between requests (`snp_in_ready` = controller
  idle).

## Modules

| File | Role |
|---|---|
| `rtl/wf_pkg.sv` | widths (48-bit address, 64 B line, 42-bit line address, 64-bit word), MESI and policy enums, L1 write-operation codes, write-buffer entry, `line_word`/`merge_word` |
| `rtl/wf_l1d_top.sv` | top: the access controller (state machine, allocation policy, write-back register, snoop handling) and the instances below |
| `rtl/wf_cache.sv` | WF cache array: tags, data, valid, dirty, MESI per entry; combinational lookup; free-entry-first then LRU victim; dirty victim reported for write-back |
| `rtl/wf_dup_tags.sv` | duplicate WF tags for snoop matching |
| `rtl/stt_l1d.sv` | STTRAM L1: 128 sets x 4 ways x 64 B, LRU, read and write engines with the STTRAM latencies |
| `rtl/lru_sets.sv` | true-LRU age counters per set, two touch ports (used with 1 set by the WF cache, 128 sets by the L1) |
| `rtl/write_buffer.sv` | FIFO of write-through stores to L2 with a line-address probe |

Top-level parameters and their defaults:

| Parameter | Default | Meaning |
|---|---|---|
| `POLICY` | `WF_WR` | allocation policy, `WF_WR` or `WF_RD` |
| `WF_ENTRIES` | 8 | WF cache lines (4 is the other evaluated size) |
| `L1_SETS`, `L1_WAYS` | 128, 4 | 32 KB L1 with 64-byte lines |
| `RD_LAT`, `WR_LAT` | 2, 4 | STTRAM read and write cycles |
| `WBUF_DEPTH` | 8 | write-buffer entries |

The top's external interfaces:

* **Core:** `req_*` / `resp_*`.
* **Other cores:** `snp_in_*`, `snp_out_*`.
* **L2 line requests:** `l2_req_*` / `l2_resp_*`, including a `shared` flag
  that makes a loaded line S instead of E.
* **L2 write-through stores:** `l2_wr_*`.

The core, the L2 and the other cores are not part of this RTL.

## Where this RTL departs from or goes beyond the design description

These follow the design description:

* the WF cache organisation (fully associative, LRU, 64 B lines, 42-bit tags,
  2 MESI bits, duplicate tags);
* the WF_RD and WF_WR allocation rules;
* strict inclusion;
* silent clean eviction;
* the 1/3/5-cycle latencies;
* the 4-cycle background write-back;
* the stall for the remaining cycles of a write;
* write-through to L2 through a write buffer;
* invalidation on stores to shared lines;
* snoop invalidation of both caches;
* the 32 KB 4-way L1.

Additions and choices of this implementation:

* **Allocation table vs. text.** WF_RD allocates on L1 store hits as well as
  load hits. The allocation table lists both; the prose mentions only load
  hits.
* **Single outstanding request.** The evaluated core is out-of-order and could
  have several outstanding accesses.
* **Word size.** Accesses are 64-bit words with byte enables.
* **Store misses.** Store misses are write-allocate. They respond as soon as
  the L2 line has been merged, and the fill runs in the background.
* **Store misses and the write engine.** A store that misses in the WF cache
  waits for any L1 write in progress (see above).
* **Snoop timing.** Snoops are taken only between requests.
* **Write-back register.** It is one line deep. A second dirty victim waits
  until the register is free; under WF_WR this cannot happen.
* **Refetch ordering.** A refetch from L2 waits for the queued stores to that
  line.
* **Tag check on L1 writes.** A write-back or store word that misses in the L1
  ends after one cycle and changes nothing.
* **Not modelled:** refresh of the short-retention STTRAM cells, energy, and
  the physical placement of the WF cache next to the L1.
* **Idle outputs in `stt_l1d`.** The 7 low bits of `stt_l1d.evict_laddr` are
  the set index of the fill address, so they are wired through from the input.

## Verification

Every module has a self-checking testbench that prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog:

* `tb_lru_sets`, `tb_wf_dup_tags`, `tb_write_buffer` and `tb_wf_cache`:
  random stimulus against reference models.
* `tb_stt_l1d`: directed checks of read and write timing, fill and LRU
  victims, the stall behind a write to the same line, a parallel read of
  another line, and snoop invalidation; then random reads, writes, fills and
  invalidations against a reference model of the array, with the exact
  latency of every operation checked.
* Both `wf_l1d_top` and `stt_l1d` also carry assertions for their main
  invariants, for example that no line is allocated into the WF cache twice
  and that a fill never targets a resident line.
* `tb_wf_pkg`: the line helpers.
* `tb_wf_l1d_top`: runs the top at its full default size.
  * It models L2 (fixed latency, some lines shared, random back-pressure on
    write-through stores) and keeps a golden memory for every load.
  * It checks the 1, 3, 5 and 7-cycle cases above, lazy allocation, snoops in
    and out, and inclusion.
  * It then runs 6000 random accesses and snoops over lines that collide in a
    few L1 sets.
  * At the end it drains the write buffer and compares L2 with the golden
    memory.
  * It counts each mechanism (WF load/store hits, L1 load/store hits, fills,
    allocations, dirty write-backs, silent evictions, stalls behind L1
    writes, snoop hits in WF and L1, outgoing invalidations, inclusion
    invalidations, refetches waiting for the write buffer, a full write
    buffer) and fails if any never occurred.
* `tb_wf_rd_policy`: the same test with `POLICY = WF_RD`.
* `tb_wf_e4_config`: the same test with a 4-entry WF cache.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/wf_pkg.sv tb/tb_wf_l1d_top.sv --top-module tb_wf_l1d_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `tb_wf_l1d_top` with any other testbench name to run that one. The
full-size top test finishes in well under a second. The testbenches use
hierarchical references into the top only to count internal events.
