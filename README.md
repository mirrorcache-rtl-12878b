# Mirror cache: a relaxed-retention STTRAM L1 data cache that refreshes in place

STTRAM is attractive for L1 caches because it is dense and leaks little, but writing
a cell that holds its data for years is slow and costly. If the cell's retention time
is relaxed to microseconds or milliseconds, writes get cheaper and faster. The catch is
that a block that stays in the cache longer than the retention time must be rewritten
("refreshed") before it fades. The usual scheme copies such blocks into a separate
refresh buffer and back.

The mirror cache needs no buffer. The cache is built with twice its logical capacity:

- a **main segment**;
- an **auxiliary (mirror) segment** of the same size and organisation.

When a block gets close to its retention limit, it is copied from whichever segment
holds it into the same slot of the other segment. A one-bit **status array** entry per
block records which copy is live. The tags stay at the logical size: a 32 KB cache has a
32 KB tag array plus 512 status bits, in front of 64 KB of data.

This repository holds synthesizable SystemVerilog for the whole cache at the main
configuration:

- 32 KB logical capacity, 64 KB physical;
- 64 B lines, 4 ways (128 sets, 512 blocks);
- 2 GHz core clock;
- 100 µs retention cell: 1-cycle hits and 3-cycle writes.

## The life of a block

```
 refill / store ─► MAIN (status 0, counter 0)
                     │ counter reaches state 3  (2C..3C after the last write)
                     ▼
                   refresh: read main copy, write aux copy, then status := 1, counter := 0
                     │
                   AUX (status 1) ── store hit ──► merged line written to MAIN (status 0)
                     │ counter reaches state 3
                     ▼
                   refresh: read aux copy, write main copy, then status := 0, counter := 0
```

**Writes always land in the main segment.** A refill from the lower level goes to the
main segment, and so does a CPU store. If the stored-to block currently lives in the
auxiliary segment, the controller:

1. reads the whole line from the auxiliary segment;
2. merges in the stored word;
3. writes the line to the main segment;
4. clears the block's status bit.

**Refresh counters.** Each block has a four-state counter (2 bits). Every write of the
block resets it to 0: a store, a refill, or the end of a refresh. All counters advance
together on a common counter clock, whose period is C = R / P:

- R is the retention time;
- P = S − 1 for an S-state counter, so P = 3 here;
- at the defaults, C = 200 000 / 3, rounded down to 66 666 core cycles.

A counter that reaches state 3 stays there and raises a refresh request for its block.
Only valid blocks count. The counter clock is global and not aligned to the write, so a
block reaches state 3 between 2C and 3C after its last write, that is between 0.67 R and
R.

**Refresh engine.** The engine runs beside the CPU-side state machine. It takes the
lowest-numbered block with a pending request and works in four steps:

1. **Read:** reads the block from the segment its status bit names (1 cycle).
2. **Capture:** latches the line from the read/refresh mux (1 cycle).
3. **Write:** writes the line to the other segment. The segment is busy for WRITE_LAT
   cycles.
4. **Flip:** when that write has finished, inverts the status bit and clears the
   counter.

A refresh therefore occupies WRITE_LAT + 3 cycles from request to status flip (6 at the
defaults). Refreshing all 512 blocks back to back takes about 3 000 cycles (1.5 µs).

**Status flips last.** The status bit changes only after the new copy is complete.
Until then, loads of that block keep reading the old copy, which is still intact. So
reading a block that is being refreshed never stalls. Two other rules keep the copies
consistent:

- a store or miss that touches a block under refresh waits until the refresh is done;
- a block the CPU side is working on is skipped by the refresh engine (its pending
  write will clear the counter anyway).

## Block diagram and modules

```
              cpu_req/resp                          mem_rd / mem_wr
                   │                                      │
           ┌───────▼──────────────────────────────────────▼───────┐
           │ mc_controller                                        │
           │   CPU state machine   refresh engine                 │
           │   mc_tag_array  mc_plru  mc_status_array             │
           │   mc_refresh_counters ◄── mc_tick_gen (period C)     │
           └──┬──────────────┬───────────────────────▲────────────┘
      CPU write/refill   refresh write + read        │ line_rdata
              ▼              ▼                       │
           ┌─────────────────────────┐               │
           │ mc_refresh_demux        │               │
           └───┬─────────────────┬───┘               │
               ▼                 ▼                   │
         mc_segment u_main   mc_segment u_aux        │
               └───────┬─────────┘                   │
                       ▼                             │
              mc_read_refresh_mux ───────────────────┘
```

| File | What it is |
|---|---|
| `rtl/mc_pkg.sv` | Default sizes and timing, segment encoding, counter and controller state enums |
| `rtl/mirror_cache.sv` | Top level: controller, two segments, mux and demux wired together |
| `rtl/mc_controller.sv` | CPU state machine, refresh engine, and port arbitration |
| `rtl/mc_tag_array.sv` | Tags, valid and dirty bits (128 × 4), combinational lookup |
| `rtl/mc_plru.sv` | Tree pseudo-LRU replacement, 3 bits per set |
| `rtl/mc_status_array.sv` | 512 status bits, cleared on insert and inverted on refresh |
| `rtl/mc_refresh_counters.sv` | 512 four-state counters with a refresh request at state 3 |
| `rtl/mc_tick_gen.sv` | Counter clock: a one-cycle enable every C core cycles |
| `rtl/mc_segment.sv` | One data segment: 512 × 512-bit single-port array, 1-cycle read, write busy for WRITE_LAT cycles |
| `rtl/mc_read_refresh_mux.sv` | Selects the line read from main or auxiliary. Its output goes to the CPU, to write-back and to refresh |
| `rtl/mc_refresh_demux.sv` | Steering: refresh writes go to the other segment, CPU writes and refills to main, and the read to the segment it names |

## Interfaces and timing

**CPU side.** Requests use a valid/ready handshake:

- `cpu_req_we` selects a store (1) or a load (0);
- `cpu_req_addr` is the byte address (word aligned);
- `cpu_req_wdata` and `cpu_req_be` carry a 32-bit store with byte enables.

Only one request is outstanding at a time. `cpu_resp_valid` is a one-cycle pulse; for a
load it comes with `cpu_resp_rdata`.

| Access | Response, counted from acceptance (defaults) |
|---|---|
| Load hit (either segment) | 1 cycle |
| Store hit, block in main | 1 + WRITE_LAT = 4 cycles |
| Store hit, block in auxiliary | 3 + WRITE_LAT = 6 cycles (read aux, merge, write main) |
| Miss | victim write-back, if dirty + lower-level latency + write into main (WRITE_LAT) |

A load is accepted only when its segment port and the single read slot are free. The
refresh engine has priority on both, so a load to a segment that is busy with a write
sees `cpu_req_ready` low for a few cycles.

**Lower-level side.** Line reads and write-backs:

- a refill request is `mem_rd_valid`/`mem_rd_ready` with `mem_rd_addr`, a line-aligned
  address;
- the line returns on `mem_rd_resp_data` with `mem_rd_resp_valid`, any number of cycles
  later;
- a dirty victim goes out on `mem_wr_valid`/`mem_wr_ready` with `mem_wr_addr` and
  `mem_wr_data`, before the refill request.

**Reset.** `rst_n` is asynchronous and active low. It clears:

- the tag valid and dirty bits;
- the status bits;
- the counters;
- the replacement state;
- both state machines.

Data arrays and tag fields are not reset.

## Parameters and the evaluated retention times

`mirror_cache` takes these parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `CACHE_BYTES` | 32768 | Logical capacity; each segment has this size |
| `LINE_BYTES` | 64 | Line size |
| `WAYS` | 4 | Associativity (a power of two) |
| `ADDR_W` | 32 | Address width |
| `WORD_W` | 32 | CPU word width |
| `RETENTION_CYCLES` | 200000 | Retention time R in core cycles |
| `WRITE_LAT` | 3 | Segment write occupancy, in cycles |

Four STTRAM retention times are of interest. The defaults are the first row; the other
three are the parameter settings in the other rows:

| Retention | `RETENTION_CYCLES` (2 GHz) | `WRITE_LAT` | Counter period C |
|---|---|---|---|
| 100 µs | 200 000 | 3 | 66 666 |
| 1 ms | 2 000 000 | 4 | 666 666 |
| 10 ms | 20 000 000 | 5 | 6 666 666 |
| 100 ms | 200 000 000 | 7 | 66 666 666 |

The hit latency is one cycle for every retention time and is built in.

## Design choices and departures

The following come from the source design:

- the two-segment organisation and the tags kept at the logical size;
- the status-bit rules: 0 on insert, inverted on refresh;
- the four-state counter with C = R/P and refresh at state P;
- CPU writes and refills going to the main segment;
- the read/refresh mux and the refresh demux;
- the default sizes and latencies.

The rest is this implementation's choice:

- **Status flip after the copy.** The source description says the status bit is read
  and inverted when a refresh is triggered, and then the block is written. It also says
  that reads of a block under refresh need no stall. This design inverts the bit when
  the new copy is complete. That is what lets loads keep using the old copy during the
  refresh.
- **No guard band.** The counter period follows C = R/P exactly. A block written just
  after a counter tick reaches state 3 almost exactly R cycles later, and it may then wait
  behind other refreshes. Its last read can therefore come slightly after R: in the
  end-to-end test with R = 600 cycles, the oldest read was 671 cycles. If the cell needs
  strict margin, set `RETENTION_CYCLES` below the true retention time.
- **Write policy.** The cache is write-back and write-allocate, and keeps a dirty bit
  per block. Invalid ways are filled before the pseudo-LRU victim is used.
- **One read slot.** A single read per cycle goes through the one read/refresh mux.
  Each segment is a single-port array that is busy for WRITE_LAT cycles after a write.
- **Refresh priority and order.** Refresh has priority over the CPU. Pending blocks are
  served lowest index first. Every valid block that reaches state 3 is refreshed, whether
  or not it will be used again.
- **Storage type.** The status array, counters and tags are flip-flops. The status array
  could equally be built from relaxed-retention STTRAM, like the data.
- **Not modelled.** The segments do not model data fading after R; that is a property
  of the MTJ cell. Energy and leakage figures of the technology are not represented in
  the RTL.
- **Data cache only.** The cache is meant as the L1 data cache. A processor also has a
  separate instruction cache, which is not part of this design.
- **Not included.** The refresh-buffer baseline the mirror cache is compared against is
  not part of this design.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_mirror_cache` (environment in `tb/mc_cache_env.sv`) | 20 000 random loads and stores on a 1 KB cache with R = 600 cycles, against a byte-level reference memory and a random-latency lower level. A monitor on both segment ports checks that no line is read after it has been held longer than R plus the worst refresh queueing time. The test also checks the 1-cycle load-hit latency. It counts each mechanism and fails if one never happened: load hits in main and in aux, store hits in main and in aux, misses, write-backs, refreshes in both directions, loads served while their own block was being refreshed, loads stalled by a busy segment, several refreshes pending at once, and stores or misses waiting on a refresh. |
| `tb_mirror_cache_retention` | Four caches side by side, with R = 600, 6 000, 60 000 and 600 000 cycles (a factor of ten apart, like 100 µs … 100 ms) and write latencies of 3, 4, 5 and 7 cycles. Each runs a random stream with full data and retention-age checking. The test requires the number of refreshes during the stream to fall as R grows. A typical run gives 1536, 2, 0 and 0 refreshes. |
| `tb_mirror_cache_full` | All parameters at their defaults. It fills all 512 blocks, stores into each, and waits until every block has been refreshed into the auxiliary segment and back (about 400 000 cycles). It reads everything back at each stage and checks that each refresh started 2C to 3C after the block's last write. It then evicts every block with a block of another tag and checks the data of all 512 write-backs. It runs in a few seconds. |
| `tb_mc_controller` | A directed walk through one block's life with exact cycle counts: miss and refill, hit latency, store latency in main and in aux, counter reaching P within 2C..3C, refresh taking WRITE_LAT + 3 cycles, round trip main→aux→main, and dirty eviction with a write-back of the right data. |
| `tb_mc_segment`, `tb_mc_tag_array`, `tb_mc_plru`, `tb_mc_status_array`, `tb_mc_refresh_counters`, `tb_mc_tick_gen`, `tb_mc_read_refresh_mux`, `tb_mc_refresh_demux` | Random stimulus compared each cycle against an independent reference model, including the timing of the segment's busy window and of the counter clock. |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mc_pkg.sv tb/tb_mirror_cache.sv --top-module tb_mirror_cache -Mdir obj -o sim
./obj/sim
```

Replace `tb_mirror_cache` with any other testbench name. The top-level testbenches
and `tb_mc_controller` look inside the design through hierarchical names, for example
`dut.u_ctrl.pending`. If you rename internal signals, update those testbenches too.

Program-level studies of the cache need CPU memory traces: ten SPEC CPU2006 programs,
100 M instructions each, at all four retention times. No such traces come with the RTL,
so no program workload is simulated. The configurations themselves (32 KB, 64 B, 4-way,
at each retention time) are the parameter settings listed above.
