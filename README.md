# Unified LLC / DRAM controller with row-buffer hit harvesting

In a heterogeneous SoC the CPU, GPU and real-time units share one
last-level cache (LLC) and one DRAM channel. Usually the LLC controller and
the DRAM memory controller schedule on their own. Neither side sees the
other's state, and that costs DRAM work. Take two reads A and B that wait at
the cache for the same bank. A targets a closed row R1; B targets row R2,
which is open. If the cache serves A first, the DRAM scheduler closes R2 to
open R1. When B's miss arrives a little later, it has to close R1 and reopen
R2. Two precharge/activate pairs are spent where none were needed.

This controller removes that blind spot. The memory scheduler can see the
cache's request buffers. When it has nothing to send to DRAM, it switches to
**harvesting**: it looks for a read in the request buffers whose row is open,
or will open within the cache's miss latency. It pulls that read out and puts
it on a one-entry **fast lane** that the cache serves before anything else.
If the read misses, it reaches the transaction queue while its row is still
open, and DRAM serves it as a row-buffer hit.

The RTL is SystemVerilog 2017 and synthesizable. It lints clean of errors in
Verilator 5 and elaborates in Yosys/slang.

## Block diagram and request path

```
 port 0 (CPU) ──┐                         ┌──────────── harvest (mode 0) ─────────┐
 port 1 (RT)  ──┴─► cache_req_buffer (40) ─┤                                      ▼
                    local scheduler:       └─ local pick ──► llc ◄── fast_lane (1 entry, priority)
                    reads > writes, oldest                  │ 2 MB, 8-way, 4-cycle pipeline
                                                           │ miss / dirty writeback
 bypass port ─────────────────────────────────────────► txn_queue (30 RD + 30 WR)
                                                           │
                                             mem_scheduler (mode 1: schedule)
                                             one shared age_arbiter,
                                             input/output muxes select the mode
                                                           │
                              bank_state_table ◄──► cmd_gen x16 (one per bank)
                                                           │ offers
                                                  cmd_bus_arbiter ──► DRAM command bus
                                                           │
                                                  read_return ──► mem_done
```

| Module | Role |
|---|---|
| `unified_mem_ctrl` | Top level. Wires everything below and keeps event counters (`stats`). |
| `cache_req_buffer` | The 40 request buffers in front of the LLC, and the LLC's local scheduler. |
| `slot_buffer` | Generic unordered store with a per-entry age. Used by the request buffers and by both transaction-queue halves. |
| `fast_lane` | One-entry buffer from the harvester to the LLC. |
| `llc` | Pipelined tag-side cache with tree pseudo-LRU and dirty writebacks. |
| `txn_queue` | Read queue and write queue, shown to the scheduler as one flat 60-entry array. |
| `mem_scheduler` | Scheduling and harvesting modes around one shared arbiter. |
| `age_arbiter` | Tree of magnitude comparators: highest key wins, ties go to the lower index. |
| `bank_state_table` | Open row of each bank, plus each command generator's busy flag and its next row to open. |
| `cmd_gen` | Per-bank PRE/ACT/RD/WR generation under the bank's own timing. |
| `cmd_bus_arbiter` | One command per cycle under rank and channel timing. |
| `read_return` | Times when each RD and WR completes. |
| `umc_pkg` | Types, the address map and the stats record. |

## The two scheduler modes

`mem_scheduler` is purely combinational. Every cycle it decides one of two
things:

* **Scheduling mode (`mode = 1`).** At least one transaction-queue entry
  targets a bank whose command generator is idle. The arbiter then picks
  among those entries with the key `{row_hit, age}`: row-buffer hits first,
  then the oldest. The winner leaves the queue and goes to its bank's
  `cmd_gen`. Reads and writes compete in this one arbitration; there is no
  write-drain policy.
* **Harvesting mode (`mode = 0`).** No queued request can go anywhere, which
  means DRAM timing is holding the scheduler up. The same arbiter now gets the
  request-buffer entries, with the key `{0, age}`. An entry is eligible only
  if all of these hold:
  * it is a read;
  * its bank's open row equals its row, **or** its bank's command generator
    will open that row within `T_MISS` cycles (`next_valid`, `next_row`,
    `next_eta <= T_MISS`);
  * the fast lane can take it;
  * it is not the entry the LLC's local scheduler takes in this same cycle.

  The oldest eligible read moves into the fast lane. Rows are not held open
  for harvested reads: if the read hits in the cache, nothing is lost.

The arbiter (`age_arbiter`) is shared on purpose. Only the multiplexers in
front of it and behind it change with the mode.

`next_eta` comes from `cmd_gen`. For a closed bank it is the tRP time still
left before the ACT. For a bank with another row open, it is the time left
before PRE plus tRP. The value is exact when the command bus grants at once,
and a lower bound when it does not.

### Fast-lane timing

The harvest decision is registered into the fast lane. The LLC takes the
request in the next cycle, which it always can unless the pipeline is
stalled. The miss then comes out `LAT` cycles later. So a harvested miss
reaches the transaction queue **1 + LAT = 5 cycles after the harvest
decision**. The harvesting window is compared against `T_MISS = LAT = 4`. The
top testbench checks the 5-cycle figure.

## Last-level cache

* **Geometry:** 2 MB, 8 ways, 64-byte lines, giving 4096 sets, a 12-bit set
  index and a 14-bit tag.
* **Lookup:** tag compare, victim choice and state update all happen in the
  cycle a request enters. Invalid ways are filled first, then the tree
  pseudo-LRU victim is taken.
* **Pipeline:** the result passes through a 4-stage pipeline. Hits and misses
  both take 4 cycles.
* **Input priority:** the fast lane first, otherwise the local scheduler's
  pick (reads before writes, then the oldest).
* **Read miss:** the line is installed clean at lookup, and a read goes to the
  read queue.
* **Write miss:** the line is installed dirty without a fetch, and the write
  is acknowledged like a hit.
* **Writeback:** evicting a dirty line sends its address to the write queue
  in the same cycle as the miss.
* **Back-pressure:** if the queue cannot take the last stage's miss or
  writeback, the whole pipeline holds.
* **Reset:** tag state is cleared one set per cycle, so 4096 cycles at full
  size. `init_busy` is high during the clear, and requests wait in the
  buffers.

The cache is tag-only. No data is stored, there are no miss-status
registers, and there is no coherence. A second access to a line whose fill
is still in DRAM counts as a hit.

## DRAM side

* **Address map** (byte address, 4 GB):
  `row[31:15] | rank[14] | bank[13:11] | column[10:6] | offset[5:0]`.
  A 2 KB row holds 32 lines, and there are 16 banks (2 ranks × 8).
* **Page policy:** open page. A row stays open until a request for another
  row in that bank needs a PRE.
* **`cmd_gen` (per bank):**
  * PRE→ACT: tRP
  * ACT→RD/WR: tRCD
  * RD→PRE: tRTP
  * WR→PRE: WL + BURST + tWR

  A later command never shortens a timer that is still running.
* **`cmd_bus_arbiter` (rank and channel rules):**
  * ACT→ACT in the same rank: tRRD
  * at most 4 ACTs per rank in any tFAW window
  * column commands at least BURST cycles apart
  * WR→RD in the same rank: WL + BURST + tWTR
  * RD→WR on the bus: CL + BURST + 2 − WL

  Column commands win over ACT/PRE. Within each class the arbiter goes
  round-robin.
* **`read_return`:** a RD completes CL + BURST cycles after issue, a WR
  completes WL + BURST cycles after issue. The bus rules above keep
  completions in issue order.

Default timing, in controller clock cycles:

| Parameter | Value | Origin |
|---|---|---|
| CL, tRCD, tRP | 36, 34, 34 | LPDDR4 configuration of the design |
| tWTR, tRTP, tWR | 19, 14, 34 | LPDDR4 configuration of the design |
| tRRD, tFAW | 19, 75 | LPDDR4 configuration of the design |
| BURST, WL | 8, 18 | chosen here |

With tRRD = 19, four ACTs already span 57 cycles. A fifth ACT therefore comes
at cycle 76 at the earliest, so the 75-cycle tFAW window can never be the
binding limit at these values. The logic for it is still there, and the
arbiter's testbench exercises it with tRRD = 10.

## Interfaces of the top (`unified_mem_ctrl`)

| Port | Dir | Meaning |
|---|---|---|
| `req_valid/req_ready/req[N_REQ_PORTS]` | in/out | Core requests (`mem_req_t`: addr, we, 8-bit id). Port 0 is the CPU side, port 1 the real-time side. |
| `byp_valid/byp_ready/byp_req` | in/out | Cache-bypassing requests. They go straight to the transaction queue, and cache traffic has priority. |
| `llc_resp_valid/llc_resp` | out | Cache read hit, or write acknowledgement. Carries the requester id. |
| `mem_done_valid/mem_done` | out | DRAM completion (`src`: cache miss, writeback, or bypass). |
| `dram_cmd_valid/dram_cmd` | out | Command bus: cmd, rank, bank, row, column, plus the id and source. |
| `mode` | out | 1 = scheduling, 0 = harvesting. |
| `stats` | out | 32-bit counters: ACT, PRE, RD, WR, row hits, harvests, cache hits and misses, harvested misses, harvesting cycles. |
| `init_busy` | out | High while the cache is clearing its tags after reset. |

All handshakes are valid/ready, and a transfer happens on a clock edge where
both are high. Readiness never depends on the same port's valid. The design
has one clock and an active-low asynchronous reset. There are no response
back-pressure signals: completions are single-cycle strobes.

Each requester must keep its own ids unique while requests are outstanding.
That allows 256 core requests and 256 bypass requests in flight.

## Where this RTL departs from, or adds to, the design it implements

* **Not part of the design:** the DRAM device, the cores and energy
  estimation. `tb/dram_model.sv` is only a protocol checker.
* **Cache simplifications:** the cache is tag-only, with no coherence and no
  miss-status registers (see above).
* **Choices made here, where the design says nothing:**
  * line size and address map;
  * tree pseudo-LRU replacement;
  * write-allocate without fetch;
  * two request ports;
  * LLC priority over bypass traffic at the queue inputs;
  * round-robin command bus with column-first priority;
  * BURST = 8 and WL = 18;
  * ages held as 12-bit saturating counters, so entries older than 4095
    cycles compare as equal.
* **Harvest condition:** the scheduler harvests in exactly the cycles where it
  cannot schedule. That is this design's reading of "idle cycles".
* **Fast-lane latency:** the fast lane adds one register stage, so a
  harvested miss reaches the transaction queue `T_MISS + 1` cycles after the
  harvest, not `T_MISS`.
* **Missing DRAM features:** tRAS, refresh, power-down, rank-to-rank
  switching gaps and a write-drain policy are not modelled.

## Simulation

Each block has a self-checking testbench, `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and ends with `$finish`. The simulator
needs the package first and the folders as library paths. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/umc_pkg.sv tb/tb_unified_mem_ctrl.sv --top-module tb_unified_mem_ctrl \
    -Mdir obj -o sim
obj/sim
```

`tb_unified_mem_ctrl` runs the whole design at its default parameters. It
takes about 36 000 cycles and well under a second. It does three things:

1. **A/B scenario.** It replays the A/B case: B must be harvested, reach the
   queue 5 cycles later, and be read from the open row before the bank is
   precharged for A.
2. **Random traffic.** It runs 30 000 cycles of random CPU traffic together
   with streaming real-time and bypass traffic. During this, every request
   must complete exactly once, and `dram_model` must see no protocol
   violation.
3. **Coverage.** It fails if a mechanism never happened:
   * harvesting from an open row;
   * harvesting from a row about to open;
   * harvested misses;
   * row hits and row conflicts;
   * writebacks and bypassing;
   * mode switches;
   * fast-lane priority;
   * full request buffers, a full queue, and a cache stall.

The unit testbenches override parameters only where that helps coverage.
`tb_llc` uses 8 sets × 4 ways. `tb_slot_buffer` uses 8 entries.
`tb_cmd_bus_arbiter` uses tRRD = 10.

## Workload sweep

`tb_workload_sweep` runs the full-size controller under traffic shaped like
a phone SoC's mix:

* **CPU side:** four cores issuing random accesses, half of them to a hot
  64 KB set, with a quarter of them writes. At most 16 CPU requests are
  outstanding.
* **Real-time side:** ten long sequential streams, with every third stream
  writing. A fixed share of the streams, the *bypass ratio* (BR), goes
  straight to the transaction queue. The other streams go through the
  cache. At most 10, 30 or 50 real-time requests are outstanding.

Each point runs one million cycles, which takes about 4 s. The testbench
checks that every request completes exactly once and that `dram_model`
sees no protocol violation.

It also measures **evitable precharges**. A PRE counts as evitable if, when
it is issued, a read still waiting at the cache targets the row being
closed and that read later misses. "Waiting at the cache" means in the
request buffers, the fast lane or the cache pipeline. The testbench fails
in three cases:

* that share reaches 14 %;
* the share does not grow with the number of outstanding real-time
  requests;
* the share does not fall as BR grows.

Results with the default parameters:

| BR | RT outstanding | row hits / ACT | column cmds / cycle | harvests | evitable PRE |
|---|---|---|---|---|---|
| 0 % | 50 | 2.27 | 0.092 | 14676 | 6.5 % |
| 20 % | 50 | 1.81 | 0.092 | 6287 | 2.5 % |
| 40 % | 50 | 1.79 | 0.091 | 3395 | 1.4 % |
| 60 % | 50 | 1.96 | 0.097 | 2306 | 0.9 % |
| 0 % | 30 | 1.70 | 0.081 | 5817 | 3.0 % |
| 0 % | 10 | 1.13 | 0.068 | 33 | 0.2 % |
| 60 % | 30 | 1.62 | 0.089 | 577 | 0.4 % |
| 60 % | 10 | 1.14 | 0.076 | 35 | 0.1 % |

The traffic is synthetic, so these numbers show trends only. They do not
reproduce any particular application. With few real-time requests
outstanding, the request buffers rarely hold a read for an open row, and
harvesting almost never fires. The peak column rate is 1/BURST = 0.125 per
cycle. At the 0.09 column commands per cycle seen here, the channel spends
most of its time on ACT/PRE timing. That is exactly the idle time that
harvesting uses.

## Changing the design

* **Sizes:** all sizes are parameters of `unified_mem_ctrl`:
  * `LLC_SIZE`, `LLC_WAYS`, `LLC_LAT`;
  * `CRB_DEPTH`, `N_REQ_PORTS`;
  * `RQ_DEPTH`, `WQ_DEPTH`;
  * the `T_*` timings.

  `LLC_LAT` is also the harvesting window `T_MISS`.
* **DRAM organisation and address map:** these live in `umc_pkg`. Row, rank,
  bank and column widths are derived there.
* **Timer widths:** timers are 8 bits, so each timing value must stay below
  256.
* **`read_return` depth:** it is 8. That is enough while (CL + BURST) / BURST
  + 1 ≤ 8.
