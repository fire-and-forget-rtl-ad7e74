# Fire-and-Forget: load/store scheduling with no store queue

A conventional out-of-order core keeps a load queue (LQ) and a store queue
(SQ). Both are searched by address (CAMs) so that loads see the values of
older stores and ordering violations are caught. These searches are what
keeps the two queues from growing. Yet most stores never forward to a load,
and most loads find nothing in the SQ.

Fire-and-Forget (FnF) removes the store queue altogether and does without any
address search:

* **Forwarding is pushed by the store, to a predicted LQ entry.** A store that
  fed a load in the past usually feeds the same load again, at the same
  distance in the load sequence. At dispatch a store looks up that distance.
  When its data uop executes, it writes its value straight into one LQ entry,
  like a RAM write. It never checks that entry again. That is the "fire and
  forget".
* **Loads decide on their own whether to take a forwarded value.** A one-bit
  predictor per load PC says "wait for a store" or "read the cache".
* **Correctness comes from commit-time checking.** Store sequence numbers and
  a small filter (the SVW scheme: store vulnerability window) prove most loads
  correct without a second access. The rest re-read the cache at commit. A
  wrong value flushes everything younger and trains the predictors.
* **Stores wait in the reorder buffer.** A store's address and value sit in
  its own ROB entry, in the register slot a store would otherwise leave
  unused. Commit writes them to the cache in program order. Nothing else
  buffers them.

This repository holds the memory-scheduling side of such a core in
synthesizable SystemVerilog. It covers dispatch, the ROB, the LQ, the three
FnF tables, the SVW filter and commit. The reservation stations, execution
units and data cache are outside. They connect through the ports of
`fnf_lsu`.

## Sequence numbers: the coordinate system

Everything in FnF is located by two counters that dispatch assigns:

| name | meaning |
|---|---|
| LSN | load sequence number: each dynamic load gets the next one. A load's LQ entry is `LSN mod LQ_ENTRIES`. |
| SSN | store sequence number: each dynamic store gets the next one. |
| MRDL | a store's "most recently dispatched load": the LSN of the last load dispatched before the store. It says where the store would stand in the load sequence. |
| `commit_ssn` | SSN of the youngest committed store. |

Both counters start at 1, so MRDL 0 and SSN 0 mean "none". After a flush,
dispatch resumes just after the flushing load's LSN and just after
`commit_ssn`. The numbers of squashed instructions are reused. This keeps
"LSN mod size" equal to the LQ slot. The counters are 32 bits wide, and their
wrap-around is not handled.

## Life of a store

1. **Dispatch** (`fnf_dispatch`). The store gets a ROB entry, its SSN and its
   MRDL. Its PC reads the load distance predictor (LDP). A non-zero distance
   `d` predicts that the consuming load has LSN `MRDL + d`, so its LQ index
   is `(MRDL + d) mod LQ_ENTRIES` (`fnf_lqi_calc`). The store is cracked into
   two reservation-station uops: STA (address) and STD (data). The STD
   carries the predicted index. Example with a 6-entry LQ: MRDL 49 and
   distance 2 give LSN 51 and index 3.
2. **STA executes.** The address goes into the store's ROB entry.
3. **STD executes.** The value goes into the store's ROB entry. If the STD has
   a predicted index, the value and the store's SSN are also written blindly
   into that LQ entry. The entry may hold the intended load, another load, or
   no load yet. FnF accepts all three.
4. **Commit** (`fnf_commit`). Once address and value are both present and the
   store is the oldest instruction, it writes the data cache. It also records
   its SSN in the SSBF (store sequence Bloom filter) and its PC and MRDL in the
   SPCT (store PC table), both at its address. `commit_ssn` then advances.

## Life of a load

1. **Dispatch.** The load gets the next LSN and the LQ entry `LSN mod
   LQ_ENTRIES`. The entry records:
   * the load consumption predictor (LCP) bit, `use_fwd`;
   * `ssn_nvul`, the current `commit_ssn`: older stores had already reached
     the cache, so the load cannot be hurt by them;
   * `ssn_prev`, the SSN of the youngest store dispatched before it.
2. **Getting a value** (`fnf_load_queue`).
   * `use_fwd = 0`: once its address arrives, the load reads the data cache.
     A value forwarded into its entry is ignored.
   * `use_fwd = 1`: the load completes as soon as a forwarded value is in its
     entry, even before its own address is known. If the value came before
     the load was dispatched, the load completes at dispatch. A forwarded
     value stays in the entry until the entry is freed.
   * **Forward progress.** A waiting load might wait forever, because no
     store has to target it. Once every store older than the load has
     committed (`commit_ssn >= ssn_prev`), the load reads the cache instead.
   * The cache takes one read per cycle. The oldest eligible load goes first.
     Data returns one cycle after the request.
3. **Commit.** The load must have its value and its address. Then one of the
   checks below decides whether it re-reads the cache.

## Catching wrong values at commit

This is the part that makes blind forwarding safe. The SSBF is indexed by
word address. Each entry holds the SSN and the address tag of the youngest
committed store that maps there. The check depends on where the load's value
came from:

| load got its value from | re-executes when |
|---|---|
| the data cache | SSBF SSN > `ssn_nvul`. A store to that entry committed after the load was dispatched, so the cache read may have been too early. |
| a forwarded value with SSN *s* | the SSBF does not hold *s* with a matching address tag. The value is right only if the forwarding store was the last committed store to that exact word. |

A re-executing load reads the cache through a separate port. The data returns
one cycle later:

* **Same value:** the load retires normally. The check is value-based, so a
  "violation" that changed nothing costs no flush. Silent stores are one such
  case.
* **Different value:** the load retires with the cache value, `flush` pulses
  for one cycle, and everything younger is squashed. The core must re-fetch
  from the next instruction. Then the predictors are trained:
  * The SPCT entry at the load's address names the last store to that word:
    its PC and its MRDL.
  * Suppose that store committed after the load was dispatched, the address
    tag matches, and `d = load LSN - store MRDL` is between 1 and 255. Then
    the load should have been fed by forwarding. The LDP entry of the
    store's PC gets `d`, and the load's LCP bit is set to 1.
  * Otherwise the load should have read the cache. Its LCP bit is cleared
    and the LDP is left alone.

  Example: the store at PC 0x4000 with MRDL 26 commits to X. The load at PC
  0x400C with LSN 28 finds a wrong value at X. The LDP learns distance 2 for
  0x4000, and the LCP bit of 0x400C becomes 1.

All table updates happen at commit, so no table needs a checkpoint or repair
after a flush.

## Blocks

| module | role |
|---|---|
| `fnf_lsu` | top; wires everything below, exports the core-side ports |
| `fnf_dispatch` | LSN/SSN/MRDL counters, STA/STD cracking, LQI prediction |
| `fnf_lqi_calc` | `(MRDL + distance) mod LQ_ENTRIES` |
| `fnf_rob` | reorder buffer; store address and value live here |
| `fnf_load_queue` | non-associative LQ, blind forward port, cache issue, forward-progress rule |
| `fnf_commit` | retirement, SSBF checks, re-execution, flush, training |
| `fnf_ldp` | load distance predictor, store-PC indexed |
| `fnf_lcp` | load consumption predictor, one bit per load-PC entry |
| `fnf_spct` | store PC table, address indexed: PC and MRDL of the last committed store |
| `fnf_ssbf` | SSN filter, address indexed, with address tag |
| `fnf_pkg` | shared widths, `op_kind_e`, `uop_kind_e` |

All tables are direct-mapped and untagged, except the SSBF tag. Each is read
combinationally and written at the clock edge. PC-indexed tables use
`pc[2 +: log2 ENTRIES]` and address-indexed ones use `addr[2 +: log2 ENTRIES]`.
Reset is asynchronous and active-low, and clears every table.

## Interface of `fnf_lsu`

One instruction is dispatched and one retired per cycle.

* **Dispatch:** `disp_valid/disp_kind/disp_pc`, accepted when `disp_ready`.
  In the same cycle, `rs_valid[1:0]`, `rs_kind`, `rs_rob_idx` and `rs_lq_idx`
  describe the uops for the reservation stations: slot 0 holds the LD, ALU or
  STA uop, and slot 1 the STD. For the STD, `rs_lq_idx[1]` with
  `rs_lqi_valid` is the predicted LQ index.
* **Execution results:**
  * `sta_*`: ROB index and address.
  * `std_*`: ROB index, data, and the LQI the STD was given.
  * `agu_*`: LQ index and load address.
  * `alu_done_*`: ROB index.
* **Load results for dependents:** `ld_fwd_wb_*` for a forwarded value
  (a load completed at dispatch raises only `ev_fwd_use`), and `ld_dc_wb_*`
  for a cache read.
* **Data cache:**
  * `dc_ld_req_*`: load reads; data is expected on `dc_ld_rsp_data` one cycle
    later.
  * `rx_req_*`: re-execution reads; data on `rx_rsp_data` one cycle later.
  * `dc_wr_*`: store writes from commit.
* **Retirement:** `ret_*` reports each retired instruction with its kind,
  PC, address, data, and the `ret_reexec` and `ret_used_fwd` flags. `flush`
  marks a retiring load whose re-execution found a different value.
* **Counting:** `ev_*` pulses once per event: dispatch stall, STD forward,
  forwarded value used, forward-progress read, LDP write, LCP write.

## Parameters

| parameter | default | |
|---|---|---|
| `LQ_ENTRIES` | 32 | any value of two or more; the modulo is general |
| `ROB_ENTRIES` | 128 | |
| `LCP_ENTRIES` | 4096 | one bit each |
| `LDP_ENTRIES` | 1024 | |
| `SSBF_ENTRIES` | 1024 | also the SPCT size; the two must index alike |
| `DIST_W` | 8 | LDP distance width |

These defaults are this design's choices. The machine configuration behind
the published results is not reproduced here.

## What is this design's own choice

The mechanism follows the published FnF scheme: store-push forwarding to an
LQ index predicted from MRDL plus an LDP distance, the one-bit LCP, the
forward-progress rule, SSN-tagged forwarded values checked against the SSBF,
SPCT/LDP/LCP training on re-execution flushes, and store data held in the
ROB. The following are choices made here:

* **SSBF address tag.** A plain hashed filter would accept a forward from a
  store to a different address that maps to the same entry. The tag closes
  that hole. Cache-path loads still use the SSN comparison alone, which can
  only cause extra re-executions.
* **Width and ports.** Dispatch and commit handle one instruction per cycle.
  There is one cache read port for loads, one for re-execution, and
  one-cycle cache latency.
* **The test for "should have forwarded".** It is described above.
* **When a forwarded value is dropped.** It stays in its LQ entry until the
  entry is freed, so a store may fire before its consumer is dispatched.
* **The load's address at commit.** A load may complete on a forwarded value
  without its address, but it does not retire until the address is known,
  because the SSBF check needs it.
* **Counter width.** Sequence numbers are 32 bits, with no wrap-around
  handling.
* **Table sizes.** All table and queue sizes are chosen here.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The package must come first. For example:

```
verilator --binary --timing --assert -Irtl rtl/fnf_pkg.sv tb/tb_fnf_lsu.sv \
          --top-module tb_fnf_lsu -o sim && obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_fnf_lsu` | The whole design at default sizes. It runs 4000 dynamic instructions with random out-of-order execution and checks every retirement against a sequential reference. The program forces every mechanism: training, forwarding, forwards into the wrong entry, forward-progress reads, same-value re-execution, flushes, and LQ-full stalls. Each must occur. It takes well under a second. |
| `tb_fnf_load_queue` | Directed: blind forward, value present at dispatch, ignored forward, forward-progress rule, oldest-first issue, full queue, flush. |
| `tb_fnf_commit` | Directed: each SSBF rule, same-value re-execution, the distance-2 training example, LCP cleared. |
| `tb_fnf_dispatch`, `tb_fnf_rob` | Random streams against reference models. |
| `tb_fnf_lqi_calc` | The 6-entry example and random cases. |
| `tb_fnf_ldp`, `tb_fnf_lcp`, `tb_fnf_spct`, `tb_fnf_ssbf` | Random access against reference arrays. |

The simulator has two states, so every register that is read is reset. The
assertions in the ROB, LQ, commit and top check handshake rules: pop only a
valid entry, allocate only with room, and the ROB head load is the LQ head.

## Limits

* No multi-issue dispatch or commit.
* No memory-consistency handling for multiprocessors.
* No sub-word accesses.
* No sequence-number wrap-around.
* Branch mispredictions and other flush sources are not modelled. Only
  load re-execution flushes.
* The reservation stations, execution units and data cache are not part of
  the RTL.
