# Vertical L2 cache pooling for a 3D-stacked multicore

Programs differ a lot in how much L2 cache they can use. Some keep getting
faster as the cache grows, others barely notice it. A chip with one fixed L2
size per core gives the first kind too little cache and burns power and area
on the second kind.

This design stacks four single-core layers. Each core has a private 1 MB,
4-way L2, and each of the four ways (a 256 KB *partition*) can be lent to the
core directly above or below through TSVs (through-silicon vias). Vertical
wires are very short, so a borrowed partition answers as fast as a local one.
A core can therefore run with anything from one to seven partitions, and
partitions that nobody needs are switched off. A small runtime policy,
also built here in RTL, decides who gets what:

1. it pairs a cache-hungry job with a job that needs little cache, on
   adjacent layers;
2. it grows each job's share of the pair's eight partitions while the
   measured speed-up is still worth the extra power.

The hardware cost is small. Each layer adds ten status-register bits, a few
multiplexers and demultiplexers, and the TSV bundles.

## The stack at a glance

```
            layer 3  core3 ─ l2_miss_ctrl ─ l2_pool_layer ─ mem port 3
                                              ║ TSVs (req / rsp / lent-way mask, both ways)
            layer 2  core2 ─ l2_miss_ctrl ─ l2_pool_layer ─ mem port 2
                                              ║
            layer 1  core1 ─ l2_miss_ctrl ─ l2_pool_layer ─ mem port 1
                                              ║
            layer 0  core0 ─ l2_miss_ctrl ─ l2_pool_layer ─ mem port 0   (nearest the heat sink)

  policy:   job_pair_alloc ──> pool_policy x2 (pairs 0-1, 2-3) ──> pool_cfg_encode x2
                                     └─> reconfiguration: hold cores, wait idle, write LCSR/RCSR
```

`crp_top` is the whole stack. Inside each `l2_pool_layer`:

| module | role |
|---|---|
| `cache_status_regs` | 4 LCSRs (2 bits each) and 2 RCSR bits; works out which partitions to flush |
| `l2_req_gen` | sends the core's request to the local ways and, per RCSR, over the TSVs |
| `l2_partition` x4 | one 256 KB way: request mux chosen by its LCSR, tag/data arrays, compare, fill, flush |
| `out_loc_gen` x4 | sends each way's hit and data to the local core, up, or down, chosen by its LCSR |

Each layer also has an `l2_miss_ctrl`, which handles misses, refills and
write-through, and a `perf_counters` block. `cp_pkg` holds the shared types
and constants.

## Partitions and their status registers

Every partition has a **Local Cache Status Register**:

| LCSR | meaning |
|---|---|
| `00` LOCAL | serves the core on this layer |
| `01` LOWER | lent to the core on the layer below |
| `10` UPPER | lent to the core on the layer above |
| `11` OFF   | unused, powered down |

Every core has two **Remote Cache Status Register** bits:

- `RCSR[0]`: this core uses partitions of the layer below.
- `RCSR[1]`: this core uses partitions of the layer above.

Three rules are enforced in hardware:

- Way 0 is the reserved partition of each core. It is never lent or turned off.
- A core never pools from both neighbours at once. A write with both RCSR bits
  set is refused and `cfg_err` pulses.
- A coherence invalidation (`coh_inval`) returns all of that layer's registers
  to 0: every way local, no remote use. The ways that were lent or off are
  flushed as they come back, so no line of a former owner survives. The
  neighbour stops reaching them at once; its own RCSR bit is left as it is
  and its lookups there simply miss. The policy's partition counts are not
  changed. The next register write (every `pool_start`, and every step that
  changes a count) restores the pooled layout.

The encoding is chosen so that "all zero" means "no remote access".

## What happens on an L2 access

The core side is the port an L1 miss would use: `core_valid`/`core_ready`,
then one `resp_valid` pulse per request.

**Lookup (cycle 0).** The controller drives the request into `l2_req_gen`.
The request always goes to the four local partitions. If an RCSR bit is set,
it also goes in the same cycle over the TSVs to the neighbour. On each layer,
a partition accepts a request only from the requester its LCSR names: the
LCSR drives the partition's input multiplexer. The tag and data arrays are
read with the set index.

**Compare (cycle 1).** Each partition compares tags. `out_loc_gen` sends a
hit, with its 64-bit word, to the destination the LCSR named when the
request arrived. The layer ORs its local hits with the hits coming back over
the TSVs. If both are 0, the access is an L2 miss. A read hit is answered in
this cycle, one clock after the request, whether the hitting way is local or
on a neighbour layer. The TSV delay (a few picoseconds) is far below a clock
period and is not modelled.

**Miss.** `l2_miss_ctrl` chooses a victim among the ways the core owns:

- its local ways;
- the neighbour's ways lent to it. The neighbour sends this mask up or down
  the TSVs.

The choice is round robin over up to eight candidates. The controller reads
the 64-byte line from memory as eight 64-bit beats and writes each beat into
the victim as a *fill beat*. The fill goes either into a local way or across
the TSVs into the lent way. Beat 0 clears the line's valid bit; beat 7
writes the tag and sets it. The requested word is returned after beat 7.

**Write.** The L2 is write-through with no write allocate. A write hit
updates the L2 copy during the lookup. Every write then goes on to memory.

| operation | latency (clocks from acceptance to `resp_valid`) |
|---|---|
| read hit, local or remote way | 1 |
| read miss | 2 + memory handshake + 8 beats (+ gaps) + 1 |
| write | 2 + memory handshake + 1 |

One request per core is outstanding at a time.

## What crosses the TSVs

Between two adjacent layers, in each direction:

- `l2_req_t`: valid, write, fill, way index, 64-bit address, 64-bit write data;
- `l2_rsp_t`: hit and 64-bit read data;
- a 4-bit mask of the ways lent to the other layer.

Sixty-four address wires and 64 data wires each way match the TSV budget
this scheme is usually costed with: 128 data, 64 address and 4
request/hit TSVs. The way index, the write/fill flags and the lent-way mask
are extra control wires. The mask exists so that a core can refill into a
way it borrowed.

## Reconfiguration and flushing

A partition that changes owner must not keep lines from its previous owner.
`cache_status_regs` compares each new LCSR with the current one and raises
`flush` for every partition that changes. That partition clears all its
valid bits on the same clock edge that the new LCSR is stored. Because the
L2 is write-through, nothing has to be written back, so a flush takes one
clock.

The status registers must not change under a request that is in flight.
When the policy changes any partition count, `crp_top` raises
`reconfig_pending` and handles it in three steps:

1. It stops accepting new core requests (`core_ready` low).
2. It waits until every `l2_miss_ctrl` is idle.
3. It writes all layers' registers in one clock.

## The pooling policy

The policy runs in two stages. It works on gains: a gain is the relative IPC
improvement a job gets from more cache. Gains are 12-bit unsigned Q0.10
fractions, so 3 % is 31 and 9 % is 92.

**Stage 1: placement (`job_pair_alloc`).** The inputs are each job's
predicted gain from 1 to 4 partitions (`job_p`) and its measured IPC
(`job_ipc`).

1. The jobs are ranked by gain.
2. The highest is paired with the lowest, the second highest with the
   second lowest.
3. The pair with the larger IPC sum goes to layers 0-1, nearest the heat
   sink; the other pair goes to layers 2-3.
4. Inside a pair, the job with the larger gain takes the lower layer.

The result (`job_of_layer`) tells software where to run each job. Moving the
jobs is software's job.

The policy's timing also comes from outside. Software or a timer pulses
`alloc_start`, `pool_start` and `pool_step` at the end of each measurement
interval. The published scheme samples for about 10 ms and re-runs the
whole policy every 100 ms.

**Stage 2: sharing a pair's 8 partitions (`pool_policy`, one per pair).**

- **Start.** A job whose predicted gain exceeds 9 % starts with 4 partitions
  and may grow to 7. Otherwise it starts with 1 and may grow to 4.
- **Each step** brings the gain each job measured over the last interval:
  - gain above t = 3 % and below the job's ceiling: the job asks for one
    more partition;
  - gain not above t, and the job grew in the previous step: that
    partition is taken back, and the job stops growing;
  - a job at its ceiling, or one that asks when nothing is free, stops
    growing.

  When both jobs ask and only one partition is free, the job with the larger
  gain gets it.

The 3 % threshold comes from requiring that one more partition lowers the
energy-delay product:

```
P / IPC^2 > (P + dP) / (IPC + dIPC)^2   <=>   dIPC / IPC > sqrt(1 + dP / P) - 1 = t
```

Here `P` is power, `dP` the extra power of one more partition, and `dIPC`
the IPC gain it brings. A typical value of t is 3 %; 9 % is the
corresponding threshold for going from 1 to 4 partitions.

**Counts to registers (`pool_cfg_encode`).** Each job gets its own ways from
way 0 upwards. A job with more than 4 partitions borrows the rest from the
top ways of its partner (way 3 downwards) and sets its RCSR bit towards the
partner. All other ways are OFF.

Worked example (checked in `tb_crp_top`):

| event | layer 0 | layer 1 | layer 2 | layer 3 |
|---|---|---|---|---|
| predicted gains of the jobs placed there | 20 % | 2 % | 12 % | 5 % |
| start | 4 | 1 | 4 | 1 |
| step: gains 10/6/8/1 % | 5 (borrows way 3 of layer 1) | 2 | 5 | 1 (stops) |
| step: gains 8/6/6/1 %, pair 0 competes | 6 | 2 (loses, stops) | 6 | 1 |
| step: layer 0 gain 1 % | 5 (revert) | 2 | 7 (ceiling) | 1 |

## Parameters and sizes

| name | default | where |
|---|---|---|
| `NUM_LAYERS` | 4 | `crp_top`: layers, one core each; even, paired (0,1), (2,3) |
| `NUM_WAYS` | 4 | `cp_pkg`: partitions per L2 |
| `L2_SETS` / `SETS` | 4096 | 1 MB / 4 ways / 64-byte lines |
| line, word | 64 B, 64 bit | 8 fill beats per line |
| physical address | 48 bit, carried on 64 wires | gives a 30-bit tag |
| `THR_T`, `THR_INIT` | 31, 92 (Q0.10) | 3 % and 9 % |
| `CW` | 32 | counter width |

At the defaults, the four layers hold 35.5 Mbit of tag and data arrays:
16 x (4096 x 512 + 4096 x 30) bits. This is written as plain arrays with one
synchronous read and one write port, so a memory compiler or an SRAM macro
can replace it. Valid bits are flip-flops (4096 per way) so that a flush is
a single clock.

## Not included

- **Cores and L1 caches.** `crp_top` exposes the L1-miss request port of
  each core.
- **Main memory.** Each layer has a memory port. Reads return eight in-order
  beats; writes are posted. The testbenches use `tb/mem_model.sv`, a
  behavioural model.
- **Gain predictor.** It is a regression over the performance counters. Its
  outputs enter through `job_p` (predicted gains) and `layer_gain` (measured
  gains per step). The counters it reads are built (`perf_counters`): L2
  replacements, L2 writes, L2 read misses, L2 instruction-fetch misses and
  cycles.
- **Load balancing between columns.** In a 16-core stack with four cores
  per layer, jobs are moved between columns to even out cache-hungriness.
  Each column is the 4-layer stack built here. No balancing rule is given
  beyond an example, so none is built.
- **TSVs.** They are plain wires.
- **Power gating.** An OFF partition ignores all requests; cutting its
  supply is left to the physical design.

## Own choices, and how far to trust them

The partition and register scheme, the request and response routing, the
miss condition, flush before re-assignment, and the whole policy
(thresholds, ceilings, pairing, heat-sink placement) follow the published
architecture. The following are this implementation's choices:

- The LCSR encoding, with `00` = local.
- The 64-byte line, the 48-bit address and the 8-beat fills over the
  64-bit data path.
- Write-through with no write allocate. With it, a flush needs no
  write-back. A write-back L2 would need a dirty-line drain before every
  re-assignment.
- Round-robin victim choice over owned ways, and one outstanding request
  per core.
- The lent-way mask and fill-way index wires across the TSVs.
- The two RCSR bits sit next to the LCSRs in each layer's
  `cache_status_regs`, on the L2 side of the L1-miss port. In the published
  scheme they belong to the L1 caches (shared by the I- and D-cache), which
  are not built here; they steer the requests the same way.
- Holding core requests during a reconfiguration.
- Q0.10 gains; ties go to the lower layer or the lower job index; a job
  that reverts or cannot get a partition stops growing.
- Layer 0 is nearest the heat sink; inside a pair, the job with the larger
  gain takes the lower layer.
- `ev_replace` counts every refill, whether or not a valid line was evicted.

Every block has a self-checking testbench. `tb_crp_top` runs the full-size
stack with its default parameters and exercises every mechanism listed
above. `tb_pool_workload` closes the policy loop on a running
workload. The hungry job grows from 4 to 7 partitions one step at a time.
The seventh brings nothing, so it is given back, and the job ends with 6.
The streaming job keeps its single reserved way. In that run the hungry
job's throughput rises from about 2400 to about 8400 accesses per
20 000-cycle interval. Coherence between cores is not modelled: each core's testbench
traffic uses its own address space.

## Simulating

Every testbench ends with `TB_RESULT checks=<n> failures=<m>` and stops
itself with a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cp_pkg.sv tb/tb_crp_top.sv --top-module tb_crp_top -o sim
./obj_dir/sim
```

Replace `tb_crp_top` with any other testbench:

| testbench | what it checks |
|---|---|
| `tb_crp_top` | whole stack at full size: data integrity, 1-clock hits (local and remote), policy results, register values, every mechanism counted |
| `tb_l2_pool_layer` | one layer with the TSV side driven directly: lending, forwarding, merging, flush on re-assignment, refusal, clear |
| `tb_l2_miss_ctrl` | controller with one layer and memory: reference data, latencies, victims only in owned (local or lent) ways |
| `tb_l2_partition` | one way against a reference model under random fills, lookups, writes, LCSR changes and flushes |
| `tb_cache_status_regs`, `tb_l2_req_gen`, `tb_out_loc_gen`, `tb_pool_cfg_encode` | the small blocks, exhaustively or with a reference |
| `tb_pool_policy`, `tb_job_pair_alloc`, `tb_perf_counters` | policy and counters against reference models and worked examples |
| `tb_pool_workload` | two-layer stack (64 sets per way) running a cache-hungry job beside a streaming job, with the policy fed gains measured from the jobs' own throughput |

The simulator is two-state. Everything read before it is written is reset:
valid bits, registers and controller state. The tag and data arrays need no
reset because the valid bits guard them.
