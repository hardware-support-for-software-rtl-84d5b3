# NXA inter-core hardware: spawn queues, lazy register communication and a memory communication unit

NXA speeds up a single-threaded program on a two-core chip by splitting it,
at compile time, into a **main thread** that holds the performance-critical
instructions (control flow, miss-prone loads, or the dataflow critical path)
and **work threads** that hold the rest. The main thread runs on core P0.
Whenever it reaches a stretch of deferred work it executes a *spawn*
instruction, and core P1 runs that stretch as a work thread, ending it with a
*join*. The software sees one sequential program: the hardware moves
register and memory values between the cores so that every instruction sees
the state it would have seen on a single core.

Three instructions are added to the ISA:

| instruction | meaning |
|---|---|
| `pbr` (checked spawn) | start a work thread at a target PC; P0 must see everything the work thread writes |
| `pbrnc` (unchecked spawn) | same, but the compiler promises P0 will not read the work thread's results |
| `pjn` (join / endblock) | end the work thread on P1; P1 fetches the next queued spawn or stalls |

This repository holds synthesizable SystemVerilog for everything NXA adds
between two conventional out-of-order cores, sized like the published
configuration: a 256-entry spawn queue, 76-bit register masks (Alpha: 32
integer, 32 floating point, 12 special registers), 128 pending register reads
per core, 2 register transfers per cycle with a 2-cycle minimum latency, and a
320-entry memory communication unit with a 5-cycle minimum bypass latency and
1 bypass per cycle. The cores, caches, L2 and coherence protocol are not
included. The top module `nxa_top` connects to them through ports.

## Block map

```
            P0 (main thread)                               P1 (work threads)
   rename --+-- reg_update_mask --> spawn queue -----------> fetch
            |                      (target, mask, id, pbr?)   |
            +-- silo add (rcu0)                               +--> stale_mask (P1, decode)
   ROB   <------------------------ endblock queue <---------- rename -- reg_update_mask
     |       (mask, id, pbr?)                                   +-- silo add (rcu1)
     +-- stale_mask (P0, before retire)
   retire --> spawns-at-retire queue ------------------------> ROB
   ROB   <--- endblocks-at-retire queue (frees rcu0 silo) <--- retire
   regfile <--> rcu0  <== requests / values, 2 per cycle ==>  rcu1 <--> regfile
   MOB  <------------------------> mcu <--------------------------> MOB
```

| file | role |
|---|---|
| `rtl/nxa_pkg.sv` | widths, record types (`spawn_t`, `endblock_t`, `reg_req_t`, `mem_key_t` …), order comparisons |
| `rtl/nxa_top.sv` | the whole inter-core design |
| `rtl/nxa_queue.sv` | FIFO used for all four inter-core queues |
| `rtl/reg_update_mask.sv` | per-core register update bitmask at rename |
| `rtl/stale_mask.sv` | per-core stale register mask and source check |
| `rtl/reg_map_silo.sv` | rename-map snapshots at each spawn/join |
| `rtl/rcu.sv` | register communication unit (one per core) |
| `rtl/mcu.sv` | memory communication unit (shared) |
| `rtl/nxa_mfifo.sv` | multi-lane FIFO used inside the RCU and MCU |

## Spawns, endblocks and the four queues

At P0's rename stage a `pbr`/`pbrnc` pushes a `spawn_t` into the spawn queue:
the target PC, the register update mask (below), the checked flag and a spawn
id. Ids count from 1, in step with the MCU's core 0 spawn counter and P0's
silo entries. P1's fetch stage pops the head (`p1_sp_take`) and starts
fetching at its target. A `pjn` at P1's rename stage pushes an `endblock_t`
(the work thread's update mask, the spawn id and whether that spawn was
checked) back towards P0.

Both of these queues are fed from the front ends, so their entries are
speculative. Two more queues, written when the instructions actually retire,
tell the other core that a spawn (P0 to P1) or a join (P1 to P0) has
committed. The retired-join queue also frees P0's silo entries. P1 keeps a
16-entry list of the spawns it has fetched but not yet joined, so that it can
label its endblocks. P1 is shown no new spawn while that list is full.

## Lazy register communication

Register values move only when an instruction reads one that the other core
wrote. This is the subtlest part of the design, and it rests on four
structures per core.

**Update mask (`reg_update_mask`).** At rename each core ORs the destination
register of every instruction into a 76-bit mask. A `pbr`/`pbrnc` on P0, or a
`pjn` on P1, takes a snapshot of the mask and clears it. The snapshot covers
the older slots of the same rename group. So the mask travelling with spawn
*j* names exactly the registers P0 wrote since spawn *j-1*, and an endblock's
mask names what the work thread wrote.

**Stale mask (`stale_mask`).** This records the registers whose newest value
lives in the other core.
- On P1 it takes in each spawn's mask when the spawn is fetched. At decode,
  every source is checked against it. A hit (`p1_dc_src_stale`) means the
  value must be fetched from P0, and the instruction waits (`p1_dc_wait`).
- On P0 it takes in an endblock's mask only if the spawn was a `pbr`. Just
  before retirement, P0's instructions are checked the same way. A hit means
  the instruction read a stale value: it must replay (`p0_ck_replay`), and
  the value is fetched from P1.

Masks are ORed in, so a register never read since an earlier spawn stays
stale. A bit clears when a read raises a request, because the fetched value
becomes the local copy, or when the core writes that register itself. Within
a group, slots are handled in program order: a later reader of a register
that an earlier slot just requested is not requested again, and a write
ahead of a read hides the stale bit.

**Register map silo (`reg_map_silo`).** Each stale read names an
architectural register *as of a given spawn or join*. The other core may have
renamed that register many times since then. So at every spawn (P0) or join
(P1) the core's whole rename map (76 × 9-bit physical register numbers) is
copied into the silo under that id. A request carries (id, architectural
register, requester's destination physical register). The serving side's silo
turns it into the physical register to read. Entries are allocated and freed
in order, with one entry per spawn the spawn queue can hold (256). P0's
entries are freed when the join retires on P1. P1's entries are freed by the
input `p0_eb_release`, which P0 raises once it is done with that work
thread's values.

**Register communication unit (`rcu`).** The two RCUs are wired back to
back. Requests raised by one core (up to 8 per cycle, from 4 instructions × 2
sources) wait in a request buffer and cross to the other RCU 2 per cycle. On
arrival they are translated through the silo into a 128-entry read buffer.
Two reads of the register file are made per cycle, and the values return to
the requester's write buffer, which writes them into the requester's register
file while `rf_wr_grant` is high.

Timing, with nothing queued:

| step | cycle |
|---|---|
| request shown at P1 decode | t |
| request reaches P0's RCU (silo lookup) | t+1 |
| P0 register file read | t+2 |
| value leaves P0's RCU | t+3 (2 cycles after arrival: the RCU latency) |
| value written into P1's register file | t+4 |

## Memory communication unit

The MCU mirrors both cores' memory order buffers so that memory dependences
that cross cores are honoured.

**Logical order.** A memory operation carries a key `{seq, p0, age}` (see
`mem_key_t`). Two spawn counters supply `seq`. Core 0's counter counts the
spawns enqueued, so a P0 operation renamed after *k* spawns has seq *k*. Core
1's counter names the spawn it is running, so an operation of work thread *j*
has seq *j*. Work thread *j* logically follows P0's code with seq *j-1* and
precedes P0's code with seq *j*. Keys therefore order by seq first, then work
thread before main thread, then each core's own age. All counters are 16 bits
and compared modulo 2^16. The cores read the counters at rename (`p0_seq`,
`p1_seq`) and send the key back with each operation, because operations reach
the MCU out of order.

**Mirrors and checking.** Each core has an 80-entry store queue mirror and an
80-entry load queue mirror (320 in all). Each load is checked against the
*other* core's stores, and each store against the other core's loads:
- a load takes the youngest logically older store of the other core to the
  same 8-byte word, including one arriving in the same cycle. Its data is
  bypassed. Bypasses leave through a queue at one per cycle and appear 5
  cycles after the load at the earliest (`mem_fwd_*`);
- a store that is logically older than a load of the other core which has
  already executed, where that load got its value from something older, means
  the load read stale data. The oldest such load is reported one cycle later
  (`mem_viol_*`). For P0 loads this is done only when the store's work thread
  came from a `pbr`. The MCU keeps one checked bit per in-flight spawn.
- An operation re-sent with the same age (a replay) overwrites its entry.
  `mem_retire_age` frees a core's entries up to that age. A full mirror drops
  `mem_op_ready`.

**Oldest operation.** Each core reports its oldest uncommitted memory
operation (`mem_head_*`). `mem_is_oldest[c]` is high when that operation
precedes everything the other core has yet to commit. If P1 has nothing
pending but some spawns have not yet joined, the next unjoined spawn stands in
for it. The joins are counted from the retired-join queue. After a `pbr`, P0
commits a memory operation only when it is the oldest. A register holds the
overall oldest key (`oldest_key` in `mcu`).

## Interface of `nxa_top`

All ports are plain signals, packed structs or unpacked arrays; `p0_`/`p1_`
name the core, and `mem_*` arrays are indexed by core. Every group is
documented in the header of `rtl/nxa_top.sv`. The handshakes:
- rename groups (`p*_rn_*`, 4 slots) are taken when `p*_rn_ready` is high.
  P0 stalls when the spawn queue or its silo is full, and P1 when the
  endblock queue or its silo is full. At most one spawn or join per group.
- decode and pre-retire check groups (`p1_dc_*`, `p0_ck_*`) are taken when
  their `ready` is high (there is room in the request buffer). Their stale
  outputs are combinational.
- queue heads (`p1_sp_*`, `p0_eb_*`, `p1_spawn_commit_*`, `p0_eb_commit_*`)
  are valid/take.
- register file ports: reads must answer in the same cycle, and writes happen
  under `p*_rf_wr_grant`.

Reset is asynchronous and active low (`rst_n`), and it empties every queue,
mask, silo and mirror.

## Relation to the original NXA description

These follow the original description directly: the three instructions; the
spawn FIFO from P0's rename stage to P1's fetch stage; the 76-bit update masks
sent with spawns and joins and then reset; the stale mask on both sides, with
P0 checking only for `pbr`; the silo, request buffer and read buffer in each
RCU; the MCU's per-core SQM/LQM pairs cross-coupled, its two spawn counters,
its oldest-operation register, its violation detection and its store
forwarding; and all sizes and rates listed above.

The following are choices made here, where the original leaves the point
open:
- widths: 9-bit physical register numbers, 64-bit PCs, addresses and data,
  16-bit spawn ids and ages. Also the order key and its modulo comparison;
- the depths of the endblock queue and the two retire-time queues (256, like
  the spawn queue), of the silo (256, so the id modulo 256 is the index), of
  the request buffer (32), the write buffer (16), the bypass queue (8) and
  P1's in-flight spawn list (16);
- when P1's stale mask is loaded (when the spawn is fetched), and when silo
  entries are freed;
- OR-accumulating stale masks, and clearing a stale bit on a request or a
  local write;
- word-granular address matching. Also: violations reported one cycle after
  the store, and only the oldest violating load;
- how the 2-cycle register latency is measured (arrival at the serving RCU
  to value leaving it).

Not implemented:
- squashing of spawns fetched on a mispredicted P0 path. The retire-time
  queues carry the commit notices, but the recovery policy is not described
  and is left to the cores.
- the memory bypass bandwidth variant of the sensitivity study (up to 4
  per cycle). The MCU delivers one bypass per cycle. The other variants are
  parameters: `RC_BW` gives 1 to 4 register transfers per cycle, `RC_LAT`
  gives register latencies up to 8 cycles (it adds stages to the link
  between the RCUs), and `BYPASS_LAT` gives any bypass latency.
- the out-of-order cores, caches, the L2, the update-protocol coherence and
  the branch predictors.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/nxa_pkg.sv rtl/nxa_top.sv \
          tb/tb_nxa_top.sv --top-module tb_nxa_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace `nxa_top` with `rcu`, `mcu`, `reg_map_silo`, `stale_mask`,
`reg_update_mask` or `nxa_queue` for the block tests (`-Irtl` finds the
helpers). `tb_nxa_top` runs the full default configuration end to end:
- a checked and an unchecked spawn;
- a register fetched from P0 by P1, checked against P0's silo mapping and
  the 4-cycle decode-to-write time;
- a P0 replay with a value fetched from P1;
- a memory bypass arriving exactly 5 cycles after the load, and a memory
  violation;
- P0 held back as non-oldest until the work threads join;
- the retire-time queues;
- 256 spawns filling the spawn queue until P0's rename stalls.

It counts how often each of these happens and fails if any never does. The
`tb_rcu` test measures the 2-cycle latency, the 2-per-cycle bandwidth and the
128-entry read buffer. `tb_mcu` measures the 5-cycle bypass and the
one-per-cycle limit. `tb_rcu_lat` (built from `rtl/rcu.sv` like `tb_rcu`)
runs an RCU with an 8-cycle link and checks the latency and the sustained 2
values per cycle.

Sizes are parameters of `nxa_top` (`SPAWN_DEPTH`, `SILO_DEPTH`, `READ_BUF`,
`RC_BW`, `RC_LAT`, `MIRROR_DEPTH`, `BYPASS_LAT`, `WIDTH`, `NSRC`, `INFLIGHT`). The
register count and field widths are in `nxa_pkg`. `SILO_DEPTH` must be a
power of two.
