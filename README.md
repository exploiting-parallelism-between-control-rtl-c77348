# Control/data parallel execution on a dual-core CMP

A program's control decisions (loop tests, branches on loop counters, pointer
chasing that picks the next iteration) often form a thin slice that runs far
ahead of the bulky data work. This design splits execution over two
out-of-order cores. The **control thread (CT)** runs the control slice. The
**work thread (WT)** runs the data blocks that the CT spawns. Two new
instructions mark the split:

* `pbr` (parallel branch): a 1-byte opcode and a signed 16-bit offset. It tells
  the WT core to start a block at `pc_after_pbr + offset`. The CT itself simply
  continues after the `pbr`.
* `pjn` (parallel join): a 1-byte opcode that ends a WT block.

In program order a `pbr`/`pjn` pair behaves like a call/return. The work block
logically sits between the `pbr` and the next CT instruction. The hardware here
keeps that order intact although both sides run at the same time. It does this
on three fronts: instruction fetch, registers and memory.

The RTL is the logic added between the two cores. The cores, caches and branch
predictor are not included. Their signals are ports of the top module
`cdp_top`.

## Spawn ids

Every `pbr` gets a 16-bit **spawn id (sid)** from a counter in CT decode. The
block it spawns and the `pjn` that ends that block carry the same sid. Every
ordering question below reduces to comparing sids, using wrapping arithmetic
(`cdp_pkg::sid_after`). These structures are all indexed or tagged by sid:

* the spawn queue and the endblock queue;
* both register-map silos;
* the retirement counters.

## Fetch: the spawn queue and the predicted `pjn`

The CT decodes a `pbr` (`pbr_pjn_decode`) and pushes `{target, register update
mask, sid}` into the **spawn queue** (`spawn_queue`, 256 entries). When the
queue is full, `ct_stall` holds CT decode.

The WT does not wait for each spawn. It treats `pjn` as a branch. Its own
branch predictor supplies the likely next spawn target (`wt_pjn_pred`), and
fetch goes on down that path. Instructions after the `pjn` are held at decode
(`wt_dec_stall`) until the next spawn is in the queue.

`wt_fetch_ctrl` dequeues that spawn, which is the moment the "branch" is
resolved:

* **Target matches the prediction** (`wt_pred_hit`): decode resumes with no
  lost cycles.
* **Target differs**: `wt_redirect_valid`/`wt_redirect_pc` restart WT fetch at
  the real spawn point.

After reset or a WT squash, no prediction exists, so the first spawn always
redirects.

**Squashing speculative spawns.** A CT branch mispredict can remove spawns
that were made on the wrong path. For every branch, the CT core saves two
values: the queue write pointer (`ct_spawn_ptr`) and the sid counter
(`ct_next_sid`). On a mispredict it returns them on `ct_squash_*`.

* **Wrong-path spawns still in the queue** are dropped. The sid counter is
  restored.
* **A wrong-path spawn the WT has already taken** is also handled. The queue
  sees that the squash point lies behind its read pointer and raises
  `wt_squash_req`. The WT core must then squash its younger work. The fetch
  controller goes back to waiting, with no prediction, for the next correct
  spawn.

## Registers

### Which registers move

During rename, each core keeps a 108-bit **register update mask**
(`reg_update_mask`): one bit per architectural register. The 108 covers x86
partial registers, flags and microcode temporaries. The mask records what the
current block has written.

* The CT sends its mask with each spawn and clears it.
* The WT sends its mask into the **endblock queue** at each `pjn`, then clears
  it.

Writes in the same decode group ahead of the `pbr`/`pjn` belong to the mask
being sent. Writes after it start the next mask.

**WT side** (`wt_input_check`). When a block starts, the registers in the
spawn's mask become *stale* on the WT. A stale source register is flagged in
`wt_need_remote`. The WT core allocates a fresh physical register for it
(`wt_src_newpreg`). A request is queued to fetch the value the register had
at that `pbr`. The register is then no longer stale, and neither is a
register the WT writes itself.

**CT side** (`ct_update_ctrl`). The CT collects endblock masks over a batch
of 4 blocks. For every register written in the batch, it requests the value
from the latest block that wrote it. It issues at most 2 requests per cycle.
The CT core supplies the destination physical register (`ct_up_preg`).
`ct_upd_flush` ends a partial batch early.

### How a register moves: the register communication unit

Each core has one `rcu`. The two are wired back to back. An rcu has three
parts.

* **Map silo** (`reg_map_silo`). A copy of the core's architectural-to-physical
  map is taken at every `pbr` (CT) or `pjn` (WT). The copy is stored under its
  sid and kept until the core releases it (`*_rel_*`) at retirement. This is
  what lets the other core ask for "register r as it was at boundary k" long
  after the core has renamed r again.
* **Request buffer** (`rcu_req_buffer`). It holds requests made on this core:
  `{sid, areg, destination preg}`. It sends up to 2 per cycle, tagged with
  their slot. When a reply comes back it writes the value into the local
  register file through `rf_wr_*`. That write wakes the waiting instructions
  in the core. Replies may return out of order.
* **Read buffer** (`rcu_read_buffer`, 128 entries). It holds requests arriving
  from the other core. The silo lookup happens on arrival. When the physical
  register becomes ready (`preg_ready`), the buffer reads it on a dedicated
  read port (`rf_rd_*`) and sends the value back. It reads up to 2 per cycle,
  in any order.

**Timing.** A request sent in cycle *t* whose register is already ready is
written on the requesting side in cycle *t+2*. That is the minimum latency,
and the bandwidth is 2 per cycle in each direction.

### Retirement rules

`retire_sync` enforces two rules:

* **WT rule.** A WT instruction of block *k* retires only after `pbr` *k* has
  retired on the CT. Until then, a CT mispredict could still cancel the
  block.
* **CT rule.** A CT instruction after `pbr` *k* retires only once `pjn` *k*
  has been decoded on the WT. From that point the block can produce nothing
  more that the CT instruction might have needed.

The notices arrive in sid order, so counters replace the retire-stage queues.
The cores ask with the sid of their oldest instruction and get `*_retire_ok`.
`pjn_retired` counts WT blocks that are fully retired. The CT's register
allocator needs it: a CT register overwritten after a `pbr` may be freed only
once the WT block before it has retired.

## Memory: the memory communication unit

`mcu` orders memory between the two cores with two CAMs, searched by address.
Every memory operation has a **program-order sequence number** that both
cores agree on. The CAMs are:

* **ASB** (`mcu_asb`, 320 entries, 128 reserved per core): holds the sequence
  number and address of every load and store in flight.
* **MSB** (`mcu_msb`, 160 entries, 32 reserved per core): holds the sequence
  number, address and data of every store.

The life of a memory operation:

1. **Insert** (`mem_ins_*`). A core gets an ASB entry, plus an MSB entry for a
   store. Reservation means one core can never starve the other.
2. **Load address** (`mem_ld_*`). The MSB is searched for the youngest store
   to that address that is older than the load. The answer comes out on
   `mem_ld_rsp_*` exactly 5 cycles later. With `fwd=1` the data is the
   bypassed store value. With `fwd=0` the core uses its cache.
3. **Store address and data** (`mem_st_*`).
   1. The MSB finds the next younger store to the same address.
   2. The ASB finds the oldest load to that address that lies between the two
      stores and has already issued. Such a load read a stale value.
   3. The load is reported one cycle later on `mem_vio_*` (core, ASB index,
      sequence number), so the core can replay from it.
4. **Commit** (`mem_cm_*`). Only the core that owns the oldest ASB entry may
   commit (`mem_cm_ready`, `mem_oldest_core`). So memory operations commit in
   program order across both cores. A committed store appears on `mem_wr_*`
   for the cache.

One load and one store are handled per cycle in total. When both cores ask in
the same cycle, they take turns. A load and a store in the same cycle are
checked against each other as well.

## Top module `cdp_top`

The top wires together:

* WIDTH decoders per core;
* both update masks;
* the spawn queue, the endblock queue (a second `spawn_queue` holding
  `{mask, sid}`) and the fetch controller;
* the input check and the CT update controller;
* two rcus, `retire_sync` and the `mcu`.

The per-core interface is grouped by pipeline stage: decode slots, rename
information, register file ports, retirement and memory. The header comment
of `rtl/cdp_top.sv` lists the conventions:

* a slot's decode and rename information arrive together;
* a group holds at most one `pbr` (CT) or `pjn` (WT);
* a WT `pjn` is the last slot of its group.

All state uses a synchronous active-low reset `rst_n`.

### Parameters

| Parameter | Default | Origin |
|---|---|---|
| `WIDTH` | 4 | issue width of each core |
| `NSRC` | 2 | sources per decoded operation (own choice) |
| `SQ_DEPTH` | 256 | spawn queue size |
| `EQ_DEPTH` | 256 | endblock queue, sized like the spawn queue (own choice) |
| `SILO_DEPTH` | 512 | checkpoints in flight: 256 queued spawns plus the blocks of a 256-instruction window (own choice) |
| `RCU_DEPTH` | 128 | pending reads (and pending requests) per core |
| `BW` | 2 | register communications per cycle |
| `BATCH` | 4 | blocks per CT update batch (own choice) |
| `ASB_DEPTH`/`ASB_RESV` | 320/128 | ASB size / reserved per core |
| `MSB_DEPTH`/`MSB_RESV` | 160/32 | MSB size / reserved per core |
| `BYP_LAT` | 5 | memory bypass latency in cycles |

The package `cdp_pkg` fixes several widths:

* 108 architectural registers;
* 256 physical registers per core (`PREG_W` = 8);
* 32-bit data, addresses and PCs;
* 16-bit sids;
* 32-bit sequence numbers.

The `pbr`/`pjn` opcode bytes (0xD6, 0xF1) are parameters of
`pbr_pjn_decode`. They are placeholders: only the opcode's size is fixed.

## Where this departs from the described machine, and what is missing

* **Cores, caches, coherence and branch prediction are not here.** The ports
  expect an out-of-order core that provides the following:
  * a per-branch checkpoint of `ct_spawn_ptr`/`ct_next_sid`;
  * a squash of younger WT work on `wt_squash_req`;
  * a register map vector per core;
  * physical register ready bits;
  * two extra register file read/write ports per core;
  * the sid of the oldest instruction at retirement;
  * program-order sequence numbers for memory operations.
* **The CT's stale-read check and replay are not built.** The CT is supposed
  to find instructions that read a register before the WT's value arrived and
  replay them. That logic lives in the CT core's scheduler. The update
  requests it would issue go into the CT rcu like any other request.
* **Register freeing is not built.** The rule that a register must outlive
  the other core's retirement of the previous block is left to the cores'
  free lists. `pjn_retired` and `*_retire_ok` give them what they need.
* **Delayed branch resolution is not built.** One partitioning option lets
  the CT carry a branch whose inputs are computed on the WT. The CT core
  would then resolve that branch only once the inputs arrive, instead of at
  execute. That is also a change inside the core. The inputs themselves
  arrive through the normal CT register requests.
* **Storage is flip-flops.** The silo is 512 full maps, and the CAMs search
  every entry in a single cycle. This is a functional model, not a floor
  plan. Synthesis keeps the silo and buffer arrays as memories. The searches
  are large comparator trees.
* **Sequence numbers are assumed not to wrap** while operations are in flight.
* **The 2-cycle register latency is a minimum.** Longer link latencies were
  not modelled; they would need pipeline stages on the `link_*` wires of
  `rcu`.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. Most run at
reduced sizes, set by parameter overrides. The checks compare against models
written in the testbench: FIFO and map models, a reference register file,
and brute-force searches for forwarding and violations. They also check the
cycle counts: the 2-cycle register latency, the 5-cycle bypass and 2
communications per cycle.

`tb_cdp_top` runs the whole design at its default sizes. It drives both cores
as small programs:

* 12 blocks with register traffic in both directions, mixed correct and wrong
  `pjn` predictions, and random retirement that checks both retirement rules;
* filling the spawn queue until the CT stalls;
* a squash of queued spawns;
* a squash of a spawn the WT had already taken;
* memory forwarding, a violation and ordered commit.

It counts each mechanism and fails if one never occurred. It runs in well
under a second.

To run a testbench with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -yrtl -ytb rtl/cdp_pkg.sv tb/tb_cdp_top.sv \
          --top-module tb_cdp_top -Mdir obj_tb_cdp_top
./obj_tb_cdp_top/Vtb_cdp_top
```

Use the same command for any `tb/tb_<block>.sv`. The RTL uses no
tool-specific constructs. Yosys with the slang front end elaborates and
synthesises it as well.
