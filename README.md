# X-Cache: a cache tagged by accelerator metadata, run by microcoded walkers

Domain-specific accelerators rarely think in addresses. A sparse-matrix
engine asks for "row 4711 of B", and a database probe engine asks for "the
record whose key is 0x3a7". An ordinary cache makes such an engine first walk
its index structure (a row-pointer array, a hash bucket chain) to find an
address, and only then learn whether the data was on chip.

X-Cache turns this around in two ways:

* **Meta-tags.** The cache is tagged with the accelerator's own key, so a
  load of a resident element is a hit at once, with no address work.
* **Walkers.** On a miss, a small program called a *walker* walks the index
  structure in DRAM, fills the data RAM and installs the tag. Walkers are
  written as coroutines and stored as microcode, so one piece of hardware
  serves different accelerators by being reprogrammed.

Many walkers are in flight at once. Each one sleeps while its DRAM refill is
outstanding, and a few execution lanes are shared among all of them.

This repository holds synthesizable SystemVerilog for the whole cache
controller. It has self-checking testbenches for every block and an
end-to-end test that runs a hash-index walker.

## How a request travels

The datapath sends *meta requests*: `{kind, key, data}`. The kind is load,
preload or store. Each cycle the **front end** takes at most one message from
four queues, in this priority order:

1. **Replays.** A walker finished, and loads were waiting for its element.
2. **DRAM responses.** These carry the id of the walker that asked.
3. **Internal events.** A routine enqueued them.
4. **Meta requests.** These come from the datapath.

The front end takes the first message that can make progress this cycle. A
meta request is then handled in one of these ways:

| case | what happens |
|---|---|
| load, key resident (meta-tag entry in state END) | A job goes to the **hit path**. The element's sectors stream out of a dedicated data-RAM read port, and the entry is touched for LRU. No routine runs. |
| load, a walker for this key is already active | The load joins that walker, which increments a waiting-load count in the walker's X-register. |
| load or preload, miss | A new walker starts in state DEFAULT (an X-register is allocated). |
| preload of a resident or active key | Dropped; there is nothing to do. |
| store | Starts a walker. If the key is resident, the walker starts with the entry's state and pointers, so its routine can merge the payload. A store waits while another walker of its key is active. |

To run a walker, the front end looks up two tables:

* The **trigger table** maps `{source, hit}` to an event.
* The **routine table** maps `[walker state, event]` to a microcode address.

The routine is dispatched to the lowest idle **executor lane**. A message
whose `[state, event]` cell is not programmed is dropped and counted. So is a
DRAM response for a walker that does not exist.

When a walker's routine moves it to state END, the X-register is released.
If loads were waiting, a **replay** `{key, count}` is queued. The replay
sends each waiting load through the hit path, which is how every load gets
exactly one answer.

## Walkers: coroutines on shared lanes

A walker is a state machine whose transitions are *routines*: short,
straight-line sequences of actions that never wait on memory. Wherever the
walk would wait (a DRAM refill, a dependent address computation), the routine
ends instead:

* it issues the request or enqueues an event,
* it writes the next state,
* it gives up the lane.

The walker's state and temporaries live in its **X-register** while it
sleeps. The matching DRAM response or event wakes it later, and
`[new state, event]` picks the next routine. Routines of one walker never
overlap: the front end does not dispatch a walker whose routine is still
running.

An **executor lane** fetches one action per cycle from the microcode RAM,
starting at the routine-table pointer. It executes the action against its
private copy of the walker context and moves on.

* Every action takes one cycle, except READ, which takes two because the data
  RAM is synchronous.
* Actions that use a shared structure wait for the **port scheduler**. The
  shared structures are the meta-tag array, the sector allocator, the DRAM
  queue, the event queue, the data-RAM write port and the data-RAM read port.
* The port scheduler is round-robin per port and grants one lane per port per
  cycle.
* The STATE action ends the routine. It writes the state to the meta-tag
  entry and the context back to the X-register.

**Allocation failure.** An `allocM` can fail because every way of the set
belongs to a walker still in flight. An `allocD` can fail because no run of
free sectors exists and nothing can be evicted.

A lane that hits either failure does not wait. It:

* writes the walker back as it stands,
* re-queues the triggering event with its message on the internal event
  queue,
* becomes free.

The walker re-runs the routine from its start later. The lane must not wait
for the allocation: the walkers that own the busy ways need lanes to finish,
so every lane could end up waiting on a walker that cannot run.

As a consequence, routines must do their allocations before any action that
cannot be repeated. `allocM` and `allocD` are themselves no-ops once they
have succeeded.

**One message in flight per walker.** A walker keeps at most one DRAM request
or internal event outstanding. It issues the next one from the routine that
the previous one wakes. Two things follow from this rule:

* The internal event queue, which is NACTIVE deep, can never fill.
* A walker that is running never has a response stuck at the head of the
  DRAM response queue while it waits for room to send another request.

A routine that fires several DRAM reads at once breaks the rule. It can
deadlock: its own first response blocks the response queue, while it waits
for the request queue that the blocked memory no longer drains. Multi-sector
elements are therefore copied sector by sector, and each response triggers
the next read.

## The action set

An action is 33 bits: `{op[5:0], rd[2:0], rs1[3:0], rs2[3:0], imm[15:0]}`.

* `rd` names R0..R7.
* `rs1`/`rs2` name R0..R7 (values 0..7) or the control registers C0..C7
  (values 8..15). The control registers are written through the
  configuration port and hold things like table base addresses and masks.
* The walker's key is available through `allocR`.

| group | actions | notes |
|---|---|---|
| address generation | `add and or xor` rd = rs1 op rs2; `addi` rd = rs1 + sext(imm); `inc dec` rd ± 1; `shl sra srl` by imm; `shr` by rs2; `not`; `allocR` rd = key | integer/logic ALU in each lane |
| message queue | `enq` (imm[15] = 1: DRAM read of address rs1; else internal event imm[3:0] with the message buffer), `deq` (clear the message buffer), `rdata` rd = msg[rs1], `peek` rd = msg[imm], `wdata` msg[imm] = rs1 | the message buffer holds the triggering message (a DRAM block, the store payload) |
| meta-tag | `allocM` (claim a way in the key's set), `deallocM`, `update` (write the data pointers), `state` imm (end the routine) | `state END` releases the walker |
| control flow | `bmiss bhit` (on the trigger's hit flag), `beq bnz blt bge ble` on rs1/rs2; target = imm | |
| data RAM | `allocD` (imm sectors, or rs1 if imm = 0), `deallocD`, `read` rd = sector[dstart + rs1].word[imm], `write` sector dstart + rs1 (imm[15] = 0: the whole message buffer; imm[15] = 1: rs2 into word imm[1:0]) | |

## Storage: meta-tags, sectors and replacement

**Meta-tag array.** The array (`xc_meta_tag`) has SETS × WAYS entries.
Each entry holds:

* the full key,
* the owning walker's state (only END counts as a hit),
* the data pointers: first sector and sector count.

The set is the low bits of the key.

**Data RAM.** The data RAM (`xc_data_ram`) is WLEN 32-bit banks, so one
*sector* is one WLEN-word line. An element occupies a contiguous run of
sectors handed out by `xc_sector_alloc`, which keeps a free bitmap and
allocates first-fit. Because tags and sectors are decoupled, one element may
be one sector or MAX_RUN sectors, and the number of cached elements is not
tied to the data capacity.

**Replacement.** Replacement ranks live in their own module (`xc_lru`, true
LRU by per-way ranks), so the policy can be exchanged.

* An `allocM` takes an invalid way first, otherwise the least recently used
  entry in state END. An entry whose walker is still in flight is never
  evicted.
* An eviction frees the victim's sectors through the allocator's second free
  port in the same cycle.

## Timing

* **Meta hit: 3 cycles load-to-use.** A request accepted at clock edge *t*
  reaches the front end from the request queue after *t*. At edge *t+1* the
  front end decides "hit", and the hit path starts the RAM read. At edge
  *t+2* the data enters the output queue, and the response is valid for edge
  *t+3*.
* The hit path is fully pipelined: one sector per cycle, with credit-based
  back-pressure from the output queue.
* The front end handles one message per cycle. A lane executes one action
  per cycle (READ takes two). A routine holds its lane from dispatch to its
  STATE action.
* DRAM responses may return in any order across walkers. Within one walker
  there is never more than one in flight (see below).

## Programming the cache

The configuration port is `cfg_we`, `cfg_target`, `cfg_addr[15:0]` and
`cfg_wdata[63:0]`:

| target | address | data |
|---|---|---|
| `CFG_TRIGGER` | `{source[1:0], hit}` | event in [3:0] |
| `CFG_RTABLE` | `{state[3:0], event[3:0]}` | [8] valid, [7:0] microcode address |
| `CFG_UCODE` | microcode address | action in [32:0] (`xcache_pkg::mk_act` builds one) |
| `CFG_CTRL` | register 0..7 | value in [31:0] |

Sources are load 0, preload 1, store 2 and DRAM 3. State 0 is DEFAULT (where
every new walker starts) and state 1 is END (resident).

### Example: the hash-index walker

`tb/tb_xcache.sv` programs a database hash-index probe. The data structures:

* C0 is the base of the bucket-root table; C1 is the bucket mask.
* Each node is a 4-word block `{key, rid, next, 0}`.

| state, event | routine |
|---|---|
| DEFAULT, MISS | allocD 1; allocM; r0 = key; enq event PTR; state AGEN |
| AGEN, PTR | r3 = ((key >> 4) ^ key) & C1; r1 = C0 + (r3 << 4); enq DRAM r1; state ROOT |
| ROOT, DRAM | r1 = msg[0]; if r1 ≠ 0: enq DRAM r1, state WAIT; else the key is absent: cache rid 0, state END |
| WAIT, DRAM | r2, r3, r4 = key, rid, next of the node; enq event CHECK; state MATCH |
| MATCH, CHECK | if r2 = r0: write {rid, next}, update, state END; else if next ≠ 0: enq DRAM next, state WAIT; else cache rid 0, state END |
| END, STORE-hit | r5 = read word 0; r5 += msg[0]; write word 0; state END |
| DEFAULT, STORE-miss | allocD 1; allocM; write msg; update; state END |

The ROOT/WAIT/MATCH split is the coroutine form of the loop
`while (node) { if (node->key == key) return node; node = node->next; }`.
The walk yields at each DRAM access and at the match decision.

## Parameters

Defaults are the sparse-GEMM configuration: 4 lanes, 32 walkers, 8 ways,
512 sets and 4-word sectors.

| parameter | default | meaning |
|---|---|---|
| `NEXE` | 4 | executor lanes |
| `NACTIVE` | 32 | X-registers (walkers in flight) |
| `WAYS`, `SETS` | 8, 512 | meta-tag geometry |
| `NSECTORS` | 4096 | data-RAM sectors (one per tag entry) |
| `MAX_RUN` | 8 | longest element, in sectors |
| `UCODE_DEPTH` | 256 | microcode actions |
| `NSTATES`, `NEVENTS` | 16, 16 | routine-table size |
| `QDEPTH` | 8 | depth of each message queue |

The following are package constants in `xcache_pkg`:

* `WLEN` = 4 (words per sector)
* `NREGS` = 8 (temporaries)
* 32-bit keys, words and addresses

The other configurations the design is known for also fit these parameters:

* hash lookups: 16 walkers, 1024 sets
* graph events: direct-mapped, 131072 sets, 8-word sectors, which needs `WLEN` = 8

## Where this design makes its own choices

The following are decisions of this implementation rather than part of the
architecture it follows:

* the message formats, the configuration port and the action encoding;
* the front-end priority order;
* the waiting-load count with replay;
* the store policy;
* the round-robin port scheduler;
* first-fit contiguous sector runs;
* the rule that busy entries are never evicted;
* the yield-and-retry on allocation failure.

Sectors are addressed by first sector and count, not by start and end
pointers.

## Limitations

* **Hit-path race.** A hit job is decided in the front end and streamed a
  few cycles later. If the entry were evicted and its sectors reallocated and
  rewritten in that window, the job would stream the new data. A refill
  takes at least a DRAM round trip, so this does not happen with realistic
  memory latency, but nothing in the hardware forbids it.
* **Replay queue.** A replay whose element was evicted before it ran needs a
  free lane to start a new walk. If every lane were waiting to push a replay
  into a full replay queue at that moment, the cache would stall. The queue
  is QDEPTH deep; nothing in the hardware rules this case out.
* **Sector allocator size.** The first-fit allocator is a combinational scan
  over the free bitmap. At 4096 sectors it is large and slow. A real
  implementation would use a hierarchical free list.
* **Address width.** Addresses are 32 bits, so a DRAM-resident index beyond
  4 GB needs `ADDR_W` raised.
* **Not included.** The main memory, the accelerator datapaths, the
  generator and compiler that produce the tables, and the interfaces to other
  caches and to a system bus are not included. The cache brings out plain
  valid/ready queues for the datapath and for DRAM.

## Files

`rtl/` has one module per file:

* `xcache_pkg.sv`: types, action set, `mk_act`
* `xcache.sv`: top
* `xc_frontend.sv`: event loop
* `xc_executor.sv`: lane
* `xc_port_sched.sv`
* `xc_trigger_table.sv`
* `xc_routine_table.sv`
* `xc_ucode_ram.sv`
* `xc_xreg.sv`
* `xc_meta_tag.sv`
* `xc_lru.sv`
* `xc_sector_alloc.sv`
* `xc_data_ram.sv`
* `xc_hit_path.sv`
* `xc_fifo.sv`

`tb/` has:

* `tb_<module>.sv` for every block;
* `tb_xcache.sv`: the end-to-end test at a small size;
* `tb_xcache_full.sv`: the same walker on the cache at its default size;
* `tb_xcache_sparch.sv`: a sparse-matrix row walker at the default size;
* `xc_dram_model.sv`: a fixed-latency behavioural DRAM.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself (each
has a watchdog). For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/xcache_pkg.sv tb/tb_xcache.sv --top-module tb_xcache -Mdir obj
./obj/Vtb_xcache
```

`tb_xcache` runs the cache at 2 lanes, 4 walkers, 4 sets × 2 ways and 16
sectors, against a hash table of 40 keys in chains of up to about 8 nodes.
It checks:

* every load is answered once with the reference value;
* the 3-cycle hit latency;
* store merge and insert.

It also fails if any of these mechanisms never occurred: hits, misses, loads
joining an active walker, replays, port conflicts, allocation yields,
X-register-full stalls, evictions, dropped stray messages, and multi-node
chains.

`tb_xcache_full` runs the same walker on the cache at its default parameters
and requires the mechanisms that occur at that size. It takes under a minute
to build and a fraction of a second to run.

`tb_xcache_sparch` runs the sparse-matrix row walker at the default size.
The key is a row number of a CSR matrix, and the element is the row's values.
On a miss the walker:

1. reads `row_ptr[r]` and `row_ptr[r+1]` in one DRAM access;
2. allocates `(len + 3) / 4` sectors;
3. copies the row one sector per DRAM response.

Rows of 0 to 32 values give elements of 0 to 8 sectors. The test checks
every word of every streamed sector and the `last` flags, and it requires
multi-sector and empty rows to occur.
