# Bytecode and array prefetching for an embedded Java accelerator

A small Java processor runs bytecode that it fetches through its data cache,
and much of the Java data it touches sits in arrays. Both kinds of miss stall
it for a whole memory latency (50 cycles here). This RTL adds two prefetchers
beside the cache. Both use information that only a Java machine has:

* **Bytecode prefetching with a non-sequential block prediction table (NBPT).**
  Bytecode is dense, and the PC stays only a few tens of cycles in each
  16-byte block. The prefetcher therefore predicts the *next block* each time
  the PC enters a new one. The default guess is the sequential block. Jumps
  that keep recurring (loops, frequent branches, method calls and returns)
  are learnt in a small table. Calls and returns get special treatment
  because the Java runtime spends extra time on them.
* **Array prefetching with a stride table (ST) tagged by array base.** On
  every array load or store the accelerator knows the array's base, index,
  element size and length. The table learns one stride per array and
  prefetches ahead of it. How far ahead depends on the stride's size. The
  prefetcher never fetches outside the array; when it reaches the end it
  wraps to the array's head for the next pass.

Prefetched lines go into a small fully associative **prefetch buffer**, not the
cache, so a wrong guess cannot evict useful data. A demand miss that finds its
line in the buffer moves the line into the cache in one cycle.

```
 pc_*  ──► nbpt_prefetcher ──(2 lanes)──┐
                                        ├─► prefetch_request_queue ──► memory_controller ──► m_* (memory)
 arr_* ──► stride_table_prefetcher ─(D)─┘                               │      │
                                                                   data_cache  prefetch_buffer
 d_*   (demand loads/stores) ──────────────────────────────────────────►┘
```

The accelerator core, the host processor that emulates unimplemented
bytecodes, and main memory are outside this design. Their signals are the
ports of `java_prefetch_top`.

## The NBPT: predicting the next bytecode block

A *block switch* happens when a bytecode fetch falls in a different 16-byte
block Q than the previous fetch, which was in P. At every switch the unit
does two things in the same cycle:

1. **Predict** the block after Q. Q is looked up in the table:
   * If there is no entry, or the entry is in state S-LC, the prediction is
     **Q+1**.
   * If the entry is in NS-LC or NS-HC, the prediction is the recorded
     **next block r**. If the entry's I bit (Q left by an invoke) or R bit
     (Q left by a return) is set, **r+1** is also prefetched. The runtime's
     invoke/return work gives the memory time for a second block.
   * If the PC reached Q by a *return* and Q's I bit is set, nothing is
     prefetched. Q called a method, and that method's block is not needed
     again now.
2. **Update** P's entry with the pair (P, Q). "Sequential" means Q = P+1, and
   "match" means Q equals the recorded next block.

| P's state | (P,Q) | new state |
|---|---|---|
| no entry (S-HC) | non-sequential | insert as S-LC, next := Q, I/R from how Q was reached |
| no entry (S-HC) | sequential | no entry |
| S-LC | match | NS-HC |
| S-LC | sequential, I = 0 | entry removed |
| S-LC | sequential, I = 1 | NS-LC |
| S-LC | other non-sequential | NS-LC, next := Q |
| NS-LC | match | NS-HC |
| NS-LC | sequential | entry removed |
| NS-LC | other non-sequential | NS-LC, next := Q |
| NS-HC | match | NS-HC |
| NS-HC | anything else | NS-LC |

Some consequences of this table:

* A loop's backward branch settles in NS-HC. One exit from the loop only
  drops it to NS-LC, so the next entry into the loop is still predicted.
* An occasional second target does not replace the learnt one. Two
  consecutive occurrences do replace it.
* The block that makes a call keeps its entry even though the code after
  the return falls through sequentially (the I = 1 arc).

S-HC is the state of every block without an entry, so the table stores only
three states. `pc_kind` marks the first fetch after an invoke or a return;
the I and R bits are taken from it.

The prefetch outputs are registered. Requests appear one cycle after the
fetch that caused the switch.

## The stride table: following arrays

Entries are tagged by array **base address**, not by instruction address.
Several instructions that walk the same array (for example an unrolled copy
loop) share one entry, and one instruction that walks many arrays gets an
entry per array. Each entry holds the previous byte offset, the stride, a
state (Init or Steady) and a trigger block.

On each access (byte offset = index × element size):

* **Lookup / insert.** A new array gets an entry with stride equal to the
  element size, in state Init. An array that fits entirely inside one block
  is not entered, because it can never need a prefetch.
* **Stride check.** The new stride is offset − previous offset.
  * If it equals the stored stride, the entry goes to Steady.
  * If it differs, the entry goes back to Init, stores the new stride and
    disarms its trigger block.
* **Stride-adaptive targets.**
  * If |stride| ≤ H, the next block in the stride's direction is fetched.
    Consecutive elements then share blocks, and one block ahead is enough.
  * Otherwise the blocks of the next `PREFETCH_DEPTH` elements are fetched
    (address + k·stride, k = 1..depth).
* **Trigger block.** In Steady, prefetches are produced only when the access
  enters the armed trigger block. The trigger is the last block prefetched
  for that array. This keeps an array walk from sending the same prefetch
  again for every element of a block. In Init a tentative prefetch is always
  produced.
* **Circular prefetching.** A target past the array's last block wraps to
  its first block, and a target before the first block wraps to its last
  block. A loop over the array therefore finds its head prefetched when it
  starts again, and nothing outside the array is ever fetched.

The defaults are H = 2, depth = 2 and 8 entries. Strides and H are both
counted in bytes, so int arrays walked one element at a time (stride 4) use
the depth path. Targets are at most 2 elements ahead, and the next block
comes in as the walk approaches the end of the current one. A target equal
to the accessed block, or to the previous target of the same access, is not
sent.

## The memory controller

There is one memory port with one outstanding read.

* **Demand access.** Demand accesses have priority.
  * A read that hits the cache completes in the same cycle.
  * A read that misses but finds its line in the prefetch buffer moves the
    line into the cache and completes one cycle later.
  * Otherwise the line is read from memory (a true miss: the latency plus
    one cycle).
  * If the missing block is the one the outstanding prefetch is fetching,
    the demand waits for that response instead of issuing a second read
    (a late prefetch).
* **Store.** Stores are written through to memory. They update a present
  cache line, never allocate one, and invalidate any copy in the prefetch
  buffer.
* **Prefetch.** When the port is free and no demand needs it, the queue head
  is popped and checked against the cache and the buffer. A block already
  held is dropped (filtered). Otherwise it is read from memory into the
  buffer.

The buffer replaces its oldest line when full. The request queue (8 entries)
takes the bytecode lanes first and then the array lanes. A request that finds
it full is dropped and counted on `pfq_dropped`. Prefetches are hints, so
losing one costs only performance.

## Interface of `java_prefetch_top`

| port | meaning |
|---|---|
| `clk`, `rst_n` | clock; asynchronous active-low reset |
| `cfg_bc_pf_en`, `cfg_arr_pf_en` | enable bytecode / array prefetching (the tables keep learning when off) |
| `pc_valid`, `pc`, `pc_kind` | a bytecode fetch this cycle; `pc_kind` is FLOW, INVOKE or RETURN |
| `arr_valid`, `arr_base`, `arr_index`, `arr_esize_log2`, `arr_length` | an array access this cycle |
| `d_valid`, `d_we`, `d_addr`, `d_wdata`, `d_be` → `d_ready`, `d_rdata` | demand word access. Hold it until `d_ready`, which is combinational and high in the completing cycle. |
| `m_req_valid/ready/we/addr/wdata/be`, `m_rsp_valid`, `m_rsp_line` | memory port. Reads are line aligned and answered by a single `m_rsp_valid` cycle carrying the 128-bit line. Writes are single words with byte enables. |
| `nbpt_ev`, `st_ev`, `mc_ev`, `pfq_dropped` | one-cycle event strobes for performance counters |
| `pfq_count`, `pbuf_occupancy` | fill levels |

Pulse the `pc_*` and `arr_*` hints in the first cycle of the matching demand
access. `m_req_wdata` and `m_req_be` are `d_wdata` and `d_be` passed
straight through.

Parameters and their defaults: `NBPT_ENTRIES` = 16, `ST_ENTRIES` = 8,
`ST_H` = 2, `ST_DEPTH` = 2, `PFQ_DEPTH` = 8 (a power of two),
`PBUF_LINES` = 8 and `CACHE_BYTES` = 4096.

## How faithful this is

These follow the evaluated configuration:

* the 16-entry NBPT and its four states;
* the prediction rules, the I/R bits, and the extra block on invoke/return;
* the array-base-tagged two-state stride table with stride-adaptive
  targets, trigger block and circular prefetching;
* H = 2 and depth 2;
* the 8-line fully associative prefetch buffer, checked on a demand miss
  and before every prefetch;
* the 4 KB cache with 16-byte lines;
* the 50-cycle memory, used in the testbenches.

These are this design's own choices:

* **NBPT arcs.** The arcs for a non-sequential mismatch in S-LC and for a
  sequential switch in NS-LC. On a new next block the I/R bits are replaced.
* **Tables.** Replacement in both tables is first free slot, then round
  robin.
* **Strides.** Stride units are bytes, and the stride of a new entry is the
  element size. Repeated targets are dropped.
* **Cache.** Direct mapped, write-through, no write allocation.
* **Memory controller.** One outstanding read, demand before prefetch, the
  late-prefetch merge, and FIFO replacement in the buffer.
* **Request queue.** 8 entries, and requests that find it full are dropped.
* **Interface.** How the accelerator reports a call or return (`pc_kind`)
  and an array access (`arr_*`).

The designs the evaluation compares against (sequential prefetching, a
next-line prediction table, and a PC-tagged reference prediction table) are
not included.

## Files

| file | contents |
|---|---|
| `rtl/jp_pkg.sv` | widths (32-bit address, 16-byte block, 28-bit block number), enums, event structs |
| `rtl/nbpt_prefetcher.sv` | bytecode prefetch unit and NBPT |
| `rtl/stride_table_prefetcher.sv` | array prefetch unit and stride table |
| `rtl/prefetch_request_queue.sv` | multi-lane FIFO of prefetch block numbers |
| `rtl/prefetch_buffer.sv` | 8-line fully associative buffer |
| `rtl/data_cache.sv` | 4 KB direct-mapped cache, 16-byte lines |
| `rtl/memory_controller.sv` | demand/prefetch arbitration, filtering, memory port |
| `rtl/java_prefetch_top.sv` | the complete memory system |
| `tb/mem_model.sv` | behavioural 50-cycle line memory (testbench only) |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_workload_kernels.sv` | image-filter, N-queens and S-box kernels run through the whole design |

## Simulating

Each testbench needs only plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_java_prefetch_top \
    -y rtl -y tb +libext+.sv rtl/jp_pkg.sv tb/tb_java_prefetch_top.sv
./obj_dir/Vtb_java_prefetch_top
```

Every testbench ends by printing `TB_RESULT checks=<n> failures=<n>`.

* `tb_nbpt_prefetcher` walks the forward-branch, loop, invoke/return and
  two-target patterns. It checks every prediction and entry state against
  values worked out by hand.
* `tb_stride_table_prefetcher` checks the following against blocks worked
  out by hand:
  * small and large strides in both directions;
  * Init/Steady behaviour and trigger gating;
  * circular wrap-around, one-block arrays and replacement.
* `tb_prefetch_request_queue`, `tb_prefetch_buffer` and `tb_data_cache` use
  randomised traffic against behavioural models.
* `tb_memory_controller` covers the memory controller wired to the cache,
  the buffer, a queue and the 50-cycle memory. It checks data and cycle
  counts for these cases:
  * a hit, a buffer hit (1 cycle) and a true miss (51 cycles);
  * a late merge and a filtered prefetch;
  * stores;
  * demand priority over queued prefetches.
* `tb_java_prefetch_top` runs the whole design at its default parameters.
  It plays a synthetic program:
  * a five-block loop;
  * a virtual call with two targets, and the return from it;
  * a forward branch;
  * int, byte and large-stride array walks, one array inside a single
    block, and stores;
  * a burst that overflows the request queue.

  The program runs once without prefetching and once with it. Every load is
  checked against the memory contents. The first miss must take 51 cycles.
  Both remaining stall ratios (stall cycles with prefetching ÷ without) must
  be below 1. The run measures about 0.60 for bytecode and 0.46 for array
  reads. Every mechanism above must occur at least once.
* `tb_workload_kernels` runs three small kernels through the whole design,
  each without and then with prefetching:
  * a 3×3 image filter over row arrays, with a call per pixel;
  * recursive 6-queens;
  * S-box table lookups.

  The kernels compute with the data that comes back from the memory system,
  and their results are checked. The measured remaining stall ratios are:

  | kernel | bytecode | array |
  |---|---|---|
  | image | 0.75 | 0.51 |
  | queens | 0.72 | 0.61 |
  | S-box | 0.35 | 1.07 |

  Data-dependent table lookups have no stride, so array prefetching cannot
  help the S-box kernel.
