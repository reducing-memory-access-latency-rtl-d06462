# Enhanced memory controller: running dependent cache misses next to DRAM

On a multi-core chip, a load that misses in the last level cache (LLC) is
often followed by more loads whose addresses come from the missing data:
pointer chasing. Each such dependent miss can only start after the first
line has come back from DRAM, crossed the on-chip ring and the cache
hierarchy, and reached the core. This design adds a small integer engine to
the memory controller: the enhanced memory controller (EMC). When a core
stalls behind an LLC miss, it extracts the few uops that turn the missing
data into the next address. It ships them, already renamed, to the EMC. The
EMC runs them as soon as the data is there. The dependent miss then leaves
from the memory controller itself, often while its DRAM row is still open.
Results go back to the core, which retires everything in order.

The RTL covers both halves:

* the **chain generator** at each core (`emc_chain_gen`), which builds the
  chain out of the core's reorder buffer (ROB);
* the **EMC compute engine** (`emc` and its parts), which executes chains
  for all cores.

`emc_system` is the top: four chain generators, an arbiter and one engine.

## System view

```
 core 0..3                                   memory controller
 ┌───────────────┐  chain + live-ins   ┌──────────────────────────────────────┐
 │ ROB window ──►│ emc_chain_gen ──┐   │ emc                                  │
 │ (entry 0 =    │                 ├──►│  emc_contexts ─► emc_rs ─► ALU0/ALU1 │
 │  source miss) │  ... x4 ...  RR arb │       ▲  PRF      │  CDB x2   │      │
 └───────────────┘                     │       └───────────┴───────────┘      │
        ▲  live-outs, stores, halts    │  ALU0 address ─► M0: emc_tlb, emc_lsq│
        └──────────────────────────────│     ─► emc_dcache ─► MSHRs ─► mreq_* │
                                       │     emc_miss_pred: LLC or DRAM?      │
                                       └──────────────────────────────────────┘
```

The cores, the ring, the LLC, the DRAM scheduler and the DRAM are not part
of this RTL. Their side of every connection is a port of `emc_system`:

* ROB windows and training in;
* line requests out, line fills in;
* lines seen coming from DRAM, and LLC invalidations, in;
* page table entries and TLB shootdowns in;
* load/store notices, halts and live-outs out.

## Chain generation (core side)

This is the least conventional part. It reuses the core's own wakeup idea
without executing anything. `start` means: the ROB is full and its head is
an LLC miss. Generation runs only when a 3-bit saturating counter has one of
its top two bits set. The counter counts +1 for an LLC miss that had a
dependent miss and −1 for one that had none (`train_*`).

1. **Source.** ROB entry 0, the missing load, becomes chain position 0. Its
   address operands are ready at the core, so they go into the live-in
   vector. Its destination tag is "pseudo-broadcast".
2. **Pseudo wakeup.** In each later cycle, a ROB entry wakes up when all of
   these hold:
   * one of its source tags was broadcast in the previous cycle;
   * each of its other sources is ready at the core or already in the chain;
   * the EMC supports its operation.

   `OP_OTHER` stands for floating point, vector and anything else. Such a uop
   never wakes, so nothing that depends on it joins the chain.
3. **Rename.** Up to `WIDTH` (4) woken uops join per cycle, oldest first;
   the rest stay pending. The register remapping table (RRT) maps a chain
   source to an EMC register. A ready source is copied into the next
   live-in slot. The destination gets the next EMC register. That is the
   chain position: uop *i* always writes EMC register *i*. The destination
   tag is broadcast in the next cycle.
4. **End.** Generation stops when nothing is left to wake, when 16 uops are
   in the chain, or when a uop's ready sources no longer fit in the 16
   live-in slots. The chain is then offered to the EMC. With it go the core
   register (`chain_cpr`) and ROB index (`chain_rob`) of every position.

For the document's pointer-chasing example (source load → move → two loads →
add with a ready register → load), the chain is built in six cycles:

* one cycle for the source;
* four wakeup levels;
* one cycle to see that nothing is left.

The ROB window is a port (`rob`, `ROB_N` entries of `rob_uop_t`, entry 0 at
the head). Operand values of ready sources are assumed readable there.

## The EMC engine

### Contexts and dispatch (`emc_contexts`)
There are two contexts. Each has a 16-uop buffer, a 16-entry live-in vector
and a private 16-register PRF with ready bits. There is no fetch, decode or
rename. A context dispatches its chain in program order. One uop per cycle
is dispatched, taken round-robin from the running contexts, whenever the
reservation station has room. Operands are read at dispatch:

* a live-in is ready;
* a register is ready if its PRF ready bit is set;
* otherwise the operand is a tag, {context, position}.

Context states:

* IDLE → RUN when a chain is loaded;
* RUN → DONE when all uops have completed;
* DONE → IDLE when the core takes the live-outs;
* RUN → DRAIN on a halt;
* DRAIN → IDLE once none of the context's memory accesses is in flight.

### Out-of-order back end (`emc_rs`, `emc_alu`)
The reservation station has 8 entries. It compares pending tags with the two
common data buses (CDB) every cycle, including the cycle a uop is
dispatched. It issues up to two ready uops per cycle, with the lowest entry
first:

* **port 0** takes anything. It takes a memory uop only when the memory
  unit can accept one (`mem_ok`). It takes a load only when no older store
  of the same chain is still unexecuted (`st_pend`), so the LSQ can forward
  to it.
* **port 1** takes integer uops and branches. It issues nothing while the
  load result queue is non-empty, because that queue then owns CDB 1.

The ALUs do add, sub, move, and, or, xor, not, shifts and sign-extension,
plus address generation. They also resolve branches: eq, ne, and signed
lt/ge on two operands or an operand and the immediate. A branch whose
outcome differs from the core's prediction halts the chain: the EMC is on
the wrong path. Integer results are broadcast one cycle after issue.

### Memory unit (in `emc`)
A load or store issued in cycle *t* is in stage M0 in *t+1*. There:

* `emc_tlb` translates it. There are 32 entries per core, kept as a circular
  buffer of the last pages the core supplied. A miss halts the chain: the
  EMC does not walk page tables.
* A **store** writes `emc_lsq` and completes. The LSQ has one entry per
  chain position. Stores never reach memory from here. They return to the
  core with the live-outs.
* A **load** takes store data from the youngest older store to the same
  8-byte word, if there is one. Otherwise it reads `emc_dcache`: 64 lines,
  4 ways, one port, 2-cycle access, first-in first-out replacement. The
  cache is filled with every line the memory controller receives from DRAM
  (`dline_*`) and with lines returned for EMC misses. The LLC can take a
  line back (`dinv_*`).
* A cache **miss** takes one of 4 MSHRs and sends a line request
  (`mreq_*`). `emc_miss_pred` holds a 3-bit counter per PC hash per core. If
  the counter is above 3, the request is marked to go straight to DRAM
  (`mreq_dram`), skipping the LLC lookup. The fill's LLC hit/miss flag
  trains the counter.

Every executed load and store also sends a notice to its home core
(`note_*`). The core uses it to fill its own LSQ entry and to check memory
ordering against its own stores.

Load results from a forward, a cache hit or a fill go through an 8-entry
queue onto CDB 1. The queue is sized by credits, so it cannot overflow. A
load that hits therefore broadcasts four or more cycles after issue.

### Results (`done_*`, `abort_*`)
A finished chain offers its results to the core, with the core registers and
ROB entries they belong to:

* the live-out registers: every position whose uop writes a register;
* the stores held in the LSQ.

A halt (`abort_valid`, with `abort_tlb` telling a TLB miss from a wrong
path) frees the context. The core then re-executes the whole chain itself.
Each core has at most one chain in flight. While it does, its `start` is
ignored.

## Uop format (`emc_pkg`)

A uop is 48 bits: 6 bytes, the size the document budgets for a uop on the
interconnect.

| field | bits | meaning |
|---|---|---|
| `op` | 5 | operation (`emc_op_e`) |
| `src1`, `src2` | 6 each | valid, live-in or register, index |
| `imm` | 20 | signed immediate: offset, second operand, sign-extend size |
| `pred_taken` | 1 | core's predicted direction for a branch |
| `pc` | 10 | low PC bits, used by the miss predictor |

Data is 64 bits wide. Addresses are 48 bits virtual and 40 bits physical.
Pages are 4 KB and lines 64 bytes.

## What follows the document and what is this design's own

These follow the document:

* 4 cores and 2 contexts;
* 16-uop buffers, 16-register PRFs and a live-in vector per context;
* round-robin issue out of the buffers;
* 8 RS entries, a 2-wide back end and a CDB;
* the operation set;
* 32 TLB entries per core, kept as a circular buffer;
* the 64-line, 4-way, 2-cycle, 1-port data cache;
* 3-bit miss-predictor counters and the 3-bit dependent-miss counter with
  its top-two-bits rule;
* pseudo wakeup, RRT renaming, live-in packing and the 16-uop limit;
* stores kept at the EMC and returned to the core;
* a halt and re-execution on a wrong path or a TLB miss.

These are choices of this design:

* all widths and the uop encoding;
* the branch conditions;
* 16 live-in slots;
* one dispatch per cycle;
* the RS select priority and the port split;
* a load waits for older stores of its chain;
* 4 MSHRs, with no merging of misses to the same line;
* the load result queue;
* FIFO replacement in the data cache;
* the miss-predictor table size (256 per core), hash and threshold (3);
* the counter reset values (0);
* round-robin arbitration between cores;
* one chain in flight per core.

Departures and limits:

* **Source data.** The source load is re-executed by the EMC as chain
  position 0. Its line is normally already in the data cache, from the DRAM
  return path, or it is requested again. The document says only that the
  chain runs once the source line has arrived.
* **Generation time.** The document counts four cycles for its example
  chain. It renames the source and wakes the first dependant in the same
  cycle, and it does not count detecting the end. This design takes six
  cycles for the same chain: one extra for the source and one to detect the
  end.
* **x86 flags.** Branches compare two operands instead of flag registers.
* **Exceptions.** The engine raises no exceptions. Its only halts are a
  wrong path and a TLB miss. Divide and other operations that could fault
  are not in the operation set.
* **No dedicated memory-ordering check.** Loads do not run ahead of older
  stores in their own chain. Conflicts with the core's own stores are left
  to the core, using the notices.
* **Fixed context count.** `NUM_CTX` is a package constant (2). The
  eight-core configurations, with 4 contexts or two EMCs that forward
  requests to each other, are not built.
* **Parts outside the RTL.** The ring, LLC, batch-scheduling DRAM
  controller, prefetchers and the uop cache (which the document leaves out)
  are not part of this RTL.

## Files

`rtl/`:

* `emc_pkg.sv`: types and constants
* `emc_alu.sv`, `emc_rs.sv`, `emc_contexts.sv`, `emc_tlb.sv`,
  `emc_dcache.sv`, `emc_lsq.sv`, `emc_miss_pred.sv`: engine parts
* `emc.sv`: the engine
* `emc_chain_gen.sv`: the core-side chain generator
* `emc_system.sv`: the top

`tb/tb_<module>.sv` is one self-checking testbench per module. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_emc` runs chains against an in-order reference model with a memory
  model.
* `tb_emc_system` runs the top at its default sizes, end to end. It counts
  each mechanism: generation, arbitration waits, blocked starts, both kinds
  of halt, data cache hits and direct-to-DRAM requests.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/emc_pkg.sv tb/tb_emc_system.sv --top-module tb_emc_system -o sim
./obj_dir/sim
```

Replace `tb_emc_system` with any other testbench to run it the same way.
The full-size system test takes about 20 seconds to build and run.

Parameters with the document's defaults:

* `emc_system`: `CORES`=4, `ROB_N`=256, `WIDTH`=4
* `emc`: `RS_ENTRIES`=8, `TLB_ENTRIES`=32, `DC_LINES`=64, `DC_WAYS`=4,
  plus this design's `MP_ENTRIES`=256 and `MSHRS`=4

Chain length, live-in count and context count are constants in `emc_pkg`.
