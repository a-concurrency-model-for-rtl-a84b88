# Microthreaded chip multiprocessor with a distributed register file

This is synthesizable SystemVerilog for the thread-management and register
hardware of a microthreaded chip multiprocessor (CMP). In the microthreaded
model a loop becomes a *family* of small threads, created by one instruction
(`Cre`). Every register is a tiny dataflow synchronisation point: reading an
empty register suspends the reading thread, and writing the register wakes
it. Threads exchange loop-carried values through registers. The CMP spreads
one family over several processors. Each processor keeps its own register
file, and four kinds of communication replace one big shared register file:

| Kind of value | Register window | How it travels |
|---|---|---|
| private to one thread | `$L` (local) | stays in the local register file |
| read by every thread (loop invariants, results) | `$G` (global) | copied in every processor; writes are broadcast on an arbitrated bus |
| passed from thread *i* to thread *i + d* | `$S` in the producer, `$D` in the consumer | the consumer fetches it on demand through a switch |
| thread creation | none | one global queue (GCQ) hands threads to processors |

The in-order pipelines and the caches are not part of this RTL. Each
processor's pipeline is an interface of the top module. Its contract is
described below, and a behavioural pipeline in `tb/pipe_model.sv` drives it in
the end-to-end tests.

## Block map

```
            boot_v/boot_tcb
                  |
        +---------v----------+   create bus (one thread per processor per cycle)
        |        gcq         |------------------------------------+
        | family table, live |<--- Cre requests, kill reports     |
        | counts, Bsync, Brk |---> consumer-done, let-go, brk     |
        +--------------------+                                    |
   +--------------------- mt_tile (x NPROC) ---------------------v-----+
   |  rau  -> allocates a thread slot, clears its frame, $L0 = index   |
   |  lcq  -> slot states, round-robin hand-over to the pipeline       |
   |  lrf  -> registers with full/empty tag + one parked continuation  |
   |  window translation, $D request queue, reply queue, $G buffer     |
   +---^-------------------^-------------------^------------------^----+
       | pin/pout          | gwbus             | rr_switch        | rr_switch
   pipeline (outside)   $G broadcast      read requests      read answers
```

| File | Role |
|---|---|
| `rtl/mt_pkg.sv` | sizes, window classes, the control block, bus payloads, pipeline interface structs, `phys_addr` |
| `rtl/mt_cmp.sv` | top: NPROC tiles, GCQ, global write bus and the two switches |
| `rtl/mt_tile.sv` | one processor without its pipeline |
| `rtl/lrf.sv` | local register file with i-structure tags and its 8 ports |
| `rtl/lcq.sv` | local continuation queue: thread slots and scheduling |
| `rtl/rau.sv` | register allocation unit |
| `rtl/gcq.sv` | global continuation queue: families, distribution, accounting |
| `rtl/gwbus.sv` | global write bus: arbitration and broadcast |
| `rtl/rr_switch.sv` | n x n switch, used for both the request and the data network |
| `rtl/rr_arb.sv`, `rtl/mpfifo.sv` | round-robin arbiter; FIFO with several pushes per cycle |

## Registers: windows, frames and i-structures

Each processor's register file holds `NGLOB` global registers, followed by
`NSLOT` frames of `FRAME` registers each, one frame per thread slot. A thread
with `nlocal` locals and `nshared` shared registers uses its frame like this:

```
frame base = NGLOB + slot*FRAME
  [0 .. nlocal-1]                      $L0..          ($L0 = the thread's index)
  [nlocal .. nlocal+nshared-1]         $S0..          written by this thread
  [nlocal+nshared .. nlocal+2*nshared-1] $D0..        copy of the producer's $S
```

`phys_addr()` in the package does this translation. Each register has three
parts:
- a full/empty bit;
- a data word;
- room for one *continuation*: either a local thread slot, or a remote
  request tag (a processor number and the `$D` register to fill there).

The register file behaves as follows:
- A read of an empty register parks the continuation and suspends the
  thread.
- Any write sets the register full and releases the parked continuation.
  - A local continuation makes its thread ready again.
  - A remote one becomes an answer on the data switch.
- A load issue writes with `wr_empty` and only marks the target empty. The
  value arrives later through the memory port and wakes the thread.
- Only one continuation fits per register. The compiler must therefore never
  let two threads wait on the same register; several readers are possible
  only for registers known to be full.

The register file has the eight ports the organisation calls for:
- two pipeline reads and one pipeline write;
- the decoupled memory write;
- the RAU's initialisation write;
- one remote read and one remote write;
- the global bus write.

All writes happen in the same cycle. If a write meets a suspension of the
same register in the same cycle, the thread is woken at once and no wake-up
is lost.

## Fetching a `$D` register from another processor

This is the least obvious mechanism, shown here with thread *c* consuming
from producer *p*:

1. *c* reads `$D0` and finds it empty. Its tile suspends *c*, parks *c*'s
   slot in the `$D0` register and puts one read request into a 4-entry queue:
   (local `$D0` address, producer identity `(fam, ord)`, `$S` index). The
   switch reports which processor a request came from, and the answer goes
   back there. `rd_ok` is low, so the pipeline drops the instruction and asks
   for another thread. If the request queue is full, the thread is not
   suspended and `rd_retry` asks the pipeline to try the same instruction
   again.
2. The request switch delivers the request to the producer's tile. That tile
   looks *p* up by identity in its LCQ and reads *p*'s `$S0` through the
   remote read port.
   - If `$S0` is full, the answer is queued at once.
   - If it is empty, the request tag is parked in `$S0`.
3. When *p* writes `$S0` (pipeline or memory port), the parked tag comes out
   in the same cycle as an answer. Answers queue in a 16-entry reply FIFO that
   takes up to three pushes per cycle, and then cross the data switch.
4. The answer writes *c*'s `$D0` through the remote write port. That sets it
   full and wakes *c*, which re-executes the read. Later reads of `$D0` are
   local.

A tile accepts a request only if its reply FIFO has room for three entries,
so a cycle's answers always fit. The pipeline never waits for the network,
because the only cost of distance is a context switch.

Each switch output has a round-robin arbiter and a one-entry output register.
Outputs work in parallel, so a permutation passes at one packet per output per
cycle. A producer on the consumer's own processor is reached through the
switch as well, through its diagonal.

## Families and the global continuation queue (GCQ)

`Cre` supplies an 8-word control block (`tcb_t`):
- start, limit and step of the index;
- the dependency distance *d*;
- the number of locals and shared registers;
- the code address;
- an optional code address for the last thread.

The create bus accepts one family per cycle from the processors, round-robin,
with the external boot request last in the ring. Each family goes into an
`NFAM`-entry table.

**Distribution.** Every cycle one family (round-robin) issues up to NPROC
consecutive threads:
- Thread ordinal *j* goes to processor `j mod NPROC`, with index
  `start + j*step`.
- The last thread starts at the optional address if that address is not
  zero.
- The limit is inclusive.
- Issue stops at the first thread whose processor has no free slot, so
  threads are created in order.

Fixed placement means a consumer knows where its producer is without a
directory: thread *j* reads the `$S` of thread *j − d* on processor
`(j − d) mod NPROC`. Threads with *j < d* read the creating thread. Distance
0 means independent threads that read no `$D`.

**Accounting.** The GCQ counts the live threads of every family, using issues
and the kill reports. A kill report names the thread.

- *Bsync*: `bsync_ok` is raised when no creation is pending and exactly one
  thread is live in the machine. Threads waiting in Bsync then become ready.
- *Brk*: the lowest-numbered processor issuing Brk wins in a cycle. Every
  other thread is freed at once, creation stops, and the other pipelines get
  `flush`.

## When a thread's registers can be freed

A killed thread cannot free its frame at once, because a consumer may still
fetch from its `$S`. The rule here is "kept until every thread that may read
it has finished":

- The GCQ tells each thread at creation whether a later thread of its family
  will read it (`has_cons`: `index + d*step <= limit`).
- When thread *j* is killed, the GCQ signals the consumer-done event
  (`cd_en`/`cd_tid`) for thread *j − d* to processor `(j − d) mod NPROC`.
  Kills on different processors name producers on different processors, so
  one such lane per processor is enough.
- A thread that issues a `Cre` with *d* ≠ 0 has its slot's hold count raised.
  The new family's first *d* threads read it. Once they have all been created
  and killed, the GCQ signals the let-go event (`un_en`/`un_tid`), which
  lowers the hold count.
- A slot is freed when the thread is dead, its consumer is done and its hold
  count is zero.

So a family much larger than the machine's slots still runs, as long as the
threads between a producer and its consumer fit. The end-to-end test runs 40
dependent threads on 32 slots. A chain of families, where each family's last
thread creates the next, needs only a few table entries, because a family's
entry is freed once it is finished and no family still depends on one of its
threads.

## Global registers

A `$G` write is made in the writer's own register file at once. It is also
held in a one-entry buffer (`gw_ready` is low while it is held) until the
global write bus grants it. The bus grants one write per cycle, round-robin,
and broadcasts it one cycle later. Every other tile writes it through its
global port, which also wakes a thread waiting on that register. The writer
skips its own broadcast.

## Pipeline interface (`pipe_in_t` / `pipe_out_t`)

The pipeline drives one operation per cycle for thread `pin.slot`. All of it
is combinational within the cycle, and all state changes at the next rising
edge.

- **Getting a thread.** Raise `thr_req`. If a thread is ready, `thr_valid`,
  `thr_slot` and `thr_pc` hand it over, and it is marked running.
- **Reading.** Set `rd_en[k]` and `rd_spec[k]` (window class and index), and
  `pc` to the instruction's address.
  - `rd_ok` high: both values are in `rd_data`.
  - `rd_ok` low and `rd_retry` low: the thread is suspended and will resume at
    `pc`. Drop the instruction and request another thread.
  - `rd_retry` high: nothing changed; try again.
- **Writing.** `wr_en`, `wr_spec`, `wr_data`. With `wr_empty`, the write is a
  load issue that marks the target empty. The load completes later through
  `mem_en`, `mem_slot`, `mem_spec` and `mem_data`, from any thread's context.
- **Control.** `op` is one of `OP_SWCH` (resume at `pc`), `OP_KILL`,
  `OP_BSYNC` (resume at `pc` once released), `OP_CRE` (`tcb` attached; only
  when `cre_ready`) and `OP_BRK`.
  - A `$G` write is allowed only while `gw_ready` is high.
  - When `flush` is high, the pipeline must drop its current thread and any
    load in flight.
- **Status.** `busy` says some slot is in use.

`err[p]` on the top flags conditions a correct program never causes:
- a thread frame larger than `FRAME`, or with no locals;
- a request for a thread that is not there;
- a queue overflow;
- a remote continuation on a port that cannot answer.

## Sizes

All sizes are `localparam`s in `mt_pkg`. None is fixed by the model except
the eight register-file ports.

| Name | Value | Meaning |
|---|---|---|
| `NPROC` | 4 | processors (power of two) |
| `DATA_W` | 32 | register width |
| `NGLOB` | 8 | `$G` registers |
| `NSLOT` | 8 | thread slots per processor |
| `FRAME` | 8 | registers per slot (`nlocal + 2*nshared <= FRAME`) |
| `NFAM` | 4 | families held by the GCQ at once |
| `ORD_W` | 16 | bits of a thread ordinal |
| `IDX_W` | 3 | register index within a window |

The reply FIFO (16 entries) and the request FIFO (4 entries) are
`localparam`s of `mt_tile`.

## Simulating

Each testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. Any of them builds with plain Verilator,
for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_mt_cmp rtl/mt_pkg.sv tb/tb_mt_cmp.sv
./obj_dir/Vtb_mt_cmp
```

| Testbench | What it shows |
|---|---|
| `tb_mt_cmp` | Whole chip at default sizes. A boot thread creates 40 chained threads on 32 slots. Each thread loads `3i+1`, adds the running sum from its `$D0` and passes it on. The last writes `$G1`, and the boot thread checks the total after Bsync. Then 16 independent threads spin until thread 13 issues Brk. Every mechanism is counted and must happen. |
| `tb_list_search` | Two chips at default sizes run a linked-list search: a chain of 20-thread families walks a 50-node list, each thread passing the next node on through `$S0`/`$D0`, and the last thread of each family creating the next. On one chip the point is in node 45's box, and the finder writes `$G6`, issues Brk and reports the node. On the other no box matches, and the boot thread's Bsync completes with `$G6 = 0`. |
| `tb_mt_tile` | One tile with the switches looped back: `$D` fetch parked in an empty `$S`, load wake-up, `$G` write and broadcast, Cre, kill and slot release. |
| `tb_lrf` | Directed cases plus 3000 random cycles against a reference model. |
| `tb_lcq` | Hand-over order, suspension and wake, Bsync, release rules, Brk. |
| `tb_rau` | Lowest-free-slot choice, allocation, `$L0` index, window-overflow flag. |
| `tb_gcq` | Placement, rate (NPROC threads per cycle), producer identity, back-pressure, live counts, consumer-done and let-go events, Brk. |
| `tb_gwbus`, `tb_rr_switch` | Arbitration fairness, full-rate permutations, random traffic against a scoreboard. |

`tb/pipe_model.sv` is the behavioural pipeline used by `tb_mt_cmp` and
`tb_list_search`. It has its own small test ISA and two fixed programs, which
its header lists.

## Departures and limitations

- **Not built:** the pipelines, the base ISA, and the instruction and data
  caches. The model leaves the pipeline as "conventional in-order" and
  leaves the memory hierarchy open.
- **Control block:** it travels with the `Cre` request instead of being
  fetched from data memory by the GCQ.
- **Fixed frames:** every slot has a fixed frame of `FRAME` registers, with
  no dynamic packing of windows.
- **Fixed placement:** thread *j* always goes to processor `j mod NPROC`, and
  creation waits in order for that processor. This is simple and lets a
  consumer find its producer directly. The model allows any placement.
- **Brk:** it frees slots at once but does not cancel register traffic
  already in the switches for the freed threads. A late answer may land in a
  frame that has meanwhile been given to a new thread.
- **`$S` lookup is by thread identity:** a tile compares the requested
  `(fam, ord)` against all its slots. Family numbers are reused only after
  their table entry is freed.
- **Slot deadlock:** slots can still run out if more threads lie between a
  producer and its consumer than there are slots (very large dependency
  distances). The GCQ then waits forever. The model accepts this case and
  suggests detecting it at run time; this design does not detect it.
- **Bsync and Brk act machine-wide,** not only on the issuer's descendants.
- **No pipeline stall on an empty register:** a tile always suspends the
  reading thread. If no other thread is ready, the pipeline idles until the
  wake-up, which costs the same time as the stall the model describes.
- **One operation per cycle per tile:** the RAU, remote and global writes use
  their own ports rather than stolen pipeline cycles.
