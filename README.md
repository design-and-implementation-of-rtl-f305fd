# Coherent shared-memory subsystem for two embedded processors

Two PowerPC 405 cores normally share nothing except a DDR controller. This
design makes one region of the DDR memory *coherently shared* between them.
Each processor's data-side bus traffic to that region is intercepted and
served by an extra, external 4 KB data cache. The two caches keep each other
coherent with a MESI protocol over a small snooping interconnect. All other
traffic (program code and private data) still goes over the processor's
normal PLB bus and never meets the coherent path.

```
 CPU0 DCU ──► plb2cache ──► coherent_cache ──┐
                 │                          │ port 0
                 ▼ (non-shared)             ▼
              PLB bus               coherent_bus ◄── port 2: NIC (outside)
                 ▲ (non-shared)             ▲ port 1        │ IPIF master
 CPU1 DCU ──► plb2cache ──► coherent_cache ──┘              ▼
                                                  ddr_mux (input 0)
 private PLB_IPIF 0 ────────────────────────────► ddr_mux (input 1) ──► DDR controller
 private PLB_IPIF 1 ────────────────────────────► ddr_mux (input 2)
```

`coherent_memory_system` is the top module. It holds two `plb2cache`
filters, two `coherent_cache`s, one `coherent_bus` with three ports, and
one `ddr_mux`. These sit outside the design, and the top brings their
signals out as ports: the processors, the PLB bus, the private-memory
PLB_IPIF bridges, the DDR controller and the DDR chips, and the third
interconnect participant (a network interface planned for multi-board
systems).

## Address map

`plb2cache` sorts every DCU access into one of three classes:

| Class | Default window | Path |
|---|---|---|
| private | everything outside `SHARED_BASE/SHARED_MASK` | passed through to the PLB untouched |
| shared, cacheable | `0x0100_0000 / 0xFF00_0000` (16 MB) | coherent cache |
| shared, non-cacheable | `0x01F0_0000 / 0xFFF0_0000` inside the shared window | goes through the cache as a single-word bus transaction, never allocated |

These window values are this design's own choice, and they are parameters
of the top.

## plb2cache: acknowledge now, execute later

The DCU is acknowledged at once for a shared write (address and data
acknowledge), so the processor goes on without waiting. The access is
pushed into a 16-entry FIFO. A second FSM pops entries one at a time and
replays them to the cache as `read_cmd`/`write_cmd` with a 32-bit word
address and byte enables. Reads must wait: `rddack` returns the word on the
DCU's 64-bit read bus in the half chosen by `addr[2]`. The lane order is
big-endian, so `addr[2]=0` is `data[63:32]`.

The FIFO is read without a register stage. A read that hits takes 3 cycles
from DCU request to `rddack`, and a write takes 2 cycles to be acknowledged.
If the PLB is returning read data for a private access in the same cycle,
the cache's read data waits.

## coherent_cache

### Organisation

- 2-way set-associative, with 8-word (32 B) lines, write-back and
  write-allocate. Shared non-cacheable accesses are the exception.
- The default is 4 KB, which gives 64 sets. The address splits into
  `tag[31:11]`, `index[10:5]`, `word[4:2]`. The 21-bit tags are compared by
  `tag_equal`, an XNOR per bit followed by an AND over all bits.
- One LRU bit per set records the way that served the last access. The
  victim is the other way.
- Per line: tag, 2-bit MESI state, dirty bit. These are in flip-flops. The
  data is in a dual-port synchronous RAM (`cache_data_ram`, 512×32 at
  4 KB). Port A belongs to the processor side and port B to the bus side.

### Two halves that share the arrays

The cache is split into two parts.

**Part A (processor side)** is `FSM_CPU_ACCESS` plus a write-back FSM.
- It reads the tags, compares them, and gives a hit answer in 2 cycles.
- A write hit to an S line needs ownership. It puts an **Invalidate** into
  the outgoing queue and waits.
- A miss puts a **BusRd** (read) or **BusRdX** (write) into the queue. If the
  LRU victim is dirty, it also queues the victim's address and 8 data words
  as a write-back (`WB_FSM`).

**Part B (bus side)** consists of:
- `BUS_FSM`, which drains the outgoing queue onto the interconnect.
- `FSM_REQ_IN`, which handles everything that arrives from the
  interconnect:
  - snoops of other caches' requests
  - refills
  - Update blocks
  - non-cacheable read data

The outgoing queue is a `flow_fifo`. Its first entry is visible at the
output in the same cycle it is written, so no request pays a dead cycle to
reach the bus.

### The hard part 1: processor and snoops touching the same set

A snoop can change a line's state between part A's tag read and the cycle
part A acts on it. Part B therefore raises its tag-write intention one
cycle *before* it writes the tag array, and the index is compared with part
A's. On a match, part A drops its decision and reads the tags again. This
is the `a_conflict` term.

The intention comes from part B's own registered state, not from the
interconnect's inputs. This keeps the combinational path from processor
request → queue → bus grant → snoop → stall from closing into a loop.

### The hard part 2: critical word first and early restart

On a miss the interconnect delivers the missed double-word first and then
wraps around the line. Part A is released as soon as the requested word is
written. The remaining words arrive while the processor goes on.

The refill head latches everything the rest of the refill needs:
- the way
- the pending write merge, for BusRdX
- the target word

A following miss cannot corrupt the refill in progress. While part B refills
or updates a line, it publishes the line address and one valid bit per word.
- A processor access to that line waits only until its own word has arrived.
- A miss into the set still being filled waits until the fill is complete.
- An access to any other set proceeds.

### The hard part 3: requests that go stale in the queue

A request waits in the outgoing queue until the interconnect grants it, and
by then a snoop may have changed the situation:

- **Invalidate → BusRdX.** A queued Invalidate whose line was meanwhile
  invalidated by another cache's BusRdX/Invalidate no longer has data to
  upgrade. In `BUS_CHECK_CMD` the tags are checked again before sending,
  and such an Invalidate is sent as a BusRdX that fetches the line.
- **Cancelled write-back.** A dirty victim may still be waiting to be sent
  when a snooped BusRdX, Invalidate or Update hits it. The line is then
  being taken over or rewritten elsewhere, so the write-back is cancelled
  (`wb_cancel`). Its queued data words are discarded, and the interconnect
  forgets the write-back it expected. Once half the block (4 words) has
  reached the interconnect, the write-back is confirmed instead. The
  interconnect then queues it to memory and acknowledges it (`wb_ack`), and
  it can no longer be cancelled.

### MESI as built

| Event | Result |
|---|---|
| read miss, another cache has the line | line filled in **S**. The supplier goes M/E→S (a demoted M line stays dirty). |
| read miss, no other cache has it | filled from DDR in **E** |
| write miss | BusRdX, line filled in **M**. Other copies are invalidated. |
| write hit in S | Invalidate (2 bus cycles). When granted, the line is raised to E and the write is retried, so it ends in **M**. |
| write hit in E | silent upgrade to **M** |
| snooped Update | the whole 8-word block is written into a valid copy. The copy keeps its state and its dirty bit is cleared, because memory receives the same block. |

## coherent_bus: the snooping interconnect

One transaction owns the interconnect at a time; there is no interleaving.
The arbiter (`FSM_Arb`) grants in round-robin order, starting from the
port after the last winner. A request is masked out while the queue it
would need is full, so granted work never stalls halfway.

| Transaction | Bus occupancy | Path |
|---|---|---|
| non-cacheable write | 2 cycles | queued in the NC FIFO (4 writes) |
| Invalidate | 2 cycles | broadcast |
| Update | 9 cycles | broadcast and queued (2 blocks) for DDR |
| BusRd / BusRdX, remote hit | 11 cycles | broadcast; the hitting cache sends the line to the requester |
| BusRd / BusRdX, remote miss | variable | broadcast, then queued to DDR; the line returns through a data-in FIFO |
| non-cacheable read | variable | queued to DDR |
| write-back | — | `FSM_BUS_WB` collects evicted lines into two 1-line buffers |

Every participant answers a broadcast with hit or miss in the cycle after
it. When several hit, the first one after the requester in round-robin order
supplies the data.

All DDR-bound work is ordered through a 36-bit command FIFO. The command
has an opcode, a buffer select and a word address. `FSM_2_DDR` pops it and
drives a 64-bit IPIF master:
- single transfers for non-cacheable words
- 4-beat bursts for lines

Each 1-line buffer is a pair of 32-bit sub-FIFOs (even and odd words), so
32-bit words go in and 64-bit beats come out.

## ddr_mux

`ddr_mux` shares the one DDR controller between the interconnect and the
two private-memory bridges. An input is active while its `cs` is high, and
grants go round robin.

The subtle case is the single-word IPIF transfer. There, `rdreq`/`wrreq` is
a one-cycle pulse at the start of `cs`, and nothing acknowledges it at that
time. The pulse may arrive while another input owns the controller. So a
small FSM per input records it, and when that input is granted the mux
issues the pulse to the controller again. One idle cycle separates
transfers.

## Latency at the processor port

Measured by the top testbench on an idle system. The DDR model answers 8
cycles after a request. Counts are in bus clock cycles from the DCU request
to the acknowledge that completes it.

| Access | This design | Original system |
|---|---|---|
| read hit | 3 | 3 |
| write (any shared) | 2 | 2 |
| remote hit, critical word | 8 | 7 |
| fetch from DDR, critical word | 20 (memory-model dependent) | 21 |
| non-cacheable read | 17 (memory-model dependent) | 17 |

The remote hit is one cycle longer. The snoop reply is registered one cycle
after the broadcast, where the original used the inverted clock to answer
half a cycle earlier.

## Departures from the original system

- **One clock.** The original runs the coherent logic on the inverted PLB
  clock and crosses half-cycles. Here everything is on one rising edge, with
  a synchronous active-low reset. Cycle counts are whole cycles and a few
  are shorter.
- **Tags in flip-flops.** The original keeps tags in dual-port block RAM
  (about 10 block RAMs for two 4 KB caches).
- **plb2cache states.** The original request filter has a three-state PLB
  FSM (idle, address acknowledged for a read, write acknowledged). Its
  access FSM has four states, and a request taken from the queue spends an
  extra cycle being popped. Here the queue is read flow-through, and a
  request from the queue starts as fast as a direct one. The visible timing
  is the same: 3 cycles for a read hit and 2 for a write. The rule that
  returned shared data waits while the PLB is still delivering an earlier
  burst read is kept. It preserves load order when private and shared reads
  overlap.
- **Own choices where the original is silent.** Each of these is recorded
  in the file headers:
  - the address windows
  - the snoop reply timing
  - the Update block starting at word 0
  - the write-back cancel handshake
  - the one-cycle gap in `ddr_mux`
  - the IPIF simplification (no address-acknowledge phase)

## Files

| File | Contents |
|---|---|
| `rtl/ccs_pkg.sv` | shared types: bus commands, MESI states, cache↔bus, DCU and IPIF structs |
| `rtl/coherent_memory_system.sv` | top |
| `rtl/plb2cache.sv`, `rtl/coherent_cache.sv`, `rtl/coherent_bus.sv`, `rtl/ddr_mux.sv` | the four blocks |
| `rtl/flow_fifo.sv`, `rtl/tag_equal.sv`, `rtl/cache_data_ram.sv` | helpers |
| `tb/ddr_ipif_model.sv` | behavioural DDR controller and memory with an IPIF slave, used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_workloads` (shared-memory programs on the top) |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends itself. It
has a watchdog. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
  rtl/ccs_pkg.sv tb/tb_coherent_memory_system.sv --top-module tb_coherent_memory_system
./obj_dir/Vtb_coherent_memory_system
```

Replace the top module name with `tb_plb2cache`, `tb_coherent_cache`,
`tb_coherent_bus`, `tb_ddr_mux`, `tb_flow_fifo` or `tb_tag_equal` for the
others.

`tb_coherent_memory_system` runs the top at its default parameters: two
CPUs and 4 KB caches. It drives both DCUs and checks every read against a
reference memory. The run has two phases:
1. Directed sections: hits, misses, remote hits, invalidations, conversion
   of Invalidate to BusRdX, evictions, Update through the NIC port,
   non-cacheable and private accesses.
2. 1500 random shared accesses per CPU on a small region, so the lines
   bounce between the caches.

It counts how often each mechanism occurred and fails if any count is zero.
It also checks that every remote hit took the 11-cycle bus occupancy. The
block testbenches check cycle counts:
- the 2-cycle cache hit
- the 3-cycle read and 2-cycle write at the DCU
- the 2/9/11-cycle bus transactions

## Shared-memory programs

`tb_workloads` runs the three kinds of program the subsystem was designed
for on the full design at default parameters. The processors are modelled
as sequences of loads and stores, and all data and synchronisation
variables are ordinary cached shared words.

| Program | Size simulated | Cycles | Check |
|---|---|---|---|
| shared counter under a Peterson lock | 200,000 increments per processor | 17,400,037 | final count = 400,000 |
| producer–consumer through a 16-word ring | 1,000 words | 32,460 | every value received correctly |
| merge sort, each processor sorts half, processor 0 merges | 8,192 words | 796,713 | output equals a reference sort |

The cycle counts cover memory traffic only, with no instruction overhead.
They are not comparable with program run times.

### Memory ordering

Shared writes are acknowledged to the processor before they are performed.
Each processor's accesses are still performed in program order, one at a
time. A write is performed once it owns the line (after its Invalidate or
BusRdX has been granted), and only then does the next access start. This is
why a Peterson lock works without fences.

A program that checks another processor's results must wait until that
processor's `busy` output has dropped. Otherwise its last write may still
be queued. The testbench does this before its final checks.
