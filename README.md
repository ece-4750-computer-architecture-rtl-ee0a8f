# Three small caches: FSM, pipelined, and parallel-read

This is RTL for the textbook progression of a first-level data cache, taken
from the ECE 4750 (Fall 2015) lecture topic T04, "Fundamental Memory
Microarchitecture". The same tiny cache is built three ways, so that each
step's gain in average memory access latency (AMAL) can be seen and measured:

1. **FSM cache** (`fsm_cache`): two-way set-associative. A finite-state
   machine takes one request at a time through a sequence of steps. A hit
   takes two cycles.
2. **Pipelined cache** (`pipe_cache`): direct-mapped. Tag check and data
   access become two pipeline stages, M0 and M1. A new request can start
   every cycle, and a hit still answers in two cycles. Misses stall the
   pipeline while the line is fetched.
3. **Parallel-read cache** (`pipe_cache_pr`): direct-mapped. Tag and data
   are read in the same cycle, so a read hit answers in one cycle. Writes
   finish a cycle later in M1. The hazards this opens are fixed by giving
   the data array a second port and a bypass path.

A fourth instance puts two memory-side improvements from the same lecture
behind a pipelined cache: a next-line **prefetcher** and a **write buffer**.

All caches share one small configuration:

- four 16-byte lines;
- 4-byte requests;
- write-through, no write allocate: every write goes to memory, and a
  write miss does not bring the line into the cache;
- tag and data arrays in single-ported SRAMs with a combinational read;
- a main memory that answers in the same cycle. This is unrealistic on
  purpose: it keeps the focus on the cache's own timing.

## Common interface

Each cache has three interfaces.

**Request port.** `cachereq_val`, `cachereq_rdy` and `cachereq_msg`. The
message is a `cache_req_t` with fields `typ` (`REQ_READ`/`REQ_WRITE`),
`addr[31:0]` and `data[31:0]`.

**Response port.** `cacheresp_val`, `cacheresp_rdy` and `cacheresp_msg`. The
message is a `cache_resp_t` with fields `typ` and `data[31:0]`. A write is
answered with an acknowledgement whose data is zero.

Both ports use a val/rdy handshake. A transfer happens in a cycle where val
and rdy are both high. While rdy is low, the sender must hold val high and
keep its message unchanged. The pipelined caches assert this rule.

**Memory port.** `memreq_val`, `memreq_msg` (`mem_req_t`) and `memresp_line`.
A request has one of two ops:

- `MEM_RD_LINE` reads a whole 16-byte line. The line comes back on
  `memresp_line` in the same cycle.
- `MEM_WR_WORD` writes one 32-bit word at the rising clock edge.

The memory is always ready.

Addresses are 32-bit byte addresses. Bits 3:0 are the offset in the line, and
bits 3:2 pick the word. The rest of the address splits differently per cache:

| cache                  | sets × ways | index bits | tag bits      |
|------------------------|-------------|------------|---------------|
| `fsm_cache`            | 2 × 2       | 4          | 31:5 (27 bits) |
| `pipe_cache`, `pipe_cache_pr` | 4 × 1 | 5:4        | 31:6 (26 bits) |

Reset is synchronous and active high. It marks every line invalid and clears
the arrays. Types and helper functions live in `mem_pkg`:

- `line_addr` clears the low 4 bits of an address;
- `repl_word` copies a word into all four slots of a line;
- `word_onehot` and `pick_word` select one word of a line.

## The FSM cache

`fsm_cache` is a control unit (`fsm_cache_ctrl`) wired to a datapath
(`fsm_cache_dpath`).

### Datapath

The datapath has these parts:

- **Arrays.** Two tag arrays, `tarray0` and `tarray1`, one per way, each with
  one entry per set. One data array, `darray`, holds all four lines at entry
  `{index, way}`.
- **Tag comparators.** Two comparators report `tag_match0` and `tag_match1`.
  The valid bits are not in the datapath: they live in the control unit,
  which turns a match into a hit.
- **Line address (`z4b`).** `z4b_sel` clears the four offset bits, to make the
  address of a line refill.
- **Write data.** The replication unit copies the request word into all four
  word slots. `darray_sel` chooses between that replicated word and the
  refill line.
- **Word enables.** `worden_sel` enables all four words (refill) or only the
  addressed word (write hit).
- **Registers.** A request register holds the request after the first state.
  A refill register holds the line that memory returned.

### States

| state | what happens | next |
|-------|--------------|------|
| MT  | `cachereq_rdy` is high. The incoming request is compared with both tag arrays and latched. | write → MWD; read hit → MRD; read miss → R0 |
| MRD | The data array is read at `{index, hit way}`. The word is returned. | MT once the response is taken |
| R0  | A line read goes to memory, and the line is captured. | R1 |
| R1  | The line and its tag are written into the victim way, and the valid bit is set. | MRD |
| MWD | The word is written to memory. On a hit it is also written into the data array. The write is acknowledged. | MT once the response is taken |

### Replacement

The control unit keeps one **use bit** per set, naming the way used most
recently. Every hit updates it, and so does every refill. The victim on a miss
is the other way (`victim = !use[idx]`), which is exact LRU for two ways.

### Timing

| request   | cycles, first presented to response, inclusive | states |
|-----------|-----------------------------|--------|
| read hit  | 2 | MT, MRD |
| read miss | 4 | MT, R0, R1, MRD |
| write     | 2 | MT, MWD |

Requests do not overlap.

## The two-cycle pipelined cache

`pipe_cache` is a hybrid of a pipeline and an FSM.

### Hit path

- **M0** checks the request against the tag array in the same cycle that the
  request is presented. An accepted request moves to M1.
- **M1** accesses the data array and sends the response:
  - a read reads the data array;
  - a write sends the word to memory, and writes the data array if M0 found
    a hit.

A hit answers in the cycle after it is accepted, so the hit latency is two
cycles. A new request can be accepted every cycle.

### Miss path

A read miss holds `cachereq_rdy` low and moves M0 into a refill step. The
refill waits until M1 is empty, because M1 may be using the single data-array
port or the memory port. In one cycle it then:

- reads the line from memory;
- writes line, tag and valid bit.

The request then checks its tag again and hits. In total a read miss takes
four cycles, the same as in the FSM cache, but hits between misses now flow at
one per cycle.

### Back-pressure

If `cacheresp_rdy` is low, M1 holds its response and M0 stalls behind it.

## The parallel-read, pipelined-write cache

`pipe_cache_pr` is the part of the design that takes the most care.

### Stages

- **Reads** read the tag array and the data array in parallel, in M0. A read
  hit answers combinationally in the cycle it is presented: the hit latency is
  one cycle.
- **Writes** check their tag in M0 and are acknowledged there. The actual
  work happens one cycle later, in M1:
  - the write-through to memory;
  - the data-array write, on a hit.

The write latency is two cycles, but the requester never sees it, because the
acknowledgement was sent in M0.

### Structural hazard

A read in M0 and a write in M1 both need the data array in the same cycle.
The lecture offers three fixes:

- expose the hazard to software, which must insert a nop;
- stall the read;
- duplicate the port.

This design duplicates the port. The data array is `comb_sram_1r1w`, with
one read port used by M0 and one write port used by M1 and refills.

### Data hazard

With two ports, a read in M0 of the word that the write in M1 is writing
would get the old value from the array. A **bypass** fixes this. The read
takes its data from the M1 write instead of the array when all three hold:

- the word addresses (bits 31:2) match;
- the write in M1 hit;
- the read hits in M0.

A write that missed needs no bypass: the line is not cached, so the read
misses too. Its refill waits until M1 has drained, and so reads memory after
the write has landed.

The `bypass` output is high in each cycle where the bypass path supplies a
response.

### Misses

Misses work as in `pipe_cache`, one detection cycle plus one refill cycle,
and the refill waits for M1 to drain. A read miss takes three cycles, because
the final hit answers in the same cycle.

### Handshake note

`cachereq_rdy` is high exactly when the response is being sent. Request and
response share one handshake cycle, so `cachereq_rdy` depends on
`cacheresp_rdy` combinationally.

## Memory-side extensions

Both modules below sit on the combinational memory interface, so either can
be inserted between any cache and `comb_mem`. In `mem_system_top` the chain is
`pipe_cache → prefetcher → write_buffer → comb_mem`.

### Write buffer

`write_buffer` holds up to `DEPTH` (default 4; must be a power of two)
buffered word writes.

- **Reads go first.** A line read goes to memory at once, ahead of buffered
  writes. The buffer compares every buffered address with the line and
  patches matching words into the returned line, oldest first so the newest
  write wins. This is the "check the buffer and bypass" choice rather than
  "wait until empty".
- **Draining.** One write drains to memory in each cycle without a request.
- **Full buffer.** A write into a full buffer drains the oldest entry in the
  same cycle, so the cache never waits.

### Prefetcher

`prefetcher` watches the line reads, which are the miss stream. After a read
of line L it schedules a read of line L+1, to be sent in the next cycle with
no request. The line goes into a one-line prefetch buffer.

- A later refill of that line is served from the buffer without a memory
  access. `pf_hit` pulses when this happens.
- Word writes update the buffered line, so it never goes stale.

### Effect on timing

With a memory that answers at once, neither module changes the cache's
timing. They are built for their function, and the end-to-end test checks
that the fourth instance's cycle counts equal those of the plain pipelined
cache.

## Measured latency on the lecture's workloads

The lecture estimates AMAL for two loops over arrays of 64 four-byte
elements:

- **copy:** `rd 0x1000+4i`, `wr 0x2000+4i`;
- **increment:** `rd 0x1000+4i`, `wr 0x1000+4i`.

The end-to-end testbench runs both on cold caches and checks the cycle
counts:

| cache | copy (128 accesses) | increment | cycles per access |
|-------|---------------------|-----------|-------------------|
| `fsm_cache`     | 288 | 288 | 2.25 |
| `pipe_cache`    | 161 | 161 | 1.26 |
| `pipe_cache_pr` | 160 | 160 | 1.25 |

The counts break down as follows. Each source line of four elements misses
once.

- **FSM cache:** 18 cycles per line, from 4 (miss) + 3 × 2 (read hits) +
  4 × 2 (writes).
- **Pipelined caches:** one cycle per access, plus two M0 stall cycles per
  miss, plus one cycle for the last response of the two-cycle design.

No write allocates, so the destination array never evicts the source lines.

## How far to trust it, and where it departs from the lecture

### Taken from the lecture

- the configurations: line size, line count, associativity, LRU, the write
  policy, and combinational SRAMs and memory;
- the FSM states and control-signal names;
- the valid and use bits and the victim rule;
- the two-stage hit path with misses stalling in M0;
- parallel read with a write acknowledgement in M0;
- port duplication plus bypass;
- prioritised reads with address check and bypass;
- a prefetcher feeding a prefetch buffer from the miss stream.

### This design's own choices

The lecture is silent on these:

- the val/rdy handshake, the message layouts and 32-bit addresses;
- the request and refill registers in the FSM datapath;
- one-cycle refills in the pipelined caches, made possible by the
  combinational memory;
- the entries of the FSM control table, derived from the state descriptions;
- the exact bypass condition;
- the write buffer's depth, drain and full policy;
- next-line prediction with a one-line prefetch buffer;
- a 64 KB main memory in which never-written words read as zero;
- composing the prefetcher and write buffer behind `pipe_cache`.

### Fixed geometry

The cache geometry is fixed, as in the lecture: four lines, a 2×2 FSM cache
and direct-mapped pipelined caches. It is not parameterised, because the
control logic is written for exactly these shapes.

### Not built

- **TLB.** The lecture discusses where a TLB can sit relative to the cache
  (physically addressed, virtually addressed, virtually indexed and
  physically tagged), but its own caches assume "no TLB". It gives no TLB
  design to build.
- **Commercial case studies.** The ARM Cortex-A8 and Intel Core i7 memory
  systems are described only by sizes and latencies.
- **Write-back, write-allocate caches.** The lecture lists their steps only
  as background. Its designs are write-through.
- **Multi-level hierarchy.** The lecture gives only the AMAL formulas and
  policy trade-offs for an L2, with no organisation to build.
- **Other hazard fixes and associativity.** The lecture also mentions
  resolving the M0/M1 hazards by software nops or by stalling, and a
  set-associative parallel-read cache that reads every way speculatively.
  These are alternatives to the configuration built here, so they are not
  included.

### Verification

Every module except the helper `comb_sram_1r1w` has a self-checking
testbench. `comb_sram_1r1w` is exercised through `pipe_cache_pr`. Each
testbench was also run against a deliberately broken copy of its module, and
it failed there as it should.

## Files

| file | contents |
|------|----------|
| `rtl/mem_pkg.sv` | shared types, widths and helper functions |
| `rtl/comb_sram.sv` | single-ported SRAM, combinational read, word-enabled write |
| `rtl/comb_sram_1r1w.sv` | one-read, one-write-port SRAM (duplicated data-array port) |
| `rtl/comb_mem.sv` | combinational main memory |
| `rtl/fsm_cache_dpath.sv`, `rtl/fsm_cache_ctrl.sv`, `rtl/fsm_cache.sv` | FSM cache |
| `rtl/pipe_cache.sv` | two-cycle-hit pipelined cache |
| `rtl/pipe_cache_pr.sv` | parallel-read, pipelined-write cache with bypass |
| `rtl/write_buffer.sv`, `rtl/prefetcher.sv` | memory-side extensions |
| `rtl/mem_system_top.sv` | all four systems side by side |
| `tb/<module>_tb.sv` | a self-checking testbench per module |
| `tb/cache_agent.sv` | request driver and in-order response checker, used by the top-level test |

The top-level test `mem_system_top_tb` runs everything at the default sizes.
It covers:

- random traffic with response back-pressure;
- both workloads;
- back-to-back write-then-read pairs.

It counts every mechanism: refills, LRU evictions, write hits,
write-throughs, M0 and M1 stalls, bypasses, prefetch hits, write-buffer
bypasses and writes into a full write buffer. A mechanism that never occurs
counts as a failure.

## Simulating

Verilator 5 is enough. From the repository root:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module mem_system_top_tb \
  -y rtl -y tb +libext+.sv rtl/mem_pkg.sv tb/mem_system_top_tb.sv
./obj_dir/Vmem_system_top_tb
```

Replace the top module and file with any other `*_tb` to test one block.
Each testbench ends by printing `TB_RESULT checks=N failures=M`. Each has a
watchdog that counts a failure and stops if the run hangs. All of them finish
in well under a second of simulation time.

For lint only:

```sh
verilator --lint-only -Wall -y rtl +libext+.sv rtl/mem_pkg.sv rtl/mem_system_top.sv
```

The RTL is plain synthesizable SystemVerilog.

- **Arrays as flip-flops.** The arrays are written as arrays, so a synthesis
  tool maps them to flip-flops or memories as it sees fit. A real design
  would swap `comb_sram` for SRAM macros, whose reads are not combinational.
- **Memory size.** The `MEM_BYTES` parameter of `mem_system_top` sets the size
  of each main memory.
