# DLT: a data layout transformation accelerator

In a system full of accelerators, the computation is cheap. Moving data to where it is
needed, in the layout it is needed in, is what costs time and energy. The DLT (Data
Layout Transformation) accelerator sits next to a simple in-order RISC core. It gives
software a handful of instructions that describe a whole strided copy at once: "take
`nelem` elements of `fsize` bytes, `stride` bytes apart, from here, and pack them there",
or the reverse. The hardware then streams the elements between off-chip memory (DRAM), a
large banked on-chip local memory, and a wide vector register file. The same
instructions also rearrange data inside the local memory, for example to transpose a
matrix.

This repository holds synthesizable SystemVerilog for the accelerator and for the two
on-chip memories it serves:

- four lanes, each with a 16-entry instruction buffer;
- the instruction decode, including the fence and flush instructions;
- a 4 MiB local memory of 64 banks;
- a 16 x 256 B vector register file.

The core, the caches and DRAM are not included. They connect through ports.

## Instructions

The core offers one instruction per cycle on the `cmd_*` valid/ready interface, with up to
three register operands `a`, `b`, `c`.

| Instruction    | Operands (a, b, c)          | Effect |
|----------------|-----------------------------|--------|
| `FORMDESC`     | nelem, stride, fsize        | `cmd_result` = packed 32-bit descriptor (same cycle) |
| `GATHER`       | dst, src, desc              | strided src -> packed dst |
| `SCATTER`      | dst, src, desc              | packed src -> strided dst |
| `VGATHER`      | vreg, src, desc             | strided src -> packed vector register `vreg` |
| `VSCATTER`     | dst, vreg, desc             | packed vector register `vreg` -> strided dst |
| `GATHERFENCE`  | -                           | core loads/stores wait for the gathers now in flight |
| `SCATTERFENCE` | -                           | the same, for scatters |
| `FENCE`        | -                           | waits for everything in flight; meanwhile no new DLT memory instruction and no core load/store |
| `FLUSH`        | addr1, addr2                | asks the caches to write back the range; completes on `flush_done` |

For GATHER and SCATTER, `src` and `dst` are ordinary physical addresses. The local
memory is mapped at `0x8000_0000`–`0x803F_FFFF`, and any other address goes to DRAM.
Any combination of the two works: DRAM to local memory, local memory to DRAM, or local
memory to local memory (which is how a transpose is done).

### The descriptor

```
 31        20 19                  6 5      0
+------------+---------------------+--------+
|   nelem    |       stride        | fsize  |
+------------+---------------------+--------+
  12 bits        14 bits, bytes     6 bits, bytes
  0 = 4096                          0 = 64
```

`stride` is the byte distance between the starts of consecutive elements on the strided
side. On the packed side, elements follow each other `fsize` bytes apart. FORMDESC simply
truncates its operands to these fields. That is why 4096 elements and 64-byte elements
come out as 0, and the hardware reads 0 that way.

Elements can be at most 64 bytes. With four lanes, each issuing one 64-byte request per
cycle at 1 GHz, that is 256 GB/s of request bandwidth. This is the figure the
architecture is sized for.

## How a lane moves an instruction

This is the core of the design (`dlt_lane`, `dlt_instr_buffer`, `dlt_agu`, `dlt_decoder`).

Each lane keeps its instructions as 99-bit entries: a 3-bit opcode, src, dst and the
descriptor (16 x 99 bits, about 200 bytes). The head entry is the instruction being
executed. It is not copied into separate counters. Instead, the entry itself is the
state and is rewritten as the work progresses:

1. **Read.** The decoder raises the read enable and routes the read address to its
   memory. The lane requests `fsize` bytes. The read address is `src` while no read is
   outstanding. Otherwise it is a read issue pointer that runs ahead of `src`.
2. **ReadDone.** The data come back and wait in the read-ahead queue, or go straight to
   the write channel. The buffer's `src` field is replaced by `nextSrc`, computed by the
   AGU.
3. **Write.** The decoder raises the write enable and routes `dst`. The oldest read
   data are written.
4. **WriteDone.** The write is acknowledged. `dst` is replaced by `nextDst`, and `nelem`
   by `nelem - 1`. When the element just written was the last one (`nelem` was 1), the
   entry is released instead. The lane then starts the next entry, and `done` pulses
   for the fence unit.

Steps 1-2 of later elements overlap steps 3-4 of earlier ones (see Timing below).

The AGU has two adders, each fed through a multiplexer by either the stride or the
element size, and a decrementer:

| Opcode class          | nextSrc           | nextDst           |
|-----------------------|-------------------|-------------------|
| GATHER, VGATHER       | src + stride      | dst + fsize       |
| SCATTER, VSCATTER     | src + fsize       | dst + stride      |

The decoder sends VGATHER writes and VSCATTER reads to the vector register file. The
vector register file has its own 4 KiB space, addressed `{register[3:0], byte[7:0]}`.
Every other access goes by the address map.

**Timing.** A lane has a read channel and a write channel. Up to four reads
(`RD_MAX`) and one write can be outstanding. Read data wait in a four-entry queue, and a
read is issued only when its data will have a queue entry. A read issue pointer runs
ahead of `src`, which still advances only on ReadDone. Outstanding reads all go to one
memory, so they come back in order. When a write completes (WriteDone), the next write
goes out in the same cycle at nextDst. With single-cycle memories that accept a read and a write each cycle,
an instruction of n elements takes n + 2 cycles. Local memory to local memory takes two
cycles per element, because reads and writes share the one element port. The tests check
both rates. With a read latency below four cycles, a lane still moves one element per
cycle. Because reads run ahead, an instruction whose source and destination overlap
within five elements is not supported. Instructions in a lane run in order. Instructions in different
lanes run concurrently, in any order relative to each other.

**Which lane gets an instruction.** The dispatcher puts each data-movement instruction
into the least occupied lane (the lowest-numbered lane on a tie). When all four buffers
are full, `cmd_ready` stays low.

## Sharing the memories: the router

Each lane has a read channel and a write channel, eight channels in all. Each request
carries the target its decoder chose: local memory, vector registers or DRAM.
`dlt_mem_router` runs one round-robin arbiter per target over the eight channels, so up
to three requests are served in the same cycle. Each forwarded request is tagged
`{lane, write}`. Completions come back with the tag. The router steers read data to the
lane's read channel and write acknowledges to its write channel. Each target returns at
most one completion per cycle, so completions never collide at a channel. The router keeps
no per-request state. Each memory must therefore answer one tag in request order.

## Local memory and vector register file

`dlt_banked_mem` is 64 single-ported banks of 4-byte words, 16k words deep (4 MiB).
Consecutive words are in consecutive banks. As a result, any element of up to 64 bytes,
at any byte alignment, touches at most 17 words. These words are always in different
banks, so each element access is one single-cycle access. Read data are returned
right-aligned, with the bytes past the element size zeroed.

A second port reads or writes a whole 256-byte row (one word from each bank), with a
write mask per word. This is the wide interface that the core and the compute
accelerators use. It has priority: while it is active, `dlt_ready` is low and the lanes
wait. Both ports have one cycle of latency.

`dlt_vrf` is the same structure with 16 rows. One row is one 256-byte vector register.
The register port reads or writes whole registers. The DLT element port lets an element
run from one register into the next.

## Fences and flush

`dlt_fence_unit` counts, per lane, the gather-class and scatter-class instructions that
have been dispatched but not completed. A fence takes a snapshot of those counts. Because
each lane completes in order, the first N completions of a class in a lane are exactly
the N instructions that were pending at the snapshot. So a GATHERFENCE releases the
core's loads and stores (`risc_mem_stall`) as soon as the gathers issued *before* it are
done, whatever was issued after it.

FENCE snapshots both classes. It additionally keeps `cmd_ready` low for every DLT memory
instruction and FLUSH until the snapshot drains. Fences themselves are accepted at once.
FLUSH raises `flush_valid` with the range. It stays on the interface until the cache
hierarchy answers `flush_done`.

## Top-level ports (`dlt_top`)

| Port group | Protocol |
|---|---|
| `cmd_valid, cmd_op, cmd_a/b/c, cmd_ready, cmd_result` | valid/ready. `cmd_op` is `dlt_pkg::isa_e`. `cmd_result` is valid with FORMDESC. |
| `risc_mem_stall`, `busy` | stall for the core's memory stage; any DLT work in flight |
| `flush_valid, flush_addr1/2, flush_done` | request held until `flush_done` |
| `dram_req` (`mem_req_t`), `dram_ready`, `dram_rsp` (`mem_rsp_t`) | Request held until `dram_ready`. Every read is answered with data and every write with an acknowledge, tagged with the request's `id`, any number of cycles later. Answers with the same tag come back in request order; answers with different tags may come in any order. |
| `lm_io_*` | local memory row port, one-cycle latency |
| `vr_*` | vector register port, one-cycle latency |

There is one clock. Reset is active-low and synchronous, and clears all control state.
Memory contents are not reset.

Parameters: `LANES` (4), `DEPTH` (16), `LM_ROWS` (16384). All are the architecture's
own numbers.

## What the sizes mean for real workloads

These are the data movements of the benchmarks this accelerator was evaluated with,
checked against the field widths above:

- **2D FFT, 4k x 4k, 16-bit samples.** A column is 4096 elements (fits, as nelem 0) at a
  stride of 8192 B (fits). Tiles go to local memory, and are transposed there with
  local-to-local gathers.
- **DWT and 2D convolution, 1080 x 1920 int.** A column is 1080 elements at a stride of
  7680 B (fits). A frame (8.3 MB) is larger than the 4 MiB local memory, so it is
  processed in tiles.
- **Merge sort, 1k streams x 1k int.** Streams are contiguous, 4 KiB each, moved as 64
  elements of 64 B. All streams together are exactly 4 MiB.
- **Matrix multiply, 4k x 4k int.** A column stride of 16384 B is one more than the
  14-bit stride field holds. Columns have to be formed by transposing tiles in local
  memory rather than by one gather from DRAM.

## Where this RTL departs from the original architecture

- **Throughput.** The original sizes the lanes for one 64-byte request per lane per
  cycle, 256 GB/s for four lanes. Here a lane can issue one read and one write per cycle.
  However, each of the three memories takes one element request per cycle. All lanes
  together therefore issue at most 192 GB/s of requests, and at most 64 GB/s to DRAM.
  That is far above DDR3 (10.6 GB/s) but below the quoted 256/512 GB/s. A lane has at
  most four DRAM reads in flight. A DRAM latency of L cycles therefore limits a lane to
  four elements per L cycles.
- **Choices where the architecture is silent:**
  - the descriptor bit split;
  - the local-memory address window;
  - the vector-register address space;
  - all handshakes;
  - the lane choice;
  - word interleaving and the element port of the memories;
  - the one-cycle memory latency;
  - the exact meaning of "concurrent" for the fences (snapshot at fence time);
  - 1..64-byte elements with any alignment.
- **FORMDESC** completes in the cycle it is offered.
- **VGATHER / VSCATTER** are meant for moves between local memory and the vector
  registers. Here their memory-side address may also be a DRAM address; the decoder
  routes it like any other.
- **Not included:** the RISC core, the L1/L2 caches, DRAM, the compute accelerators (FFT,
  vector, sort) and the on-chip fabric. The DLT instruction interface, the flush request
  and the DRAM request port are where they would connect.

## Files

| File | Content |
|---|---|
| `rtl/dlt_pkg.sv` | sizes, opcodes, descriptor/entry/request structs, address map |
| `rtl/dlt_top.sv` | the accelerator with its memories |
| `rtl/dlt_dispatch.sv` | instruction decode, FORMDESC, lane choice, flush |
| `rtl/dlt_fence_unit.sv` | in-flight counts and fence stalls |
| `rtl/dlt_lane.sv` | one lane: buffer, AGU, decoder, read and write sequencing |
| `rtl/dlt_instr_buffer.sv` | 16 x 99-bit in-order buffer with in-place head update |
| `rtl/dlt_agu.sv` | nextSrc / nextDst / nelem-1 |
| `rtl/dlt_decoder.sv` | read/write enables and target routing |
| `rtl/dlt_mem_router.sv`, `rtl/dlt_rr_arb.sv` | per-target round-robin arbitration of the eight lane channels |
| `rtl/dlt_banked_mem.sv` | 64-bank scratchpad (local memory; also the register file) |
| `rtl/dlt_vrf.sv` | 16 x 256 B vector register file |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_dram_model.sv` | behavioural DRAM for the top-level test |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each has a
watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/dlt_pkg.sv tb/tb_dlt_top.sv --top-module tb_dlt_top
./obj_dir/Vtb_dlt_top
```

Replace `tb_dlt_top` with any other `tb_*` name to run that module's test. The top-level
test runs the full-size design in well under a minute of wall time. It does the
following:

- issues about 110 instructions, including a 16 x 16 transpose in local memory, a
  4096-element gather, vector gathers and scatters, all three fences and two flushes;
- replays every instruction on byte arrays and compares all of DRAM, the touched local
  memory and every vector register;
- checks that each mechanism happened at least once: all lanes full, a fence stall,
  FENCE holding the DLT, the flush handshake, the row port holding the lanes off, DRAM
  back-pressure, and four lanes busy at once;
- checks the element rate of a lone instruction: two cycles per element from local
  memory to local memory, one cycle per element from the vector registers to local
  memory.

`tb_dlt_workloads` runs the data movements of the evaluated applications at reduced
sizes and checks each against its definition:

- a 32 x 32 16-bit transpose through local memory (2D FFT);
- column tiles of a 24 x 40 int image (DWT, 2D convolution);
- eight 256-byte streams moved and interleaved (merge sort);
- matrix rows and strided matrix columns loaded into vector registers (matrix multiply).

The module tests cover the rest:

- the AGU and decoder against reference formulas on random inputs;
- the buffer against a queue model;
- a lane against three byte-array memories with random grants and read latencies,
  including the n + 2 cycle instruction time, four reads in flight and a full
  read-ahead queue;
- the router's tagging and round-robin bound;
- the memories against byte arrays, at full size.

## Trust

All modules pass Verilator lint and elaborate in Yosys with the slang front end.
Everything listed above is checked by self-checking simulation.

The following has not been checked:

- timing closure at 1 GHz;
- behaviour against a real DDR3/HMC controller;
- the throughput the original architecture quotes, which this RTL does not reach (see
  above).
