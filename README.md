# Hybrid-threaded FPGA kernels: Sobel, Smith-Waterman and BFS

This repository holds SystemVerilog for three accelerator kernels. They are
built the way a hybrid-threading (HT) toolflow builds coprocessor logic, for a
platform with four FPGAs and many independent memory ports:

* **Sobel edge detector.** A streaming kernel. It reads one pixel per clock,
  keeps a 3x3 window in a smart (stencil) buffer, and writes the gradient
  magnitude back to memory.
* **Smith-Waterman local alignment.** A compute-bound kernel. Each unit has
  128 hardware threads that share one 8x8 processing-element (PE) array. The
  array is a 15-stage pipeline. Queries of any length are handled in
  8-residue segments.
* **Breadth-first search (BFS).** A memory-bound kernel. Each unit has a
  Master, a Kernel and a NextEnq module. Units cooperate on one graph and
  synchronise through atomic memory operations only.

All three follow one pattern: a **unit** is replicated once per memory port
(16 units per FPGA by default, so 64 on four FPGAs). Inside a unit,
**modules** run **threads** that are time-multiplexed: each clock, one thread
runs one instruction. A thread that would hit a busy memory port is not
picked (it retries). A thread that waits for read data is paused until the
data comes back. That is how one memory port and one datapath stay busy
while memory latency is long.

`ht_coproc_top` puts the three designs side by side, as one FPGA. On the real
platform each would be its own FPGA image. Each design has its own memory
ports and host controls.

## Memory ports (`ht_pkg`)

Every unit uses the same port format. A request (`mem_req_t`) has these
fields:

* `op`: `MEM_RD`, `MEM_WR` or `MEM_FADD`. `MEM_FADD` is an atomic
  fetch-and-add that returns the old word.
* `addr`: a 32-bit **word** address. Words are 64 bits.
* `data`: 64 bits.
* `tag`: 12 bits.

The handshake is `req_valid`/`req_ready`: a transfer happens on a clock edge
where both are high. Reads and fetch-and-adds return one response
(`mem_rsp_t`: data and tag) per request, in request order. Writes return
nothing. Inside a unit, the top tag bits say which module made the request.
The rest of the tag names the thread and which word of its instruction the
response belongs to. The thread schedulers in `sw_qdb` and `bfs_kernel`
raise `req_valid` only when `req_ready` is already high. So a memory system
driving these ports must not make `req_ready` depend combinationally on
`req_valid`.

## Sobel unit (`sobel_unit`, `sobel_window`, `sobel_mac_tree`)

```
read address gen --> memory --> sobel_window --> sobel_mac_tree --> output FIFO --> write address gen
        ^                       (2 line bufs,     (12 multipliers,     (OUT_DEPTH)
        |                        3x3 window)       10+2+1 adders)          |
        +-------------------------- credits <------------------------------+
```

* A frame is stored one pixel per word, in the low `PIX_W` (16) bits, in
  raster order. Frames are up to `IMG_W_MAX` x `IMG_H_MAX` = 1920 x 1080.
* `sobel_window` stores the two previous rows in line buffers. Each incoming
  pixel adds a 3-pixel column to the window. The window is presented one clock
  later, with the coordinates of its centre pixel, once the input is past row 1
  and column 1.
* `sobel_mac_tree` computes Gx and Gy from the twelve non-zero filter taps.
  It then forms `|Gx| + |Gy|`, saturated to 16 bits. It is pipelined with a
  4-clock latency.
* Only interior pixels are written, to `dst + row*W + col`. The one-pixel
  border of the destination frame is not written.
* **Flow control by credits.** The unit starts with `OUT_DEPTH` credits, and
  each read costs one. A credit comes back when the pixel turns out to be a
  border pixel (it makes no output), or when its result leaves the output
  FIFO. So the FIFO can never overflow, and reads run ahead as far as the
  credits allow (prefetching). When the write port stalls, reads stop on their
  own.
* **Timing.** If both ports are always ready, a W x H frame takes about W*H
  clocks plus the memory latency. The testbench measures 206 clocks for a
  21 x 9 frame (189 pixels) at 10 clocks of memory latency.

Controls: pulse `start` for one clock with `cfg_src`, `cfg_dst`, `cfg_w` and
`cfg_h` valid. `busy` stays high until the last write is accepted, then `done`
pulses. Frames must be at least 3 x 3.

## Smith-Waterman unit (`sw_unit` = `sw_control` + `sw_qdb`, which holds `sw_tile_array` of `sw_pe`)

### Scoring

`sw_pe` uses affine gaps (Gotoh). A gap of length k costs
`GAP_OPEN + k*GAP_EXT`. Equal residues score `+MATCH` and unequal ones score
`-MISMATCH`. The defaults are 10, 1, 5 and 4.

```
E = max(H_left - GAP_OPEN - GAP_EXT, E_left - GAP_EXT)
F = max(H_up   - GAP_OPEN - GAP_EXT, F_up   - GAP_EXT)
H = max(0, H_diag + s(q,d), E, F)
```

All values are unsigned 16-bit, and subtraction saturates at 0. Clamping E and
F at 0 cannot change H, because H is never below 0 anyway. Residues are 5-bit
codes. Code 31 (`SW_PAD`) fills past the end of a sequence and never matches,
so padding cannot raise a score. **This is a simplification:** protein search
normally uses a substitution matrix such as BLOSUM62. To add one, replace the
`s(q,d)` line in `sw_pe.sv` with a table lookup.

### The 15-stage PE array

`sw_tile_array` computes one 8x8 tile of the dynamic-programming matrix for
each issue: 8 query residues (rows) against 8 database residues (columns). Its
inputs are the tile's boundaries:

* upper: H and F of the row above (8 each)
* left: H and E of the column to the left (8 each)
* the corner H

The cells on anti-diagonal k (row + column = k) depend only on earlier
anti-diagonals, so pipeline stage k computes diagonal k. That gives 2*8-1 =
15 stages and 64 PEs in total. A tile can enter every clock and leaves 15
clocks later with these outputs:

* lower boundary (H, F)
* right boundary (H, E)
* the largest H inside the tile
* the thread tag it entered with

### Threads and segments (`sw_qdb`)

A thread aligns one query against one database sequence. It walks the matrix
in **segments** of 8 query rows. Within a segment it sweeps the database
sequence in **chunks** of 8 residues, one tile per chunk:

* The left boundary and the corner carry from tile to tile in the thread's
  own registers.
* The lower boundary of each tile is written to the thread's scratch area in
  memory: 4 words per chunk (H[0..3], H[4..7], F[0..3], F[4..7], four 16-bit
  scores per word, element 0 in the low bits).
* The next segment reads it back as its upper boundary.

So the query length is limited only by the 16-bit length fields.

The per-tile instruction sequence of a thread:

| instruction | runs when | does |
|---|---|---|
| LDQ (first chunk of a segment) | port ready | read the 8 query residues of the segment |
| LDD | port ready | read the 8 database residues of the chunk |
| LDT0..3 (segment > 0) | port ready | read the upper boundary |
| TILE | all reads returned | issue the tile, pause |
| (tile returns) | | store right boundary, lower boundary, max |
| ST0..3 (not last segment) | port ready | write the lower boundary |
| NEXT | always | next chunk (corner = last upper H), next segment, or RTN |
| RTN | return accepted | hand back {job id, best score} |

Each clock, a round-robin scheduler picks one thread whose instruction can
run, and executes it in that clock. Memory tags are `{thread, word index}`.
Responses may come back for any thread, and a count of outstanding reads per
thread wakes it up.

Residue words hold one residue per byte, eight per word, residue 0 in the low
byte. Thread t uses scratch at `job.scratch + t * job.scr_stride`. The stride
must be at least 4 x ceil(longest database sequence / 8) words.

**Throughput.** A tile needs about 3 instructions when the query fits in one
segment, and 11 when it does not: 1 database read, 4 boundary reads, 4
boundary writes, TILE and NEXT. With one 64-bit memory port per unit, memory
bandwidth sets the limit, not the 64-PE array. A faster version would widen
the port or keep the boundary rows on chip.

### Control (`sw_control`) and the unit

The host starts a unit with an `sw_cfg_t`:

* the query address and length
* a table of `n_seqs` database sequences, one word each: bits 31:0 the address,
  bits 47:32 the length
* a result address
* the scratch base and stride

Control reads the table ahead through a 4-entry queue and forks one thread
per sequence (job id = table index). Each returned score is written to
`res_addr + index`. `done` pulses after the last write. In `sw_unit`, Control's
requests take priority on the shared port, and responses are routed by tag bit
11.

## BFS unit (`bfs_unit` = `bfs_master` + `bfs_kernel` + `bfs_next_enq`)

### Graph layout (`bfs_pkg`)

All tables use one 64-bit word per entry:

| table | contents |
|---|---|
| `vinfo[v]` | bits 31:0 address of v's neighbour list, bits 63:32 degree |
| adjacency | one neighbour per word |
| `visited[v]` | 0 while v is unreached |
| `level[v]` | BFS level, written when v is reached |
| queue 0 / queue 1 | vertex lists of the even / odd levels |
| `cnt[L]` | size of level L's queue |
| barrier | one counter shared by all units |

Before starting, the host sets `visited[src]=1`, `level[src]=0`,
`queue0[0]=src` and `cnt[0]=1`, and zeroes the other counters, the barrier and
`visited`.

### One level, in every unit at once

1. **Master** reads `cnt[L]`. If it is 0, the search is over: `done` pulses.
2. Master forks one **Kernel** thread for each queue index `u, u+U, u+2U, ...`,
   where u is the unit number and U the number of units.
3. A Kernel thread reads the vertex, its `vinfo`, then each neighbour n. For
   each n it does a fetch-and-add of `visited[n]`. If the old value was 0, the
   thread has claimed n, exactly once across all units, and passes it to
   **NextEnq**.
4. NextEnq writes `level[n] = L+1`, reserves a slot with a fetch-and-add on
   `cnt[L+1]`, and writes n into the queue of level L+1.
5. When the unit's Kernel threads and NextEnq are idle, Master adds 1 to the
   barrier counter and polls it until it reaches `U*(L+1)`. Then it goes to
   level L+1.

Units never message each other: the claim and the barrier are both memory
atomics. The barrier is one counter that only grows, so it never needs
resetting. Queues alternate between two buffers, so only the last two levels'
queues remain in memory at the end. Inside a unit, NextEnq has priority on the
port, then the Master, then the Kernel. The strobes `ev_barrier_wait`,
`ev_claim_lost`, `ev_enq` and `ev_enq_full` are brought out for measurement.

## Top level (`ht_coproc_top`)

| parameter | default | meaning |
|---|---|---|
| `IMG_W_MAX`, `IMG_H_MAX`, `PIX_W` | 1920, 1080, 16 | largest Sobel frame, pixel width |
| `SW_UNITS`, `SW_THREADS` | 16, 128 | Smith-Waterman units, threads per unit (1024 PEs) |
| `BFS_UNITS`, `BFS_K_THREADS` | 16, 32 | BFS units, Kernel threads per unit |

The ports are these:

* Sobel: controls, and a read and a write memory port.
* Smith-Waterman: per-unit arrays of start, `sw_cfg_t`, busy/done, tile strobe
  and memory port.
* BFS: one start and one `bfs_cfg_t`. The top fills in each unit's number and
  the unit count. Per-unit memory ports, and event vectors.

`bfs_done` goes high once every unit has finished, and stays high until the
next start. The host interface and the memory controllers are not part of this
RTL.

## Simulating

Each testbench checks itself. It ends by printing
`TB_RESULT checks=N failures=M`, and has a watchdog. The helpers in `tb/` are:

* `mem_model.sv`: a multi-port memory. It has a fixed latency and random
  ready stalls, and fetch-and-add is atomic across ports.
* `sw_ref.sv`: a software Smith-Waterman.
* `bfs_graph.sv`: a random-graph builder and a software BFS.

For example:

```
verilator --binary --timing --assert --top-module tb_sw_unit \
  rtl/ht_pkg.sv rtl/sw_pkg.sv rtl/bfs_pkg.sv rtl/sw_pe.sv rtl/sw_tile_array.sv \
  rtl/sw_qdb.sv rtl/sw_control.sv rtl/sw_unit.sv \
  tb/mem_model.sv tb/sw_ref.sv tb/tb_sw_unit.sv
./obj_dir/Vtb_sw_unit +verilator+rand+reset+2
```

| testbench | what it exercises |
|---|---|
| `tb_sobel_window`, `tb_sobel_mac_tree` | window contents and coordinates; magnitudes and the 4-clock latency |
| `tb_sobel_unit` | two frames against software Sobel, with stalls; the full-rate cycle bound |
| `tb_sw_pe`, `tb_sw_tile_array` | cell recurrences; 200 tiles, 15-clock latency, back-to-back issue |
| `tb_sw_qdb` | 16 jobs on 8 threads, multi-segment, memory retry, return back-pressure |
| `tb_sw_control`, `tb_sw_unit` | forking and result writes; a whole unit against software alignment |
| `tb_bfs_unit` | 3 units on a random graph: levels, queue sizes, barrier, lost claims, full FIFO |
| `tb_ht_coproc_top` | the whole top at default parameters, all three designs at once, every mechanism counted |

`tb_ht_coproc_top` uses the default parameters: 16 + 16 units and 128
threads per Smith-Waterman unit. Verilator needs a few minutes to build it,
and the run takes a few seconds.

## How far to trust it, and where it departs from the original designs

These points are known:

* All blocks pass their testbenches. The testbenches compare against software
  models (Sobel, Smith-Waterman with the same scoring, BFS), use random memory
  stalls, and, for BFS, run several units at once.
* No timing closure or FPGA implementation has been done.
* Frequencies and frame rates above are arithmetic, not measurements.

These parts come from the description the design follows:

* the kernels, and their split into units and modules
* one pixel per clock, pixels up to 16 bits, frames up to 1080p
* twelve multipliers
* 128 threads sharing an 8x8 PE array in a 15-stage pipeline
* 8-residue query segments, with boundaries buffered in memory
* 64 units over four FPGAs
* Master/Kernel/NextEnq, with synchronisation through memory atomics

These are this design's own choices:

* the memory-port format and every memory layout
* the Sobel credit scheme and its border handling
* the Smith-Waterman scoring model (match/mismatch rather than a substitution
  matrix)
* the thread instruction sequences, and single-cycle instruction execution
  (an HT module pipelines variable read, execute, variable write and thread
  control)
* the Kernel thread count (32) and the FIFO depths
* the work split among BFS units, the claim by fetch-and-add, and the
  counter barrier

These are not built:

* the host interface that loads images and dispatches units (here, plain
  start/config ports)
* cross-unit messaging, which the original toolset version lacked too
* the infrastructure's global and shared variable storage, beyond the
  per-thread registers

Performance differs from the published numbers:

* Smith-Waterman throughput is bounded by one 64-bit memory port per unit
  (see above).
* BFS threads do one memory access per instruction, so the ratio of
  traversed edges to memory operations is low.
