# SMX: a tiled sequence-alignment engine behind a coherent memory port

This is synthesizable SystemVerilog for a sequence-alignment accelerator. It
fills the dynamic-programming (DP) matrix of a global alignment:

    H[i][j] = max(H[i-1][j-1] + s(q_i, r_j),  H[i-1][j] + I,  H[i][j-1] + D)

It does this one VL x VL tile per clock cycle. The host places two sequences
in memory, writes a handful of registers and gets back either the final
score (score-only mode) or the border elements of every tile (traceback
mode). Traceback itself is left to software, which recomputes the inside of
a tile from its borders.

The design is meant to sit in the programmable logic of a Zynq
UltraScale+-class MPSoC. It has an AXI4-Lite control slave and an AXI4
master towards the CPU's Accelerator Coherency Port (ACP), so it reads and
writes the CPU's L2 cache directly and no cache flushes are needed. It
follows the architecture of the published SMX coprocessor and its MPSoC
port:

- an engine with four PE arrays;
- SMX-Workers that orchestrate DP-blocks;
- a memory bridge that adapts the workers' 512-bit cache-line requests to
  the 128-bit ACP;
- a hardware score adder;
- the substitution matrix fetched by DMA;
- performance counters.

Interfaces, encodings, sizes that were not published and the register map
are this implementation's own choices. The section on departures and
choices lists them.

## Differential encoding: why the datapath is so narrow

The arrays never hold absolute scores. Every DP-element is carried as two
*offset deltas*:

    dv' = H[i][j] - H[i-1][j] - I        (vertical difference)
    dh' = H[i][j] - H[i][j-1] - D        (horizontal difference)

Both are never negative. Both are bounded by `max(S')`, where the offset
substitution score is `S' = s - I - D`. A processing element (`smx_pe`)
therefore needs only EW-bit unsigned arithmetic:

    z'     = max(S', dh'_in, dv'_in)
    dv'_out = z' - dh'_in          (passed to the right)
    dh'_out = z' - dv'_in          (passed down)

This is the same recurrence as above, with H[i-1][j-1] subtracted out.
A negative S' can be clamped to 0 without changing any result, because the
max() then always picks one of the deltas, which are never negative.

The element width selects one of four physical arrays. Vector length VL
is the number of elements along each side of a tile:

| mode | EW (bits) | VL | typical use                                   |
|------|-----------|----|-----------------------------------------------|
| 0    | 2         | 32 | 4-letter alphabet with small (unit) costs     |
| 1    | 4         | 16 | 16-letter DNA alphabet, or weighted costs     |
| 2    | 6         | 10 | protein, with gap costs or a 26x26 matrix     |
| 3    | 8         | 8  | ASCII text, or wide score ranges              |

A job uses the smallest EW that holds both its characters and its largest
delta. The largest delta is `match - I - D`, or `max(matrix) - I - D`.

A tile vector (VL characters, a dv' column or a dh' row) always fits in
64 bits. Characters are EW bits wide, element k in bits `[k*EW +: EW]`.

The final global score needs no matrix read-back. Along the last column,
`H[m][n] = H[0][n] + sum(dv' + I) = n*D + m*I + sum(dv')`. The worker adds
up the dv' values of the rightmost tile column as they leave the engine.

## The engine (`smx_engine`, `smx_array`, `smx_pe`, `smx_subst_matrix`)

`smx_array` is a VL x VL mesh of PEs. The left dv' column and top dh' row
enter at the edges, and the right dv' column and bottom dh' row leave as
the tile result.

- **Pipelining.** The combinational path runs along the antidiagonals. It
  is cut into `NSEG` segments by registers. Cell (i,j) belongs to segment
  `floor((i+j)*NSEG/(2VL-1))`. Every signal that crosses into a later
  segment is registered once per boundary. Edge inputs, S' values and
  outputs are delayed so that all data of one tile meet in step.
- **Rate and latency.** An array accepts a new tile every cycle. The result
  appears exactly `NSEG` cycles later (default 2).
- **Substitution scores.** S' is made next to the PEs.
  - With match/mismatch scoring, each cell compares its two characters
    (the comparator mesh).
  - With the matrix, the 6-bit array reads the matrix entry for its
    character pair from `smx_subst_matrix`. This is a bank of registers
    holding all 26 x 26 signed 6-bit entries, so every cell reads it at
    once. It adds the bias -(I+D) and clamps.
- **The engine.** `smx_engine` holds the four arrays (EW/VL = 2/32, 4/16,
  6/10, 8/8) and the matrix.
  - It steers each task to the array of its mode. Idle arrays see zeros.
  - It carries the worker id alongside the task, so the result returns to
    its owner.
  - Because every array has the same latency, at most one result leaves
    per cycle. An assertion checks this.

## Supertiles and the worker (`smx_worker`)

A worker computes one whole DP-block, that is, one alignment. The block is
cut into **supertiles** of 8 x 8 tiles (8·VL x 8·VL elements). All data a
supertile reads or writes is 512 bits wide, one cache line:

- eight query tile vectors, one line;
- eight reference tile vectors, one line;
- eight border vectors, one line per border.

Per supertile the worker does three things.

1. **Load.** It issues the reads back to back. The query line is read only
   for the first supertile of a row. The reference line is always read.
   The top border line is read from the supertile above, except in the
   first row. The left border stays in registers from the previous
   supertile of the row.

   Loads are speculative. While the tiles of one supertile run, the worker
   already reads the reference line and top border of the next supertile
   in the same row into prefetch buffers. This overlaps memory latency with
   computation. When the worker moves on, it keeps whatever the prefetch
   has already issued or received and reads only the rest. The first
   supertile of a row is not prefetched, because its top border may still
   be on its way to memory.
2. **Tiles.** It issues the 64 tiles row by row. Tile (ti,tj) needs the
   right dv' column of tile (ti,tj-1), which is still in the engine.
   - The worker waits for that result: an *engine-dependency stall*.
   - When the result arrives, it is forwarded straight into the next
     request in the same cycle: a bypass.
   - With NSEG = 2, one worker therefore issues a tile every second cycle.
     The second worker fills the other slots through `smx_engine_arbiter`,
     which is round-robin. This is why the default has two workers.
3. **Write.**
   - Traceback mode writes two lines per tile row: the bottom dh' rows of
     its eight tiles, then their right dv' columns. That is 16 lines per
     supertile, at `OADDR + ((si*RLEN + sj)*16 + 2*ti + {0,1}) * 64`.
   - Score-only mode writes one line per supertile, its bottom border, at
     `OADDR + sj*64`. The next supertile row reads it back from there.
     This gives the 16x reduction in writes.
   - Before the first supertile of a row reads its top border, the worker
     waits until all of its writes are acknowledged. The border may have
     been written only just before.

When the last write is acknowledged, `SCORE` becomes
`sum(dv') + QLEN*8*VL*I + RLEN*8*VL*D`, and `done` rises.

Limits of the worker:

- global alignment only (zero deltas on the top and left edges);
- linear gap costs;
- lengths in whole supertiles, so the host pads the sequences. Padding
  changes a global score, so the host aligns the remainder itself. The
  original software also handles the last tile on the CPU.

## Memory path (`smx_mem_arbiter`, `smx_mem_ctrl`, `smx_mem_bridge`)

Line requests (`mem_req_t`: worker id, write flag, 40-bit address, 512-bit
data) go through three units.

- **`smx_mem_arbiter`** picks a worker round-robin. It holds its choice
  until the request is accepted.
- **`smx_mem_ctrl`** passes requests on to the bridge. It counts, per
  worker, the requests still waiting for a response. A worker at
  `MAX_OUT` (16/2 = 8) is held back, so one worker cannot use every read
  slot of the bridge. It returns each response, read data or write
  acknowledge, to its worker by id.
- **`smx_mem_bridge`** is the width adapter.
  - **Requests.** It queues requests in a REQ FIFO. Each read becomes
    exactly one AXI4 burst of four 128-bit beats: ARLEN = 3, ARSIZE =
    16 bytes, INCR, AxCACHE = 1111. Each write becomes one AW and four W
    beats.
  - **Read limit.** Reads are non-blocking, up to `MAX_RD_OUT` = 16 in
    flight.
  - **IDs and responses.** The AXI ID is the worker index. R beats of
    different IDs may interleave, so each ID collects its four beats in
    its own line buffer. A round-robin arbiter moves complete lines and
    write acknowledges (B responses) into the RESP FIFO.
  - **Matrix fetch.** A pulse on `mtx_start` makes the bridge read 8
    lines from `MTX_BASE`, under ID 4, into the engine's matrix registers.
    A read already offered on AR is never withdrawn for the matrix fetch.

Assertions check the handshake rules:

- AR stays stable until accepted;
- there are never more than 16 reads in flight;
- no R beat arrives for an unknown ID;
- no counter underflows;
- a granted memory request stays stable.

## Host interface (`smx_ctrl_if`, `smx_perf_counters`)

AXI4-Lite, 32-bit data, 12-bit address. A write takes the AW and W
channels together. Every response is OKAY, and unmapped addresses read as
0. Start bits are self-clearing pulses.

| offset            | register       | meaning |
|-------------------|----------------|---------|
| 0x000             | CTRL (W)       | bit0 start matrix fetch, bit1 clear performance counters |
| 0x004             | STATUS (R)     | bit0 matrix fetch busy, [7:4] worker busy, [11:8] worker done |
| 0x008 / 0x00C     | MTX_BASE lo/hi | byte address of the matrix (8 lines, row-major, 6-bit signed entries) |
| 0x010             | IRQ_EN         | bit w: `irq` is high while worker w is done |
| 0x020             | PERF_BUSY      | cycles with any worker busy |
| 0x024             | PERF_ENG       | cycles in which the engine accepted a tile |
| 0x100 + 0x40·w    | worker w block: | |
| +0x00             | CTRL (W)       | bit0 start |
| +0x04             | CFG            | [1:0] mode (EW 2/4/6/8), [2] use matrix (mode 2), [3] score-only |
| +0x08 … +0x1C     | QADDR, RADDR, OADDR | lo/hi pairs, 64-byte aligned |
| +0x20 / +0x24     | QLEN / RLEN    | lengths in supertiles (8·VL characters) |
| +0x28             | SCORING        | [7:0] match, [15:8] mismatch, [23:16] insertion I, [31:24] deletion D (signed) |
| +0x2C             | SCORE (R)      | final score of the last job |
| +0x30 … +0x3C     | PERF           | busy, memory-stall, engine-stall, tile count |

The performance counters only observe event flags from the workers, so
profiling never affects the datapath. Memory stalls are cycles spent
loading, draining or blocked on a write. Engine stalls are cycles spent
waiting for a dependent result.

Sequences are stored one line per supertile: line k holds tile vectors
8k..8k+7, and vector t holds characters `t*VL .. t*VL+VL-1`.

## Top level (`smx_top`)

`smx_top` wires these blocks together:

- the control interface;
- `NUM_WORKERS` (2) workers;
- the engine arbiter and the engine;
- the memory arbiter, the memory controller and the bridge.

Its ports are the AXI4-Lite slave `s_axil_*`, the AXI4 master `m_axi_*`
(towards the ACP) and `irq`. Parameters: `NUM_WORKERS` (1–4, default 2),
`NSEG` (2), `MAX_RD_OUT` (16), `AXIL_AW` (12). `smx_pkg` holds the shared
types and constants. `smx_fifo`, `smx_rr_arbiter` and `smx_delay` are small
helpers.

## Departures and choices

These follow the published design:

- the four arrays and their 2/32 and 8/8 sizes;
- antidiagonal segmentation registers;
- the comparator mesh and the register-based matrix;
- workers grouping tiles into supertiles that share query and reference
  lines;
- several workers sharing one engine (two by default);
- 512-bit requests mapped to one 4-beat ACP burst;
- 16 outstanding reads;
- redistribution of responses to up to 4 workers by AXI ID;
- the matrix fetched from a base address;
- the hardware score adder;
- stall counters;
- a 32-bit AXI-Lite control port.

These are this implementation's own choices:

- **Array details.** VL = 16 and 10 for the 4- and 6-bit arrays (the most
  that fit 64 bits). The segment count (2) and the rule for segment
  boundaries.
- **Layout and protocols.** The supertile size (8 x 8 tiles); the memory
  layout of sequences and border lines; the register map; the request and
  response formats; FIFO depths.
- **Memory path.** The per-worker limit in the memory controller; AXI ID 4
  for the matrix; the order of matrix entries in memory.
- **Scope.** Only global alignment with linear gaps and whole-supertile
  lengths. No affine gaps, no local or semi-global modes.
- **Interrupt.** The `irq` condition.
- **One tile per worker.** A worker keeps only one tile in the engine at a
  time. That is enough to fill the engine with two workers at NSEG = 2.
  With larger NSEG, more workers would be needed.

The CPU, its L2 cache and ACP, the clock, reset and interrupt blocks and
the software stack belong to the platform and are not part of this RTL.
`tb/acp_mem_model.sv` stands in for the ACP in simulation.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. `tb/smx_ref_pkg.sv` is the reference. It
computes tiles and whole matrices on absolute scores with the plain
recurrence, and converts to deltas only at the edges, so it does not share
the hardware's arithmetic.

| testbench | what it shows |
|-----------|---------------|
| `tb_smx_pe` | all 4096 input combinations at EW = 4 against the absolute recurrence |
| `tb_smx_array` | random tiles at the default size and at VL 10/EW 6/NSEG 3 with the matrix; latency exactly NSEG, one tile per cycle |
| `tb_smx_subst_matrix` | line loading and entry placement |
| `tb_smx_engine` | all four modes and matrix mode, one task per cycle, result and id after NSEG cycles |
| `tb_smx_worker` | worker and engine on four jobs (all widths, traceback and score-only); checks score, every border line and the write count; requires bypasses, engine and memory stalls, and waits for acknowledges |
| `tb_smx_engine_arbiter`, `tb_smx_mem_arbiter`, `tb_smx_mem_ctrl` | fairness, stability and routing under random traffic; per-worker limit |
| `tb_smx_mem_bridge` | writes, 464 reads with interleaved R beats and back-pressure, the 16-read limit reached and never exceeded, matrix fetch |
| `tb_smx_ctrl_if`, `tb_smx_perf_counters` | register map, pulses, read-back, counting and clearing |
| `tb_smx_top` | the whole design at default parameters, driven only through AXI-Lite (details below) |
| `tb_smx_workloads` | DNA (2-bit), DNA with gaps (4-bit), protein with matrix (6-bit) and ASCII edit distance (8-bit) at 100 bp and about 1 Kbp, score and all borders checked |

`tb_smx_top` drives the design only through AXI-Lite, against a random
latency AXI memory.

- It runs two batches of two jobs on both workers. The jobs cover all four
  widths, matrix mode, score-only and traceback.
- It checks the scores, every border written and the tile counters.
- It fails unless it has seen at least once each of:
  - engine stalls and forwarding;
  - memory stalls;
  - worker interleaving on the engine;
  - the memory-controller limit;
  - several reads in flight;
  - R-beat interleaving;
  - acknowledge waits;
  - both matrix fetches;
  - the interrupt.

At these job sizes the top level reaches 11 to 12 reads in flight. The
limit of 16 is exercised in `tb_smx_mem_bridge`.

To run one testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
      rtl/smx_pkg.sv tb/smx_ref_pkg.sv tb/tb_smx_top.sv --top-module tb_smx_top
    ./obj_dir/Vtb_smx_top

The top-level test runs in under a minute.
