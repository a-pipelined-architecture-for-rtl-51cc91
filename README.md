# Pipelined Lee maze router

Lee's algorithm finds the shortest rectilinear path between two cells of a
grid that contains blocked cells. It grows a breadth-first "front wave" out
of the source. Each reached cell is labelled with the direction back to the
cell it was reached from. When the wave touches the target, the path is read
back by following those labels. A software router does this one neighbour at
a time.

This design does it in hardware. A queue of front-wave cells feeds three
identical three-stage pipelines. Every cycle one cell leaves the queue. Each
pipeline examines one of the three neighbours that cell can still expand
into (the fourth is the cell it came from). Up to three new cells enter the
queue per cycle. The grid and the queue are split into memory banks so that
the three pipelines never compete for a memory port. Once the pipelines are
full, one queue cell is expanded per clock with no conflict stalls.

The default configuration routes on a 64 x 64 grid with four queue buffers
of 48 cells each. A queue that grows beyond the buffers is spilled to an
external store (a "disk") through a streaming port.

## The grid: two banked cell memories

Each grid cell has five bits, kept in two separate memories:

| memory | bits | used by | meaning |
|---|---|---|---|
| BCMA (`bcm_a`) | tag, hblk, sblk | stage 1 | tag = on a routed wire; hblk = hard block (obstacle or earlier wire); sblk = soft block (already reached in this expansion) |
| BCMB (`bcm_b`) | 2-bit direction | stage 3 | way back to the predecessor: N=0, S=1, E=2, W=3 |

In this direction code, opposite directions differ only in bit 0. So "the way
back" is always `dir ^ 1`.

Each memory is four banks. Cell (i, j) is placed as follows:

- It lives in bank `j mod 4` when `i mod 4` is 0 or 3.
- It lives in bank `(j+2) mod 4` when `i mod 4` is 1 or 2.
- Its address in the bank is `i * COLS/4 + j/4`.

With this mapping, the four neighbours of any cell always sit in four
different banks. So the three pipelines, which look at three different
neighbours of the same cell, always hit three different banks.

The 8 x 8 corner of the bank map is:

```
0 1 2 3 0 1 2 3
2 3 0 1 2 3 0 1
2 3 0 1 2 3 0 1
0 1 2 3 0 1 2 3
(repeats every four rows)
```

### Cell descriptors and the neighbour lookup

A queued cell is not stored as (row, column). It is stored as a 17-bit
descriptor `cell_t` (in `maze_pkg`) with these fields:

- row parity (1 bit, i mod 2)
- column parity (2 bits, j mod 4)
- direction to predecessor (2 bits)
- bank (2 bits)
- bank address (10 bits)

`neighbor_table` derives the neighbour's descriptor from these fields alone,
with no multiplier or divider:

- `i mod 4` follows from the row parity and from whether bank equals column
  parity.
- North and south change the address by one row of the bank (`COLS/4`). The
  new bank follows from the new `i mod 4`.
- East and west step the bank and column parity by ±1. The address moves
  only when the column parity wraps.

The same logic also reports whether the neighbour lies off the grid edge.
Off-grid neighbours are treated as blocked. Only the source and target go
through the full (row, col) formula (`cell_of`).

## The expansion pipeline

Every cycle the queue read processor (`queue_ctrl`) broadcasts one
descriptor, `cur`, or nil. All three pipelines receive it.

**Stage 1 (`pp_stage1`, one per pipeline, parameter `IDX` = 1, 2, 3)**

1. It picks direction `(pred + IDX) mod 4`. The three pipelines therefore
   take the three directions other than the way back.
2. It computes the neighbour and reads its BCMA bits.
3. In the same cycle it writes them back with `sblk = 1`, so no other path
   can claim the cell.
4. The neighbour survives if it is inside the grid, not hard-blocked and
   not already soft-blocked.

BCMA is read asynchronously and written at the clock edge. The
read-modify-write therefore fits in one cycle.

**Stage 2 (`pp_stage2`, shared by the three pipelines)**

The three stage 2 processors share flags and a queue pointer, so they are
one block. It works as follows:

- It raises one flag per surviving neighbour. `Num` is the number of flags.
- It gives each survivor a `Priority`. Priority is the number of other
  survivors that rank ahead of it.
- Ranking puts "straight on" first, which keeps the wire moving in its
  current direction and avoids jogs. The two turns follow in pipeline order.
- A survivor's queue position is `Next + Priority`. Its queue bank is
  `position mod 3`.
- `Next` advances by `Num`.
- If fewer than three places are left in the write buffer after the group,
  the buffer is reported full. `Next` then restarts at 0 for the next
  buffer.
- If any survivor is the target, stage 2 flags the group.

**Stage 3 (`pp_stage3`, one per pipeline)**

Each stage 3 stores the way back, `dir ^ 1`, in two places:

- It writes the descriptor, with its predecessor field set to `dir ^ 1`,
  into the queue at its position.
- It writes the same code into BCMB.

During sweeping the BCMB write is suppressed.

**Registers and control**

Between stages sit ordinary pipeline registers. All of them hold on
`stall` and clear on `flush`. A cell therefore goes from broadcast to
enqueued in three cycles.

When the target's group reaches stage 3, the target still gets its BCMB
label. Then the whole pipeline is flushed and expansion ends.

## The queue: four buffers and a disk

The queue memory (`bqm_mem`) is split into four buffers. Each buffer has
three banks: place k of a buffer lives in bank `k mod 3`. The (up to) three
cells written per cycle therefore land in three different banks.

It has two more ports:

- a disk-in write port, which loads a buffer coming back from the disk;
- a disk-out read port, which streams a buffer out to the disk.

Both ports work while the pipelines keep running.

### Queue variables

`queue_ctrl` keeps these variables:

- `RB` with `Front`: the read buffer and its read index.
- `WB` with `Last`: the write buffer and its fill level.
- `NB`: one full buffer queued behind RB.
- `PF`: a buffer already loaded back from the disk.
- A count of whole buffer loads on the disk. They come back in the order
  they were written.
- A free-buffer mask.

The invariant that makes this safe is that queue order is always:

```
RB  ->  NB  ->  PF  ->  loads on disk (oldest first)  ->  WB
```

### Write side

When a group fills WB, the group is still written into WB. WB then changes
in one of three ways:

- **WB was also RB:** a free buffer becomes the new WB.
- **Only RB is ahead of WB and the disk is idle and holds nothing:** WB
  becomes NB, and a free buffer becomes the new WB.
- **Otherwise:** a free buffer becomes the new WB, and the old WB is
  streamed to the disk. Its buffer returns to the free list when the last
  cell has been accepted. Only one disk transfer runs at a time.

If the needed buffer or the disk port is not yet available, `stall` freezes
every pipeline register until it is.

### Read side

- When RB runs out, RB moves on to the next buffer in the order above:
  NB, then PF (waiting for the disk if the load is still arriving), then WB.
- The old RB is freed. The switch costs one nil broadcast.
- A disk read of the oldest load starts whenever the disk port is idle, no
  loaded buffer is waiting, and a buffer can be spared.

### Empty queue and conflicts

If RB has caught up with WB, the queue is empty and nil is broadcast. After
four empty cycles in a row, the three pipelines are also empty. `empty4`
then ends the phase: no path exists in expansion, or the sweep is complete.

If the write side and the read side both want to change buffers in the same
cycle, the write side wins. The read side broadcasts nil and retries next
cycle. This is reported on `ev_defer`.

### Sizing

On an n x n grid the front wave never holds more than about 4n cells. At the
default size that is 4 x 64 = 256. The four buffers hold 4 x 48 = 192.

So large routes do use the disk. The end-to-end test spills 200 loads over
its seven routes. With `BUF_SIZE` = 96 the same test never touched the disk.
A larger buffer also gives a slow disk more time per buffer.

## Route sequencing

`path_ctrl` runs one route from `start` to `done`.

1. **Expansion.** The queue is cleared and the source is soft-blocked. The
   source is then broadcast twice, once with predecessor N and once with
   predecessor S. Between them the two broadcasts cover all four
   neighbours.

   Expansion runs until the target is reached, or until `empty4` signals
   that no path exists.

2. **Recovery.** Starting at the target, the controller reads the BCMB
   label. It sets the cell's `tag` and steps to the labelled neighbour, one
   cell per cycle, until it reaches the source. It counts the cells in
   `path_len`.

3. **Sweep.** The source's tag is turned into a hard block. The source is
   injected again, and the pipelines run with the soft-block roles reversed:
   - A cell passes only if its `sblk` is 1.
   - Each visited cell gets `sblk = 0`.
   - A cell with `tag = 1` becomes `hblk = 1, tag = 0`.

   This clears all soft blocks left by the expansion and turns the new wire
   into an obstacle for later routes. The sweep ends on `empty4`.

After a failed expansion the sweep runs too, so the grid is clean for the
next route.

## Top level: `maze_router`

| port group | signals | notes |
|---|---|---|
| clock/reset | `clk`, `rst_n` | reset is asynchronous, active low |
| host | `hst_en`, `hst_we`, `hst_row`, `hst_col`, `hst_wdata` → `hst_rdata`, `hst_dir` | read or write one cell's BCMA bits and read its BCMB label while `busy = 0`; reads are combinational |
| route | `start`, `src_row/col`, `tgt_row/col` → `busy`, `done`, `path_found`, `path_len` | `start` is a one-cycle pulse; `done` pulses once at the end |
| disk | `dsk_clear`, `dsk_wr_valid/data/last` ← `dsk_wr_ready`, `dsk_rd_req` → `dsk_rd_valid/data/last` | one cell per cycle each way; a load is one buffer; loads are returned first-in first-out |
| events | `ev_stall`, `ev_wswitch`, `ev_rswitch`, `ev_spill`, `ev_refill`, `ev_defer`, `ev_expand` | one-cycle pulses for monitoring |

### Typical flow

1. Clear the grid through the host port and write `hblk` for obstacles.
2. Pulse `start` and wait for `done`.
3. Read the wire back: cells with `hblk` set that were not obstacles.

### Parameters and grid size

The only top-level parameter is `BUF_SIZE`, which defaults to 48. The grid
size is set in `maze_pkg`: `GRID_N` gives 2^GRID_N columns (default 6, so 64
columns) and `GRID_ROWS` the number of rows (default 64). The column count
must be a power of two, at least 4, for the bank mapping to work. Memory
sizes and port widths follow from these values.

## Where this design departs from, or fills in, the published architecture

- **Neighbour table.** The published design uses a neighbour lookup table.
  This design computes the same values with a few gates, as described
  above.
- **Stage 2 priority.** The priority rule is "straight on first". The order
  between the two turns is this design's choice.
- **Queue buffer management.** The published procedure chains up to two
  buffers (NB, NNB) and frees buffers through a stack. As written, it can
  hand out a buffer that is still in use when a chained buffer is also the
  write buffer. This design uses the ordering invariant above with a single
  NB and a free mask. The number of buffers and the rules for when a buffer
  goes to or comes from the disk are unchanged.
- **Full-buffer test.** WB counts as full when fewer than three places
  remain, so a buffer that is not full can always take a whole group.
- **Source injection.** In the published design the source's neighbours are
  placed directly in the queue. Here the source is broadcast twice, which
  reaches the same state through the normal pipeline.
- **Pipeline hold.** The pipeline stalls while waiting for a free buffer or
  for the disk port. In the published design every stage is assumed to
  finish in its cycle.
- **Target handling.** The target's group is let through stage 3 before the
  flush, so the target gets its label.
- **Interface.** Grid edges, the host port, the disk handshake, the event
  outputs and the start/done protocol are this design's own.
- **Not built: dual-region variant.** The published text outlines an
  extension that splits the grid like a chessboard into two regions, since
  consecutive wavefronts alternate between them. Each region gets its own
  queue and pipeline set, with eight memory banks in all (four per region).
  The text gives only its block diagram and memory map, so it is not built.
- **Not built: other outlines.** Variants with cost functions and multiple
  layers are mentioned only in outline and are not built either.
- **Disk.** The disk is outside the design. `tb/disk_model.sv` is a
  behavioural first-in first-out store with adjustable write back-pressure
  and read latency.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_neighbor_table` | every cell and direction of the 64 x 64 grid against the mapping formula; the 8 x 8 bank map; four distinct neighbour banks |
| `tb_bcm_a`, `tb_bcm_b` | random multi-port traffic against a shadow model |
| `tb_pp_stage1` | direction choice, blocking and soft-block update in both modes, stall/flush |
| `tb_pp_stage2` | flags, Num, priority, positions, full-buffer wrap, target detection (small buffer) |
| `tb_pp_stage3` | queue and label writes, `dir ^ 1`, sweep suppression |
| `tb_bqm_mem` | all four ports against a shadow model |
| `tb_queue_ctrl` | random groups against a reference FIFO with a small buffer and a slow disk, so every buffer switch, spill and refill case occurs |
| `tb_path_ctrl` | phase sequence, injection, recovery walk, path length |
| `tb_maze_router` | full size, default parameters |

`tb_maze_router` routes seven nets on a 64 x 64 grid with 20 % random
obstacles. It compares every path length with a breadth-first reference and
checks these properties:

- The path is connected.
- The path avoids obstacles.
- The grid is clean after the sweep.
- The new wire became a hard block.

It also checks the rate. Every cycle of a route must do one of these:

- expand a cell;
- stall;
- change the read buffer;
- wait for a disk load;
- find the queue empty;
- walk the path.

Only a small fixed overhead is allowed beyond that. Two measured routes:

- When the disk is not needed, a route took 6140 cycles for 5924 expanded
  cells, counting expansion and sweep together.
- With the slowed-down disk model, waiting for loads can take more than half
  the cycles. Making `BUF_SIZE` larger than the disk round trip avoids this.

It also covers a walled-in target with no path and an empty grid. It uses
a disk model with back-pressure and latency, and fails if any of these
mechanisms never occurred: target found, no path, stall, write-buffer
switch, read-buffer switch, spill, refill, deferred read switch.

### Running a testbench with Verilator

```
verilator --binary --timing --assert -Irtl -Itb rtl/maze_pkg.sv tb/tb_maze_router.sv \
          --top-module tb_maze_router -Mdir obj_tb -o sim
obj_tb/sim +verilator+rand+reset+2
```

Replace `tb_maze_router` with any other testbench. The testbenches start with
random register contents and rely only on the reset.
