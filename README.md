# A raster pipeline subarray machine for Lee maze routing

Lee-style maze routing spends nearly all its time on wavefront expansion.
In each step, every free cell next to the wavefront joins it. In software, a
step costs time in proportion to the length of the wavefront. This design
does expansion in hardware, in a different way. The routing grid is stored
in a buffer and streamed, cell by cell in raster order (row by row, each row
west to east), through a pipeline of small **raster subarray processors**
(stages). Each stage keeps two rows of the stream in line buffers. This lets
it look at every cell together with its 3 x 3 neighbourhood and write out
the cell's new value at the same rate as cells arrive. Every stage reads the
previous stage's output, so a pass through an N-stage pipeline advances the
wavefront by N cells. The pass takes time in proportion to the area streamed,
not to the wavefront. To keep that area small, the host streams only a
**frame**, a bounding rectangle around the growing wavefront, and enlarges
the frame as the wave grows.

The organisation is that of a published raster pipeline machine (ERIM's
Model II cytocomputer, with 8-bit cells, a 256K-cell buffer and two stages,
driven by a host computer). The cell encoding, the stage operations, the
command set and all interface timing are this design's own. They are listed
under "Where this design makes its own choices".

## Block structure

```
            host (not part of the RTL)
              | command port
        +-----v-----------+      read port     +-------------+
        | pipe_controller |------------------->| grid_buffer |
        |  frame, program |<-------------------| 256K x 8    |
        |  pass sequencer |      write port    +-------------+
        +--+-----------^--+
   cells in|           |cells out + flags
        +--v-----------+------------------------------+
        | stage_pipeline:  raster_stage -> raster_stage -> ...  (NSTAGES) |
        +-------------------------------------------------+
raster_stage = line_buffer x2 + nbhd_window (3x3) + subarray_proc + counters
```

| Module | Role |
|---|---|
| `raster_pkg` | cell type, stage operations, pass flags, host command codes |
| `line_buffer` | one row of delay; the length is programmable, so it follows the frame width |
| `nbhd_window` | three 3-cell shift registers: the 3 x 3 subarray |
| `subarray_proc` | combinational cell rule: expand, clean up or pass |
| `raster_stage` | one stage: the parts above plus frame masking, flushing and counters |
| `stage_pipeline` | `NSTAGES` stages in series; ORs the stages' flags together |
| `grid_buffer` | grid storage; 1 synchronous read port, 1 write port |
| `pipe_controller` | host command decoder; streams the frame from the buffer through the pipe and back |
| `raster_top` | the machine |

## How a raster stage sees a neighbourhood

This is the part that needs the most care. Take a frame `W` cells wide and
`H` rows high. Each time the stage shifts (called a *tick*), one cell enters:

* the input cell goes into row 2 of the window;
* line buffer 0 outputs the cell that entered `W` ticks earlier, which goes
  into row 1;
* line buffer 1 outputs the cell from `2W` ticks earlier, which goes into
  row 0.

Each window row shifts one place, so column 0 always holds the newest cell.
Suppose the window has just taken in cell number `t`. Its centre
`win[1][1]` then holds cell `t-W-1`, and the eight cells around the centre
are exactly that cell's grid neighbours:

* north is `win[0][1]` and south is `win[2][1]`;
* east is `win[1][0]` and west is `win[1][2]`.

The stage computes the centre's new value combinationally and registers it
on the next tick. The output cell therefore runs `W+2` ticks behind the
input.

Two details make this exact at the frame's edges:

* **Masking.** The stage counts the row and column of the centre cell. Any
  neighbour that would lie outside the frame (above row 0, below row `H-1`,
  or across the east or west edge) is replaced by an obstacle cell. This
  also hides the stale contents of the line buffers and the window at the
  start of a pass, and the wrap from the end of one row to the start of the
  next. The result is that the frame's edge acts as a wall.
* **Flushing.** The last row can only be processed once the row below it
  would have arrived. So after the `W*H`-th input cell, the stage shifts
  itself `W+2` more times with no input. It emits exactly `W*H` cells and
  then drops `busy`.

Timing: one cell in and one cell out per clock. When the input is
continuous, a cell's result leaves the stage `W+3` cycles after the cell
entered it. Through the pipeline that is `NSTAGES*(W+3)` cycles. Gaps in the
input (cycles with `in_valid` low) are allowed. There is no back-pressure:
the stage never stalls its input, and its output must always be accepted.

Each stage reads its neighbourhoods from its own input stream, never from
its own output. So one stage is exactly one synchronous expansion step, and
the wavefront is a true breadth-first front. This is what makes the routed
wires shortest paths.

## Cells and stage operations

A cell has 8 bits:

| bits | field | meaning |
|---|---|---|
| 7 | `obstacle` | blocked: a pre-placed feature or a routed wire |
| 6 | `reached` | the cell is on or behind the wavefront |
| 5 | `source` | the cell belongs to the net's source, or to the tree of the net routed so far |
| 4 | `target` | a terminal that is still unconnected |
| 3:2 | unused | |
| 1:0 | `dir` | the neighbour the cell was reached from: 0 N, 1 E, 2 S, 3 W |

Each stage is programmed with one operation:

* `OP_EXPAND`: a free cell (neither obstacle nor reached) that has a reached
  4-neighbour becomes reached. `dir` records which neighbour reached it. If
  several did, the first of N, E, S, W wins. Diagonal neighbours are present
  in the window but unused, because the grid is unit-cost and 4-connected.
* `OP_CLEAN`: every cell that is not an obstacle becomes free. This is the
  clean-up after a wire has been traced.
* `OP_PASS`: the cell is copied unchanged. With the second stage set to
  `OP_PASS`, the machine behaves as a single-stage pipe.

For every cell it emits, a stage raises three flags. The controller ORs them
over the whole pass:

* `changed`: some cell changed; if none did, the expansion is stuck;
* `target_hit`: a target cell was reached;
* `frame_hit`: a cell on the frame boundary was reached, so the frame must
  grow.

## Frames and passes (`pipe_controller`)

A pass streams the current frame out of the buffer:

* rows `y0 .. y0+H-1`, columns `x0 .. x0+W-1`;
* one cell read per clock;
* each result written back to its own address as it leaves the pipeline.

A cell is always read at least `NSTAGES*(W+3)` cycles before its result is
written, so updating the buffer in place is safe. A pass takes about
`W*H + NSTAGES*(W+3) + 3` cycles. The frame size is latched when the pass
starts.

The wavefront must not be allowed to run into the frame's edge. A wave that
meets that wall gets distorted, and its wires are no longer guaranteed to be
shortest. With two stages, one pass can advance the wave 2 cells. So a host
that grows the frame as soon as a pass reports `frame_hit` keeps every
result exact. The first boundary cell that is reached is itself correct, and
so is one step beyond it. With more stages, the host must keep a margin of
at least `NSTAGES-1` cells between the wave and the frame.

### Host commands

A command is taken on a cycle where `cmd_valid` and `cmd_ready` are both
high. `cmd_ready` is low while a read or a pass is running.

| `cmd_op` | action | response |
|---|---|---|
| `CMD_WRITE` | `grid[cmd_addr] <= cmd_data[7:0]` | none |
| `CMD_READ` | read `grid[cmd_addr]` | `rsp_valid` 2 cycles later, cell in `rsp_data[7:0]` |
| `CMD_FRAME` | origin cell `cmd_addr`, width `cmd_data[15:0]`, height `cmd_data[31:16]` | none |
| `CMD_PROGRAM` | operation of stage k = `cmd_data[2k+1:2k]` | none |
| `CMD_PASS` | one pass over the frame | at the end, `rsp_data[2:0] = {frame_hit, target_hit, changed}` |

Addresses: cell (x, y) is at `y*GRID_W + x`. After reset the frame is the
whole grid and every stage is set to `OP_PASS`. An assertion checks that
every frame is non-empty and lies inside the grid.

## Routing with the machine

The host does all the sequential work. In this repository, the testbench
model `tb/tb_host.sv` plays the host. Its procedure for one connection:

1. Write the cells of the source (or of the tree routed so far) as
   `source|reached`, and the unconnected terminals as `target`.
2. Set a frame: the tree's bounding box plus a margin (2 cells to start).
3. Run `OP_EXPAND` passes until one of these happens:
   * `target_hit`: go to step 4;
   * `frame_hit`: double the margin;
   * no change with the frame already covering the whole plane: the net is
     unroutable.
4. Find the target that was reached. Back-trace from it by reading cells
   and following `dir` until a `source` cell.
5. Run an `OP_CLEAN` pass over the frame.

An n-point net is built one terminal at a time: each newly traced wire joins
the tree. When the net is finished, its cells are written as obstacles for
the nets that follow.

## Parameters

| Parameter | Default | Where |
|---|---|---|
| `GRID_W`, `GRID_H` | 512, 512 | `raster_top`, `pipe_controller` (frames up to the full grid) |
| `NSTAGES` | 2 | `raster_top`, `stage_pipeline` |
| `MAX_W`, `MAX_H` | 512, 512 | `raster_stage`, `stage_pipeline` (largest frame) |
| `DEPTH` | 262144 | `grid_buffer` (= `GRID_W*GRID_H` in the top) |
| `CELL_W` | 8 | `raster_pkg` |

At the defaults the grid buffer holds one 512 x 512 grid (2 Mbit), and each
stage has two 512 x 8 line buffers. The throughput is one cell per clock. At
the 480K cells/s of the original machine, one pass over the whole grid takes
0.55 s. Eight stages at 2M cells/s need `NSTAGES = 8` and a 2 MHz clock.

## Simulating

All testbenches check themselves and end with a line
`TB_RESULT checks=N failures=M`. Run one with Verilator 5 like this:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/raster_pkg.sv tb/tb_raster_top.sv --top-module tb_raster_top
./obj_dir/Vtb_raster_top
```

The unit testbenches that use the reference rules also need
`tb/tb_ref_pkg.sv` on the command line, right after `rtl/raster_pkg.sv`.

| Testbench | What it checks |
|---|---|
| `tb_line_buffer` | the delay equals the programmed length, for lengths 1 to 16 |
| `tb_nbhd_window` | the window contents follow the shifts |
| `tb_subarray_proc` | 20,000 random neighbourhoods against a separately written copy of the rules (`tb_ref_pkg`) |
| `tb_raster_stage` | frames from 1 x 1 to 16 x 12, all operations; each cell and its flags; latency `W+3`; one cell per cycle |
| `tb_stage_pipeline` | 3 stages with mixed operations against three reference steps; pass flags; latency `3*(W+3)` |
| `tb_grid_buffer` | random reads and writes, including a read and a write to the same address in one cycle |
| `tb_pipe_controller` | commands and passes over random frames, with a model memory and a model pipe; pass cycle count |
| `tb_raster_top` | 32 x 32 grid: a detour round a wall, a single-stage route, a top-row net whose target the first stage reaches, a 4-point net, an unroutable net; the whole grid read back; every mechanism counted |
| `tb_raster_top_full` | default 512 x 512 machine: a 32-cell diagonal 2-point net, a 4-point net, a full-plane clean-up, the whole grid read back |
| `tb_bench_2point` | 512 x 512 grid, single expanding stage: diagonal 2-point nets of length 4 to 512; each wire must be exactly that long |
| `tb_bench_4point` | 512 x 512 grid, single expanding stage: 4-point nets at five sizes |
| `tb_bench_pcb` | an 80 x 120-cell board (8 x 12 inches at a 0.1 inch grid) with 250 random 2-point nets, routed greedily: every net is tried on layer 1, and the failures are tried again on layer 2 |

Each wire is also checked against a breadth-first search over the host's own
obstacle map, and every pass is checked to take at most
`W*H + NSTAGES*(W+3) + 8` cycles.

Pipeline cycles spent in passes on the 2-point benchmark, with the host's
margin-doubling frames and one expanding stage:

| wire length | 8 | 32 | 128 | 512 |
|---|---|---|---|---|
| passes | 9 | 33 | 129 | 513 |
| pass cycles | 1,982 | 85,198 | 4.95 M | 106 M |

Once the frames reach full size, the cost per step is about one full-grid
pass. A better framing strategy on the host side, or more stages, reduces
the count.

On the two-layer board, with the pads of every net blocking both layers,
one run routed 75 nets on layer 1 and 59 on layer 2. The other 116 nets had
no path at all. This is a coarse grid with random nets, so the numbers say
more about the test than about the machine.

`tb_bench_2point` runs for about 1.5 minutes and `tb_bench_pcb` for about
45 s. The other testbenches take seconds.

## Where this design makes its own choices

* **Cell encoding and rules.** The 8-bit layout, the N/E/S/W priority, and
  direction pointers (rather than distance labels) for the back-trace are
  choices of this design.
* **Stage programmability.** Each stage has three fixed operations. The
  original machine's stages were programmed with general neighbourhood
  functions, and this RTL does not model that.
* **Frame handling.** Streaming only the frame, making the line-buffer
  length programmable, treating the frame edge as a wall, and reporting
  `frame_hit` so the host can grow the frame are all choices of this design.
* **Buffer size.** The buffer size, "256K", is read as 256K cells of 8 bits:
  exactly one 512 x 512 grid.
* **Host interface.** The command set, its encoding, the valid/ready
  handshake and the one-cycle response pulse are this design's own.
* **Reset.** Reset is asynchronous and active-low. It clears the controller
  and the stage counters, but not the grid buffer, the line buffers or the
  window. The host must load the grid before use.

Things that are not in the RTL:

* the host computer and its software: framing strategy, back-trace, net
  ordering, and the choice of layer on a two-layer board;
* any physical clock rate.
