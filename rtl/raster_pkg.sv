// raster_pkg: types and constants shared by the raster pipeline subarray
// machine.
//
// A grid cell is 8 bits, as on the machine the design follows. How those 8
// bits are used is this design's own choice, made for unit-cost Lee routing:
//   bit 7    obstacle  - blocked: a pre-placed feature or an already routed wire
//   bit 6    reached   - the cell is on or behind the wavefront
//   bit 5    source    - the net's source cell(s)
//   bit 4    target    - a terminal still to be connected
//   bits 3:2 unused, always written as zero by the clean-up operation
//   bits 1:0 dir       - direction back to the neighbour this cell was reached
//                        from; the host follows these pointers to back-trace
// Stage operations and host command codes live here too.
package raster_pkg;

  localparam int unsigned CELL_W = 8;

  // Direction back towards the predecessor cell on the wavefront.
  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_E = 2'd1,
    DIR_S = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  typedef struct packed {
    logic       obstacle;
    logic       reached;
    logic       source;
    logic       target;
    logic [1:0] unused;
    dir_e       dir;
  } cell_t;

  // Value read for a neighbour that lies outside the frame: a wall.
  localparam cell_t BORDER_CELL = '{obstacle: 1'b1, reached: 1'b0, source: 1'b0,
                                    target: 1'b0, unused: 2'b00, dir: DIR_N};
  localparam cell_t FREE_CELL   = '0;

  // What one stage does to every cell that streams through it.
  typedef enum logic [1:0] {
    OP_PASS   = 2'd0,  // copy the cell unchanged
    OP_EXPAND = 2'd1,  // one Lee wavefront-expansion step
    OP_CLEAN  = 2'd2   // grid clean-up: everything but obstacles becomes free
  } stage_op_e;

  // Per-cell and per-pass status.
  typedef struct packed {
    logic frame_hit;   // a cell on the frame boundary was expanded
    logic target_hit;  // a target cell was expanded
    logic changed;     // some cell was changed
  } pass_flags_t;

  // Host commands.
  typedef enum logic [2:0] {
    CMD_WRITE   = 3'd0,  // grid[addr] <= data[7:0]
    CMD_READ    = 3'd1,  // respond with grid[addr]
    CMD_FRAME   = 3'd2,  // frame origin = addr, width = data[15:0], height = data[31:16]
    CMD_PROGRAM = 3'd3,  // stage k operation = data[2k+1:2k]
    CMD_PASS    = 3'd4   // stream the frame through the pipe once; respond with flags
  } host_cmd_e;

endpackage
