// raster_top: the raster pipeline subarray machine.
//
// A host computer drives the machine through one command port. The routing
// grid lives in the grid buffer; each pass command streams the current frame
// of the grid through a pipeline of NSTAGES programmable raster stages and
// back, so a pass with every stage set to OP_EXPAND advances a Lee wavefront
// by NSTAGES cells in time proportional to the frame's area. Back-trace of a
// wire, the choice of frames and the net order are the host's work. The
// defaults are a 512 x 512 grid of 8-bit cells and two stages, the
// configuration of the machine this design follows.
//
// Interface: the command port of pipe_controller (see there for the
// commands and their timing), with addresses of $clog2(GRID_W*GRID_H) bits
// (cell (x, y) is at y*GRID_W + x). `busy` is high while a read or a pass is
// in progress.
module raster_top
  import raster_pkg::*;
#(
  parameter int unsigned GRID_W  = 512,
  parameter int unsigned GRID_H  = 512,
  parameter int unsigned NSTAGES = 2,
  localparam int unsigned ADDR_W = $clog2(GRID_W * GRID_H),
  localparam int unsigned LEN_W  = $clog2(GRID_W + 1),
  localparam int unsigned ROW_W  = $clog2(GRID_H + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  host_cmd_e         cmd_op,
  input  logic [ADDR_W-1:0] cmd_addr,
  input  logic [31:0]       cmd_data,
  output logic              rsp_valid,
  output logic [31:0]       rsp_data,
  output logic              busy
);

  logic                    gb_rd_en, gb_wr_en;
  logic [ADDR_W-1:0]       gb_rd_addr, gb_wr_addr;
  cell_t                   gb_rd_data, gb_wr_data;
  logic                    p_start, p_in_valid, p_out_valid, p_busy;
  stage_op_e [NSTAGES-1:0] p_ops;
  logic [LEN_W-1:0]        p_line_len;
  logic [ROW_W-1:0]        p_num_rows;
  cell_t                   p_in_cell, p_out_cell;
  pass_flags_t             p_out_flags;

  pipe_controller #(.GRID_W(GRID_W), .GRID_H(GRID_H), .NSTAGES(NSTAGES)) u_ctrl (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_op, .cmd_addr, .cmd_data, .rsp_valid, .rsp_data,
    .gb_rd_en, .gb_rd_addr, .gb_rd_data, .gb_wr_en, .gb_wr_addr, .gb_wr_data,
    .p_start, .p_ops, .p_line_len, .p_num_rows, .p_in_valid, .p_in_cell,
    .p_out_valid, .p_out_cell, .p_out_flags, .p_busy
  );

  grid_buffer #(.DEPTH(GRID_W * GRID_H), .DATA_W(CELL_W)) u_grid (
    .clk, .rd_en(gb_rd_en), .rd_addr(gb_rd_addr), .rd_data(gb_rd_data),
    .wr_en(gb_wr_en), .wr_addr(gb_wr_addr), .wr_data(gb_wr_data)
  );

  stage_pipeline #(.NSTAGES(NSTAGES), .MAX_W(GRID_W), .MAX_H(GRID_H)) u_pipe (
    .clk, .rst_n, .start(p_start), .ops(p_ops), .line_len(p_line_len),
    .num_rows(p_num_rows), .in_valid(p_in_valid), .in_cell(p_in_cell),
    .out_valid(p_out_valid), .out_cell(p_out_cell), .out_flags(p_out_flags),
    .busy(p_busy)
  );

  assign busy = !cmd_ready;

endmodule
