// pipe_controller: host interface and pass sequencer of the machine.
//
// Every action of the router is a host command: load or read grid cells, set
// the frame (the bounding rectangle the next passes work on), program the
// operation of each stage, and run one pass through the pipeline. A pass
// streams the frame, row by row, from the grid buffer into the pipeline and
// writes the pipeline's output back into the same cells; a cell is always
// read long before its result is written, so the update in place is safe.
// The flags raised by any stage during the pass (a cell changed, a target was
// reached, the frame boundary was reached) are collected and returned as the
// command's response, which is how the host tests for the end of an
// expansion. Only the frame is streamed, so a pass costs frame-area cycles.
// The command set follows the operations the router needs; its encoding and
// the handshake are this design's own.
//
// Interface: a command is taken on a cycle with cmd_valid and cmd_ready
// high (cmd_ready is low while a read or a pass is in progress).
//   CMD_WRITE   grid[cmd_addr] <= cmd_data[7:0]              (1 cycle)
//   CMD_READ    rsp_data = grid[cmd_addr], rsp_valid 2 cycles later
//   CMD_FRAME   origin cell = cmd_addr, width = cmd_data[15:0],
//               height = cmd_data[31:16]; the frame must lie inside the grid
//   CMD_PROGRAM stage k operation = cmd_data[2k+1:2k]
//   CMD_PASS    one pass; rsp_valid with rsp_data[2:0] = {frame_hit,
//               target_hit, changed} at its end, about
//               width*height + NSTAGES*(width+3) + 3 cycles after the command
// rsp_valid is a one-cycle pulse. Bits of cmd_data above the frame-size
// fields, and above the stage fields for CMD_PROGRAM, are ignored.
module pipe_controller
  import raster_pkg::*;
#(
  parameter int unsigned GRID_W  = 512,
  parameter int unsigned GRID_H  = 512,
  parameter int unsigned NSTAGES = 2,
  localparam int unsigned ADDR_W = $clog2(GRID_W * GRID_H),
  localparam int unsigned LEN_W  = $clog2(GRID_W + 1),
  localparam int unsigned ROW_W  = $clog2(GRID_H + 1),
  localparam int unsigned CNT_W  = $clog2(GRID_W * GRID_H + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // host command port
  input  logic                    cmd_valid,
  output logic                    cmd_ready,
  input  host_cmd_e               cmd_op,
  input  logic [ADDR_W-1:0]       cmd_addr,
  input  logic [31:0]             cmd_data,
  output logic                    rsp_valid,
  output logic [31:0]             rsp_data,
  // grid buffer
  output logic                    gb_rd_en,
  output logic [ADDR_W-1:0]       gb_rd_addr,
  input  cell_t                   gb_rd_data,
  output logic                    gb_wr_en,
  output logic [ADDR_W-1:0]       gb_wr_addr,
  output cell_t                   gb_wr_data,
  // stage pipeline
  output logic                    p_start,
  output stage_op_e [NSTAGES-1:0] p_ops,
  output logic [LEN_W-1:0]        p_line_len,
  output logic [ROW_W-1:0]        p_num_rows,
  output logic                    p_in_valid,
  output cell_t                   p_in_cell,
  input  logic                    p_out_valid,
  input  cell_t                   p_out_cell,
  input  pass_flags_t             p_out_flags,
  input  logic                    p_busy
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_PASS, S_DONE} state_e;
  state_e state;

  // frame and program registers
  logic [ADDR_W-1:0] f_base;
  logic [LEN_W-1:0]  f_w;
  logic [ROW_W-1:0]  f_h;
  logic [CNT_W-1:0]  f_total;

  // read side (grid buffer -> pipe) and write side (pipe -> grid buffer)
  logic [ADDR_W-1:0] rd_row, wr_row;
  logic [LEN_W-1:0]  rd_col, wr_col;
  logic [CNT_W-1:0]  rd_cnt, wr_cnt;
  logic              rd_pending;
  pass_flags_t       acc;

  logic accept, rd_go;
  assign cmd_ready = (state == S_IDLE);
  assign accept    = cmd_valid && cmd_ready;
  assign rd_go     = (state == S_PASS) && (rd_cnt != f_total);
  assign f_total   = CNT_W'(f_w) * CNT_W'(f_h);

  assign p_start    = accept && cmd_op == CMD_PASS;
  assign p_line_len = f_w;
  assign p_num_rows = f_h;
  assign p_in_valid = rd_pending;
  assign p_in_cell  = gb_rd_data;

  always_comb begin
    gb_rd_en   = 1'b0;
    gb_rd_addr = cmd_addr;
    if (accept && cmd_op == CMD_READ) begin
      gb_rd_en = 1'b1;
    end else if (rd_go) begin
      gb_rd_en   = 1'b1;
      gb_rd_addr = rd_row + ADDR_W'(rd_col);
    end
  end

  always_comb begin
    gb_wr_en   = 1'b0;
    gb_wr_addr = cmd_addr;
    gb_wr_data = cell_t'(cmd_data[CELL_W-1:0]);
    if (accept && cmd_op == CMD_WRITE) begin
      gb_wr_en = 1'b1;
    end else if (state != S_IDLE && p_out_valid) begin
      gb_wr_en   = 1'b1;
      gb_wr_addr = wr_row + ADDR_W'(wr_col);
      gb_wr_data = p_out_cell;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      f_base     <= '0;
      f_w        <= LEN_W'(GRID_W);
      f_h        <= ROW_W'(GRID_H);
      p_ops      <= '0;
      rd_row     <= '0;
      rd_col     <= '0;
      rd_cnt     <= '0;
      wr_row     <= '0;
      wr_col     <= '0;
      wr_cnt     <= '0;
      rd_pending <= 1'b0;
      acc        <= '0;
      rsp_valid  <= 1'b0;
      rsp_data   <= '0;
    end else begin
      rsp_valid  <= 1'b0;
      rd_pending <= rd_go;
      unique case (state)
        S_IDLE: if (accept) begin
          unique case (cmd_op)
            CMD_READ:  state <= S_READ;
            CMD_FRAME: begin
              f_base <= cmd_addr;
              f_w    <= cmd_data[LEN_W-1:0];
              f_h    <= cmd_data[16 +: ROW_W];
            end
            CMD_PROGRAM: p_ops <= cmd_data[2*NSTAGES-1:0];
            CMD_PASS: begin
              state  <= S_PASS;
              rd_row <= f_base;
              rd_col <= '0;
              rd_cnt <= '0;
              wr_row <= f_base;
              wr_col <= '0;
              wr_cnt <= '0;
              acc    <= '0;
            end
            default: ;  // CMD_WRITE is done combinationally
          endcase
        end
        S_READ: begin
          rsp_valid <= 1'b1;
          rsp_data  <= 32'(gb_rd_data);
          state     <= S_IDLE;
        end
        S_PASS: begin
          if (rd_go) begin
            rd_cnt <= rd_cnt + CNT_W'(1);
            if (LEN_W'(rd_col + LEN_W'(1)) == f_w) begin
              rd_col <= '0;
              rd_row <= rd_row + ADDR_W'(GRID_W);
            end else begin
              rd_col <= rd_col + LEN_W'(1);
            end
          end
          // Earlier stages raise flags while the last one is still filling,
          // so flags are collected on every cycle, not only with a result.
          acc <= acc | p_out_flags;
          if (p_out_valid) begin
            wr_cnt <= wr_cnt + CNT_W'(1);
            if (LEN_W'(wr_col + LEN_W'(1)) == f_w) begin
              wr_col <= '0;
              wr_row <= wr_row + ADDR_W'(GRID_W);
            end else begin
              wr_col <= wr_col + LEN_W'(1);
            end
            if (wr_cnt + CNT_W'(1) == f_total) state <= S_DONE;
          end
        end
        S_DONE: if (!p_busy) begin
          rsp_valid <= 1'b1;
          rsp_data  <= 32'(acc);
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The frame must be non-empty and lie inside the grid.
  a_frame: assert property (@(posedge clk) disable iff (!rst_n)
    (accept && cmd_op == CMD_FRAME) |->
      (cmd_data[LEN_W-1:0] != 0 && cmd_data[16 +: ROW_W] != 0 &&
       (int'(cmd_addr) % GRID_W) + int'(cmd_data[LEN_W-1:0]) <= GRID_W &&
       (int'(cmd_addr) / GRID_W) + int'(cmd_data[16 +: ROW_W]) <= GRID_H));
  // Results arrive only during a pass.
  a_out: assert property (@(posedge clk) disable iff (!rst_n)
    p_out_valid |-> state == S_PASS);

endmodule
