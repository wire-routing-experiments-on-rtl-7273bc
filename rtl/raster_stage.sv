// raster_stage: one raster subarray processor, one stage of the pipeline.
//
// The grid arrives as a raster-order stream of cells (row by row, each row
// west to east). Two line buffers keep the two previous rows, and a 3x3
// shift-register window (nbhd_window) presents every cell together with its
// eight neighbours to the subarray processor, which computes the cell's new
// value. The output stream has the same raster format as the input, so
// stages chain into a pipeline. This organisation follows the single-stage
// diagram of the machine; the counters, flushing and masking are this
// design's own.
//
// A pass covers a frame of num_rows rows of line_len cells (the bounding
// rectangle being worked on). Row and column counters of the centre cell
// replace every neighbour outside the frame by an obstacle, so the frame
// edge acts as a wall. After the last input cell the stage shifts itself
// line_len+2 more times to push out the last row; it then drops `busy`.
//
// Interface and timing: pulse `start` (with line_len, num_rows and op
// stable; they are latched) before the first cell. One cell is taken on each
// cycle with in_valid high; gaps are allowed, and exactly line_len*num_rows
// cells must be sent. The result for an input cell appears on
// out_valid/out_cell line_len+3 cycles after it when the input is
// continuous, together with that cell's flags. The throughput is one cell per
// cycle.
module raster_stage
  import raster_pkg::*;
#(
  parameter int unsigned MAX_W = 512,
  parameter int unsigned MAX_H = 512,
  localparam int unsigned LEN_W  = $clog2(MAX_W + 1),
  localparam int unsigned ROW_W  = $clog2(MAX_H + 1),
  localparam int unsigned TICK_W = $clog2(MAX_W * MAX_H + MAX_W + 3)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  stage_op_e         op,
  input  logic [LEN_W-1:0]  line_len,
  input  logic [ROW_W-1:0]  num_rows,
  input  logic              in_valid,
  input  cell_t             in_cell,
  output logic              out_valid,
  output cell_t             out_cell,
  output pass_flags_t       out_flags,
  output logic              busy
);

  logic [LEN_W-1:0]  len_r;
  logic [ROW_W-1:0]  rows_r;
  stage_op_e         op_r;
  logic [TICK_W-1:0] total, tick, first_out, last_tick;
  logic [LEN_W-1:0]  cc;   // centre column
  logic [ROW_W-1:0]  cr;   // centre row
  logic              in_phase, advance, produce;

  assign total     = TICK_W'(len_r) * TICK_W'(rows_r);
  assign first_out = TICK_W'(len_r) + TICK_W'(2);
  assign last_tick = total + first_out;          // ticks run 0 .. last_tick-1
  assign in_phase  = tick < total;
  assign advance   = busy && (in_phase ? in_valid : 1'b1);
  assign produce   = advance && (tick >= first_out);

  // ---- row storage and neighbourhood ------------------------------------
  cell_t                 lb0_out, lb1_out;
  logic [2:0][CELL_W-1:0] row_in;
  logic [2:0][2:0][CELL_W-1:0] win_raw;

  line_buffer #(.MAX_LEN(MAX_W), .DATA_W(CELL_W)) u_lb0 (
    .clk, .rst_n, .clear(start), .len(len_r), .advance,
    .din(in_cell), .dout(lb0_out)
  );
  line_buffer #(.MAX_LEN(MAX_W), .DATA_W(CELL_W)) u_lb1 (
    .clk, .rst_n, .clear(start), .len(len_r), .advance,
    .din(lb0_out), .dout(lb1_out)
  );

  assign row_in[2] = in_cell;
  assign row_in[1] = lb0_out;
  assign row_in[0] = lb1_out;

  nbhd_window #(.DATA_W(CELL_W)) u_win (
    .clk, .advance, .row_in, .win(win_raw)
  );

  // ---- frame masking ----------------------------------------------------
  logic top_ok, bot_ok, west_ok, east_ok, on_edge;
  cell_t [2:0][2:0] nb;

  assign top_ok  = cr != '0;
  assign bot_ok  = ROW_W'(cr + ROW_W'(1)) != rows_r;
  assign west_ok = cc != '0;
  assign east_ok = LEN_W'(cc + LEN_W'(1)) != len_r;
  assign on_edge = !(top_ok && bot_ok && west_ok && east_ok);

  always_comb begin
    for (int r = 0; r < 3; r++) begin
      for (int c = 0; c < 3; c++) begin
        logic ok;
        ok = 1'b1;
        if (r == 0 && !top_ok)  ok = 1'b0;
        if (r == 2 && !bot_ok)  ok = 1'b0;
        if (c == 0 && !east_ok) ok = 1'b0;
        if (c == 2 && !west_ok) ok = 1'b0;
        nb[r][c] = ok ? cell_t'(win_raw[r][c]) : BORDER_CELL;
      end
    end
  end

  cell_t       result;
  pass_flags_t flags;

  subarray_proc u_proc (
    .op(op_r), .nb, .on_edge, .result, .flags
  );

  // ---- sequencing -------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      tick      <= '0;
      cc        <= '0;
      cr        <= '0;
      len_r     <= LEN_W'(1);
      rows_r    <= ROW_W'(1);
      op_r      <= OP_PASS;
      out_valid <= 1'b0;
      out_cell  <= FREE_CELL;
      out_flags <= '0;
    end else begin
      out_valid <= 1'b0;
      out_flags <= '0;
      if (start) begin
        busy   <= 1'b1;
        tick   <= '0;
        cc     <= '0;
        cr     <= '0;
        len_r  <= line_len;
        rows_r <= num_rows;
        op_r   <= op;
      end else if (advance) begin
        tick <= tick + TICK_W'(1);
        if (tick + TICK_W'(1) == last_tick) busy <= 1'b0;
        if (produce) begin
          out_valid <= 1'b1;
          out_cell  <= result;
          out_flags <= flags;
          if (!east_ok) begin
            cc <= '0;
            cr <= cr + ROW_W'(1);
          end else begin
            cc <= cc + LEN_W'(1);
          end
        end
      end
    end
  end

  // A cell must not arrive outside the input phase of a pass.
  a_in_phase: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (busy && in_phase && !start));

endmodule
