// tb_pipe_controller: self-checking test of the host interface and pass
// sequencer.
// The grid buffer and the pipeline are replaced by simple testbench models:
// a memory array with a one-cycle read, and a delay line of fixed latency
// that inverts some bits of every cell and raises flags taken from the
// cell's bits, some at the pipe's end and some halfway along it, where no
// result leaves the pipe in the same cycle. The test writes and reads back cells, programs the
// stages, and runs passes over random frames; after each pass the cells
// inside the frame must have been transformed exactly once, the cells outside
// untouched, the response must be the OR of the flags, and the pass must
// take width*height + latency + a few cycles.
module tb_pipe_controller;
  import raster_pkg::*;
  localparam int unsigned GRID_W = 16, GRID_H = 8, NSTAGES = 2, LAT = 10;
  localparam int unsigned DEPTH = GRID_W * GRID_H;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, rsp_valid;
  host_cmd_e cmd_op;
  logic [6:0] cmd_addr;
  logic [31:0] cmd_data, rsp_data;
  logic gb_rd_en, gb_wr_en;
  logic [6:0] gb_rd_addr, gb_wr_addr;
  cell_t gb_rd_data, gb_wr_data;
  logic p_start, p_in_valid, p_out_valid, p_busy;
  stage_op_e [NSTAGES-1:0] p_ops;
  logic [4:0] p_line_len;
  logic [3:0] p_num_rows;
  cell_t p_in_cell, p_out_cell;
  pass_flags_t p_out_flags;
  int checks = 0, failures = 0;

  pipe_controller #(.GRID_W(GRID_W), .GRID_H(GRID_H), .NSTAGES(NSTAGES)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // grid buffer model
  logic [7:0] mem [DEPTH];
  always @(posedge clk) begin
    if (gb_rd_en) gb_rd_data <= cell_t'(mem[gb_rd_addr]);
    if (gb_wr_en) mem[gb_wr_addr] <= gb_wr_data;
  end

  // pipeline model: fixed latency, cell ^ 8'h5A, flags = low bits of the cell
  logic [LAT-1:0] dv;
  cell_t dc [LAT];
  int pend = 0;
  always @(posedge clk) begin
    dv <= {dv[LAT-2:0], p_in_valid};
    dc[0] <= p_in_cell;
    for (int i = 1; i < LAT; i++) dc[i] <= dc[i-1];
    pend <= pend + int'(p_in_valid) - int'(dv[LAT-1]);
  end
  assign p_out_valid = dv[LAT-1];
  assign p_out_cell  = cell_t'(dc[LAT-1] ^ 8'h5A);
  // Flags also come from a model "first stage" halfway down the delay line,
  // on cycles when no result leaves the pipe.
  assign p_out_flags = (dv[LAT-1] ? pass_flags_t'(dc[LAT-1][2:0]) : '0) |
                       (dv[LAT/2] ? pass_flags_t'(dc[LAT/2][5:3]) : '0);
  assign p_busy      = pend != 0 || dv != '0;

  longint cyc = 0;
  always @(posedge clk) cyc++;

  task automatic cmd(host_cmd_e op, int addr, logic [31:0] data);
    @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_addr = 7'(addr); cmd_data = data;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk) cmd_valid = 0;
  endtask

  task automatic wait_rsp(output logic [31:0] d, output longint at);
    while (!rsp_valid) @(posedge clk);
    d = rsp_data; at = cyc;
    @(negedge clk);
  endtask

  initial begin
    logic [7:0] ref_m [DEPTH];
    logic [31:0] d;
    longint t0, t1;
    dv = '0;
    cmd_op = CMD_WRITE; cmd_addr = '0; cmd_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load the grid
    for (int a = 0; a < DEPTH; a++) begin
      ref_m[a] = 8'($urandom);
      cmd(CMD_WRITE, a, 32'(ref_m[a]));
    end
    // read back a few
    for (int i = 0; i < 20; i++) begin
      automatic int a = $urandom_range(0, DEPTH - 1);
      cmd(CMD_READ, a, 0);
      wait_rsp(d, t1);
      checks++;
      if (d[7:0] !== ref_m[a]) begin
        failures++;
        $display("read %0d: got %h want %h", a, d[7:0], ref_m[a]);
      end
    end
    // program
    cmd(CMD_PROGRAM, 0, {28'd0, OP_CLEAN, OP_EXPAND});
    checks++;
    if (p_ops[0] !== OP_EXPAND || p_ops[1] !== OP_CLEAN) begin
      failures++;
      $display("program not applied: %b", p_ops);
    end
    // passes over random frames
    for (int i = 0; i < 12; i++) begin
      automatic int x0 = $urandom_range(0, GRID_W - 1), y0 = $urandom_range(0, GRID_H - 1);
      automatic int w  = $urandom_range(1, GRID_W - x0), h = $urandom_range(1, GRID_H - y0);
      automatic logic [2:0] wf = '0;
      if (i == 0) begin x0 = 0; y0 = 0; w = GRID_W; h = GRID_H; end
      cmd(CMD_FRAME, y0 * GRID_W + x0, {16'(h), 16'(w)});
      t0 = cyc + 1;
      cmd(CMD_PASS, 0, 0);
      wait_rsp(d, t1);
      checks += 3;
      if (p_line_len !== 5'(w) || p_num_rows !== 4'(h)) begin
        failures++;
        $display("frame size %0d x %0d on the pipe, want %0d x %0d", p_line_len, p_num_rows, w, h);
      end
      for (int y = 0; y < GRID_H; y++)
        for (int x = 0; x < GRID_W; x++)
          if (x >= x0 && x < x0 + w && y >= y0 && y < y0 + h) begin
            wf |= ref_m[y*GRID_W+x][2:0] | ref_m[y*GRID_W+x][5:3];
            ref_m[y*GRID_W+x] ^= 8'h5A;
          end
      if (d[2:0] !== wf) begin
        failures++;
        $display("pass %0d: flags %b want %b", i, d[2:0], wf);
      end
      if (t1 - t0 > longint'(w * h + LAT + 6) || t1 - t0 < longint'(w * h + LAT)) begin
        failures++;
        $display("pass %0d took %0d cycles for %0d cells", i, t1 - t0, w * h);
      end
      for (int a = 0; a < DEPTH; a++) begin
        checks++;
        if (mem[a] !== ref_m[a]) begin
          failures++;
          if (failures < 10) $display("pass %0d cell %0d: %h want %h", i, a, mem[a], ref_m[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
