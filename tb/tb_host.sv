// tb_host: behavioural model of the host computer and its router program,
// for the system testbenches.
//
// The host owns everything sequential: it loads the grid, places obstacles,
// and routes n-point nets on a unit-cost grid. For each connection it marks
// the partial tree as source cells and the unconnected terminals as targets,
// then repeats expansion passes in a frame around the tree. It grows the
// frame (doubling its margin) whenever a pass reports that the wavefront
// reached the frame boundary, and stops when a target is reached or, with
// the frame covering the whole plane, nothing changed any more (unroutable).
// It back-traces the wire by following the cells' direction pointers,
// checks that the wire is as short as a breadth-first search of its own
// obstacle map says it must be, cleans the grid up with a clean-up pass and
// finally stores the finished net as obstacle cells.
//
// It counts every mechanism it used (passes, target hits, frame hits and
// growths, clean-up passes, unroutable connections, passes with an idle
// stage) and checks each pass's cycle count against one cell per cycle.
module tb_host
  import raster_pkg::*;
#(
  parameter int unsigned GRID_W  = 32,
  parameter int unsigned GRID_H  = 32,
  parameter int unsigned NSTAGES = 2,
  localparam int unsigned ADDR_W = $clog2(GRID_W * GRID_H),
  localparam int unsigned CELLS  = GRID_W * GRID_H
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              cmd_valid,
  input  logic              cmd_ready,
  output host_cmd_e         cmd_op,
  output logic [ADDR_W-1:0] cmd_addr,
  output logic [31:0]       cmd_data,
  input  logic              rsp_valid,
  input  logic [31:0]       rsp_data
);

  int checks = 0, failures = 0;
  int n_pass = 0, n_target_hit = 0, n_frame_hit = 0, n_frame_grow = 0;
  int n_clean = 0, n_unroutable = 0, n_idle_stage = 0, n_no_change = 0;
  longint pass_cycles = 0;

  logic   obs  [CELLS];
  int     dmap [CELLS];
  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    cmd_valid = 0; cmd_op = CMD_WRITE; cmd_addr = '0; cmd_data = '0;
  end

  function automatic int A(int x, int y);
    return y * int'(GRID_W) + x;
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("host: %s", msg);
  endtask

  task automatic cmd(host_cmd_e op, int addr, logic [31:0] data);
    @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_addr = ADDR_W'(addr); cmd_data = data;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk) cmd_valid = 0;
  endtask

  task automatic wait_rsp(output logic [31:0] d);
    while (!rsp_valid) @(posedge clk);
    d = rsp_data;
    @(negedge clk);
  endtask

  task automatic write_cell(int x, int y, cell_t c);
    cmd(CMD_WRITE, A(x, y), 32'(c));
  endtask

  task automatic read_cell(int x, int y, output cell_t c);
    logic [31:0] d;
    cmd(CMD_READ, A(x, y), 0);
    wait_rsp(d);
    c = cell_t'(d[7:0]);
  endtask

  task automatic clear_grid();
    for (int a = 0; a < int'(CELLS); a++) begin
      cmd(CMD_WRITE, a, 0);
      obs[a] = 0;
    end
  endtask

  task automatic set_obstacle(int x, int y);
    cell_t c = '0;
    c.obstacle = 1;
    write_cell(x, y, c);
    obs[A(x, y)] = 1;
  endtask

  // frame in cell coordinates, inclusive corners
  int fx0, fy0, fx1, fy1;
  task automatic set_frame(int x0, int y0, int x1, int y1);
    fx0 = x0 < 0 ? 0 : x0;
    fy0 = y0 < 0 ? 0 : y0;
    fx1 = x1 >= int'(GRID_W) ? int'(GRID_W) - 1 : x1;
    fy1 = y1 >= int'(GRID_H) ? int'(GRID_H) - 1 : y1;
    cmd(CMD_FRAME, A(fx0, fy0), {16'(fy1 - fy0 + 1), 16'(fx1 - fx0 + 1)});
  endtask

  function automatic bit frame_full();
    return fx0 == 0 && fy0 == 0 && fx1 == int'(GRID_W) - 1 && fy1 == int'(GRID_H) - 1;
  endfunction

  // One pass: program, stream, collect flags, check the time it took.
  task automatic pass(stage_op_e op, int stages_used, output pass_flags_t f);
    logic [31:0] prog = '0, d;
    longint t0;
    int w = fx1 - fx0 + 1, h = fy1 - fy0 + 1;
    for (int k = 0; k < int'(NSTAGES); k++)
      prog[2*k +: 2] = (k < stages_used) ? op : OP_PASS;
    if (stages_used < int'(NSTAGES)) n_idle_stage++;
    cmd(CMD_PROGRAM, 0, prog);
    t0 = cyc;
    cmd(CMD_PASS, 0, 0);
    wait_rsp(d);
    f = pass_flags_t'(d[2:0]);
    n_pass++;
    pass_cycles += cyc - t0;
    checks++;
    if (cyc - t0 > longint'(w * h + int'(NSTAGES) * (w + 3) + 8))
      fail($sformatf("pass over %0dx%0d took %0d cycles", w, h, cyc - t0));
    if (op == OP_CLEAN) n_clean++;
  endtask

  // Breadth-first distances from the tree over the host's obstacle map.
  task automatic bfs(int tx[$], int ty[$]);
    int q[$];
    for (int a = 0; a < int'(CELLS); a++) dmap[a] = -1;
    foreach (tx[i]) begin
      dmap[A(tx[i], ty[i])] = 0;
      q.push_back(A(tx[i], ty[i]));
    end
    while (q.size() > 0) begin
      int a = q.pop_front();
      int x = a % int'(GRID_W), y = a / int'(GRID_W);
      int nx[4] = '{x, x + 1, x, x - 1};
      int ny[4] = '{y - 1, y, y + 1, y};
      for (int d = 0; d < 4; d++)
        if (nx[d] >= 0 && ny[d] >= 0 && nx[d] < int'(GRID_W) && ny[d] < int'(GRID_H) &&
            !obs[A(nx[d], ny[d])] && dmap[A(nx[d], ny[d])] < 0) begin
          dmap[A(nx[d], ny[d])] = dmap[a] + 1;
          q.push_back(A(nx[d], ny[d]));
        end
    end
  endtask

  // Route an n-point net: terminal 0 starts the tree, the others are joined
  // one at a time, nearest first. Returns the number of terminals joined and
  // the total wire length (in cell steps).
  task automatic route_net(int px[$], int py[$], int stages_used, int margin0,
                           output int joined, output int length);
    int tx[$], ty[$];   // tree
    int rx[$], ry[$];   // remaining terminals
    tx.push_back(px[0]); ty.push_back(py[0]);
    for (int i = 1; i < px.size(); i++) begin rx.push_back(px[i]); ry.push_back(py[i]); end
    joined = 0; length = 0;
    while (rx.size() > 0) begin
      int margin = margin0, bx0, by0, bx1, by1, best, hit, steps, cx, cy;
      pass_flags_t f;
      cell_t c;
      bit done = 0, unroutable = 0;
      // mark the tree and the targets
      bfs(tx, ty);
      best = -1;
      foreach (rx[i]) if (dmap[A(rx[i], ry[i])] >= 0 && (best < 0 || dmap[A(rx[i], ry[i])] < best))
        best = dmap[A(rx[i], ry[i])];
      bx0 = tx[0]; by0 = ty[0]; bx1 = tx[0]; by1 = ty[0];
      foreach (tx[i]) begin
        c = '0; c.source = 1; c.reached = 1;
        write_cell(tx[i], ty[i], c);
        if (tx[i] < bx0) bx0 = tx[i];
        if (tx[i] > bx1) bx1 = tx[i];
        if (ty[i] < by0) by0 = ty[i];
        if (ty[i] > by1) by1 = ty[i];
      end
      foreach (rx[i]) begin
        c = '0; c.target = 1;
        write_cell(rx[i], ry[i], c);
      end
      set_frame(bx0 - margin, by0 - margin, bx1 + margin, by1 + margin);
      while (!done) begin
        pass(OP_EXPAND, stages_used, f);
        if (f.target_hit) begin
          n_target_hit++;
          done = 1;
        end else if (f.frame_hit && !frame_full()) begin
          n_frame_hit++;
          n_frame_grow++;
          margin *= 2;
          set_frame(bx0 - margin, by0 - margin, bx1 + margin, by1 + margin);
        end else if (!f.changed) begin
          n_no_change++;
          if (frame_full()) begin
            unroutable = 1;
            done = 1;
          end else begin
            n_frame_grow++;
            margin *= 2;
            set_frame(bx0 - margin, by0 - margin, bx1 + margin, by1 + margin);
          end
        end else if (f.frame_hit) begin
          n_frame_hit++;
        end
      end
      if (unroutable) begin
        n_unroutable++;
        checks++;
        if (best >= 0) begin
          int shown = 0;
          fail($sformatf("net (%0d,%0d)-(%0d,%0d) declared unroutable, but a path of %0d exists", px[0], py[0], px[1], py[1], best));
          // show where the grid and the host's map disagree
          for (int a = 0; a < int'(CELLS) && shown < 8; a++) begin
            read_cell(a % int'(GRID_W), a / int'(GRID_W), c);
            if (c.obstacle != obs[a]) begin
              $display("host: cell (%0d,%0d) = %h, host map obstacle %0d", a % int'(GRID_W),
                       a / int'(GRID_W), c, obs[a]);
              shown++;
            end
          end
        end
        pass(OP_CLEAN, 1, f);
        return;
      end
      // which target was reached?
      hit = -1;
      foreach (rx[i]) if (hit < 0) begin
        read_cell(rx[i], ry[i], c);
        if (c.reached) hit = i;
      end
      checks++;
      if (hit < 0) begin
        fail("target hit reported but no target is reached");
        return;
      end
      // back-trace
      cx = rx[hit]; cy = ry[hit]; steps = 0;
      read_cell(cx, cy, c);
      while (!c.source && steps <= int'(CELLS)) begin
        case (c.dir)
          DIR_N: cy--;
          DIR_E: cx++;
          DIR_S: cy++;
          default: cx--;
        endcase
        steps++;
        checks++;
        if (cx < 0 || cy < 0 || cx >= int'(GRID_W) || cy >= int'(GRID_H) || obs[A(cx, cy)]) begin
          fail($sformatf("back-trace left the free grid at (%0d,%0d)", cx, cy));
          return;
        end
        read_cell(cx, cy, c);
        if (!c.source) begin tx.push_back(cx); ty.push_back(cy); end
      end
      tx.push_back(rx[hit]); ty.push_back(ry[hit]);
      checks++;
      if (steps != dmap[A(rx[hit], ry[hit])] || steps != best)
        fail($sformatf("wire to (%0d,%0d) is %0d long, shortest is %0d", rx[hit], ry[hit],
                       steps, best));
      length += steps;
      joined++;
      rx.delete(hit); ry.delete(hit);
      pass(OP_CLEAN, 1, f);
    end
    // the finished net becomes an obstacle for the nets that follow
    foreach (tx[i]) set_obstacle(tx[i], ty[i]);
  endtask

endmodule
