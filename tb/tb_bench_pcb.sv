// tb_bench_pcb: greedy two-layer board routing, at a reduced size.
// A board of 80 x 120 cells (an 8 x 12 inch board at a 0.1 inch grid) is
// routed with NETS random 2-point nets on two layers. Every pad of every net
// is an obstacle on both layers except while its own net is routed. Layer 1
// also carries a full-width strip across the board, so every net whose pads
// lie on both sides of it must go to layer 2. As in the greedy strategy: all
// nets are tried on layer 1, the failures are recorded, and those are tried
// again on an empty layer 2. Every routed wire is checked to be shortest,
// and every failure to have no path at all. The test fails if no net was
// routed on either layer.
module tb_bench_pcb;
  import raster_pkg::*;
  localparam int unsigned GRID_W = 80, GRID_H = 120, NSTAGES = 2, NETS = 250;

  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, rsp_valid, busy;
  host_cmd_e cmd_op;
  logic [13:0] cmd_addr;
  logic [31:0] cmd_data, rsp_data;
  int checks = 0, failures = 0;

  raster_top #(.GRID_W(GRID_W), .GRID_H(GRID_H), .NSTAGES(NSTAGES)) dut (.*);
  tb_host #(.GRID_W(GRID_W), .GRID_H(GRID_H), .NSTAGES(NSTAGES)) host (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_op, .cmd_addr, .cmd_data,
    .rsp_valid, .rsp_data
  );

  always #5 clk = ~clk;
  initial begin
    repeat (200000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + host.checks, failures + host.failures);
    $finish;
  end

  int ax[NETS], ay[NETS], bx[NETS], by[NETS];
  bit pad [GRID_W*GRID_H];

  function automatic int A(int x, int y);
    return y * int'(GRID_W) + x;
  endfunction

  task automatic load_layer(bit strip);
    host.clear_grid();
    for (int a = 0; a < int'(GRID_W*GRID_H); a++)
      if (pad[a]) host.set_obstacle(a % int'(GRID_W), a / int'(GRID_W));
    if (strip)
      for (int x = 0; x < int'(GRID_W); x++) host.set_obstacle(x, 60);
  endtask

  // Route net n on the loaded layer; its pads are freed for the attempt.
  task automatic try_net(int n, output bit ok);
    int joined, len;
    host.obs[A(ax[n], ay[n])] = 0;
    host.obs[A(bx[n], by[n])] = 0;
    host.route_net('{ax[n], bx[n]}, '{ay[n], by[n]}, NSTAGES, 2, joined, len);
    ok = joined == 1;
    if (!ok) begin
      host.set_obstacle(ax[n], ay[n]);
      host.set_obstacle(bx[n], by[n]);
    end
  endtask

  initial begin
    int failed[$], on1 = 0, on2 = 0, lost = 0;
    bit ok;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // pads: distinct cells off the strip row, nets 3 to 40 cells long
    for (int n = 0; n < int'(NETS); n++) begin
      do begin
        ax[n] = $urandom_range(0, GRID_W - 1); ay[n] = $urandom_range(0, GRID_H - 1);
        bx[n] = $urandom_range(0, GRID_W - 1); by[n] = $urandom_range(0, GRID_H - 1);
      end while (ay[n] == 60 || by[n] == 60 || pad[A(ax[n], ay[n])] || pad[A(bx[n], by[n])] ||
                 A(ax[n], ay[n]) == A(bx[n], by[n]) ||
                 (ax[n] > bx[n] ? ax[n] - bx[n] : bx[n] - ax[n]) +
                 (ay[n] > by[n] ? ay[n] - by[n] : by[n] - ay[n]) > 40 ||
                 (ax[n] > bx[n] ? ax[n] - bx[n] : bx[n] - ax[n]) +
                 (ay[n] > by[n] ? ay[n] - by[n] : by[n] - ay[n]) < 3);
      pad[A(ax[n], ay[n])] = 1;
      pad[A(bx[n], by[n])] = 1;
    end
    // a net that must cross the strip
    ay[0] = 50; by[0] = 70;
    pad[A(ax[0], ay[0])] = 1; pad[A(bx[0], by[0])] = 1;
    load_layer(1);
    for (int n = 0; n < int'(NETS); n++) begin
      try_net(n, ok);
      if (ok) on1++; else failed.push_back(n);
    end
    load_layer(0);
    foreach (failed[i]) begin
      try_net(failed[i], ok);
      if (ok) on2++; else lost++;
    end
    $display("%0d nets: %0d routed on layer 1, %0d on layer 2, %0d unroutable; %0d passes, %0d pass cycles",
             NETS, on1, on2, lost, host.n_pass, host.pass_cycles);
    checks += 2;
    if (on1 == 0) begin failures++; $display("no net routed on layer 1"); end
    if (on2 == 0) begin failures++; $display("no net routed on layer 2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks + host.checks, failures + host.failures);
    $finish;
  end
endmodule
