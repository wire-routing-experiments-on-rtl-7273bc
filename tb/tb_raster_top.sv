// tb_raster_top: end-to-end test of the machine on a 32 x 32 grid with two
// stages.
// The host model loads an empty grid with a wall, then routes: a 2-point
// net that must detour around the wall (two expansion stages per pass), a
// 2-point net across the diagonal with one stage expanding and the other
// idle (the single-stage configuration), a net along the grid's top row
// whose target the first stage reaches while the second is still filling,
// a 4-point net, and a net whose
// target is walled in (unroutable). Every wire must be as short as a
// breadth-first search says; afterwards the whole grid is read back and must
// hold exactly the obstacles and wires, everything else cleaned up. The test
// fails if any mechanism - target hit, frame hit, frame growth, clean-up,
// a pass with no change, an unroutable net, an idle stage - never occurred.
module tb_raster_top;
  import raster_pkg::*;
  localparam int unsigned GRID_W = 32, GRID_H = 32, NSTAGES = 2;

  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, rsp_valid, busy;
  host_cmd_e cmd_op;
  logic [9:0] cmd_addr;
  logic [31:0] cmd_data, rsp_data;
  int checks = 0, failures = 0;

  raster_top #(.GRID_W(GRID_W), .GRID_H(GRID_H), .NSTAGES(NSTAGES)) dut (.*);
  tb_host #(.GRID_W(GRID_W), .GRID_H(GRID_H), .NSTAGES(NSTAGES)) host (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_op, .cmd_addr, .cmd_data,
    .rsp_valid, .rsp_data
  );

  always #5 clk = ~clk;
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + host.checks, failures + host.failures);
    $finish;
  end

  task automatic expect_count(string what, int n);
    checks++;
    $display("%s: %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("%s never happened", what);
    end
  endtask

  initial begin
    int joined, len;
    cell_t c;
    repeat (3) @(negedge clk);
    rst_n = 1;
    host.clear_grid();
    for (int y = 0; y < 28; y++) host.set_obstacle(16, y);
    // 2-point net around the wall, two stages expanding
    host.route_net('{4, 28}, '{4, 6}, 2, 2, joined, len);
    checks++;
    if (joined != 1) begin failures++; $display("net 1 not routed"); end
    $display("net 1: length %0d", len);
    // 2-point net across the diagonal, one stage expanding
    host.route_net('{8, 23}, '{23, 8}, 1, 2, joined, len);
    checks++;
    if (joined != 1) begin failures++; $display("net 2 not routed"); end
    $display("net 2: length %0d", len);
    // a net along the top row, 11 cells long: the first stage reaches the
    // target while the second is still filling
    host.route_net('{2, 13}, '{0, 0}, 2, 2, joined, len);
    checks++;
    if (joined != 1 || len != 11) begin failures++; $display("top-row net: %0d, length %0d", joined, len); end
    // 4-point net
    host.route_net('{6, 12, 2, 10}, '{18, 22, 26, 29}, 2, 1, joined, len);
    checks++;
    if (joined != 3) begin failures++; $display("net 3 joined %0d of 3", joined); end
    $display("net 3: length %0d", len);
    // a walled-in target
    for (int i = 24; i <= 28; i++) begin
      host.set_obstacle(i, 24); host.set_obstacle(i, 28);
      host.set_obstacle(24, i); host.set_obstacle(28, i);
    end
    host.route_net('{20, 26}, '{20, 26}, 2, 2, joined, len);
    checks++;
    if (joined != 0) begin failures++; $display("walled-in net was routed"); end
    // the grid holds only obstacles and wires
    for (int y = 0; y < int'(GRID_H); y++)
      for (int x = 0; x < int'(GRID_W); x++) begin
        host.read_cell(x, y, c);
        checks++;
        if (host.obs[y*GRID_W+x] ? (c != BORDER_CELL) : (c != FREE_CELL)) begin
          failures++;
          if (failures < 10) $display("cell (%0d,%0d) = %h after clean-up", x, y, c);
        end
      end
    $display("passes %0d, pass cycles %0d", host.n_pass, host.pass_cycles);
    expect_count("target hits", host.n_target_hit);
    expect_count("frame hits", host.n_frame_hit);
    expect_count("frame growths", host.n_frame_grow);
    expect_count("clean-up passes", host.n_clean);
    expect_count("passes without change", host.n_no_change);
    expect_count("unroutable nets", host.n_unroutable);
    expect_count("passes with an idle stage", host.n_idle_stage);
    $display("TB_RESULT checks=%0d failures=%0d", checks + host.checks, failures + host.failures);
    $finish;
  end
endmodule
