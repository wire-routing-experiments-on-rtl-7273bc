// tb_raster_top_full: the machine at its default size (512 x 512 grid, two
// stages), taken through complete routing operations.
// The host model loads an empty grid and routes the two benchmark shapes:
// a 2-point net whose terminals lie on the grid's anti-diagonal, 32 cells
// apart in Manhattan distance, and a 4-point net. Each wire must be as short
// as a breadth-first search says. A final clean-up pass streams the whole
// 512 x 512 grid, which must then hold exactly the routed wires.
module tb_raster_top_full;
  import raster_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, rsp_valid, busy;
  host_cmd_e cmd_op;
  logic [17:0] cmd_addr;
  logic [31:0] cmd_data, rsp_data;
  int checks = 0, failures = 0;

  raster_top dut (.*);
  tb_host #(.GRID_W(512), .GRID_H(512), .NSTAGES(2)) host (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_op, .cmd_addr, .cmd_data,
    .rsp_valid, .rsp_data
  );

  always #5 clk = ~clk;
  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + host.checks, failures + host.failures);
    $finish;
  end

  initial begin
    int joined, len;
    cell_t c;
    pass_flags_t f;
    repeat (3) @(negedge clk);
    rst_n = 1;
    host.clear_grid();
    host.route_net('{248, 264}, '{263, 247}, 2, 2, joined, len);
    checks++;
    if (joined != 1 || len != 32) begin
      failures++;
      $display("2-point net: joined %0d, length %0d, want 32", joined, len);
    end
    $display("2-point net: length %0d", len);
    host.route_net('{200, 270, 236, 262}, '{150, 150, 214, 196}, 2, 2, joined, len);
    checks++;
    if (joined != 3) begin failures++; $display("4-point net joined %0d of 3", joined); end
    $display("4-point net: length %0d", len);
    // clean-up of the whole plane
    host.set_frame(0, 0, 511, 511);
    host.pass(OP_CLEAN, 2, f);
    checks++;
    if (f.changed) begin failures++; $display("clean plane changed"); end
    for (int y = 0; y < 512; y++)
      for (int x = 0; x < 512; x++) begin
        host.read_cell(x, y, c);
        checks++;
        if (host.obs[y*512+x] ? (c != BORDER_CELL) : (c != FREE_CELL)) begin
          failures++;
          if (failures < 10) $display("cell (%0d,%0d) = %h", x, y, c);
        end
      end
    $display("passes %0d, pass cycles %0d", host.n_pass, host.pass_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks + host.checks, failures + host.failures);
    $finish;
  end
endmodule
