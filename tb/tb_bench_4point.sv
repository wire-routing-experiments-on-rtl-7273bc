// tb_bench_4point: the 4-point net benchmark at full size.
// One 4-point net shaped like the benchmark drawing (two terminals at the
// ends of an upper horizontal bar, one at the foot of a vertical trunk, one at
// the end of a lower bar) is scaled by u = 2, 4, .. 32 cells and routed on an
// empty 512 x 512 grid with a single expanding stage. The host joins the
// terminals one at a time, nearest first, and checks each connection against
// a breadth-first search; the total length, passes and pipeline cycles are
// printed for each size.
module tb_bench_4point;
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
    repeat (400000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + host.checks, failures + host.failures);
    $finish;
  end

  initial begin
    int joined, len, p0;
    longint c0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 1; n <= 5; n++) begin
      automatic int u = 1 << n;
      host.clear_grid();
      p0 = host.n_pass; c0 = host.pass_cycles;
      host.route_net('{256 - 2*u, 256 + 2*u, 256, 256 + 2*u},
                     '{256 - 2*u, 256 - 2*u, 256 + 2*u, 256 + u}, 1, 2, joined, len);
      checks++;
      if (joined != 3) begin
        failures++;
        $display("u %0d: joined %0d of 3", u, joined);
      end
      $display("4-point u %0d: length %0d, %0d passes, %0d pass cycles", u, len,
               host.n_pass - p0, host.pass_cycles - c0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + host.checks, failures + host.failures);
    $finish;
  end
endmodule
