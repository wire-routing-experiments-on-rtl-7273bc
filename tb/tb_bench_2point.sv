// tb_bench_2point: the 2-point net benchmark at full size.
// On the 512 x 512 grid the two terminals of one net lie on the grid's
// anti-diagonal, placed so that the Manhattan length of the wire is 2^N for
// N = 2 .. 9 (4 to 512 cells). Each net is routed on an empty grid with one
// stage expanding and the other idle (a single-stage pipe). The wire must be
// exactly 2^N long; the number of passes and of pipeline cycles spent in
// passes is printed for each length.
module tb_bench_2point;
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
    int joined, len, q, p0;
    longint c0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 2; n <= 9; n++) begin
      automatic int L = 1 << n;
      q = L / 4;
      host.clear_grid();
      p0 = host.n_pass; c0 = host.pass_cycles;
      host.route_net('{256 - q, 256 + q}, '{255 + q, 255 - q}, 1, 2, joined, len);
      checks++;
      if (joined != 1 || len != L) begin
        failures++;
        $display("length %0d: joined %0d, wire %0d", L, joined, len);
      end
      $display("2-point length %0d: %0d passes, %0d pass cycles", L, host.n_pass - p0,
               host.pass_cycles - c0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + host.checks, failures + host.failures);
    $finish;
  end
endmodule
