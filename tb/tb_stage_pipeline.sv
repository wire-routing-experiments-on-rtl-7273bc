// tb_stage_pipeline: self-checking test of the stage pipeline.
// Three stages, each given its own random operation per pass, process random
// frames. The output must equal the reference rules applied three times in
// turn to the testbench's copy of the frame (each stage working on the
// previous stage's result), the OR of all flags over the pass must match, and
// for a continuous stream the latency must be 3*(line_len+3) cycles with one
// cell out per cycle.
module tb_stage_pipeline;
  import raster_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned NSTAGES = 3, MAX_W = 16, MAX_H = 12;

  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  stage_op_e [NSTAGES-1:0] ops;
  logic [4:0] line_len;
  logic [3:0] num_rows;
  cell_t in_cell, out_cell;
  logic out_valid, busy;
  pass_flags_t out_flags;
  int checks = 0, failures = 0;

  stage_pipeline #(.NSTAGES(NSTAGES), .MAX_W(MAX_W), .MAX_H(MAX_H)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cell_t       g [MAX_H][MAX_W];
  cell_t       got [$];
  pass_flags_t acc;
  longint      cyc = 0, first_in, first_out, last_out;
  always @(posedge clk) begin
    cyc++;
    if (out_valid) begin
      got.push_back(out_cell);
      if (got.size() == 1) first_out = cyc;
      last_out = cyc;
    end
    acc |= out_flags;
  end

  task automatic step(int w, int h, stage_op_e o, inout pass_flags_t fo);
    cell_t n [MAX_H][MAX_W];
    cell_t nbr[4]; logic ok[4]; pass_flags_t f;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        ok[0] = y > 0;     nbr[0] = ok[0] ? g[y-1][x] : BORDER_CELL;
        ok[1] = x < w - 1; nbr[1] = ok[1] ? g[y][x+1] : BORDER_CELL;
        ok[2] = y < h - 1; nbr[2] = ok[2] ? g[y+1][x] : BORDER_CELL;
        ok[3] = x > 0;     nbr[3] = ok[3] ? g[y][x-1] : BORDER_CELL;
        ref_cell(o, g[y][x], nbr, ok, x == 0 || y == 0 || x == w - 1 || y == h - 1, n[y][x], f);
        fo |= f;
      end
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) g[y][x] = n[y][x];
  endtask

  task automatic run(int w, int h, bit gaps);
    int n = 0;
    pass_flags_t wf = '0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) g[y][x] = rand_cell();
    for (int k = 0; k < NSTAGES; k++) ops[k] = stage_op_e'($urandom_range(0, 3) == 0 ? 2 : 1);
    got.delete();
    @(negedge clk);
    line_len = 5'(w); num_rows = 4'(h); start = 1; acc = '0;
    @(negedge clk) start = 0;
    while (n < w * h) begin
      in_valid = gaps ? ($urandom_range(0, 2) != 0) : 1'b1;
      in_cell  = g[n / w][n % w];
      if (in_valid && n == 0) first_in = cyc + 1;
      if (in_valid) n++;
      @(negedge clk);
    end
    in_valid = 0;
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    for (int k = 0; k < NSTAGES; k++) step(w, h, ops[k], wf);
    checks += 2;
    if (got.size() != w * h) begin
      failures++;
      $display("%0dx%0d: %0d cells out, want %0d", w, h, got.size(), w * h);
      return;
    end
    if (acc !== wf) begin
      failures++;
      $display("%0dx%0d: pass flags %b want %b", w, h, acc, wf);
    end
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        checks++;
        if (got[y*w+x] !== g[y][x]) begin
          failures++;
          if (failures < 10)
            $display("%0dx%0d (%0d,%0d): got %h want %h", w, h, x, y, got[y*w+x], g[y][x]);
        end
      end
    if (!gaps) begin
      checks += 2;
      if (first_out - first_in != longint'(NSTAGES * (w + 3))) begin
        failures++;
        $display("%0dx%0d latency %0d, want %0d", w, h, first_out - first_in, NSTAGES * (w + 3));
      end
      if (last_out - first_out + 1 != longint'(w * h)) begin
        failures++;
        $display("%0dx%0d output not one cell per cycle", w, h);
      end
    end
  endtask

  initial begin
    ops = '0; line_len = 5'd1; num_rows = 4'd1; in_cell = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(16, 12, 0);
    run(7, 5, 0);
    run(1, 6, 0);
    run(6, 1, 0);
    for (int i = 0; i < 20; i++)
      run($urandom_range(1, 16), $urandom_range(1, 12), 1'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
