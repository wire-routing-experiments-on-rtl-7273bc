// tb_raster_stage: self-checking test of one raster stage.
// Frames of several sizes (down to one row or one column) are filled with
// random cells and streamed through the stage with every operation, both
// continuously and with random gaps. Each output cell and its flags are
// compared with the reference rules applied to the testbench's copy of the
// frame, where neighbours outside the frame do not exist. For a continuous
// stream the latency must be line_len+3 cycles and the output must be
// continuous (one cell per cycle).
module tb_raster_stage;
  import raster_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned MAX_W = 16, MAX_H = 12;

  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  stage_op_e op;
  logic [4:0] line_len;
  logic [3:0] num_rows;
  cell_t in_cell, out_cell;
  logic out_valid, busy;
  pass_flags_t out_flags;
  int checks = 0, failures = 0;

  raster_stage #(.MAX_W(MAX_W), .MAX_H(MAX_H)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cell_t       g   [MAX_H][MAX_W];
  cell_t       got [$];
  pass_flags_t gotf[$];
  longint      cyc = 0, first_in, first_out, last_out;
  always @(posedge clk) begin
    cyc++;
    if (out_valid) begin
      got.push_back(out_cell);
      gotf.push_back(out_flags);
      if (got.size() == 1) first_out = cyc;
      last_out = cyc;
    end
  end

  task automatic run(int w, int h, stage_op_e o, bit gaps);
    int n = 0;
    cell_t want; pass_flags_t wf; cell_t nbr[4]; logic ok[4];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) g[y][x] = rand_cell();
    got.delete(); gotf.delete();
    @(negedge clk);
    op = o; line_len = 5'(w); num_rows = 4'(h); start = 1;
    @(negedge clk) start = 0;
    while (n < w * h) begin
      in_valid = gaps ? ($urandom_range(0, 2) != 0) : 1'b1;
      in_cell  = g[n / w][n % w];
      if (in_valid && n == 0) first_in = cyc + 1;
      if (in_valid) n++;
      @(negedge clk);
    end
    in_valid = 0;
    in_cell  = rand_cell();
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (got.size() != w * h) begin
      failures++;
      $display("%0dx%0d: %0d cells out, want %0d", w, h, got.size(), w * h);
      return;
    end
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        ok[0] = y > 0;     nbr[0] = ok[0] ? g[y-1][x] : BORDER_CELL;
        ok[1] = x < w - 1; nbr[1] = ok[1] ? g[y][x+1] : BORDER_CELL;
        ok[2] = y < h - 1; nbr[2] = ok[2] ? g[y+1][x] : BORDER_CELL;
        ok[3] = x > 0;     nbr[3] = ok[3] ? g[y][x-1] : BORDER_CELL;
        ref_cell(o, g[y][x], nbr, ok, x == 0 || y == 0 || x == w - 1 || y == h - 1, want, wf);
        checks++;
        if (got[y*w+x] !== want || gotf[y*w+x] !== wf) begin
          failures++;
          if (failures < 10)
            $display("%0dx%0d %s (%0d,%0d): got %h/%b want %h/%b", w, h, o.name(), x, y,
                     got[y*w+x], gotf[y*w+x], want, wf);
        end
      end
    if (!gaps) begin
      checks += 2;
      if (first_out - first_in != longint'(w + 3)) begin
        failures++;
        $display("%0dx%0d latency %0d, want %0d", w, h, first_out - first_in, w + 3);
      end
      if (last_out - first_out + 1 != longint'(w * h)) begin
        failures++;
        $display("%0dx%0d output not one cell per cycle", w, h);
      end
    end
  endtask

  initial begin
    op = OP_PASS; line_len = 5'd1; num_rows = 4'd1; in_cell = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(16, 12, OP_EXPAND, 0);
    run(16, 12, OP_CLEAN, 0);
    run(16, 12, OP_PASS, 0);
    run(5, 3, OP_EXPAND, 0);
    run(1, 7, OP_EXPAND, 0);
    run(9, 1, OP_EXPAND, 0);
    run(1, 1, OP_EXPAND, 0);
    for (int i = 0; i < 20; i++)
      run($urandom_range(1, 16), $urandom_range(1, 12), stage_op_e'($urandom_range(0, 2)),
          1'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
