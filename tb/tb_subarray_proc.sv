// tb_subarray_proc: self-checking test of subarray_proc.
// Random neighbourhoods (biased towards free, reached, obstacle and target
// cells) are applied with every operation; the new cell and the flags are
// compared with the reference rules of tb_ref_pkg. Border cells are applied
// as the stage does for neighbours outside the frame.
module tb_subarray_proc;
  import raster_pkg::*;
  import tb_ref_pkg::*;

  stage_op_e        op;
  cell_t [2:0][2:0] nb;
  logic             on_edge;
  cell_t            result;
  pass_flags_t      flags;
  int checks = 0, failures = 0;
  int n_expand = 0, n_tgt = 0, n_edge = 0, n_clean = 0;

  subarray_proc dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cell_t       nbr[4], want;
    logic        ok[4];
    pass_flags_t wf;
    for (int n = 0; n < 20000; n++) begin
      op      = stage_op_e'($urandom_range(0, 2));
      on_edge = $urandom_range(0, 1);
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) nb[r][c] = rand_cell();
      for (int d = 0; d < 4; d++) ok[d] = 1'b1;
      // sometimes put a border cell where a neighbour would be
      if ($urandom_range(0, 3) == 0) begin
        automatic int d = $urandom_range(0, 3);
        ok[d] = 1'b0;
        case (d)
          0: nb[0][1] = BORDER_CELL;
          1: nb[1][0] = BORDER_CELL;
          2: nb[2][1] = BORDER_CELL;
          default: nb[1][2] = BORDER_CELL;
        endcase
      end
      nbr[0] = nb[0][1]; nbr[1] = nb[1][0]; nbr[2] = nb[2][1]; nbr[3] = nb[1][2];
      ref_cell(op, nb[1][1], nbr, ok, on_edge, want, wf);
      #1;
      checks++;
      if (result !== want || flags !== wf) begin
        failures++;
        if (failures < 10)
          $display("op %s centre %h N %h E %h S %h W %h: got %h/%b want %h/%b",
                   op.name(), nb[1][1], nbr[0], nbr[1], nbr[2], nbr[3], result, flags, want, wf);
      end
      if (op == OP_EXPAND && wf.changed) n_expand++;
      if (wf.target_hit) n_tgt++;
      if (wf.frame_hit) n_edge++;
      if (op == OP_CLEAN && wf.changed) n_clean++;
    end
    checks++;
    if (n_expand == 0 || n_tgt == 0 || n_edge == 0 || n_clean == 0) begin
      failures++;
      $display("a case never occurred: %0d %0d %0d %0d", n_expand, n_tgt, n_edge, n_clean);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
