// tb_ref_pkg: reference cell rules for the testbenches.
//
// A second, independent statement of what one stage does to one cell, written
// from the rules rather than from the RTL: given the centre cell and its four
// edge neighbours (a neighbour outside the frame is passed as `valid = 0`), it
// returns the new cell and the flags a stage must raise.
package tb_ref_pkg;
  import raster_pkg::*;

  function automatic logic is_front(cell_t c, logic valid);
    return valid && c.reached && !c.obstacle;
  endfunction

  // nbr[0..3] = N, E, S, W; ok[0..3] their validity.
  function automatic void ref_cell(input stage_op_e op, input cell_t c,
                                   input cell_t nbr[4], input logic ok[4],
                                   input logic on_edge,
                                   output cell_t r, output pass_flags_t f);
    r = c;
    f = '0;
    if (op == OP_EXPAND) begin
      if (!c.obstacle && !c.reached) begin
        for (int d = 3; d >= 0; d--)
          if (is_front(nbr[d], ok[d])) begin
            r.reached = 1'b1;
            r.dir     = dir_e'(d);
          end
        if (r.reached) begin
          f.target_hit = c.target;
          f.frame_hit  = on_edge;
        end
      end
    end else if (op == OP_CLEAN) begin
      r = c.obstacle ? c : cell_t'(8'h00);
    end
    f.changed = (r != c);
  endfunction

  // A random cell, biased towards the cases the rules distinguish.
  function automatic cell_t rand_cell();
    cell_t c;
    int unsigned k = $urandom_range(0, 9);
    c = cell_t'(8'($urandom));
    if (k < 4)      c = '0;                                   // free
    else if (k < 6) begin c = '0; c.reached = 1'b1; c.dir = dir_e'($urandom_range(0,3)); end
    else if (k < 7) begin c = '0; c.obstacle = 1'b1; end
    else if (k < 8) begin c = '0; c.target = 1'b1; end
    return c;
  endfunction
endpackage
