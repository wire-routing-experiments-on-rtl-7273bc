// subarray_proc: the combinational cell function of one raster stage.
//
// It sees the centre cell with its eight neighbours and computes the centre's
// new value. The operation is programmed per stage:
//   OP_PASS   - the cell leaves unchanged.
//   OP_EXPAND - one step of unit-cost Lee wavefront expansion. A free cell
//               (neither obstacle nor reached) with a reached, non-obstacle
//               4-neighbour becomes reached and records in `dir` which
//               neighbour reached it; if several did, the first of N, E, S, W
//               wins. Because every stage reads its neighbourhoods from its
//               own input stream, one stage is one expansion step and the
//               wavefront stays a true breadth-first front.
//   OP_CLEAN  - grid clean-up after a wire is routed: every cell that is not
//               an obstacle becomes free; obstacles (and wires the host has
//               marked as obstacles) stay.
// The expansion and clean-up rules, and the cell encoding in raster_pkg, are
// this design's own choice for the routing the machine is used for.
//
// Interface: nb[r][c] as held by nbhd_window (r = 0 north, c = 0 east), with
// neighbours outside the frame already replaced by BORDER_CELL. `on_edge`
// says the centre lies on the frame boundary. Outputs: the new cell and three
// flags: changed, a target cell was reached (target_hit) and a boundary cell
// was reached (frame_hit, the sign that the frame must grow). The diagonal
// neighbours are part of the window but unused by these unit-cost rules.
module subarray_proc
  import raster_pkg::*;
(
  input  stage_op_e         op,
  input  cell_t [2:0][2:0]  nb,
  input  logic              on_edge,
  output cell_t             result,
  output pass_flags_t       flags
);

  cell_t centre, n_c, e_c, s_c, w_c;
  logic  n_r, e_r, s_r, w_r, free_c;

  assign centre = nb[1][1];
  assign n_c    = nb[0][1];
  assign e_c    = nb[1][0];
  assign s_c    = nb[2][1];
  assign w_c    = nb[1][2];

  assign n_r    = n_c.reached && !n_c.obstacle;
  assign e_r    = e_c.reached && !e_c.obstacle;
  assign s_r    = s_c.reached && !s_c.obstacle;
  assign w_r    = w_c.reached && !w_c.obstacle;
  assign free_c = !centre.obstacle && !centre.reached;

  always_comb begin
    result = centre;
    flags  = '0;
    unique case (op)
      OP_EXPAND: begin
        if (free_c && (n_r || e_r || s_r || w_r)) begin
          result.reached = 1'b1;
          if      (n_r) result.dir = DIR_N;
          else if (e_r) result.dir = DIR_E;
          else if (s_r) result.dir = DIR_S;
          else          result.dir = DIR_W;
          flags.target_hit = centre.target;
          flags.frame_hit  = on_edge;
        end
      end
      OP_CLEAN: begin
        if (!centre.obstacle) result = FREE_CELL;
      end
      default: result = centre;
    endcase
    flags.changed = (result != centre);
  end

endmodule
