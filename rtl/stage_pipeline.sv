// stage_pipeline: the raster pipeline, NSTAGES raster stages in series.
//
// Every stage takes the raster stream of its predecessor, so after the pipe
// fills all stages work at once, each on a different part of the grid; with
// every stage programmed to OP_EXPAND a single pass grows the wavefront by
// NSTAGES cells. Two stages is the machine's present configuration; any
// number can be built. Each stage has its own operation (ops[k] for stage k,
// stage 0 first).
//
// Interface and timing: `start` begins a pass in every stage at once with the
// frame size line_len x num_rows. Cells enter on in_valid/in_cell and leave on
// out_valid/out_cell, NSTAGES*(line_len+3) cycles later for a continuous
// stream, one per cycle. out_flags is the OR over all stages of the flags each
// stage raised on the cell it emitted in that cycle; the controller collects
// them over the pass. `busy` stays high until the last stage has flushed.
module stage_pipeline
  import raster_pkg::*;
#(
  parameter int unsigned NSTAGES = 2,
  parameter int unsigned MAX_W   = 512,
  parameter int unsigned MAX_H   = 512,
  localparam int unsigned LEN_W  = $clog2(MAX_W + 1),
  localparam int unsigned ROW_W  = $clog2(MAX_H + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  stage_op_e [NSTAGES-1:0]  ops,
  input  logic [LEN_W-1:0]         line_len,
  input  logic [ROW_W-1:0]         num_rows,
  input  logic                     in_valid,
  input  cell_t                    in_cell,
  output logic                     out_valid,
  output cell_t                    out_cell,
  output pass_flags_t              out_flags,
  output logic                     busy
);

  logic        v    [NSTAGES+1];
  cell_t       c    [NSTAGES+1];
  pass_flags_t f    [NSTAGES];
  logic [NSTAGES-1:0] b;

  assign v[0] = in_valid;
  assign c[0] = in_cell;

  for (genvar k = 0; k < NSTAGES; k++) begin : g_stage
    raster_stage #(.MAX_W(MAX_W), .MAX_H(MAX_H)) u_stage (
      .clk, .rst_n, .start, .op(ops[k]), .line_len, .num_rows,
      .in_valid(v[k]), .in_cell(c[k]),
      .out_valid(v[k+1]), .out_cell(c[k+1]), .out_flags(f[k]), .busy(b[k])
    );
  end

  always_comb begin
    out_flags = '0;
    for (int k = 0; k < NSTAGES; k++) out_flags |= f[k];
  end

  assign out_valid = v[NSTAGES];
  assign out_cell  = c[NSTAGES];
  assign busy      = |b;

endmodule
