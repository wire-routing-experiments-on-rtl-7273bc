// nbhd_window: the 3x3 neighbourhood (subarray) storage of a raster stage.
//
// Three 3-cell shift registers, one per grid row. Row 2 is fed by the input
// raster, rows 1 and 0 by the two line buffers, so after a shift the window
// holds a 3x3 block of the grid: win[r][c] with r = 0 the oldest (northern)
// row and c = 0 the newest (eastern) column; the centre is win[1][1]. The
// organisation is the one of the single-stage diagram the design follows.
//
// Interface: on a cycle with `advance` high, each row shifts one place
// towards column 2 and row_in[r] enters column 0. No reset: a stage masks
// whatever the window holds outside the frame.
module nbhd_window #(
  parameter int unsigned DATA_W = 8
) (
  input  logic                        clk,
  input  logic                        advance,
  input  logic [2:0][DATA_W-1:0]      row_in,
  output logic [2:0][2:0][DATA_W-1:0] win
);

  always_ff @(posedge clk) begin
    if (advance) begin
      for (int r = 0; r < 3; r++) begin
        win[r][2] <= win[r][1];
        win[r][1] <= win[r][0];
        win[r][0] <= row_in[r];
      end
    end
  end

endmodule
