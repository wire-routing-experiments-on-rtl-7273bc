// line_buffer: one row of raster storage.
//
// The line buffer delays the raster stream by exactly `len` cells, so that
// when a cell of row r+1 enters the stage, the cell above it (row r) leaves
// this buffer. Two of them in series hold the two earlier rows a 3x3
// neighbourhood needs. The delay is programmable up to MAX_LEN because a
// pass streams only the current frame, whose width changes from pass to pass;
// that is this design's choice, as is the circular-RAM organisation: a single
// pointer walks 0..len-1 and each shift reads the old cell at the pointer and
// writes the new one in its place.
//
// Interface: on a cycle with `advance` high, `din` is stored and the pointer
// moves on. `dout` is combinational and shows the cell stored `len` advances
// ago, valid from the (len+1)-th advance after `clear` on. `clear` returns the
// pointer to 0 for a new pass; `len` must stay constant during a pass.
module line_buffer #(
  parameter int unsigned MAX_LEN = 512,
  parameter int unsigned DATA_W  = 8,
  localparam int unsigned LEN_W  = $clog2(MAX_LEN + 1),
  localparam int unsigned PTR_W  = $clog2(MAX_LEN)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic [LEN_W-1:0]  len,
  input  logic              advance,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);

  logic [DATA_W-1:0] mem [MAX_LEN];
  logic [PTR_W-1:0]  ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    if (advance) mem[ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  ptr <= '0;
    else if (clear)                              ptr <= '0;
    else if (advance) begin
      if (LEN_W'(ptr) + LEN_W'(1) >= len)        ptr <= '0;
      else                                       ptr <= ptr + PTR_W'(1);
    end
  end

endmodule
