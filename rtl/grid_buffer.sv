// grid_buffer: the machine's storage for the routing grid between passes.
//
// An array of DEPTH cells; the default of 256K 8-bit cells holds exactly one
// 512 x 512 grid. One synchronous read port and one write port let a pass
// read the frame ahead of the pipeline and write the results back in place
// behind it. The port arrangement is this design's choice.
//
// Timing: rd_data shows grid[rd_addr] on the cycle after rd_en. A write
// happens at the clock edge of the cycle with wr_en. Reading and writing the
// same address in one cycle returns the old value. The contents are not
// reset; the host loads the grid before using it.
module grid_buffer #(
  parameter int unsigned DEPTH  = 262144,
  parameter int unsigned DATA_W = 8,
  localparam int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [DATA_W-1:0] rd_data,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0] wr_data
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end

endmodule
