// tb_grid_buffer: self-checking test of grid_buffer.
// Random reads and writes, often to the same address in the same cycle, are
// compared with a testbench copy of the memory; a read returns the value
// before a write in the same cycle, one cycle after rd_en.
module tb_grid_buffer;
  localparam int unsigned DEPTH = 1024;
  logic clk = 0, rd_en = 0, wr_en = 0;
  logic [9:0] rd_addr = '0, wr_addr = '0;
  logic [7:0] rd_data, wr_data = '0;
  logic [7:0] m [DEPTH];
  int checks = 0, failures = 0;

  grid_buffer #(.DEPTH(DEPTH), .DATA_W(8)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic       exp_v;
    logic [7:0] exp_d;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 10'(a); wr_data = 8'($urandom); m[a] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    exp_v = 0;
    for (int n = 0; n < 8000; n++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (rd_data !== exp_d) begin
          failures++;
          $display("read got %h want %h", rd_data, exp_d);
        end
      end
      rd_en   = $urandom_range(0, 1);
      rd_addr = 10'($urandom);
      wr_en   = $urandom_range(0, 1);
      wr_addr = ($urandom_range(0, 1) != 0) ? rd_addr : 10'($urandom);
      wr_data = 8'($urandom);
      exp_v   = rd_en;
      exp_d   = m[rd_addr];
      if (wr_en) m[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
