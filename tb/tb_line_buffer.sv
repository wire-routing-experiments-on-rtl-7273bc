// tb_line_buffer: self-checking test of line_buffer.
// For several programmed lengths, random cells are shifted in with random
// gaps and every output is compared with the cell pushed `len` shifts
// earlier, kept in a testbench queue.
module tb_line_buffer;
  localparam int unsigned MAX_LEN = 16;
  logic clk = 0, rst_n = 0, clear = 0, advance = 0;
  logic [4:0] len;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;

  line_buffer #(.MAX_LEN(MAX_LEN), .DATA_W(8)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] hist[$];
    int lens[5] = '{1, 2, 5, 15, 16};
    len = 5'd1; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (lens[i]) begin
      len = 5'(lens[i]);
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      hist.delete();
      for (int n = 0; n < 200; n++) begin
        // check what the buffer shows before this shift
        if (hist.size() >= lens[i]) begin
          checks++;
          if (dout !== hist[hist.size() - lens[i]]) begin
            failures++;
            $display("len %0d shift %0d: got %h want %h", lens[i], n, dout,
                     hist[hist.size() - lens[i]]);
          end
        end
        advance = ($urandom_range(0, 3) != 0);
        din = 8'($urandom);
        if (advance) hist.push_back(din);
        @(negedge clk);
        advance = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
