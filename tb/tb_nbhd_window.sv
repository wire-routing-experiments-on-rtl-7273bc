// tb_nbhd_window: self-checking test of nbhd_window.
// Random row inputs are shifted in with random gaps; a testbench copy of the
// three rows, shifted the same way, must equal the window after every cycle.
module tb_nbhd_window;
  logic clk = 0, advance = 0;
  logic [2:0][7:0] row_in;
  logic [2:0][2:0][7:0] win;
  logic [7:0] m [3][3];
  int checks = 0, failures = 0, shifts = 0;

  nbhd_window #(.DATA_W(8)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    row_in = '0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      if (shifts >= 3) begin
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) begin
            checks++;
            if (win[r][c] !== m[r][c]) begin
              failures++;
              $display("cycle %0d win[%0d][%0d] = %h want %h", n, r, c, win[r][c], m[r][c]);
            end
          end
      end
      advance = $urandom_range(0, 2) != 0;
      for (int r = 0; r < 3; r++) row_in[r] = 8'($urandom);
      if (advance) begin
        shifts++;
        for (int r = 0; r < 3; r++) begin
          m[r][2] = m[r][1];
          m[r][1] = m[r][0];
          m[r][0] = row_in[r];
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
