// search_window_buf_tb: fills the 48x48 window with random words, then reads
// random (row, column) positions and checks all 17 returned pixels, including
// reads that run past the right edge (which must repeat the last column).
module search_window_buf_tb;
  import me_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [5:0] wrow, rrow, rcol;
  logic [3:0] wword;
  logic [31:0] wdata;
  row17_t rdata;
  int checks = 0, failures = 0;
  pix_t m [48][48];

  search_window_buf dut (.*);

  initial begin
    we = 0; wrow = 0; wword = 0; wdata = 0; rrow = 0; rcol = 0;
    @(negedge clk);
    for (int y = 0; y < 48; y++)
      for (int w = 0; w < 12; w++) begin
        we = 1; wrow = 6'(y); wword = 4'(w); wdata = $urandom;
        for (int b = 0; b < 4; b++) m[y][4 * w + b] = wdata[8 * b +: 8];
        @(negedge clk);
      end
    we = 0;
    for (int t = 0; t < 400; t++) begin
      rrow = 6'($urandom_range(47, 0));
      rcol = (t < 40) ? 6'(32 + t % 16) : 6'($urandom_range(47, 0));
      #1;
      for (int i = 0; i < 17; i++) begin
        automatic int c = int'(rcol) + i;
        if (c > 47) c = 47;
        checks++;
        if (rdata[i] != m[rrow][c]) begin
          failures++;
          $display("FAIL row %0d col %0d pix %0d: %0d expected %0d", rrow, rcol, i, rdata[i], m[rrow][c]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
