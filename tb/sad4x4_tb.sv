// sad4x4_tb: random test of one 4x4 SAD unit. Presents random 4x4 blocks row
// by row in one-lane and two-lane patterns, with and without a bubble, and
// compares the accumulated SAD with a sum computed here.
module sad4x4_tb;
  import me_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic first, en0, en1;
  pix_t [3:0] cur0, ref0, cur1, ref1;
  logic [SAD4_W-1:0] sad;
  int checks = 0, failures = 0;

  sad4x4 dut (.*);

  pix_t c [4][4], r [4][4];

  initial begin
    first = 0; en0 = 0; en1 = 0; cur0 = '0; ref0 = '0; cur1 = '0; ref1 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      automatic int exp = 0;
      automatic bit two = t[0];
      for (int j = 0; j < 4; j++)
        for (int i = 0; i < 4; i++) begin
          c[j][i] = (t % 7 == 0) ? 8'hff : 8'($urandom);
          r[j][i] = (t % 7 == 0) ? 8'h00 : 8'($urandom);
          exp += (c[j][i] > r[j][i]) ? c[j][i] - r[j][i] : r[j][i] - c[j][i];
        end
      for (int s = 0; s < (two ? 2 : 4); s++) begin
        first = (s == 0);
        en0 = 1;
        en1 = two;
        for (int i = 0; i < 4; i++) begin
          cur0[i] = c[two ? 2 * s : s][i];
          ref0[i] = r[two ? 2 * s : s][i];
          cur1[i] = two ? c[2 * s + 1][i] : 8'($urandom);
          ref1[i] = two ? r[2 * s + 1][i] : 8'($urandom);
        end
        @(negedge clk);
        if (t % 5 == 0) begin  // idle cycle must hold the sum
          first = 0; en0 = 0; en1 = 0;
          @(negedge clk);
        end
      end
      first = 0; en0 = 0; en1 = 0;
      checks++;
      if (int'(sad) != exp) begin
        failures++;
        $display("FAIL block %0d: sad %0d expected %0d", t, sad, exp);
      end
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
