// pe_array_tb: random test of the 16-unit SAD array. For random 16x16 current
// and reference blocks it feeds the rows either one per cycle (16 cycles) or
// two per cycle (8 cycles), back to back without bubbles, and compares all
// sixteen 4x4 SADs and the 16x16 SAD with sums computed here. It also checks
// that the results are ready exactly one clock after the last row.
module pe_array_tb;
  import me_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic first, v0, v1;
  logic [3:0] row0, row1;
  row16_t cur0, ref0, cur1, ref1;
  logic [SAD4_W-1:0]  sad4 [NBLK];
  logic [SAD16_W-1:0] sad16;
  int checks = 0, failures = 0;

  pe_array dut (.*);

  pix_t c [16][16], r [16][16];

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    first = 0; v0 = 0; v1 = 0; row0 = 0; row1 = 0;
    cur0 = '0; ref0 = '0; cur1 = '0; ref1 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      automatic int e4 [16];
      automatic int e16 = 0, ncyc = 0;
      automatic bit two = t[0];
      for (int b = 0; b < 16; b++) e4[b] = 0;
      for (int j = 0; j < 16; j++)
        for (int i = 0; i < 16; i++) begin
          automatic int d;
          c[j][i] = (t == 2) ? 8'hff : 8'($urandom);
          r[j][i] = (t == 2) ? 8'h00 : 8'($urandom);
          d = c[j][i] - r[j][i];
          if (d < 0) d = -d;
          e4[4 * (j / 4) + i / 4] += d;
          e16 += d;
        end
      for (int s = 0; s < (two ? 8 : 16); s++) begin
        first = (s == 0);
        v0 = 1;
        v1 = two;
        row0 = 4'(two ? 2 * s : s);
        row1 = 4'(two ? 2 * s + 1 : $urandom);
        for (int i = 0; i < 16; i++) begin
          cur0[i] = c[row0][i];
          ref0[i] = r[row0][i];
          cur1[i] = two ? c[row1][i] : 8'($urandom);
          ref1[i] = two ? r[row1][i] : 8'($urandom);
        end
        @(negedge clk);
        ncyc++;
      end
      chk("cycles per candidate", ncyc, two ? 8 : 16);
      // next candidate's first row is applied now; results of this one are visible
      for (int b = 0; b < 16; b++) chk($sformatf("t%0d sad4[%0d]", t, b), int'(sad4[b]), e4[b]);
      chk($sformatf("t%0d sad16", t), int'(sad16), e16);
      first = 0; v0 = 0; v1 = 0;
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
