// cur_mb_buf_tb: fills the 16x16 macroblock buffer with random words and reads
// every pair of rows through both read ports.
module cur_mb_buf_tb;
  import me_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [3:0] wrow, rrow0, rrow1;
  logic [1:0] wword;
  logic [31:0] wdata;
  row16_t rdata0, rdata1;
  int checks = 0, failures = 0;
  pix_t m [16][16];

  cur_mb_buf dut (.*);

  initial begin
    we = 0; wrow = 0; wword = 0; wdata = 0; rrow0 = 0; rrow1 = 0;
    @(negedge clk);
    for (int y = 0; y < 16; y++)
      for (int w = 0; w < 4; w++) begin
        we = 1; wrow = 4'(y); wword = 2'(w); wdata = $urandom;
        for (int b = 0; b < 4; b++) m[y][4 * w + b] = wdata[8 * b +: 8];
        @(negedge clk);
      end
    we = 0;
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        rrow0 = 4'(a); rrow1 = 4'(b);
        #1;
        for (int i = 0; i < 16; i++) begin
          checks += 2;
          if (rdata0[i] != m[a][i]) failures++;
          if (rdata1[i] != m[b][i]) failures++;
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
