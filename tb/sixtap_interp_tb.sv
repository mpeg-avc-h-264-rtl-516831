// sixtap_interp_tb: checks the six-tap half samples (taps 1 -5 20 20 -5 1,
// rounding, clipping to 0..255) and the quarter samples on random rows and on
// rows built to overflow and underflow the clip range.
module sixtap_interp_tb;
  import me_pkg::*;
  pix_t [MB+4:0] pix;
  row16_t half, quarter;
  int checks = 0, failures = 0;

  sixtap_interp dut (.*);

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 21; i++) begin
        if (t == 0) pix[i] = (i % 4 < 2) ? 8'd0 : 8'd255;
        else if (t == 1) pix[i] = (i % 4 < 2) ? 8'd255 : 8'd0;
        else pix[i] = 8'($urandom);
      end
      #1;
      for (int i = 0; i < 16; i++) begin
        automatic int h = (int'(pix[i]) - 5 * int'(pix[i+1]) + 20 * int'(pix[i+2]) + 20 * int'(pix[i+3]) - 5 * int'(pix[i+4]) + int'(pix[i+5]) + 16) >>> 5;
        automatic int q;
        if (h < 0) h = 0;
        if (h > 255) h = 255;
        q = (pix[i+2] + h + 1) / 2;
        checks += 2;
        if (int'(half[i]) != h) begin
          failures++;
          $display("FAIL half %0d: %0d expected %0d", i, half[i], h);
        end
        if (int'(quarter[i]) != q) begin
          failures++;
          $display("FAIL quarter %0d: %0d expected %0d", i, quarter[i], q);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
