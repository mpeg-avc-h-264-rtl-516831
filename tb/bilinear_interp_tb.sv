// bilinear_interp_tb: checks the bilinear quarter-pel samples for all 16
// fractional positions on random and extreme rows against the weighted
// average computed here; position (0,0) must return the top row unchanged.
module bilinear_interp_tb;
  import me_pkg::*;
  row17_t top, bot;
  logic [1:0] fx, fy;
  row16_t out;
  int checks = 0, failures = 0;

  bilinear_interp dut (.*);

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 17; i++) begin
        top[i] = (t < 10) ? 8'hff : 8'($urandom);
        bot[i] = (t < 10) ? 8'hff : 8'($urandom);
      end
      fx = 2'(t % 4);
      fy = 2'((t / 4) % 4);
      #1;
      for (int i = 0; i < 16; i++) begin
        automatic int e = ((4 - fx) * (4 - fy) * top[i] + fx * (4 - fy) * top[i + 1]
               + (4 - fx) * fy * bot[i] + fx * fy * bot[i + 1] + 8) / 16;
        checks++;
        if (int'(out[i]) != e) begin
          failures++;
          $display("FAIL fx=%0d fy=%0d i=%0d: %0d expected %0d", fx, fy, i, out[i], e);
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
