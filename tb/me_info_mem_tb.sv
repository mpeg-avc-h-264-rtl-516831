// me_info_mem_tb: writes random words to every address of the result memory
// and reads them back through the read port, checking the one-cycle read
// latency and that a read with `re` low keeps the previous output.
module me_info_mem_tb;
  import me_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we, re;
  logic [4:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [31:0] m [32];
  int checks = 0, failures = 0;

  me_info_mem dut (.*);

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    @(negedge clk);
    for (int a = 0; a < 32; a++) begin
      we = 1; waddr = 5'(a); wdata = $urandom; m[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int t = 0; t < 200; t++) begin
      automatic logic [31:0] prev;
      raddr = 5'($urandom);
      re = 1;
      @(negedge clk);
      checks++;
      if (rdata != m[raddr]) begin
        failures++;
        $display("FAIL addr %0d: %h expected %h", raddr, rdata, m[raddr]);
      end
      prev = rdata;
      re = 0;
      raddr = raddr + 5'd1;
      @(negedge clk);
      checks++;
      if (rdata != prev) failures++;
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
