// mem_ctrl_tb: the EBUS loader against the behavioural AHB memory, with a
// small 64x48 frame. Loads windows at the top-left, bottom-right and an inner
// macroblock and a current macroblock, captures every buffer write and checks
// each pixel against the edge-padded frame computed here. Also checks the bus
// rules (address and NONSEQ held while HREADY is low, one transfer at a time),
// the write-enable routing to buffers A/B and, without wait states, the load
// time of exactly two cycles per word.
module mem_ctrl_tb;
  import me_pkg::*;
  localparam int W = 64, H = 48, FSZ = W * H;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready, busy;
  mc_cmd_e cmd;
  logic [1:0] frame, dest;
  logic [7:0] mb_x, mb_y;
  logic [31:0] haddr, hrdata;
  logic [1:0] htrans;
  logic hwrite, hready;
  logic [2:0] hsize, hburst;
  logic sw_we_a, sw_we_b, cur_we;
  logic [5:0] sw_wrow;
  logic [3:0] sw_wword, cur_wrow;
  logic [1:0] cur_wword;
  logic [31:0] wdata;
  int waits, reads;

  mem_ctrl #(.FRAME_W(W), .FRAME_H(H)) dut (.*);
  ahb_mem_model #(.SIZE(4 * FSZ), .MAX_WAIT(2)) u_mem (
    .clk, .rst_n, .haddr, .htrans, .hready, .hrdata, .waits, .reads
  );

  int checks = 0, failures = 0;
  pix_t swa [48][48], swb [48][48], cm [16][16];
  int nwa, nwb, nwc;

  always @(posedge clk) if (rst_n) begin
    if (sw_we_a) begin for (int b = 0; b < 4; b++) swa[sw_wrow][4 * sw_wword + b] = wdata[8 * b +: 8]; nwa++; end
    if (sw_we_b) begin for (int b = 0; b < 4; b++) swb[sw_wrow][4 * sw_wword + b] = wdata[8 * b +: 8]; nwb++; end
    if (cur_we)  begin for (int b = 0; b < 4; b++) cm[cur_wrow][4 * cur_wword + b] = wdata[8 * b +: 8]; nwc++; end
  end

  // bus rule: an address phase held by HREADY low keeps address and HTRANS
  logic [31:0] last_addr;
  logic        last_held;
  always @(posedge clk) if (rst_n) begin
    if (last_held) begin
      checks++;
      if (htrans != 2'b10 || haddr != last_addr) begin
        failures++;
        $display("FAIL address phase not held");
      end
    end
    last_held <= (htrans == 2'b10) && !hready;
    last_addr <= haddr;
  end

  function automatic int fpix(int f, int x, int y);
    if (x < 0) x = 0;
    if (y < 0) y = 0;
    if (x > W - 1) x = W - 1;
    if (y > H - 1) y = H - 1;
    return u_mem.mem[f * FSZ + y * W + x];
  endfunction

  task automatic run(mc_cmd_e c, int f, int mx, int my, logic [1:0] d, output int cyc);
    @(negedge clk);
    cmd_valid = 1; cmd = c; frame = 2'(f); mb_x = 8'(mx); mb_y = 8'(my); dest = d;
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 0;
    cyc = 1;
    while (busy) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    int cyc, w0, nwa0, nwb0;
    int mbs[3][2] = '{'{0, 0}, '{3, 2}, '{1, 1}};
    cmd_valid = 0; cmd = MC_LOAD_CUR; frame = 0; mb_x = 0; mb_y = 0; dest = 0;
    nwa = 0; nwb = 0; nwc = 0; last_held = 0; last_addr = 0;
    for (int i = 0; i < 4 * FSZ; i++) u_mem.mem[i] = 8'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 3; m++) begin
      automatic logic [1:0] d = (m == 0) ? 2'b11 : (m == 1 ? 2'b01 : 2'b10);
      automatic int f = m + 1;
      nwa0 = nwa; nwb0 = nwb; w0 = waits;
      run(MC_LOAD_SW, f, mbs[m][0], mbs[m][1], d, cyc);
      checks++;
      if (nwa - nwa0 != (d[0] ? 576 : 0) || nwb - nwb0 != (d[1] ? 576 : 0)) begin
        failures++;
        $display("FAIL write routing dest=%b: A %0d B %0d", d, nwa - nwa0, nwb - nwb0);
      end
      checks++;
      if (cyc != 2 * 576 + (waits - w0) + 1) begin
        failures++;
        $display("FAIL load time %0d cycles, expected %0d", cyc, 2 * 576 + waits - w0 + 1);
      end
      for (int y = 0; y < 48; y++)
        for (int x = 0; x < 48; x++) begin
          automatic int e = fpix(f, 16 * mbs[m][0] - 16 + x, 16 * mbs[m][1] - 16 + y);
          checks++;
          if (int'(d[0] ? swa[y][x] : swb[y][x]) != e) begin
            failures++;
            if (failures < 10) $display("FAIL mb%0d window (%0d,%0d)", m, x, y);
          end
        end
    end
    run(MC_LOAD_CUR, 0, 2, 1, 2'b00, cyc);
    checks++;
    if (nwc != 64) failures++;
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++) begin
        checks++;
        if (int'(cm[y][x]) != fpix(0, 32 + x, 16 + y)) failures++;
      end
    checks++;
    if (waits == 0) begin
      failures++;
      $display("FAIL no wait states were exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
