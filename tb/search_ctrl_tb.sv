// search_ctrl_tb: checks the search controller's schedule and search on a
// small 64x48 frame, with the controller wired to the real buffers, SAD array
// and loader (through me_top).
// Two jobs on macroblock (1,1): in the first, reference 0 and 1 are exact
// copies of the current frame displaced by (8,-8) and reference 2 is noisy;
// in the second only reference 2 is exact. Checked: the sequence of loads
// (frame and destination buffer A/B of each, following the two-buffer
// pipeline), the pipeline stages appearing in order 0..7, two rows per
// candidate cycle in stages 1 and 3 and one row in 5 and 6, 8 or 16 row cycles
// per candidate, the 25-point coarse grid in raster order, a load running
// while stage 5 searches, the buffer feeding the 4x4 search, and the results
// (vector (8,-8) with SAD 0 in the exact references, the chosen reference,
// a 16x16 partition and quarter-pel vector (32,-32) for every block).
module search_ctrl_tb;
  import me_pkg::*;
  localparam int W = 64, H = 48, FSZ = W * H;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               start, busy, done;
  logic [7:0]         mb_x, mb_y;
  logic [1:0]         cur_frame;
  logic [1:0]         ref_frame [NREF];
  logic [3:0]         merge_th;
  logic [2:0]         pipe;
  logic               info_re;
  logic [INFO_AW-1:0] info_raddr;
  logic [31:0]        info_rdata;
  logic [31:0]        haddr, hrdata;
  logic [1:0]         htrans;
  logic               hwrite, hready;
  logic [2:0]         hsize, hburst;
  pix_t [MB+4:0]      sixtap_pix;
  row16_t             sixtap_half, sixtap_quarter;
  int                 waits, reads;

  me_top #(.FRAME_W(W), .FRAME_H(H)) dut (.*);
  ahb_mem_model #(.SIZE(4 * FSZ), .MAX_WAIT(1)) u_mem (
    .clk, .rst_n, .haddr, .htrans, .hready, .hrdata, .waits, .reads
  );

  int checks = 0, failures = 0;
  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------- monitors
  int ncmd, cmd_kind [8], cmd_frame [8], cmd_dest [8];
  int last_pipe, pipe_order_bad;
  int firsts [8], rows [8], dual_bad, single_bad, overlap5, grid_bad, ngrid;
  int src4x4_a, src4x4_b;

  always @(posedge clk) if (rst_n) begin
    automatic logic [2:0] p = pipe;
    if (dut.u_mem_ctrl.cmd_valid && dut.u_mem_ctrl.cmd_ready) begin
      if (ncmd < 8) begin
        cmd_kind[ncmd]  = int'(dut.u_mem_ctrl.cmd);
        cmd_frame[ncmd] = int'(dut.u_mem_ctrl.frame);
        cmd_dest[ncmd]  = int'(dut.u_mem_ctrl.dest);
      end
      ncmd++;
    end
    if (busy) begin
      if (int'(p) < last_pipe) pipe_order_bad++;
      last_pipe = int'(p);
    end
    if (dut.u_pe.v0) begin
      rows[p]++;
      if (dut.u_pe.first) begin
        firsts[p]++;
        if (p == 1 && ngrid < 25) begin
          if (int'(dut.u_ctrl.cx) != -16 + 8 * (ngrid % 5) || int'(dut.u_ctrl.cy) != -16 + 8 * (ngrid / 5))
            grid_bad++;
          ngrid++;
        end
        if (p == 6) begin
          if (dut.u_ctrl.rmode == dut.u_ctrl.M_SINGLE_A) src4x4_a++;
          if (dut.u_ctrl.rmode == dut.u_ctrl.M_SINGLE_B) src4x4_b++;
        end
      end
      if ((p == 1 || p == 3) && !dut.u_pe.v1) dual_bad++;
      if ((p == 5 || p == 6) && dut.u_pe.v1) single_bad++;
      if (p == 5 && dut.u_mem_ctrl.busy) overlap5++;
    end
  end

  task automatic clear_monitors();
    ncmd = 0; last_pipe = 0; pipe_order_bad = 0; dual_bad = 0; single_bad = 0;
    overlap5 = 0; grid_bad = 0; ngrid = 0; src4x4_a = 0; src4x4_b = 0;
    for (int i = 0; i < 8; i++) begin firsts[i] = 0; rows[i] = 0; end
  endtask

  // ---------------------------------------------------------------- frames
  byte unsigned coarse [H/4+4][W/4+4];
  function automatic int tex(int x, int y);
    int cx, cy, fx, fy;
    x = x + 8; y = y + 8;
    if (x < 0) x = 0;
    if (y < 0) y = 0;
    if (x > W + 12) x = W + 12;
    if (y > H + 12) y = H + 12;
    cx = x / 4; cy = y / 4; fx = x % 4; fy = y % 4;
    return ((4 - fx) * (4 - fy) * coarse[cy][cx] + fx * (4 - fy) * coarse[cy][cx + 1]
          + (4 - fx) * fy * coarse[cy + 1][cx] + fx * fy * coarse[cy + 1][cx + 1] + 8) / 16;
  endfunction

  // slot 0: current; slots 1..3: references, `exact` ones displaced by (8,-8)
  task automatic make_frames(bit exact1, bit exact2, bit exact3);
    bit ex[4];
    ex[1] = exact1; ex[2] = exact2; ex[3] = exact3;
    for (int y = 0; y < H / 4 + 4; y++)
      for (int x = 0; x < W / 4 + 4; x++) coarse[y][x] = 8'($urandom);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        u_mem.mem[y * W + x] = 8'(tex(x, y));
        for (int f = 1; f <= 3; f++)
          u_mem.mem[f * FSZ + y * W + x] = ex[f] ? 8'(tex(x - 8, y + 8))
                                                 : 8'(tex(x - 8, y + 8) ^ 8'($urandom_range(15, 0)));
      end
  endtask

  task automatic job(int best, string tag);
    logic [31:0] w;
    clear_monitors();
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(posedge clk);
    @(negedge clk);
    // loads: current MB, ref0 -> A+B, ref1 -> A+B, ref2 -> A, best of 0/1 -> B,
    // best -> the buffer not feeding the 4x4 search
    chk({tag, " loads"}, ncmd, 6);
    chk({tag, " load0 cur"}, cmd_kind[0], int'(MC_LOAD_CUR));
    chk({tag, " load0 frame"}, cmd_frame[0], 0);
    chk({tag, " load1 frame"}, cmd_frame[1], 1);  chk({tag, " load1 dest"}, cmd_dest[1], 3);
    chk({tag, " load2 frame"}, cmd_frame[2], 2);  chk({tag, " load2 dest"}, cmd_dest[2], 3);
    chk({tag, " load3 frame"}, cmd_frame[3], 3);  chk({tag, " load3 dest"}, cmd_dest[3], 1);
    if (best == 0) chk({tag, " load4 frame"}, cmd_frame[4], 1);  // tie keeps ref 0
    else chk({tag, " load4 frame is ref 0 or 1"}, int'(cmd_frame[4] == 1 || cmd_frame[4] == 2), 1);
     chk({tag, " load4 dest"}, cmd_dest[4], 2);
    chk({tag, " load5 frame"}, cmd_frame[5], best + 1);
    chk({tag, " load5 dest"}, cmd_dest[5], best == 2 ? 2 : 1);
    for (int i = 1; i <= 5; i++) chk({tag, " load is a window"}, cmd_kind[i], int'(MC_LOAD_SW));
    chk({tag, " stages in order"}, pipe_order_bad, 0);
    chk({tag, " stage 7 reached"}, last_pipe, 7);
    chk({tag, " two rows in stages 1,3"}, dual_bad, 0);
    chk({tag, " one row in stages 5,6"}, single_bad, 0);
    chk({tag, " rows per candidate stage 1"}, rows[1], 8 * firsts[1]);
    chk({tag, " rows per candidate stage 3"}, rows[3], 8 * firsts[3]);
    chk({tag, " rows per candidate stage 5"}, rows[5], 16 * firsts[5]);
    chk({tag, " rows per candidate stage 6"}, rows[6], 16 * firsts[6]);
    chk({tag, " rows per candidate stage 7"}, rows[7], 16 * firsts[7]);
    chk({tag, " coarse grid"}, grid_bad, 0);
    chk({tag, " coarse grid points"}, int'(firsts[1] >= 25), 1);
    chk({tag, " 4x4 candidates"}, firsts[6], 25);
    chk({tag, " load during stage 5"}, int'(overlap5 > 0), 1);
    chk({tag, " 4x4 source"}, best == 2 ? src4x4_a : src4x4_b, 25);
    // results
    for (int k = 0; k < 3; k++) begin
      ref_info_t ri;
      info_re = 1; info_raddr = INFO_AW'(INFO_REF0 + k);
      @(negedge clk);
      info_re = 0;
      ri = info_rdata;
      if (k == best || (best == 0 && k == 1)) begin
        chk({tag, " exact ref mv.x"}, int'(ri.mv.x), 8);
        chk({tag, " exact ref mv.y"}, int'(ri.mv.y), -8);
        chk({tag, " exact ref sad"}, int'(ri.sad), 0);
      end
    end
    begin
      mode_info_t mi;
      info_re = 1; info_raddr = INFO_AW'(INFO_MODE);
      @(negedge clk);
      info_re = 0;
      mi = info_rdata;
      chk({tag, " best ref"}, int'(mi.best_ref), best);
      chk({tag, " mb mode"}, int'(mi.mb_mode), int'(P16X16));
      chk({tag, " nparts"}, int'(mi.nparts), 1);
    end
    for (int b = 0; b < 16; b++) begin
      blk_info_t bi;
      info_re = 1; info_raddr = INFO_AW'(b);
      @(negedge clk);
      info_re = 0;
      bi = info_rdata;
      chk({tag, " blk mv.x"}, int'(bi.mv.x), 32);
      chk({tag, " blk mv.y"}, int'(bi.mv.y), -32);
      chk({tag, " blk sad"}, int'(bi.sad), 0);
    end
  endtask

  initial begin
    start = 0; mb_x = 8'd1; mb_y = 8'd1; cur_frame = 2'd0; merge_th = 4'd1;
    ref_frame[0] = 2'd1; ref_frame[1] = 2'd2; ref_frame[2] = 2'd3;
    info_re = 0; info_raddr = '0;
    for (int i = 0; i < MB + 5; i++) sixtap_pix[i] = '0;
    clear_monitors();
    make_frames(1, 1, 0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    job(0, "job1");
    make_frames(0, 0, 1);
    job(2, "job2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
