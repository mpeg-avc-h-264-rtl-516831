// me_top_tb: end-to-end test of the motion-estimation accelerator at its
// default sizes (384x320 frames, 48x48 windows, three references).
//
// Four frames are placed in a behavioural AHB memory: slot 0 is the current
// frame, slots 1..3 are references made from the same smooth random texture
// displaced per macroblock either uniformly or differently in its left and
// right halves; one reference per macroblock is noise free, so different
// references win in different macroblocks and 4x4 vectors merge or split.
// For a list of macroblocks (frame corners included, which exercises edge
// padding) the testbench runs the accelerator, reads the 20 result words and
// compares every one with a reference model of the search written here
// independently from the RTL. It also counts the mechanisms of the design
// (every pipeline stage, two-row and one-row SAD cycles, loads overlapping the
// search, sub-pel cycles, skipped out-of-window candidates, edge padding, bus
// wait states, both buffers as source of the 4x4 search, merged and split
// macroblocks) and counts a failure for any that never happened.
module me_top_tb;
  import me_pkg::*;

  localparam int W = 384, H = 320, FSZ = W * H;
  localparam int NMB = 8;

  logic clk = 1'b0, rst_n = 1'b0;
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

  me_top dut (.*);

  ahb_mem_model #(.SIZE(4 * FSZ), .MAX_WAIT(2)) u_mem (
    .clk, .rst_n, .haddr, .htrans, .hready, .hrdata, .waits, .reads
  );

  int checks = 0, failures = 0;

  // ------------------------------------------------------------------ frames
  byte unsigned fb [4][H][W];
  byte unsigned coarse [H/8+2][W/8+2];

  function automatic int tex(int x, int y);   // smooth texture, bilinear upsampled
    int cx, cy, fx, fy, a, b, c, d;
    if (x < 0) x = 0;
    if (y < 0) y = 0;
    if (x > W + 7) x = W + 7;
    if (y > H + 7) y = H + 7;
    cx = x / 8; cy = y / 8; fx = x % 8; fy = y % 8;
    a = coarse[cy][cx];     b = coarse[cy][cx + 1];
    c = coarse[cy + 1][cx]; d = coarse[cy + 1][cx + 1];
    return ((8 - fx) * (8 - fy) * a + fx * (8 - fy) * b + (8 - fx) * fy * c + fx * fy * d + 32) / 64;
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  task automatic make_frames();
    for (int y = 0; y < H / 8 + 2; y++)
      for (int x = 0; x < W / 8 + 2; x++) coarse[y][x] = 8'($urandom_range(255, 0));
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        fb[0][y][x] = 8'(tex(x + 8, y + 8));
        for (int r = 1; r <= 3; r++) begin
          int dx, dy, noise, clean;
          // one reference per macroblock is noise free, the others carry +-3
          clean = ((x / 16) + (y / 16)) % 3 + 1;
          if (((x / 16) + (y / 16)) % 2 == 0) begin
            // uniform motion over the macroblock
            dx = r - 2;
            dy = 2 - r;
          end else begin
            // left and right halves move differently
            dx = ((x % 16) < 8) ? r - 3 : 2;
            dy = ((y % 16) < 8) ? r : -r;
          end
          noise = (r == clean) ? 0 : int'($urandom_range(6, 0)) - 3;
          fb[r][y][x] = 8'(clampi(tex(x + 8 + dx, y + 8 + dy) + noise, 0, 255));
        end
      end
    for (int f = 0; f < 4; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) u_mem.mem[f * FSZ + y * W + x] = fb[f][y][x];
  endtask

  // ------------------------------------------------------------------ reference model
  int mbx0, mby0;   // pixel origin of the macroblock
  // loop bounds of the model, set at run time so the model stays a loop
  int n1, n2, n3, n4, n8, n16, n25;
  int curf;

  function automatic int pix(int f, int x, int y);
    return fb[f][clampi(y, 0, H - 1)][clampi(x, 0, W - 1)];
  endfunction

  function automatic int sad_int(int f, int mx, int my, int bx0, int by0, int bw, int bh);
    int s = 0;
    for (int j = by0; j < by0 + bh; j++)
      for (int i = bx0; i < bx0 + bw; i++) begin
        int d = pix(curf, mbx0 + i, mby0 + j) - pix(f, mbx0 + i + mx, mby0 + j + my);
        s += d < 0 ? -d : d;
      end
    return s;
  endfunction

  function automatic int bil(int f, int qx, int qy, int i, int j);
    int ix, iy, fx, fy, a, b, c, d;
    ix = qx >>> 2; iy = qy >>> 2; fx = qx & 3; fy = qy & 3;
    a = pix(f, mbx0 + i + ix,     mby0 + j + iy);
    b = pix(f, mbx0 + i + ix + 1, mby0 + j + iy);
    c = pix(f, mbx0 + i + ix,     mby0 + j + iy + 1);
    d = pix(f, mbx0 + i + ix + 1, mby0 + j + iy + 1);
    return ((4 - fx) * (4 - fy) * a + fx * (4 - fy) * b + (4 - fx) * fy * c + fx * fy * d + 8) >> 4;
  endfunction

  function automatic int sad_q(int f, int qx, int qy, int blk);
    int s = 0;
    int bx0 = 4 * (blk % 4), by0 = 4 * (blk / 4);
    for (int j = by0; j < by0 + n4; j++)
      for (int i = bx0; i < bx0 + n4; i++) begin
        int d = pix(curf, mbx0 + i, mby0 + j) - bil(f, qx, qy, i, j);
        s += d < 0 ? -d : d;
      end
    return s;
  endfunction

  int ox8[8] = '{-1, 0, 1, -1, 1, -1, 0, 1};
  int oy8[8] = '{-1, -1, -1, 0, 0, 1, 1, 1};

  function automatic bit inr(int v, int lim);
    return v >= -lim && v <= lim;
  endfunction

  // three-step style refinement; returns the best vector and SAD
  task automatic tss(int f, int first_step, inout int mx, inout int my, inout int s);
    for (int st = first_step; st >= n1; st--) begin
      int bx = mx, by = my, bs = s;
      for (int n = 0; n < n8; n++) begin
        int cx = mx + ox8[n] * st, cy = my + oy8[n] * st;
        if (inr(cx, 16) && inr(cy, 16)) begin
          int cs = sad_int(f, cx, cy, 0, 0, n16, n16);
          if (cs < bs) begin bx = cx; by = cy; bs = cs; end
        end
      end
      mx = bx; my = by; s = bs;
    end
  endtask

  // expected results
  int e_rmx[3], e_rmy[3], e_rs[3], e_best;
  int e_bmx[16], e_bmy[16], e_bs[16], e_qx[16], e_qy[16], e_pid[16];
  int e_mb_mode, e_sub[4], e_np;

  function automatic bit simv(int a, int b, int th);
    int dx = e_bmx[a] - e_bmx[b], dy = e_bmy[a] - e_bmy[b];
    return ((dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy)) <= th;
  endfunction

  task automatic model(int th, int refs[3]);
    int b3x[3], b3y[3], b3s[3];
    // reference 0: coarse grid, 3 best, three-step refinement of each
    for (int i = 0; i < n3; i++) b3s[i] = 65535;
    for (int i = 0; i < n25; i++) begin
      int cx = -16 + 8 * (i % 5), cy = -16 + 8 * (i / 5);
      int s = sad_int(refs[0], cx, cy, 0, 0, n16, n16);
      if (s < b3s[0]) begin
        b3x[2] = b3x[1]; b3y[2] = b3y[1]; b3s[2] = b3s[1];
        b3x[1] = b3x[0]; b3y[1] = b3y[0]; b3s[1] = b3s[0];
        b3x[0] = cx; b3y[0] = cy; b3s[0] = s;
      end else if (s < b3s[1]) begin
        b3x[2] = b3x[1]; b3y[2] = b3y[1]; b3s[2] = b3s[1];
        b3x[1] = cx; b3y[1] = cy; b3s[1] = s;
      end else if (s < b3s[2]) begin
        b3x[2] = cx; b3y[2] = cy; b3s[2] = s;
      end
    end
    e_rs[0] = 65535;
    for (int c = 0; c < n3; c++) begin
      int mx = b3x[c], my = b3y[c], s = b3s[c];
      tss(refs[0], 3, mx, my, s);
      if (s < e_rs[0]) begin e_rmx[0] = mx; e_rmy[0] = my; e_rs[0] = s; end
    end
    // older references: start from the newer reference's vector, steps 2 and 1
    for (int k = 1; k < n3; k++) begin
      int mx = e_rmx[k-1], my = e_rmy[k-1], s;
      s = sad_int(refs[k], mx, my, 0, 0, n16, n16);
      tss(refs[k], 2, mx, my, s);
      e_rmx[k] = mx; e_rmy[k] = my; e_rs[k] = s;
    end
    if (e_rs[2] < e_rs[0] && e_rs[2] < e_rs[1]) e_best = 2;
    else if (e_rs[1] < e_rs[0]) e_best = 1;
    else e_best = 0;
    // 4x4 +-2 search, centre first
    for (int b = 0; b < n16; b++) e_bs[b] = 4095;
    for (int i = 0; i < n25; i++) begin
      int kk = (i == 0) ? 12 : (i <= 12 ? i - 1 : i);
      int cx = e_rmx[e_best] + kk % 5 - 2, cy = e_rmy[e_best] + kk / 5 - 2;
      if (inr(cx, 16) && inr(cy, 16))
        for (int b = 0; b < n16; b++) begin
          int s = sad_int(refs[e_best], cx, cy, 4 * (b % 4), 4 * (b / 4), n4, n4);
          if (s < e_bs[b]) begin e_bs[b] = s; e_bmx[b] = cx; e_bmy[b] = cy; end
        end
    end
    // partition merge
    begin
      bit all8, qh, qv;
      int tl[4] = '{0, 2, 8, 10};
      for (int q = 0; q < n4; q++) begin
        bit h0 = simv(tl[q], tl[q] + 1, th), h1 = simv(tl[q] + 4, tl[q] + 5, th);
        bit v0 = simv(tl[q], tl[q] + 4, th), v1 = simv(tl[q] + 1, tl[q] + 5, th);
        e_sub[q] = (h0 && h1 && v0 && v1) ? 0 : (h0 && h1) ? 1 : (v0 && v1) ? 2 : 3;
      end
      all8 = e_sub[0] == 0 && e_sub[1] == 0 && e_sub[2] == 0 && e_sub[3] == 0;
      qh = simv(0, 2, th) && simv(8, 10, th);
      qv = simv(0, 8, th) && simv(2, 10, th);
      e_mb_mode = (all8 && qh && qv) ? 0 : (all8 && qh) ? 1 : (all8 && qv) ? 2 : 3;
      for (int b = 0; b < n16; b++) begin
        int bx = b % 4, by = b / 4, q = 2 * (by / 2) + bx / 2, tq = tl[q];
        case (e_mb_mode)
          0: e_pid[b] = 0;
          1: e_pid[b] = by < 2 ? 0 : 8;
          2: e_pid[b] = bx < 2 ? 0 : 2;
          default:
            case (e_sub[q])
              0: e_pid[b] = tq;
              1: e_pid[b] = tq + 4 * (by % 2);
              2: e_pid[b] = tq + (bx % 2);
              default: e_pid[b] = b;
            endcase
        endcase
      end
      e_np = 0;
      for (int b = 0; b < n16; b++) if (e_pid[b] == b) e_np++;
    end
    // sub-pel refinement per partition over +-1 pel (+-4 q-pel) around its
    // integer vector: centre, the other 24 half-pel grid points in raster
    // order, then the quarter-pel neighbours of the best that stay inside
    for (int p = 0; p < n16; p++) if (e_pid[p] == p) begin
      int cx = 4 * e_bmx[p], cy = 4 * e_bmy[p], bs = 0, bx, by, mx, my;
      for (int b = 0; b < n16; b++) if (e_pid[b] == p) bs += sad_q(refs[e_best], cx, cy, b);
      bx = cx; by = cy;
      for (int n = 0; n < n25; n++) if (n != 12) begin
        int qx = cx + 2 * (n % 5 - 2), qy = cy + 2 * (n / 5 - 2);
        if (inr(qx, 64) && inr(qy, 64)) begin
          int s = 0;
          for (int b = 0; b < n16; b++) if (e_pid[b] == p) s += sad_q(refs[e_best], qx, qy, b);
          if (s < bs) begin bs = s; bx = qx; by = qy; end
        end
      end
      mx = bx; my = by;
      for (int n = 0; n < n8; n++) begin
        int qx = mx + ox8[n], qy = my + oy8[n];
        if (inr(qx, 64) && inr(qy, 64) && inr(qx - cx, 4) && inr(qy - cy, 4)) begin
          int s = 0;
          for (int b = 0; b < n16; b++) if (e_pid[b] == p) s += sad_q(refs[e_best], qx, qy, b);
          if (s < bs) begin bs = s; bx = qx; by = qy; end
        end
      end
      for (int b = 0; b < n16; b++) if (e_pid[b] == p) begin e_qx[b] = bx; e_qy[b] = by; end
    end
  endtask

  // ------------------------------------------------------------------ mechanism counters
  int n_pipe[8], n_dual, n_single, n_sub, n_overlap, n_skip, n_pad, n_from_a, n_from_b;
  int n_merged16, n_split;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.st != dut.u_ctrl.S_IDLE) n_pipe[pipe]++;
    if (dut.u_pe.v1) n_dual++;
    if (dut.u_pe.v0 && !dut.u_pe.v1) n_single++;
    if (dut.u_ctrl.rmode == dut.u_ctrl.M_SUB && dut.u_pe.v0 && (dut.bil_fx != 0 || dut.bil_fy != 0)) n_sub++;
    if (dut.u_pe.v0 && dut.u_mem_ctrl.busy) n_overlap++;
    if (dut.u_ctrl.st == dut.u_ctrl.S_SEL && !dut.u_ctrl.sel_end && !dut.u_ctrl.sel_ok) n_skip++;
    if (dut.u_mem_ctrl.wr && dut.u_mem_ctrl.pad_q != 0) n_pad++;
    if (dut.u_pe.first && dut.u_ctrl.ph == dut.u_ctrl.PH_4X4) begin
      if (dut.u_ctrl.rmode == dut.u_ctrl.M_SINGLE_A) n_from_a++;
      if (dut.u_ctrl.rmode == dut.u_ctrl.M_SINGLE_B) n_from_b++;
    end
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic read_word(int a, output logic [31:0] w);
    @(negedge clk);
    info_re = 1'b1;
    info_raddr = INFO_AW'(a);
    @(negedge clk);
    info_re = 1'b0;
    w = info_rdata;
  endtask

  // ------------------------------------------------------------------ stimulus
  int mbs_x[NMB] = '{0, 23, 5, 12, 0, 23, 7, 18};
  int mbs_y[NMB] = '{0, 19, 3, 10, 19, 0, 12, 6};
  int cycles_per_mb[NMB];

  initial begin
    int refs[3] = '{1, 2, 3};
    start = 0; mb_x = 0; mb_y = 0; cur_frame = 0; merge_th = 4'd1;
    ref_frame[0] = 2'd1; ref_frame[1] = 2'd2; ref_frame[2] = 2'd3;
    info_re = 0; info_raddr = '0;
    for (int i = 0; i < MB + 5; i++) sixtap_pix[i] = 8'(i * 11);
    n1 = 1; n2 = 2; n3 = 3; n4 = 4; n8 = 8; n16 = 16; n25 = 25;
    make_frames();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < NMB; m++) begin
      automatic int t0;
      automatic logic [31:0] w;
      @(negedge clk);
      mb_x = 8'(mbs_x[m]); mb_y = 8'(mbs_y[m]);
      mbx0 = 16 * mbs_x[m]; mby0 = 16 * mbs_y[m]; curf = 0;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      mb_x = 8'hff; mb_y = 8'hff;     // the job must have been latched
      t0 = 0;
      while (!done) begin @(posedge clk); t0++; end
      cycles_per_mb[m] = t0;
      model(1, refs);
      for (int b = 0; b < 16; b++) begin
        blk_info_t bi;
        read_word(b, w);
        bi = w;
        check($sformatf("mb%0d blk%0d mv.x", m, b), int'(bi.mv.x), e_qx[b]);
        check($sformatf("mb%0d blk%0d mv.y", m, b), int'(bi.mv.y), e_qy[b]);
        check($sformatf("mb%0d blk%0d part", m, b), int'(bi.part_id), e_pid[b]);
        check($sformatf("mb%0d blk%0d sad", m, b), int'(bi.sad), e_bs[b]);
      end
      for (int k = 0; k < 3; k++) begin
        ref_info_t ri;
        read_word(INFO_REF0 + k, w);
        ri = w;
        check($sformatf("mb%0d ref%0d mv.x", m, k), int'(ri.mv.x), e_rmx[k]);
        check($sformatf("mb%0d ref%0d mv.y", m, k), int'(ri.mv.y), e_rmy[k]);
        check($sformatf("mb%0d ref%0d sad", m, k), int'(ri.sad), e_rs[k]);
      end
      begin
        mode_info_t mi;
        read_word(INFO_MODE, w);
        mi = w;
        check($sformatf("mb%0d best_ref", m), int'(mi.best_ref), e_best);
        check($sformatf("mb%0d mb_mode", m), int'(mi.mb_mode), e_mb_mode);
        for (int q = 0; q < 4; q++) check($sformatf("mb%0d sub%0d", m, q), int'(mi.sub_mode[q]), e_sub[q]);
        check($sformatf("mb%0d nparts", m), int'(mi.nparts), e_np);
        if (e_mb_mode == 0) n_merged16++;
        if (e_np > 4) n_split++;
      end
      $display("mb (%0d,%0d): %0d cycles, best ref %0d, mb_mode %0d, %0d partitions",
               mbs_x[m], mbs_y[m], cycles_per_mb[m], e_best, e_mb_mode, e_np);
    end
    // every mechanism must have occurred
    for (int p = 0; p < 8; p++) check($sformatf("pipe %0d seen", p), int'(n_pipe[p] > 0), 1);
    check("two-row SAD cycles", int'(n_dual > 0), 1);
    check("one-row SAD cycles", int'(n_single > 0), 1);
    check("sub-pel cycles", int'(n_sub > 0), 1);
    check("load overlapping search", int'(n_overlap > 0), 1);
    check("out-of-window candidates skipped", int'(n_skip > 0), 1);
    check("edge-padded words", int'(n_pad > 0), 1);
    check("bus wait states", int'(waits > 0), 1);
    check("4x4 search from buffer A", int'(n_from_a > 0), 1);
    check("4x4 search from buffer B", int'(n_from_b > 0), 1);
    check("macroblock merged to 16x16", int'(n_merged16 > 0), 1);
    check("macroblock split below 8x8", int'(n_split > 0), 1);
    $display("mechanisms: dual=%0d single=%0d sub=%0d overlap=%0d skip=%0d pad=%0d waits=%0d fromA=%0d fromB=%0d merged16=%0d split=%0d",
             n_dual, n_single, n_sub, n_overlap, n_skip, n_pad, waits, n_from_a, n_from_b, n_merged16, n_split);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
