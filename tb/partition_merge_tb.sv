// partition_merge_tb: directed vector fields that must produce each
// macroblock mode (16x16, 16x8, 8x16, 8x8) and each sub-mode (8x8, 8x4, 4x8,
// 4x4), plus threshold boundary cases; checks modes, partition ids and the
// partition count against values written out here.
module partition_merge_tb;
  import me_pkg::*;
  mv_t        mv [NBLK];
  logic [3:0] th;
  mb_mode_e   mb_mode;
  sub_mode_e  sub_mode [4];
  logic [3:0] part_id [NBLK];
  logic [5:0] nparts;
  int checks = 0, failures = 0;

  partition_merge dut (.*);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic mv_t v(int x, int y);
    mv_t m;
    m.x = 8'(x);
    m.y = 8'(y);
    return m;
  endfunction

  // expected part ids given as 16 numbers
  task automatic expect_ids(string name, int mbm, int s0, int s1, int s2, int s3, int ids[16], int np);
    #1;
    chk({name, " mb_mode"}, int'(mb_mode), mbm);
    chk({name, " sub0"}, int'(sub_mode[0]), s0);
    chk({name, " sub1"}, int'(sub_mode[1]), s1);
    chk({name, " sub2"}, int'(sub_mode[2]), s2);
    chk({name, " sub3"}, int'(sub_mode[3]), s3);
    for (int b = 0; b < 16; b++) chk($sformatf("%s id%0d", name, b), int'(part_id[b]), ids[b]);
    chk({name, " nparts"}, int'(nparts), np);
  endtask

  initial begin
    th = 4'd1;
    // all equal (within threshold) -> 16x16
    for (int b = 0; b < 16; b++) mv[b] = v(3 + (b % 2), -2);
    expect_ids("16x16", 0, 0, 0, 0, 0, '{0,0,0,0, 0,0,0,0, 0,0,0,0, 0,0,0,0}, 1);
    // top / bottom halves -> 16x8
    for (int b = 0; b < 16; b++) mv[b] = (b < 8) ? v(1, 1) : v(-5, 4);
    expect_ids("16x8", 1, 0, 0, 0, 0, '{0,0,0,0, 0,0,0,0, 8,8,8,8, 8,8,8,8}, 2);
    // left / right halves -> 8x16
    for (int b = 0; b < 16; b++) mv[b] = (b % 4 < 2) ? v(0, 0) : v(7, 7);
    expect_ids("8x16", 2, 0, 0, 0, 0, '{0,0,2,2, 0,0,2,2, 0,0,2,2, 0,0,2,2}, 2);
    // four different quadrants -> 8x8
    for (int b = 0; b < 16; b++) mv[b] = v(4 * (2 * (b / 8) + (b % 4) / 2), 0);
    expect_ids("8x8", 3, 0, 0, 0, 0, '{0,0,2,2, 0,0,2,2, 8,8,10,10, 8,8,10,10}, 4);
    // quadrant 0: 8x4, quadrant 1: 4x8, quadrant 2: 4x4, quadrant 3: 8x8
    for (int b = 0; b < 16; b++) mv[b] = v(0, 0);
    mv[4] = v(5, 0); mv[5] = v(5, 0);            // q0 bottom row differs
    mv[3] = v(0, 6); mv[7] = v(0, 6);            // q1 right column differs
    mv[8] = v(-9, 0); mv[9] = v(9, 0); mv[12] = v(0, 9); mv[13] = v(0, -9);  // q2 all differ
    expect_ids("mixed", 3, 1, 2, 3, 0, '{0,0,2,3, 4,4,2,3, 8,9,10,10, 12,13,10,10}, 9);
    // threshold boundary: distance 2 merges with th=2 but not with th=1
    for (int b = 0; b < 16; b++) mv[b] = (b % 2) ? v(1, 1) : v(0, 0);
    th = 4'd2;
    expect_ids("th2", 0, 0, 0, 0, 0, '{0,0,0,0, 0,0,0,0, 0,0,0,0, 0,0,0,0}, 1);
    th = 4'd1;
    expect_ids("th1", 3, 2, 2, 2, 2, '{0,1,2,3, 0,1,2,3, 8,9,10,11, 8,9,10,11}, 8);
    // extreme vectors must not wrap
    for (int b = 0; b < 16; b++) mv[b] = (b % 4 < 2) ? v(-128, -128) : v(127, 127);
    th = 4'd15;
    expect_ids("extreme", 2, 0, 0, 0, 0, '{0,0,2,2, 0,0,2,2, 0,0,2,2, 0,0,2,2}, 2);
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
