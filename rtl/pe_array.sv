// pe_array: the SAD processing-element array of the motion estimator.
//
// Sixteen sad4x4 units, one per 4x4 block of the macroblock (four across, four
// down, as in the block diagram). Each clock the array takes up to two rows of a
// candidate: lane 0 carries row `row0` of the current macroblock and of the
// reference, lane 1 row `row1`. Row r is routed to the four units of block row
// r/4, each unit receiving its 4-pixel slice. With `first` high the units
// restart. One candidate therefore takes 16 cycles with one lane or 8 with two;
// its sixteen 4x4 SADs and their 16x16 sum are valid from the clock edge after
// its last row. The 16x16 SAD is formed combinationally from the 4x4 SADs, so
// every partition size of H.264 can be summed from the same results.
module pe_array
  import me_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               first,
  input  logic               v0,
  input  logic [3:0]         row0,
  input  row16_t             cur0,
  input  row16_t             ref0,
  input  logic               v1,
  input  logic [3:0]         row1,
  input  row16_t             cur1,
  input  row16_t             ref1,
  output logic [SAD4_W-1:0]  sad4 [NBLK],
  output logic [SAD16_W-1:0] sad16
);
  for (genvar by = 0; by < 4; by++) begin : g_row
    for (genvar bx = 0; bx < 4; bx++) begin : g_col
      sad4x4 u_pe (
        .clk  (clk),
        .rst_n(rst_n),
        .first(first),
        .en0  (v0 && (row0 >> 2) == 4'(by)),
        .cur0 (cur0[4*bx +: 4]),
        .ref0 (ref0[4*bx +: 4]),
        .en1  (v1 && (row1 >> 2) == 4'(by)),
        .cur1 (cur1[4*bx +: 4]),
        .ref1 (ref1[4*bx +: 4]),
        .sad  (sad4[4*by + bx])
      );
    end
  end

  always_comb begin
    sad16 = '0;
    for (int b = 0; b < NBLK; b++) sad16 += SAD16_W'(sad4[b]);
  end

endmodule
