// sad4x4: one 4x4 SAD processing element.
//
// Accumulates the sum of absolute differences between current and reference
// pixels of a 4x4 block, taking up to two 4-pixel rows per clock (lane 0 and
// lane 1). When `first` is high the accumulator restarts with this cycle's
// rows, so consecutive candidates follow each other without a bubble. After the
// four rows of the block have been presented, `sad` holds the block's SAD from
// the next clock edge on. Row-serial accumulation is this design's choice; the
// document gives the unit's function only.
module sad4x4
  import me_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              first,
  input  logic              en0,
  input  pix_t [3:0]        cur0,
  input  pix_t [3:0]        ref0,
  input  logic              en1,
  input  pix_t [3:0]        cur1,
  input  pix_t [3:0]        ref1,
  output logic [SAD4_W-1:0] sad
);
  logic [SAD4_W-1:0] row0, row1;

  always_comb begin
    row0 = '0;
    row1 = '0;
    for (int i = 0; i < 4; i++) begin
      row0 += SAD4_W'(absdiff(cur0[i], ref0[i]));
      row1 += SAD4_W'(absdiff(cur1[i], ref1[i]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sad <= '0;
    else if (first || en0 || en1)
      sad <= (first ? '0 : sad) + (en0 ? row0 : '0) + (en1 ? row1 : '0);
  end

endmodule
