// partition_merge: bottom-up merge of 4x4 motion vectors into H.264 partitions.
//
// Input: the sixteen integer motion vectors found by the 4x4 refinement, in
// raster order (block b = 4*by + bx). Two vectors are "similar" when
// |dx| + |dy| <= th. Inside each 8x8 quadrant the four 4x4 vectors merge into
//   8x8 if both row pairs and both column pairs are similar,
//   8x4 if both row pairs are similar, 4x8 if both column pairs are, else 4x4.
// If all four quadrants became 8x8, the quadrant vectors merge the same way
// into 16x16, 16x8 or 8x16; otherwise the macroblock stays 8x8 with the
// per-quadrant sub-modes. A merged partition takes the vector of its top-left
// 4x4 block. Output part_id[b] is the index of the top-left block of the
// partition that contains block b, so the partitions are exactly the blocks
// with part_id[b] == b. Purely combinational.
// The merge of similar neighbours follows the document; the similarity measure
// (vector distance only, no SAD term), the threshold and the order of the tests
// are this design's choices.
module partition_merge
  import me_pkg::*;
(
  input  mv_t        mv [NBLK],
  input  logic [3:0] th,
  output mb_mode_e   mb_mode,
  output sub_mode_e  sub_mode [4],
  output logic [3:0] part_id [NBLK],
  output logic [5:0] nparts
);
  function automatic logic sim(mv_t a, mv_t b, logic [3:0] t);
    logic [8:0] dx, dy;
    dx = (a.x > b.x) ? 9'(a.x - b.x) : 9'(b.x - a.x);
    dy = (a.y > b.y) ? 9'(a.y - b.y) : 9'(b.y - a.y);
    return (10'(dx) + 10'(dy)) <= 10'(t);
  endfunction

  always_comb begin
    logic [3:0] tl [4];
    logic h0, h1, v0, v1;
    logic all8, qh, qv;
    for (int q = 0; q < 4; q++) begin
      tl[q] = 4'(8 * (q / 2) + 2 * (q % 2));          // top-left block of quadrant q
      h0 = sim(mv[tl[q]],     mv[tl[q] + 1], th);
      h1 = sim(mv[tl[q] + 4], mv[tl[q] + 5], th);
      v0 = sim(mv[tl[q]],     mv[tl[q] + 4], th);
      v1 = sim(mv[tl[q] + 1], mv[tl[q] + 5], th);
      if (h0 && h1 && v0 && v1) sub_mode[q] = S8X8;
      else if (h0 && h1)        sub_mode[q] = S8X4;
      else if (v0 && v1)        sub_mode[q] = S4X8;
      else                      sub_mode[q] = S4X4;
    end

    all8 = 1'b1;
    for (int q = 0; q < 4; q++) if (sub_mode[q] != S8X8) all8 = 1'b0;
    qh = sim(mv[tl[0]], mv[tl[1]], th) && sim(mv[tl[2]], mv[tl[3]], th);
    qv = sim(mv[tl[0]], mv[tl[2]], th) && sim(mv[tl[1]], mv[tl[3]], th);
    if (all8 && qh && qv) mb_mode = P16X16;
    else if (all8 && qh)  mb_mode = P16X8;
    else if (all8 && qv)  mb_mode = P8X16;
    else                  mb_mode = P8X8;

    for (int b = 0; b < NBLK; b++) begin
      logic [1:0] q;
      int tq;
      q  = 2'(2 * (b / 8) + (b % 4) / 2);
      tq = 8 * (b / 8) + 2 * ((b % 4) / 2);
      unique case (mb_mode)
        P16X16: part_id[b] = 4'd0;
        P16X8:  part_id[b] = (b < 8) ? 4'd0 : 4'd8;
        P8X16:  part_id[b] = ((b % 4) < 2) ? 4'd0 : 4'd2;
        default: begin
          unique case (sub_mode[q])
            S8X8:    part_id[b] = 4'(tq);
            S8X4:    part_id[b] = 4'(tq + 4 * (((b / 4) % 2)));
            S4X8:    part_id[b] = 4'(tq + (b % 2));
            default: part_id[b] = 4'(b);
          endcase
        end
      endcase
    end

    nparts = '0;
    for (int b = 0; b < NBLK; b++) if (part_id[b] == 4'(b)) nparts += 6'd1;
  end

endmodule
