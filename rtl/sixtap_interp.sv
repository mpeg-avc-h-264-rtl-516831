// sixtap_interp: H.264 luma six-tap interpolation of a 16-sample row.
//
// Computes the standard half-sample value from six consecutive integer samples
//   h = clip((E - 5F + 20G + 20H - 5I + J + 16) >> 5)
// for 16 positions at once, and the quarter-sample value between the integer
// sample G and h as (G + h + 1) >> 1. Input `pix` holds samples x-2 .. x+18
// (21 pixels, element 0 = x-2); output i is the half sample between x+i and
// x+i+1. Used on columns the same filter gives vertical half samples. The
// document only names this unit next to the bilinear interpolator; the filter
// taps come from the H.264 standard. Purely combinational.
module sixtap_interp
  import me_pkg::*;
(
  input  pix_t [MB+4:0] pix,
  output row16_t        half,
  output row16_t        quarter
);
  always_comb begin
    logic signed [15:0] acc;
    pix_t h;
    for (int i = 0; i < MB; i++) begin
      acc = 16'(signed'({8'd0, pix[i]}))
          - 16'sd5  * 16'(signed'({8'd0, pix[i+1]}))
          + 16'sd20 * 16'(signed'({8'd0, pix[i+2]}))
          + 16'sd20 * 16'(signed'({8'd0, pix[i+3]}))
          - 16'sd5  * 16'(signed'({8'd0, pix[i+4]}))
          + 16'(signed'({8'd0, pix[i+5]}))
          + 16'sd16;
      acc = acc >>> 5;
      if (acc < 0)        h = '0;
      else if (acc > 255) h = 8'd255;
      else                h = pix_t'(acc);
      half[i]    = h;
      quarter[i] = pix_t'((9'(pix[i+2]) + 9'(h) + 9'd1) >> 1);
    end
  end

endmodule
