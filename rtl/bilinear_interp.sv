// bilinear_interp: on-the-fly bilinear interpolation for sub-pel motion search.
//
// The design evaluates half- and quarter-pel candidates with a bilinear
// approximation instead of the H.264 six-tap filter, which keeps the search
// window at integer-pel size. This unit forms one 16-pixel row of samples at
// fractional offset (fx, fy) in quarter pels from two 17-pixel integer rows,
// `top` (row y) and `bot` (row y+1):
//   s[i] = ((4-fx)(4-fy)*A + fx(4-fy)*B + (4-fx)fy*C + fx*fy*D + 8) >> 4
// with A = top[i], B = top[i+1], C = bot[i], D = bot[i+1]. For fx = fy = 0 the
// output equals `top`. Purely combinational. The weights and the rounding are
// this design's choice; the document names the method only.
module bilinear_interp
  import me_pkg::*;
(
  input  row17_t     top,
  input  row17_t     bot,
  input  logic [1:0] fx,
  input  logic [1:0] fy,
  output row16_t     out
);
  always_comb begin
    logic [4:0] wa, wb, wc, wd;
    logic [13:0] acc;
    logic [2:0] gx, gy, hx, hy;
    gx = 3'd4 - 3'(fx);
    gy = 3'd4 - 3'(fy);
    hx = 3'(fx);
    hy = 3'(fy);
    wa = 5'(gx * gy);
    wb = 5'(hx * gy);
    wc = 5'(gx * hy);
    wd = 5'(hx * hy);
    for (int i = 0; i < MB; i++) begin
      acc = 14'(wa * top[i]) + 14'(wb * top[i+1]) + 14'(wc * bot[i]) + 14'(wd * bot[i+1]) + 14'd8;
      out[i] = pix_t'(acc >> 4);
    end
  end

endmodule
