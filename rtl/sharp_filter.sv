// Sharpening spatial filter (pre-filter ahead of bilinear interpolation).
//
// Bilinear interpolation blurs edges; sharpening the four pixels of the
// interpolation cell first counters that. Each cell pixel c is replaced by
// a 1x3 horizontal mask [-1, 2^SHIFT+2, -1] / 2^SHIFT applied to it and its
// left and right neighbours in the 2x4 window, i.e.
//   s = clamp( ((2^SHIFT+2)*c - l - r + 2^(SHIFT-1)) >>> SHIFT , 0, 255 ).
// The mask weights sum to 2^SHIFT, so flat areas pass unchanged. The
// existence and place of the filter follow the design; the mask (size and
// weights) is this design's choice, as the description gives none.
//
// Purely combinational: cell follows win in the same cycle.
module sharp_filter
  import scaler_pkg::*;
#(
  parameter int unsigned SHIFT = 2
) (
  input  win_t  win,
  output quad_t quad
);

  localparam int CENTER = (1 << SHIFT) + 2;

  function automatic pix_t sharpen(pix_t l, pix_t c, pix_t r);
    int acc;
    acc = (CENTER * int'(c) - int'(l) - int'(r) + (1 << (SHIFT - 1))) >>> SHIFT;
    if (acc < 0)                      return '0;
    else if (acc > (1 << PIX_W) - 1)  return '1;
    else                              return pix_t'(acc);
  endfunction

  always_comb begin
    quad.p00 = sharpen(win.t[0], win.t[1], win.t[2]);
    quad.p01 = sharpen(win.t[1], win.t[2], win.t[3]);
    quad.p10 = sharpen(win.b[0], win.b[1], win.b[2]);
    quad.p11 = sharpen(win.b[1], win.b[2], win.b[3]);
  end

endmodule
