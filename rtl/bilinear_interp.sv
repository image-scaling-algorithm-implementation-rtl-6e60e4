// Bilinear interpolator.
//
// The target pixel lies at fractional offset (wx, wy) / 2^WT_W inside the
// 2x2 cell. Instead of four weight products, the interpolation is rewritten
// as two nested linear steps that each need one multiplier:
//   top = p00 * 2^WT_W + wx * (p01 - p00)
//   bot = p10 * 2^WT_W + wx * (p11 - p10)
//   out = (top * 2^WT_W + wy * (bot - top) + 2^(2*WT_W-1)) >> 2*WT_W
// which equals the usual weighted sum of the four pixels, rounded to the
// nearest integer. Simplifying bilinear interpolation by algebraic
// rearrangement follows the design; the exact form, the weight width and
// the rounding are this design's choices.
//
// Purely combinational.
module bilinear_interp
  import scaler_pkg::*;
(
  input  quad_t quad,
  input  wt_t   wx,
  input  wt_t   wy,
  output pix_t  pix
);

  localparam int unsigned L1 = PIX_W + WT_W;   // width of top/bot
  localparam int unsigned L2 = PIX_W + 2*WT_W; // width of the final sum

  // one linear step: a*2^WT_W + w*(b - a), exact, width W+WT_W
  function automatic logic [L1+WT_W-1:0] lerp(logic [L1-1:0] a, logic [L1-1:0] b, wt_t w);
    logic signed [L1+WT_W+1:0] d;
    d = $signed({2'b0, {WT_W{1'b0}}, b}) - $signed({2'b0, {WT_W{1'b0}}, a});
    d = ($signed({2'b0, a, {WT_W{1'b0}}})) + d * $signed({2'b0, {L1{1'b0}}, w});
    return d[L1+WT_W-1:0];
  endfunction

  logic [L1-1:0] top, bot;
  logic [L2-1:0] sum;

  always_comb begin
    top = L1'(lerp(L1'(quad.p00), L1'(quad.p01), wx));
    bot = L1'(lerp(L1'(quad.p10), L1'(quad.p11), wx));
    sum = lerp(top, bot, wy) + L2'(1 << (2*WT_W - 1));
    pix = PIX_W'(sum >> (2*WT_W));
  end

endmodule
