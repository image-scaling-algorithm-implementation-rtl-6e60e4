// Edge detector: decides whether the interpolation cell is taken from the
// sharpened or from the raw pixels.
//
// It measures the horizontal and the vertical gradient inside the 2x2 cell
// and adds them into an edge strength:
//   grad_h = |t2 - t1| + |b2 - b1|,  grad_v = |b1 - t1| + |b2 - t2|,
//   edge   = grad_h + grad_v.
// It also forms the asymmetric parameter of the upper row,
//   A = |P(m+1) - P(m-1)| - |P(m+2) - P(m)|
// with P(m-1..m+2) = t0..t3, the four horizontal neighbours around the cell.
// A is zero across a symmetric step or a linear ramp and large when an edge
// lies next to the cell on one side. The mux selects the sharpened pixels
// (sel_sharp = 1) when edge >= EDGE_TH or |A| >= ASYM_TH. The gradient sum
// and the formula of A follow the design; which row A is taken from, the
// selection rule and both thresholds are this design's choices.
//
// Purely combinational.
module edge_detector
  import scaler_pkg::*;
#(
  parameter int unsigned EDGE_TH = 64,
  parameter int unsigned ASYM_TH = 32
) (
  input  win_t                    win,
  output logic [PIX_W:0]          grad_h,
  output logic [PIX_W:0]          grad_v,
  output logic [PIX_W+1:0]        edge_sum,
  output logic signed [PIX_W+1:0] asym,
  output logic                    sel_sharp
);

  function automatic pix_t absdiff(pix_t a, pix_t b);
    return (a > b) ? a - b : b - a;
  endfunction

  logic [PIX_W:0] asym_mag;

  always_comb begin
    grad_h   = {1'b0, absdiff(win.t[2], win.t[1])} + {1'b0, absdiff(win.b[2], win.b[1])};
    grad_v   = {1'b0, absdiff(win.b[1], win.t[1])} + {1'b0, absdiff(win.b[2], win.t[2])};
    edge_sum = {1'b0, grad_h} + {1'b0, grad_v};
    asym     = $signed({2'b0, absdiff(win.t[2], win.t[0])})
             - $signed({2'b0, absdiff(win.t[3], win.t[1])});
    asym_mag = asym[PIX_W+1] ? (PIX_W+1)'(-asym) : asym[PIX_W:0];
    sel_sharp = (32'(edge_sum) >= EDGE_TH) || (32'(asym_mag) >= ASYM_TH);
  end

endmodule
