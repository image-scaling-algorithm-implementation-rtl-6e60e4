// Pixel multiplexer: chooses which version of the 2x2 interpolation cell is
// passed to the bilinear interpolator.
//
// When sel_sharp is 1 (the edge detector found an edge) the cell comes from
// the sharpening filter, otherwise the raw pixels are taken straight from
// the register bank (columns 1 and 2 of both rows). This two-way selection
// follows the design. Purely combinational.
module pixel_mux
  import scaler_pkg::*;
(
  input  win_t  win,
  input  quad_t sharp,
  input  logic  sel_sharp,
  output quad_t quad
);

  quad_t raw;

  always_comb begin
    raw.p00 = win.t[1];
    raw.p01 = win.t[2];
    raw.p10 = win.b[1];
    raw.p11 = win.b[2];
    quad    = sel_sharp ? sharp : raw;
  end

endmodule
