// Shared types and constants of the adaptive edge-enhanced bilinear image
// scaler.
//
// The scaler works on 8-bit grey pixels (the register bank of the design is
// eight 8-bit registers). The 2x4 neighbourhood held in the register bank is
// passed between blocks as a win_t struct: row t is the upper source row
// (read from the line buffer) and row b the lower source row (the incoming
// stream). Column 0 is the pixel left of the interpolation cell, columns 1
// and 2 are the cell itself, column 3 is the pixel right of it.
//
// Interpolation weights are WT_W-bit unsigned fractions (w/2^WT_W). Source
// positions are kept as fixed-point numbers with POS_FRAC fraction bits;
// the weight is the top WT_W bits of that fraction. Both widths are this
// design's choice.
package scaler_pkg;

  localparam int unsigned PIX_W    = 8;
  localparam int unsigned WT_W     = 8;
  localparam int unsigned POS_FRAC = 16;

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic [WT_W-1:0]  wt_t;

  // 2x4 window: t = upper row, b = lower row, index 0..3 left to right
  typedef struct packed {
    pix_t [3:0] t;
    pix_t [3:0] b;
  } win_t;

  // 2x2 interpolation cell: p00 upper-left, p01 upper-right,
  // p10 lower-left, p11 lower-right
  typedef struct packed {
    pix_t p00;
    pix_t p01;
    pix_t p10;
    pix_t p11;
  } quad_t;

  // Register bank operation for one clock
  typedef enum logic [1:0] {
    BANK_HOLD  = 2'd0,  // keep contents
    BANK_FILL  = 2'd1,  // first pixel of a row: load it into all four columns
    BANK_SHIFT = 2'd2,  // shift left, new pixels enter column 3
    BANK_PAD   = 2'd3   // past the right edge: shift left, repeat column 3
  } bank_op_e;

  // Fixed-point step between neighbouring output pixels, in source pixels,
  // rounded up so that positions that are exact integers never fall below
  // the integer.
  function automatic int unsigned pos_step(int unsigned in_n, int unsigned out_n);
    longint unsigned num;
    num = longint'(in_n) << POS_FRAC;
    return int'((num + longint'(out_n) - 1) / longint'(out_n));
  endfunction

endpackage
