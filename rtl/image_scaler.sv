// Adaptive edge-enhanced bilinear image scaler (top level).
//
// Enlarges a grey-scale image streamed in raster order, by default from
// 64x64 to 96x96 pixels (factor 1.5). The datapath is:
//   input row ---+--> register bank (2x4) --+--> sharpening filter --+
//                |        ^                 |                        v
//                +--> line buffer (1 row)   +--> raw cell -------> mux --> bilinear --> output register
//                                           +--> edge detector ---- sel ^
// The line buffer holds the upper source row, the incoming stream is the
// lower one; the register bank turns both into a 2x4 window. The edge
// detector chooses, per interpolation cell, whether the bilinear
// interpolator sees the raw pixels or the sharpened ones. The controller
// walks the output image and decides when input is taken, when the bank is
// padded at the right border and when an output pixel is produced.
//
// Interface: input pixels on in_pix with in_valid/in_ready; the source must
// send the row given on req_row (a row can be asked for twice, see
// scaler_controller). Output pixels on out_pix with out_valid/out_ready in
// raster order, out_eol marks the last pixel of a row and out_eof the last
// of the image. Frames follow one another without a gap.
// Timing: one clock per accepted input pixel, per register bank pad and per
// output pixel, plus one clock per output row; the output is registered.
// The block structure follows the design; handshakes and the output
// register are this design's choices.
module image_scaler
  import scaler_pkg::*;
#(
  parameter int unsigned IN_W        = 64,
  parameter int unsigned IN_H        = 64,
  parameter int unsigned OUT_W       = 96,
  parameter int unsigned OUT_H       = 96,
  parameter int unsigned EDGE_TH     = 64,
  parameter int unsigned ASYM_TH     = 32,
  parameter int unsigned SHARP_SHIFT = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  pix_t                    in_pix,
  output logic [$clog2(IN_H)-1:0] req_row,
  output logic                    out_valid,
  input  logic                    out_ready,
  output pix_t                    out_pix,
  output logic                    out_eol,
  output logic                    out_eof
);

  logic [$clog2(IN_W)-1:0] lb_addr;
  logic                    lb_we;
  pix_t                    lb_rd;
  bank_op_e                bank_op;
  win_t                    win;
  quad_t                   sharp_quad, quad;
  logic                    sel_sharp;
  wt_t                     wx, wy;
  pix_t                    interp;
  logic                    emit, eol, eof, out_free;

  assign out_free = !out_valid || out_ready;

  scaler_controller #(
    .IN_W(IN_W), .IN_H(IN_H), .OUT_W(OUT_W), .OUT_H(OUT_H)
  ) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready, .req_row,
    .lb_addr, .lb_we,
    .bank_op,
    .out_free, .emit, .wx, .wy, .eol, .eof
  );

  line_buffer #(.DEPTH(IN_W)) u_lb (
    .clk,
    .rd_addr (lb_addr),
    .rd_data (lb_rd),
    .wr_en   (lb_we),
    .wr_addr (lb_addr),
    .wr_data (in_pix)
  );

  reg_bank u_bank (
    .clk, .rst_n,
    .op     (bank_op),
    .top_in (lb_rd),
    .bot_in (in_pix),
    .win
  );

  sharp_filter #(.SHIFT(SHARP_SHIFT)) u_sharp (
    .win,
    .quad (sharp_quad)
  );

  edge_detector #(.EDGE_TH(EDGE_TH), .ASYM_TH(ASYM_TH)) u_edge (
    .win,
    .grad_h   (),   // gradient details are only needed inside the detector
    .grad_v   (),
    .edge_sum (),
    .asym     (),
    .sel_sharp
  );

  pixel_mux u_mux (
    .win,
    .sharp (sharp_quad),
    .sel_sharp,
    .quad
  );

  bilinear_interp u_bil (
    .quad, .wx, .wy,
    .pix (interp)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_eol   <= 1'b0;
      out_eof   <= 1'b0;
    end else if (emit) begin
      out_valid <= 1'b1;
      out_pix   <= interp;
      out_eol   <= eol;
      out_eof   <= eof;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

  // an output pixel waits unchanged until it is taken
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid && $stable(out_pix));

endmodule
