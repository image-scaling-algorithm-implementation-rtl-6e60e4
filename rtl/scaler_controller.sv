// Controller of the image scaler: walks the output image in raster order
// and sequences the line buffer, the register bank and the input stream.
//
// Output pixel (ox, oy) is interpolated at source position
//   (sx, sy) = (ox * IN_W / OUT_W, oy * IN_H / OUT_H),
// kept as fixed-point numbers that advance by a constant step per output
// pixel (a DDA, no divider). The integer part (ix, iy) picks the 2x2 source
// cell, the fraction gives the weights (wx, wy). Neighbours outside the
// image are replicated from the border pixel.
//
// Each output row is made in one "pass". During a pass the line buffer
// supplies source row iy and the input stream delivers row iy+1 (clamped to
// the last row). Every accepted input pixel shifts the register bank by one
// column; past the right edge the bank is padded without input. When the
// bank holds the window of the cell ix, the controller stops the input and
// emits every output pixel of that cell (1 or 2 for a factor of 1.5), one
// per clock. The incoming row is written into the line buffer only when
// the next output row needs it as its upper row; when two output rows fall
// between the same two source rows, the line buffer keeps its row and the
// lower row is requested a second time. If the next upper row is neither
// (scaling down), it is first loaded by a priming pass that produces no
// output. The first pass of every frame is a priming pass of row 0.
//
// Because only one line is stored, the source must be able to deliver the
// row named on req_row (e.g. a frame store or the host memory the image is
// read from). req_row is stable from the first to the last pixel of a row.
//
// Interface: in_valid/in_ready handshake of the input pixel stream; emit is
// high in a cycle in which the datapath result must be captured (only when
// out_free); wx/wy and eol/eof qualify it. lb_addr/lb_we drive the line
// buffer, bank_op the register bank.
// The one-line-buffer scheme and the presence of a controller follow the
// design; the pass sequencing, the row re-request and the DDA are this
// design's choices.
module scaler_controller
  import scaler_pkg::*;
#(
  parameter int unsigned IN_W  = 64,
  parameter int unsigned IN_H  = 64,
  parameter int unsigned OUT_W = 96,
  parameter int unsigned OUT_H = 96
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // input stream
  input  logic                       in_valid,
  output logic                       in_ready,
  output logic [$clog2(IN_H)-1:0]    req_row,
  // line buffer
  output logic [$clog2(IN_W)-1:0]    lb_addr,
  output logic                       lb_we,
  // register bank
  output bank_op_e                   bank_op,
  // output side
  input  logic                       out_free,
  output logic                       emit,
  output wt_t                        wx,
  output wt_t                        wy,
  output logic                       eol,
  output logic                       eof
);

  localparam int unsigned STEP_X = pos_step(IN_W, OUT_W);
  localparam int unsigned STEP_Y = pos_step(IN_H, OUT_H);
  localparam int unsigned XPOS_W = $clog2(IN_W + 1) + POS_FRAC + 1;
  localparam int unsigned YPOS_W = $clog2(IN_H + 1) + POS_FRAC + 1;
  localparam int unsigned ICOL_W = $clog2(IN_W + 1);
  localparam int unsigned NSH_W  = $clog2(IN_W + 4);
  localparam int unsigned IROW_W = $clog2(IN_H);
  localparam int unsigned OX_W   = $clog2(OUT_W + 1);
  localparam int unsigned OY_W   = $clog2(OUT_H);

  typedef enum logic {S_PRIME, S_PASS} state_e;

  state_e              state;
  logic [IROW_W-1:0]   iy;       // upper source row of this pass
  logic [OY_W-1:0]     oy;       // output row of this pass
  logic [YPOS_W-1:0]   pos_y;    // fixed-point source row of oy
  logic [ICOL_W-1:0]   in_col;   // input pixels accepted in this row
  logic [NSH_W-1:0]    nshift;   // register bank shifts in this row
  logic [OX_W-1:0]     ox;       // next output column
  logic [XPOS_W-1:0]   pos_x;    // fixed-point source column of ox

  logic [YPOS_W-1:0]   nxt_pos_y;
  logic [IROW_W:0]     nxt_iy;
  logic [XPOS_W-POS_FRAC-1:0] ix;
  logic                last_row, x_done, row_in_done, lb_wr_pass, cell_ready;

  always_comb begin
    nxt_pos_y   = pos_y + YPOS_W'(STEP_Y);
    nxt_iy      = (IROW_W+1)'(nxt_pos_y >> POS_FRAC);
    last_row    = (oy == OY_W'(OUT_H - 1));
    // write the lower row into the line buffer if it is the next upper row
    lb_wr_pass  = !last_row && (nxt_iy == {1'b0, iy} + 1'b1);
    ix          = pos_x[XPOS_W-1:POS_FRAC];
    x_done      = (ox == OX_W'(OUT_W));
    row_in_done = (in_col == ICOL_W'(IN_W));
    // the window holds cell ix once column ix+2 has been shifted in
    cell_ready  = !x_done && (32'(nshift) == 32'(ix) + 3);
  end

  always_comb begin
    in_ready = 1'b0;
    lb_we    = 1'b0;
    bank_op  = BANK_HOLD;
    emit     = 1'b0;
    if (state == S_PRIME) begin
      in_ready = 1'b1;
      lb_we    = in_valid;
    end else if (cell_ready) begin
      emit = out_free;
    end else if (!row_in_done) begin
      in_ready = 1'b1;
      lb_we    = in_valid && lb_wr_pass;
      if (in_valid) bank_op = (nshift == '0) ? BANK_FILL : BANK_SHIFT;
    end else if (!x_done) begin
      bank_op = BANK_PAD;
    end
  end

  assign lb_addr = in_col[$clog2(IN_W)-1:0];
  assign wx      = pos_x[POS_FRAC-1 -: WT_W];
  assign wy      = pos_y[POS_FRAC-1 -: WT_W];
  assign eol     = (ox == OX_W'(OUT_W - 1));
  assign eof     = eol && last_row;
  assign req_row = (state == S_PRIME || 32'(iy) == IN_H - 1) ? iy : iy + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_PRIME;
      iy     <= '0;
      oy     <= '0;
      pos_y  <= '0;
      in_col <= '0;
      nshift <= '0;
      ox     <= '0;
      pos_x  <= '0;
    end else if (state == S_PRIME) begin
      if (in_valid) begin
        if (in_col == ICOL_W'(IN_W - 1)) begin
          state  <= S_PASS;
          in_col <= '0;
        end else begin
          in_col <= in_col + 1'b1;
        end
      end
    end else begin
      if (emit) begin
        ox    <= ox + 1'b1;
        pos_x <= pos_x + XPOS_W'(STEP_X);
      end else if (!cell_ready && !row_in_done) begin
        if (in_valid) begin
          in_col <= in_col + 1'b1;
          nshift <= nshift + 1'b1;
        end
      end else if (!cell_ready && !x_done) begin
        nshift <= nshift + 1'b1;
      end else if (x_done && row_in_done) begin
        // end of pass: set up the next output row
        in_col <= '0;
        nshift <= '0;
        ox     <= '0;
        pos_x  <= '0;
        if (last_row) begin
          oy    <= '0;
          pos_y <= '0;
          iy    <= '0;
          state <= S_PRIME;
        end else begin
          oy    <= oy + 1'b1;
          pos_y <= nxt_pos_y;
          if (lb_wr_pass) begin
            iy <= iy + 1'b1;
          end else if (nxt_iy != {1'b0, iy}) begin
            iy    <= nxt_iy[IROW_W-1:0];
            state <= S_PRIME;
          end
        end
      end
    end
  end

  // emit only while a cell is ready and the output can take it
  assert property (@(posedge clk) disable iff (!rst_n) emit |-> cell_ready && out_free);
  // input is never taken while a cell is being emitted
  assert property (@(posedge clk) disable iff (!rst_n) emit |-> !in_ready);

endmodule
