// Checker for the scaler controller, used by scaler_controller_tb.
//
// Instantiates one controller with the given sizes and drives it with a
// pixel source that stalls at random and a sink that applies random
// back-pressure. Instead of pixel values the model tracks, for every
// register of the 2x4 window and every line buffer location, which source
// (row, column) it holds. At every emitted output pixel (ox, oy) it checks
// that the window holds rows iy / min(iy+1, H-1) and columns ix-1 .. ix+2
// (clamped to the image), and that wx, wy, eol and eof follow from
//   sx = ox * ceil(IN_W * 2^16 / OUT_W),  sy = oy * ceil(IN_H * 2^16 / OUT_H).
// With no stalls a frame must take exactly CYCLES clocks when CYCLES > 0.
module ctrl_check
  import scaler_pkg::*;
#(
  parameter int unsigned IN_W   = 64,
  parameter int unsigned IN_H   = 64,
  parameter int unsigned OUT_W  = 96,
  parameter int unsigned OUT_H  = 96,
  parameter int unsigned FRAMES = 2,
  parameter bit          STALL  = 1'b1,
  parameter int          CYCLES = 0
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_prime_jump,
  output int   n_pad,
  output int   n_double
);

  localparam longint STEP_X = ((longint'(IN_W) << 16) + longint'(OUT_W) - 1) / longint'(OUT_W);
  localparam longint STEP_Y = ((longint'(IN_H) << 16) + longint'(OUT_H) - 1) / longint'(OUT_H);

  logic                    in_valid, in_ready, out_free, emit, lb_we, eol, eof;
  logic [$clog2(IN_H)-1:0] req_row;
  logic [$clog2(IN_W)-1:0] lb_addr;
  bank_op_e                bank_op;
  wt_t                     wx, wy;

  scaler_controller #(.IN_W(IN_W), .IN_H(IN_H), .OUT_W(OUT_W), .OUT_H(OUT_H)) u_dut (
    .clk, .rst_n, .in_valid, .in_ready, .req_row, .lb_addr, .lb_we,
    .bank_op, .out_free, .emit, .wx, .wy, .eol, .eof
  );

  int lb_row [IN_W];
  int bt_row[4], bt_col[4], bb_row[4], bb_col[4];
  int col, ox, oy, frame, cyc, prev_req, last_emit_cyc, n_emit_prev;
  bit first_row_of_frame;

  function automatic int clampi(int v, int hi);
    return v < 0 ? 0 : (v > hi ? hi : v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_valid <= 1'b0;
      out_free <= 1'b0;
    end else begin
      in_valid <= STALL ? ($urandom_range(0, 2) != 0) : 1'b1;
      out_free <= STALL ? ($urandom_range(0, 3) != 0) : 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= 0; ox <= 0; oy <= 0; frame <= 0; cyc <= 0; done <= 1'b0;
      checks <= 0; failures <= 0; n_prime_jump <= 0; n_pad <= 0; n_double <= 0;
      prev_req <= -1; last_emit_cyc <= -10;
      for (int a = 0; a < int'(IN_W); a++) lb_row[a] <= -1;
      for (int k = 0; k < 4; k++) begin
        bt_row[k] <= -1; bt_col[k] <= -1; bb_row[k] <= -1; bb_col[k] <= -1;
      end
    end else if (!done) begin
      cyc <= cyc + 1;
      // input handshake: line buffer and bank model
      if (in_valid && in_ready) begin
        col <= (col == int'(IN_W) - 1) ? 0 : col + 1;
        checks <= checks + 1;
        if (int'(lb_addr) != col) begin
          failures <= failures + 1;
          $display("[%0dx%0d] line buffer address %0d, expected %0d", OUT_W, OUT_H, lb_addr, col);
        end
        if (col == 0) begin
          if (bank_op == BANK_HOLD && int'(req_row) > prev_req + 1 && prev_req >= 0)
            n_prime_jump <= n_prime_jump + 1;
          prev_req <= int'(req_row);
        end
        if (lb_we) lb_row[col] <= int'(req_row);
        case (bank_op)
          BANK_FILL: for (int k = 0; k < 4; k++) begin
            bt_row[k] <= lb_row[col]; bt_col[k] <= col; bb_row[k] <= int'(req_row); bb_col[k] <= col;
          end
          BANK_SHIFT: begin
            for (int k = 0; k < 3; k++) begin
              bt_row[k] <= bt_row[k+1]; bt_col[k] <= bt_col[k+1];
              bb_row[k] <= bb_row[k+1]; bb_col[k] <= bb_col[k+1];
            end
            bt_row[3] <= lb_row[col]; bt_col[3] <= col; bb_row[3] <= int'(req_row); bb_col[3] <= col;
          end
          default: ;
        endcase
      end else if (bank_op == BANK_PAD) begin
        n_pad <= n_pad + 1;
        for (int k = 0; k < 3; k++) begin
          bt_row[k] <= bt_row[k+1]; bt_col[k] <= bt_col[k+1];
          bb_row[k] <= bb_row[k+1]; bb_col[k] <= bb_col[k+1];
        end
      end else if (bank_op != BANK_HOLD || lb_we) begin
        failures <= failures + 1;
        $display("[%0dx%0d] bank or line buffer written without input", OUT_W, OUT_H);
      end

      if (emit) begin
        automatic longint sx = longint'(ox) * STEP_X;
        automatic longint sy = longint'(oy) * STEP_Y;
        automatic int ix = int'(sx >> 16), iy = int'(sy >> 16);
        automatic int rb = clampi(iy + 1, IN_H - 1);
        automatic bit bad = 1'b0;
        if (last_emit_cyc == cyc - 1 && ox > 0 && int'(((longint'(ox) - 1) * STEP_X) >> 16) == ix)
          n_double <= n_double + 1;
        last_emit_cyc <= cyc;
        for (int k = 0; k < 4; k++) begin
          if (bt_row[k] != iy || bb_row[k] != rb) bad = 1'b1;
          if (bt_col[k] != clampi(ix - 1 + k, IN_W - 1) || bb_col[k] != clampi(ix - 1 + k, IN_W - 1)) bad = 1'b1;
        end
        if (int'(wx) != int'((sx >> 8) & 255) || int'(wy) != int'((sy >> 8) & 255)) bad = 1'b1;
        if (eol != (ox == int'(OUT_W) - 1) || eof != (ox == int'(OUT_W) - 1 && oy == int'(OUT_H) - 1)) bad = 1'b1;
        if (!out_free) bad = 1'b1;
        checks <= checks + 1;
        if (bad) begin
          failures <= failures + 1;
          if (failures < 10)
            $display("[%0dx%0d] output (%0d,%0d): window rows %0d/%0d cols %0d..%0d wx %0d wy %0d, expected rows %0d/%0d cols %0d..%0d",
                     OUT_W, OUT_H, ox, oy, bt_row[1], bb_row[1], bt_col[0], bt_col[3], wx, wy,
                     iy, rb, clampi(ix - 1, IN_W - 1), clampi(ix + 2, IN_W - 1));
        end
        if (ox == int'(OUT_W) - 1) begin
          ox <= 0;
          if (oy == int'(OUT_H) - 1) begin
            oy <= 0;
            frame <= frame + 1;
            if (CYCLES > 0 && frame == 0) begin
              if (cyc + 1 != CYCLES) begin
                failures <= failures + 1;
                $display("[%0dx%0d] frame took %0d clocks, expected %0d", OUT_W, OUT_H, cyc + 1, CYCLES);
              end
            end
            if (frame + 1 == int'(FRAMES)) done <= 1'b1;
          end else begin
            oy <= oy + 1;
          end
        end else begin
          ox <= ox + 1;
        end
      end
    end
  end

endmodule
