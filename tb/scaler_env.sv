// Test environment for the image scaler: pixel source, reference model and
// output checker, attached to the ports of an image_scaler instance.
//
// Source: serves the row the scaler asks for on req_row, pixel by pixel, from
// a synthetic test image that is a pure function of (frame, row, column):
// a ramp, a checkerboard of hard steps, noise, a diagonal edge and thin
// lines, so that both the raw and the sharpened path of the scaler are used.
// With STALL set, in_valid and out_ready are dropped at random from frame
// STALL_FROM on.
//
// Reference: for every output pixel (ox, oy) it recomputes, from the source
// image and the scaling equations, the source position, the replicated
// 2x4 neighbourhood, the edge decision, the sharpening mask and the four-
// product bilinear sum, and compares with the scaler's output, out_eol and
// out_eof. It also checks the order in which rows are requested.
//
// Mechanism counters (reported at the end, each must be seen at least once
// unless the corresponding *_EXPECTED parameter is 0): sharpened cells,
// raw cells, repeated rows, priming passes that jump rows, right-border
// padding, input throttled by the scaler, input stalls by the source,
// output back-pressure.
//
// done rises after FRAMES frames; checks/failures count the comparisons.
module scaler_env
  import scaler_pkg::*;
#(
  parameter int unsigned IN_W        = 64,
  parameter int unsigned IN_H        = 64,
  parameter int unsigned OUT_W       = 96,
  parameter int unsigned OUT_H       = 96,
  parameter int unsigned EDGE_TH     = 64,
  parameter int unsigned ASYM_TH     = 32,
  parameter int unsigned SHARP_SHIFT = 2,
  parameter int unsigned FRAMES      = 2,
  parameter bit          STALL       = 1'b1,
  parameter int unsigned STALL_FROM  = 0,   // first frame with stalls
  parameter bit          JUMP_EXPECTED   = 1'b0,
  parameter bit          REPEAT_EXPECTED = 1'b1,
  parameter bit          PAD_EXPECTED    = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  output logic                    in_valid,
  input  logic                    in_ready,
  output pix_t                    in_pix,
  input  logic [$clog2(IN_H)-1:0] req_row,
  input  logic                    out_valid,
  output logic                    out_ready,
  input  pix_t                    out_pix,
  input  logic                    out_eol,
  input  logic                    out_eof,
  // probes into the scaler
  input  logic                    p_emit,
  input  logic                    p_eof,
  input  logic                    p_sel_sharp,
  input  logic                    p_pad,
  input  logic                    p_prime,
  output logic                    done,
  output int                      checks,
  output int                      failures
);

  // ---------------- test image ----------------
  function automatic int img(int f, int r, int c);
    int h;
    if (r < 0) r = 0;
    if (r > int'(IN_H) - 1) r = IN_H - 1;
    if (c < 0) c = 0;
    if (c > int'(IN_W) - 1) c = IN_W - 1;
    h = ((r * 73 + c * 151 + f * 1009) * 40503) & 32'hffff;
    case ((c * 5 / IN_W + f) % 5)
      0: return (r * 4 + c * 3 + f * 17) % 256;
      1: return (((r / 3) + (c / 3)) % 2 == 1) ? 230 : 20;
      2: return h & 255;
      3: return (r * 3 > c * 2 + f) ? 210 : 40;
      default: return ((c % 4) == 0 || (r % 5) == 0) ? 250 : 60 + (h & 15);
    endcase
  endfunction

  localparam longint STEP_X = ((longint'(IN_W) << 16) + longint'(OUT_W) - 1) / longint'(OUT_W);
  localparam longint STEP_Y = ((longint'(IN_H) << 16) + longint'(OUT_H) - 1) / longint'(OUT_H);

  function automatic int absi(int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic int sharpen(int l, int c, int r);
    int v;
    v = ((1 << SHARP_SHIFT) + 2) * c - l - r;
    v = v + (1 << (SHARP_SHIFT - 1));
    if (v < 0) return 0;
    v = v / (1 << SHARP_SHIFT);
    return v > 255 ? 255 : v;
  endfunction

  // expected output pixel and whether the sharpened cell was used
  function automatic int expect_pix(int f, int ox, int oy, output bit sharp);
    longint sx, sy;
    int ix, iy, rb;
    longint wx, wy;
    int t[4], b[4], p[4];
    int gh, gv, a;
    longint acc;
    sx = longint'(ox) * STEP_X;
    sy = longint'(oy) * STEP_Y;
    ix = int'(sx >> 16);  wx = (sx >> 8) & 255;
    iy = int'(sy >> 16);  wy = (sy >> 8) & 255;
    rb = (iy + 1 > int'(IN_H) - 1) ? IN_H - 1 : iy + 1;
    for (int k = 0; k < 4; k++) begin
      t[k] = img(f, iy, ix - 1 + k);
      b[k] = img(f, rb, ix - 1 + k);
    end
    gh = absi(t[2] - t[1]) + absi(b[2] - b[1]);
    gv = absi(b[1] - t[1]) + absi(b[2] - t[2]);
    a  = absi(t[2] - t[0]) - absi(t[3] - t[1]);
    sharp = (gh + gv >= int'(EDGE_TH)) || (absi(a) >= int'(ASYM_TH));
    if (sharp) begin
      p[0] = sharpen(t[0], t[1], t[2]);  p[1] = sharpen(t[1], t[2], t[3]);
      p[2] = sharpen(b[0], b[1], b[2]);  p[3] = sharpen(b[1], b[2], b[3]);
    end else begin
      p[0] = t[1]; p[1] = t[2]; p[2] = b[1]; p[3] = b[2];
    end
    acc = longint'(p[0]) * (256 - wx) * (256 - wy) + longint'(p[1]) * wx * (256 - wy)
        + longint'(p[2]) * (256 - wx) * wy         + longint'(p[3]) * wx * wy;
    return int'((acc + 32768) >> 16);
  endfunction

  // ---------------- source ----------------
  int src_frame, src_col, cur_row, prev_row, rows_in_frame;
  bit row_active;
  int n_repeat, n_jump, n_in_stall, n_in_throttle, n_out_bp, n_pad, n_sharp, n_raw;

  assign in_pix = pix_t'(img(src_frame, int'(req_row), src_col));

  logic stalling;
  assign stalling = STALL && src_frame >= int'(STALL_FROM);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_valid  <= 1'b0;
      out_ready <= 1'b0;
    end else begin
      in_valid  <= stalling ? ($urandom_range(0, 3) != 0) : 1'b1;
      out_ready <= stalling ? ($urandom_range(0, 4) != 0) : 1'b1;
    end
  end

  // expected row request sequence of one frame, computed from the scaling
  // equations: prime row 0, then for every output row its lower row, with
  // an extra priming row whenever the upper row is not the previous lower
  int exp_rows[$];
  int exp_idx;
  initial begin
    int iy, prev_lower;
    exp_rows.push_back(0);
    prev_lower = -1;
    for (int oy = 0; oy < int'(OUT_H); oy++) begin
      iy = int'((longint'(oy) * STEP_Y) >> 16);
      if (oy > 0 && iy != prev_lower && iy != int'(((longint'(oy) - 1) * STEP_Y) >> 16))
        exp_rows.push_back(iy);
      prev_lower = (iy + 1 > int'(IN_H) - 1) ? IN_H - 1 : iy + 1;
      exp_rows.push_back(prev_lower);
    end
  end

  // ---------------- checker ----------------
  int eox, eoy, efr;
  int exp_v;
  bit exp_sharp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_frame <= 0; src_col <= 0; prev_row <= -1; exp_idx <= 0;
      eox <= 0; eoy <= 0; efr <= 0; done <= 1'b0;
      checks <= 0; failures <= 0;
      n_repeat <= 0; n_jump <= 0; n_in_stall <= 0; n_in_throttle <= 0;
      n_out_bp <= 0; n_pad <= 0; n_sharp <= 0; n_raw <= 0;
    end else begin
      // the next frame's rows are served once the last pixel was produced
      if (p_emit && p_eof) src_frame <= src_frame + 1;
      if (p_emit) begin
        if (p_sel_sharp) n_sharp <= n_sharp + 1; else n_raw <= n_raw + 1;
      end
      if (p_pad) n_pad <= n_pad + 1;
      if (!in_valid) n_in_stall <= n_in_stall + 1;
      if (in_valid && !in_ready) n_in_throttle <= n_in_throttle + 1;
      if (out_valid && !out_ready) n_out_bp <= n_out_bp + 1;

      if (in_valid && in_ready) begin
        if (src_col == 0) begin
          // a new row starts: check it against the expected sequence
          checks <= checks + 1;
          if (int'(req_row) != exp_rows[exp_idx]) begin
            failures <= failures + 1;
            $display("row request %0d: got row %0d, expected %0d", exp_idx, req_row, exp_rows[exp_idx]);
          end
          exp_idx <= (exp_idx + 1 == exp_rows.size()) ? 0 : exp_idx + 1;
          if (int'(req_row) == prev_row) n_repeat <= n_repeat + 1;
          if (exp_idx > 0 && p_prime) n_jump <= n_jump + 1;
          prev_row <= int'(req_row);
        end
        src_col <= (src_col == int'(IN_W) - 1) ? 0 : src_col + 1;
      end

      if (out_valid && out_ready && !done) begin
        exp_v = expect_pix(efr, eox, eoy, exp_sharp);
        checks <= checks + 1;
        if (int'(out_pix) != exp_v || out_eol != (eox == int'(OUT_W) - 1)
            || out_eof != (eox == int'(OUT_W) - 1 && eoy == int'(OUT_H) - 1)) begin
          failures <= failures + 1;
          if (failures < 10)
            $display("frame %0d pixel (%0d,%0d): got %0d eol %0b eof %0b, expected %0d",
                     efr, eox, eoy, out_pix, out_eol, out_eof, exp_v);
        end
        if (eox == int'(OUT_W) - 1) begin
          eox <= 0;
          if (eoy == int'(OUT_H) - 1) begin
            eoy <= 0;
            efr <= efr + 1;
            if (efr + 1 == int'(FRAMES)) done <= 1'b1;
          end else begin
            eoy <= eoy + 1;
          end
        end else begin
          eox <= eox + 1;
        end
      end
    end
  end

  // mechanism report, evaluated by the testbench when done
  function automatic int mechanism_failures();
    int f;
    f = 0;
    $display("mechanisms: sharp=%0d raw=%0d repeat_rows=%0d jump_primes=%0d pad=%0d in_throttle=%0d in_stall=%0d out_backpressure=%0d",
             n_sharp, n_raw, n_repeat, n_jump, n_pad, n_in_throttle, n_in_stall, n_out_bp);
    if (n_sharp == 0) f++;
    if (n_raw == 0) f++;
    if (REPEAT_EXPECTED && n_repeat == 0) f++;
    if (JUMP_EXPECTED && n_jump == 0) f++;
    if (PAD_EXPECTED && n_pad == 0) f++;
    if (n_in_throttle == 0) f++;
    if (STALL && (n_in_stall == 0 || n_out_bp == 0)) f++;
    return f;
  endfunction

endmodule
