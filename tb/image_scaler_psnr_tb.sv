// Image-quality run of the image scaler in the evaluated configuration
// (64x64 enlarged to 96x96, factor 1.5), measured as MSE and PSNR:
//   MSE  = 1/(M N) * sum (P(i,j) - P'(i,j))^2,   PSNR = 10 log10(255^2 / MSE).
// Six synthetic test images are built from continuous functions g(u, v) with
// smooth shading, texture and soft and hard edges. The 64x64 input samples g
// at integer positions, the reference 96x96 image samples the same g at the
// output positions (ox * 64/96, oy * 64/96), so the reference is the ideal
// enlargement. Two scalers run side by side: the edge-adaptive one at its
// default parameters and one whose thresholds are out of reach, i.e. plain
// bilinear interpolation. The test checks that every frame completes with
// the right number of pixels, that the edge-adaptive scaler stays above
// PSNR_MIN dB on every image, and reports both PSNR values per image.
module image_scaler_psnr_tb;
  import scaler_pkg::*;

  localparam int IN_W = 64, IN_H = 64, OUT_W = 96, OUT_H = 96;
  localparam int IMAGES = 6;
  localparam int ROWS_PER_FRAME = 1 + OUT_H;  // priming row + one row per output row
  localparam real PSNR_MIN = 24.0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // continuous test image k at position (u, v) in source pixel units
  function automatic real g(int k, real u, real v);
    real s, e;
    case (k)
      0: s = 128.0 + 90.0 * $sin(u / 6.0) * $cos(v / 9.0);
      1: s = 60.0 + 2.2 * u + 1.1 * v;
      2: s = 128.0 + 70.0 * $sin((u + v) / 3.5) + 30.0 * $cos(v / 2.5);
      3: s = ((u - 32.0) * (u - 32.0) + (v - 30.0) * (v - 30.0) < 400.0) ? 210.0 : 50.0;
      4: s = 128.0 + 100.0 * $sin(u * v / 200.0);
      default: s = 40.0 + 3.0 * v;
    endcase
    // soft edge across the image
    e = 1.0 / (1.0 + $exp(-(u - 0.6 * v - 20.0) / 1.5));
    s = s * (1.0 - 0.35 * e) + 80.0 * e;
    if (s < 0.0) s = 0.0;
    if (s > 255.0) s = 255.0;
    return s;
  endfunction

  function automatic int quant(real s);
    return int'($floor(s + 0.5));
  endfunction

  // ---------------- two scalers and their sources ----------------
  logic       iv [2], ir [2], ov [2], eol [2], eof [2];
  pix_t       ip [2], op [2];
  logic [5:0] rr [2];
  logic       ordy;
  assign ordy = 1'b1;
  assign iv[0] = rst_n;
  assign iv[1] = rst_n;

  image_scaler u_adaptive (
    .clk, .rst_n, .in_valid(iv[0]), .in_ready(ir[0]), .in_pix(ip[0]), .req_row(rr[0]),
    .out_valid(ov[0]), .out_ready(ordy), .out_pix(op[0]), .out_eol(eol[0]), .out_eof(eof[0]));

  image_scaler #(.EDGE_TH(4096), .ASYM_TH(4096)) u_plain (
    .clk, .rst_n, .in_valid(iv[1]), .in_ready(ir[1]), .in_pix(ip[1]), .req_row(rr[1]),
    .out_valid(ov[1]), .out_ready(ordy), .out_pix(op[1]), .out_eol(eol[1]), .out_eof(eof[1]));

  int  col [2], rows [2], ox [2], oy [2], frame [2];
  real sq [2][IMAGES];
  int  npix [2][IMAGES];

  for (genvar d = 0; d < 2; d++) begin : g_src
    assign ip[d] = pix_t'(quant(g(rows[d] / ROWS_PER_FRAME % IMAGES, real'(col[d]), real'(rr[d]))));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        col[d] <= 0; rows[d] <= 0; ox[d] <= 0; oy[d] <= 0; frame[d] <= 0;
        for (int k = 0; k < IMAGES; k++) begin sq[d][k] <= 0.0; npix[d][k] <= 0; end
      end else begin
        if (iv[d] && ir[d]) begin
          if (col[d] == IN_W - 1) begin
            col[d] <= 0;
            rows[d] <= rows[d] + 1;
          end else begin
            col[d] <= col[d] + 1;
          end
        end
        if (ov[d] && frame[d] < IMAGES) begin
          automatic real t = g(frame[d], real'(ox[d]) * IN_W / OUT_W, real'(oy[d]) * IN_H / OUT_H);
          automatic real diff = real'(op[d]) - real'(quant(t));
          sq[d][frame[d]] <= sq[d][frame[d]] + diff * diff;
          npix[d][frame[d]] <= npix[d][frame[d]] + 1;
          if (ox[d] == OUT_W - 1) begin
            ox[d] <= 0;
            if (oy[d] == OUT_H - 1) begin
              oy[d] <= 0;
              frame[d] <= frame[d] + 1;
            end else oy[d] <= oy[d] + 1;
          end else ox[d] <= ox[d] + 1;
        end
      end
    end
  end

  function automatic real psnr(real mse);
    return (mse <= 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 / mse);
  endfunction

  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    wait (frame[0] == IMAGES && frame[1] == IMAGES);
    @(negedge clk);
    $display("image  MSE(adaptive)  PSNR(adaptive)  MSE(plain)  PSNR(plain)");
    for (int k = 0; k < IMAGES; k++) begin
      automatic real m0 = sq[0][k] / (OUT_W * OUT_H);
      automatic real m1 = sq[1][k] / (OUT_W * OUT_H);
      $display("%5d  %13.3f  %14.2f  %10.3f  %11.2f", k, m0, psnr(m0), m1, psnr(m1));
      checks += 3;
      if (npix[0][k] != OUT_W * OUT_H || npix[1][k] != OUT_W * OUT_H) failures++;
      if (psnr(m0) < PSNR_MIN) failures++;
      if (psnr(m1) < PSNR_MIN) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
