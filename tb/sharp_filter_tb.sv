// Test of the sharpening filter: random and extreme windows; each of the
// four cell pixels is compared with the mask [-1, 2^S+2, -1] / 2^S
// evaluated with integer arithmetic, rounded and clipped to 0..255.
// Flat windows must pass unchanged.
module sharp_filter_tb;
  import scaler_pkg::*;

  localparam int unsigned SHIFT = 2;

  win_t  win;
  quad_t quad;
  int    checks = 0, failures = 0, n_clip_lo = 0, n_clip_hi = 0;

  sharp_filter #(.SHIFT(SHIFT)) u_dut (.win, .quad);

  function automatic int ref_sharp(int l, int c, int r);
    int num;
    num = ((1 << SHIFT) + 2) * c - l - r + (1 << (SHIFT - 1));
    if (num < 0) return 0;
    num = num / (1 << SHIFT);
    return (num > 255) ? 255 : num;
  endfunction

  task automatic check(pix_t got, int exp, string what);
    checks++;
    if (int'(got) != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      for (int k = 0; k < 4; k++) begin
        case (i % 3)
          0: begin win.t[k] = pix_t'($urandom); win.b[k] = pix_t'($urandom); end
          1: begin win.t[k] = $urandom_range(0, 1) ? 8'd255 : 8'd0; win.b[k] = $urandom_range(0, 1) ? 8'd255 : 8'd0; end
          default: begin win.t[k] = 8'(i); win.b[k] = 8'(i * 7); end   // flat rows
        endcase
      end
      #1;
      check(quad.p00, ref_sharp(win.t[0], win.t[1], win.t[2]), "p00");
      check(quad.p01, ref_sharp(win.t[1], win.t[2], win.t[3]), "p01");
      check(quad.p10, ref_sharp(win.b[0], win.b[1], win.b[2]), "p10");
      check(quad.p11, ref_sharp(win.b[1], win.b[2], win.b[3]), "p11");
      if (i % 3 == 2) begin
        check(quad.p00, int'(win.t[1]), "flat p00");
        check(quad.p11, int'(win.b[2]), "flat p11");
      end
      if (quad.p00 == 0 && win.t[1] != 0) n_clip_lo++;
      if (quad.p00 == 255 && win.t[1] != 255) n_clip_hi++;
    end
    checks++;
    if (n_clip_lo == 0 || n_clip_hi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
