// Test of the bilinear interpolator: random cells and weights, plus the
// corners of the weight range, compared with the textbook four-product form
//   round( (p00 (1-x)(1-y) + p01 x (1-y) + p10 (1-x) y + p11 x y) )
// with x = wx/256 and y = wy/256, evaluated in integers.
module bilinear_interp_tb;
  import scaler_pkg::*;

  quad_t quad;
  wt_t   wx, wy;
  pix_t  pix;
  int    checks = 0, failures = 0;

  bilinear_interp u_dut (.quad, .wx, .wy, .pix);

  function automatic int ref_pix(quad_t q, longint x, longint y);
    longint acc;
    acc = longint'(q.p00) * (256 - x) * (256 - y) + longint'(q.p01) * x * (256 - y)
        + longint'(q.p10) * (256 - x) * y         + longint'(q.p11) * x * y;
    return int'((acc + 32768) / 65536);
  endfunction

  initial begin
    for (int i = 0; i < 20000; i++) begin
      quad = quad_t'($urandom);
      case (i % 4)
        0: begin wx = wt_t'($urandom); wy = wt_t'($urandom); end
        1: begin wx = 0; wy = 0; end
        2: begin wx = 8'd255; wy = 8'd255; quad = '1; end
        default: begin wx = 8'd85 * 8'($urandom_range(0, 2)); wy = 8'd170; end
      endcase
      #1;
      checks++;
      if (int'(pix) != ref_pix(quad, int'(wx), int'(wy))) begin
        failures++;
        if (failures < 10)
          $display("cell %h wx %0d wy %0d: got %0d expected %0d", quad, wx, wy, pix,
                   ref_pix(quad, int'(wx), int'(wy)));
      end
      if (wx == 0 && wy == 0) begin
        checks++;
        if (pix != quad.p00) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
