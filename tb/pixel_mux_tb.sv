// Test of the pixel multiplexer: with sel_sharp = 0 the cell must be the
// centre columns of the register bank window, with sel_sharp = 1 the
// sharpened cell.
module pixel_mux_tb;
  import scaler_pkg::*;

  win_t  win;
  quad_t sharp, quad;
  logic  sel_sharp;
  int    checks = 0, failures = 0;

  pixel_mux u_dut (.win, .sharp, .sel_sharp, .quad);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      win       = win_t'({$urandom, $urandom});
      sharp     = quad_t'($urandom);
      sel_sharp = 1'(i % 2);
      #1;
      checks++;
      if (sel_sharp) begin
        if (quad != sharp) failures++;
      end else begin
        if (quad.p00 != win.t[1] || quad.p01 != win.t[2] ||
            quad.p10 != win.b[1] || quad.p11 != win.b[2]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
