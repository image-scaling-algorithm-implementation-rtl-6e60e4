// Test of the edge detector: gradients, edge strength, asymmetric parameter
// and the selection are compared with direct integer evaluation of
//   grad_h = |t2-t1| + |b2-b1|, grad_v = |b1-t1| + |b2-t2|,
//   A = |t2-t0| - |t3-t1|, sel = (grad_h+grad_v >= EDGE_TH) or (|A| >= ASYM_TH)
// for random windows and for hand-made cases: a flat area, a centred step
// (A = 0, selected by the gradient) and a step beside the cell (selected by
// A only).
module edge_detector_tb;
  import scaler_pkg::*;

  localparam int unsigned EDGE_TH = 64, ASYM_TH = 32;

  win_t                    win;
  logic [PIX_W:0]          grad_h, grad_v;
  logic [PIX_W+1:0]        edge_sum;
  logic signed [PIX_W+1:0] asym;
  logic                    sel_sharp;
  int checks = 0, failures = 0, n_by_edge = 0, n_by_asym = 0, n_none = 0;

  edge_detector #(.EDGE_TH(EDGE_TH), .ASYM_TH(ASYM_TH)) u_dut (
    .win, .grad_h, .grad_v, .edge_sum, .asym, .sel_sharp);

  function automatic int absi(int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run_one();
    int gh, gv, a;
    bit s;
    #1;
    gh = absi(int'(win.t[2]) - int'(win.t[1])) + absi(int'(win.b[2]) - int'(win.b[1]));
    gv = absi(int'(win.b[1]) - int'(win.t[1])) + absi(int'(win.b[2]) - int'(win.t[2]));
    a  = absi(int'(win.t[2]) - int'(win.t[0])) - absi(int'(win.t[3]) - int'(win.t[1]));
    s  = (gh + gv >= int'(EDGE_TH)) || (absi(a) >= int'(ASYM_TH));
    check(int'(grad_h), gh, "grad_h");
    check(int'(grad_v), gv, "grad_v");
    check(int'(edge_sum), gh + gv, "edge");
    check(int'(asym), a, "A");
    check(int'(sel_sharp), int'(s), "sel");
    if (gh + gv >= int'(EDGE_TH)) n_by_edge++;
    else if (absi(a) >= int'(ASYM_TH)) n_by_asym++;
    else n_none++;
  endtask

  function automatic win_t row_win(int a0, int a1, int a2, int a3);
    win_t w;
    w.t = {8'(a3), 8'(a2), 8'(a1), 8'(a0)};
    w.b = w.t;
    return w;
  endfunction

  initial begin
    // flat: nothing selected
    win = row_win(100, 100, 100, 100); run_one();
    check(int'(sel_sharp), 0, "flat");
    // centred step between t1 and t2: A = 0, gradient selects
    win = row_win(0, 0, 200, 200); run_one();
    check(int'(asym), 0, "centred step A");
    check(int'(sel_sharp), 1, "centred step");
    // step between t2 and t3: small gradient inside the cell, A selects
    win = row_win(50, 50, 60, 250); run_one();
    check(int'(sel_sharp), 1, "step beside the cell");
    for (int i = 0; i < 5000; i++) begin
      for (int k = 0; k < 4; k++) begin
        if (i % 2 == 0) begin
          win.t[k] = pix_t'($urandom); win.b[k] = pix_t'($urandom);
        end else begin
          win.t[k] = 8'(100 + $urandom_range(0, 40)); win.b[k] = 8'(100 + $urandom_range(0, 40));
        end
      end
      run_one();
    end
    checks++;
    if (n_by_edge == 0 || n_by_asym == 0 || n_none == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
