// End-to-end test of the image scaler at scaling ratios other than the
// default: 2x enlargement of a non-square image (10x7 -> 20x14), a
// non-integer ratio (16x12 -> 20x17) and a reduction (24x20 -> 11x7) that
// needs priming passes which skip source rows. Each scaler gets its own
// source, reference model and checker (scaler_env), with random stalls and
// back-pressure over three frames.
module image_scaler_ratio_tb;
  import scaler_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks, failures;
  logic done [3];
  int   c [3], f [3];

  // -------- 10x7 -> 20x14 --------
  logic a_iv, a_ir, a_ov, a_or, a_eol, a_eof;
  pix_t a_ip, a_op;
  logic [2:0] a_rr;
  image_scaler #(.IN_W(10), .IN_H(7), .OUT_W(20), .OUT_H(14)) u_a (
    .clk, .rst_n, .in_valid(a_iv), .in_ready(a_ir), .in_pix(a_ip), .req_row(a_rr),
    .out_valid(a_ov), .out_ready(a_or), .out_pix(a_op), .out_eol(a_eol), .out_eof(a_eof));
  scaler_env #(.IN_W(10), .IN_H(7), .OUT_W(20), .OUT_H(14), .FRAMES(3)) u_env_a (
    .clk, .rst_n, .in_valid(a_iv), .in_ready(a_ir), .in_pix(a_ip), .req_row(a_rr),
    .out_valid(a_ov), .out_ready(a_or), .out_pix(a_op), .out_eol(a_eol), .out_eof(a_eof),
    .p_emit(u_a.emit), .p_eof(u_a.eof), .p_sel_sharp(u_a.sel_sharp),
    .p_pad(u_a.bank_op == BANK_PAD), .p_prime(logic'(u_a.u_ctrl.state) == 1'b0),
    .done(done[0]), .checks(c[0]), .failures(f[0]));

  // -------- 16x12 -> 20x17 --------
  logic b_iv, b_ir, b_ov, b_or, b_eol, b_eof;
  pix_t b_ip, b_op;
  logic [3:0] b_rr;
  image_scaler #(.IN_W(16), .IN_H(12), .OUT_W(20), .OUT_H(17)) u_b (
    .clk, .rst_n, .in_valid(b_iv), .in_ready(b_ir), .in_pix(b_ip), .req_row(b_rr),
    .out_valid(b_ov), .out_ready(b_or), .out_pix(b_op), .out_eol(b_eol), .out_eof(b_eof));
  scaler_env #(.IN_W(16), .IN_H(12), .OUT_W(20), .OUT_H(17), .FRAMES(3)) u_env_b (
    .clk, .rst_n, .in_valid(b_iv), .in_ready(b_ir), .in_pix(b_ip), .req_row(b_rr),
    .out_valid(b_ov), .out_ready(b_or), .out_pix(b_op), .out_eol(b_eol), .out_eof(b_eof),
    .p_emit(u_b.emit), .p_eof(u_b.eof), .p_sel_sharp(u_b.sel_sharp),
    .p_pad(u_b.bank_op == BANK_PAD), .p_prime(logic'(u_b.u_ctrl.state) == 1'b0),
    .done(done[1]), .checks(c[1]), .failures(f[1]));

  // -------- 24x20 -> 11x7 (reduction) --------
  logic d_iv, d_ir, d_ov, d_or, d_eol, d_eof;
  pix_t d_ip, d_op;
  logic [4:0] d_rr;
  image_scaler #(.IN_W(24), .IN_H(20), .OUT_W(11), .OUT_H(7)) u_d (
    .clk, .rst_n, .in_valid(d_iv), .in_ready(d_ir), .in_pix(d_ip), .req_row(d_rr),
    .out_valid(d_ov), .out_ready(d_or), .out_pix(d_op), .out_eol(d_eol), .out_eof(d_eof));
  scaler_env #(.IN_W(24), .IN_H(20), .OUT_W(11), .OUT_H(7), .FRAMES(3),
               .JUMP_EXPECTED(1'b1), .REPEAT_EXPECTED(1'b0), .PAD_EXPECTED(1'b0)) u_env_d (
    .clk, .rst_n, .in_valid(d_iv), .in_ready(d_ir), .in_pix(d_ip), .req_row(d_rr),
    .out_valid(d_ov), .out_ready(d_or), .out_pix(d_op), .out_eol(d_eol), .out_eof(d_eof),
    .p_emit(u_d.emit), .p_eof(u_d.eof), .p_sel_sharp(u_d.sel_sharp),
    .p_pad(u_d.bank_op == BANK_PAD), .p_prime(logic'(u_d.u_ctrl.state) == 1'b0),
    .done(done[2]), .checks(c[2]), .failures(f[2]));

  initial begin
    checks = 0; failures = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2]);
    @(negedge clk);
    for (int i = 0; i < 3; i++) begin
      checks += c[i];
      failures += f[i];
    end
    failures += u_env_a.mechanism_failures();
    failures += u_env_b.mechanism_failures();
    failures += u_env_d.mechanism_failures();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
