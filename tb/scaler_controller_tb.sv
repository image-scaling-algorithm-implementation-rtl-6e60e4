// Test of the scaler controller at several scaling ratios (see ctrl_check):
// the default 64x64 -> 96x96 without stalls (exact clock count) and with
// stalls, 2x enlargement of a small non-square image, and a reduction that
// needs priming passes which skip source rows.
module scaler_controller_tb;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done[4];
  int   c[4], f[4], pj[4], pd[4], db[4];
  int   checks, failures;

  // 64x64 -> 96x96, no stalls: 64 + 96 * (64 + 2 + 96 + 1) clocks per frame
  ctrl_check #(.FRAMES(1), .STALL(1'b0), .CYCLES(64 + 96 * 163)) u_a (
    .clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]),
    .n_prime_jump(pj[0]), .n_pad(pd[0]), .n_double(db[0]));
  ctrl_check #(.FRAMES(2), .STALL(1'b1)) u_b (
    .clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]),
    .n_prime_jump(pj[1]), .n_pad(pd[1]), .n_double(db[1]));
  ctrl_check #(.IN_W(10), .IN_H(7), .OUT_W(20), .OUT_H(14), .FRAMES(2)) u_c (
    .clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]),
    .n_prime_jump(pj[2]), .n_pad(pd[2]), .n_double(db[2]));
  ctrl_check #(.IN_W(24), .IN_H(20), .OUT_W(11), .OUT_H(7), .FRAMES(2)) u_d (
    .clk, .rst_n, .done(done[3]), .checks(c[3]), .failures(f[3]),
    .n_prime_jump(pj[3]), .n_pad(pd[3]), .n_double(db[3]));

  initial begin
    checks = 0; failures = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("prime jumps (reduction) %0d, pads %0d, two outputs per cell %0d",
             pj[3], pd[0], db[0]);
    checks += 3;
    if (pj[3] == 0) failures++;
    if (pd[0] == 0) failures++;
    if (db[0] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
