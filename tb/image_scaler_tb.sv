// End-to-end test of the image scaler at its default size (64x64 enlarged
// to 96x96). Two frames are run back to back: the first with the source and
// the sink always ready, where the frame must take exactly the expected
// number of clocks, the second with random input stalls and output
// back-pressure. Every output pixel, its end-of-row/end-of-frame flags and
// the sequence of requested source rows are compared with a reference
// model (scaler_env), and every mechanism of the scaler must occur.
module image_scaler_tb;
  import scaler_pkg::*;

  localparam int unsigned IN_W = 64, IN_H = 64, OUT_W = 96, OUT_H = 96;
  // clocks of a frame without stalls: priming row 0, then per output row
  // IN_W input pixels, 2 padding shifts, OUT_W outputs and 1 turn-around
  localparam int FRAME_CYCLES = IN_W + OUT_H * (IN_W + 2 + OUT_W + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, out_eol, out_eof, done;
  pix_t in_pix, out_pix;
  logic [$clog2(IN_H)-1:0] req_row;
  int env_checks, env_failures, checks, failures;

  image_scaler u_dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_pix, .req_row,
    .out_valid, .out_ready, .out_pix, .out_eol, .out_eof
  );

  scaler_env #(
    .IN_W(IN_W), .IN_H(IN_H), .OUT_W(OUT_W), .OUT_H(OUT_H),
    .FRAMES(2), .STALL(1'b1), .STALL_FROM(1)
  ) u_env (
    .clk, .rst_n, .in_valid, .in_ready, .in_pix, .req_row,
    .out_valid, .out_ready, .out_pix, .out_eol, .out_eof,
    .p_emit(u_dut.emit), .p_eof(u_dut.eof), .p_sel_sharp(u_dut.sel_sharp),
    .p_pad(u_dut.bank_op == BANK_PAD), .p_prime(logic'(u_dut.u_ctrl.state) == 1'b0),
    .done, .checks(env_checks), .failures(env_failures)
  );

  int cyc;

  initial begin
    checks = 0; failures = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // clocks from reset release to the clock that produces the last pixel
    cyc = 1;
    while (!(u_dut.emit && u_dut.eof)) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != FRAME_CYCLES) begin
      failures++;
      $display("frame 1 took %0d clocks, expected %0d", cyc, FRAME_CYCLES);
    end
    wait (done);
    @(negedge clk);
    checks   += env_checks + 1;
    failures += env_failures + u_env.mechanism_failures();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + env_checks, failures + env_failures + 1);
    $finish;
  end

endmodule
