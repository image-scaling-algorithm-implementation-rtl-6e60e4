// Test of the register bank: random sequences of hold, fill, shift and pad
// operations are applied and the 2x4 window is compared after every clock
// with a model kept as two small queues of pixels.
module reg_bank_tb;
  import scaler_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bank_op_e op;
  pix_t     top_in, bot_in;
  win_t     win;
  int       mt[4], mb[4];
  int       checks = 0, failures = 0;
  int       n_op[4];

  reg_bank u_dut (.clk, .rst_n, .op, .top_in, .bot_in, .win);

  initial begin
    op = BANK_HOLD; top_in = '0; bot_in = '0;
    for (int k = 0; k < 4; k++) begin mt[k] = 0; mb[k] = 0; n_op[k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      op     = bank_op_e'($urandom_range(0, 3));
      top_in = pix_t'($urandom);
      bot_in = pix_t'($urandom);
      n_op[int'(op)]++;
      case (op)
        BANK_FILL:  for (int k = 0; k < 4; k++) begin mt[k] = top_in; mb[k] = bot_in; end
        BANK_SHIFT: begin
          for (int k = 0; k < 3; k++) begin mt[k] = mt[k+1]; mb[k] = mb[k+1]; end
          mt[3] = top_in; mb[3] = bot_in;
        end
        BANK_PAD:   for (int k = 0; k < 3; k++) begin mt[k] = mt[k+1]; mb[k] = mb[k+1]; end
        default: ;
      endcase
      @(posedge clk);
      #1;
      for (int k = 0; k < 4; k++) begin
        checks += 2;
        if (int'(win.t[k]) != mt[k] || int'(win.b[k]) != mb[k]) begin
          failures++;
          $display("step %0d op %s column %0d: got %0d/%0d expected %0d/%0d",
                   i, op.name(), k, win.t[k], win.b[k], mt[k], mb[k]);
        end
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_op[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
