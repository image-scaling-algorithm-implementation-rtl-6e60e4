// Test of the line buffer: fills a line with random pixels, reads every
// address back, then checks that a read of the address being written in the
// same clock returns the old pixel while the new one is stored, as the
// scaler relies on when it replaces the upper row by the lower row.
module line_buffer_tb;
  import scaler_pkg::*;

  localparam int unsigned DEPTH = 64;
  localparam int AW = $clog2(DEPTH);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [AW-1:0] rd_addr, wr_addr;
  logic          wr_en;
  pix_t          rd_data, wr_data;
  pix_t          model [DEPTH];
  int            checks = 0, failures = 0;

  line_buffer #(.DEPTH(DEPTH)) u_dut (.clk, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  task automatic check(pix_t got, pix_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    wr_en = 1'b0; wr_addr = '0; wr_data = '0; rd_addr = '0;
    // fill
    for (int a = 0; a < int'(DEPTH); a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = AW'(a); wr_data = pix_t'($urandom); model[a] = wr_data;
    end
    @(negedge clk);
    wr_en = 1'b0;
    // read back
    for (int a = 0; a < int'(DEPTH); a++) begin
      rd_addr = AW'(a);
      #1 check(rd_data, model[a], $sformatf("read %0d", a));
    end
    // read-before-write at the same address, as in a scaler pass
    for (int a = 0; a < int'(DEPTH); a++) begin
      @(negedge clk);
      rd_addr = AW'(a); wr_addr = AW'(a); wr_en = ($urandom_range(0, 1) == 1);
      wr_data = pix_t'($urandom);
      #1 check(rd_data, model[a], $sformatf("old value %0d", a));
      @(posedge clk);
      if (wr_en) model[a] = wr_data;
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int a = 0; a < int'(DEPTH); a++) begin
      rd_addr = AW'(a);
      #1 check(rd_data, model[a], $sformatf("final %0d", a));
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
