// Line buffer: one image line of pixels.
//
// The scaler keeps a single line of memory. While the lower source row of
// an interpolation pass streams in, this buffer supplies the upper row at
// the same column, and (when the controller asks for it) the incoming pixel
// replaces the old one so that the buffer then holds the lower row for the
// next pass. Using only one line of memory follows the design; the port
// style is this design's choice.
//
// Interface: rd_addr/rd_data is an asynchronous read port (LUT RAM on an
// FPGA); wr_en/wr_addr/wr_data write on the rising clock edge. A read of
// the address being written in the same cycle returns the old pixel.
// The contents are not reset: every location is written by a priming pass
// before it is read.
module line_buffer
  import scaler_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output pix_t                     rd_data,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  pix_t                     wr_data
);

  pix_t mem [DEPTH];

  assign rd_data = mem[rd_addr];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

endmodule
