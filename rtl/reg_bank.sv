// Register bank: eight 8-bit registers holding a 2x4 pixel window.
//
// Two rows of four registers each. On every BANK_SHIFT both rows move one
// column to the left and the new upper-row pixel (from the line buffer) and
// lower-row pixel (from the input stream) enter column 3. BANK_FILL loads
// the new pixels into all four columns, which replicates the first pixel of
// a row as its left neighbour. BANK_PAD shifts while repeating column 3,
// which replicates the last pixel of a row past the right border. The bank
// size (eight 8-bit registers) follows the design; the edge replication is
// this design's choice.
//
// Timing: one operation per clock; win shows the registers (no latency
// beyond the register itself). Reset clears the bank.
module reg_bank
  import scaler_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  bank_op_e op,
  input  pix_t     top_in,
  input  pix_t     bot_in,
  output win_t     win
);

  win_t r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0;
    end else begin
      unique case (op)
        BANK_HOLD: ;
        BANK_FILL: begin
          r.t <= {4{top_in}};
          r.b <= {4{bot_in}};
        end
        BANK_SHIFT: begin
          r.t <= {top_in, r.t[3:1]};
          r.b <= {bot_in, r.b[3:1]};
        end
        BANK_PAD: begin
          r.t <= {r.t[3], r.t[3:1]};
          r.b <= {r.b[3], r.b[3:1]};
        end
      endcase
    end
  end

  assign win = r;

endmodule
