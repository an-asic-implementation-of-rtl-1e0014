// aes_mixcol: MixColumns unit of the 8-bit AES core.
//
// Substituted bytes arrive one per cycle on in_valid/in_byte, row 0 of a
// column first. The unit keeps the first three bytes of a column in a small
// shift register; when the fourth byte arrives the whole column is
// available and col_valid is high for that cycle, with col_out holding the
// MixColumns result (combinational from the three stored bytes and the
// incoming one):
//     o[r] = 2*a[r] ^ 3*a[r+1] ^ a[r+2] ^ a[r+3]   (indices mod 4, GF(2^8))
// With bypass high (last AES round) col_out is the column unchanged.
// clear resets the byte counter so that the next byte is row 0.
// The MixColumns function and the unit are from the reference architecture; collecting
// the column from a byte stream is this design's choice.
module aes_mixcol
  import aes_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  input  logic    bypass,
  input  logic    in_valid,
  input  byte_t   in_byte,
  output logic    col_valid,
  output column_t col_out
);

  byte_t [2:0] hold_q;   // hold_q[r] = row r of the column being collected
  logic  [1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_q <= '0;
      cnt_q  <= '0;
    end else if (clear) begin
      cnt_q  <= '0;
    end else if (in_valid) begin
      if (cnt_q != 2'd3) hold_q[cnt_q] <= in_byte;
      cnt_q <= cnt_q + 2'd1;
    end
  end

  column_t col_in;
  always_comb begin
    col_in    = {in_byte, hold_q[2], hold_q[1], hold_q[0]};
    col_valid = in_valid && (cnt_q == 2'd3) && !clear;
    col_out   = bypass ? col_in : mix_column(col_in);
  end

endmodule
