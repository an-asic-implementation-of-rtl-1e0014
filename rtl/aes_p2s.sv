// aes_p2s: parallel-to-serial converter of the 8-bit AES core.
//
// A 32-bit column is captured when load is high; on the following four
// cycles out_valid is high and out_byte gives rows 0, 1, 2 and 3 of that
// column, one per cycle. A new column may be loaded in the cycle that shows
// the last byte of the previous one, so back-to-back columns stream without
// a gap (four bytes every four cycles). out_byte is registered.
// The converter is named by the reference architecture; its register form and timing are
// this design's choice.
module aes_p2s
  import aes_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    load,
  input  column_t col_in,
  output logic    out_valid,
  output byte_t   out_byte
);

  column_t     sh_q;
  logic  [2:0] left_q;   // bytes still to present, 0..4

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_q   <= '0;
      left_q <= '0;
    end else if (load) begin
      sh_q   <= col_in;
      left_q <= 3'd4;
    end else if (left_q != 3'd0) begin
      sh_q   <= {8'h00, sh_q[3:1]};
      left_q <= left_q - 3'd1;
    end
  end

  assign out_valid = (left_q != 3'd0);
  assign out_byte  = sh_q[0];

  // A column must not be overwritten before its bytes have left.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> (left_q <= 3'd1));

endmodule
