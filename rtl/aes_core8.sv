// aes_core8: low-area AES-128 encryption core with an 8-bit data path.
//
// The core encrypts one 128-bit block with a 128-bit key, moving one byte
// per clock cycle through a single S-box (S-box 1) for the data and a second
// one (S-box 2) for the key schedule. Both S-boxes compute the inverse in a
// composite field GF((2^4)^2) instead of reading a 256-byte table.
//
// Host interface (all synchronous to clk, active-low asynchronous rst_n):
//   load_in   high for 16 cycles: data_in and key_in carry bytes 0..15 of
//             the plaintext and of the key, one pair per cycle.
//   start_in  one-cycle pulse: encrypts. busy_out is high from the next
//             cycle for 10 * (21 + L) cycles (L = S-box latency, 0 or 3);
//             when it falls the ciphertext is ready.
//   unload_in high for 16 cycles: data_out shows ciphertext bytes 0..15, one
//             per cycle (data_out is byte 0 of the state at all times, so
//             the first byte is visible before the first unload cycle and
//             each unload cycle moves on to the next).
// load_in, unload_in and start_in are ignored while busy_out is high. After
// an encryption the key register holds the last round key, so the key is
// loaded again with every block.
//
// Round structure: the byte permutation unit applies ShiftRows to the
// state register and streams its
// bytes through S-box 1; the mixcolumn unit gathers each column and mixes
// it (bypassed in round 10); the parallel-to-serial converter returns the
// column as bytes, which are XORed with the round key byte from the key
// expansion unit and written back in place. The key expansion unit computes
// the next round key in the same pass, four cycles ahead of its use.
// The block list, the signal set and the composite-field S-box follow the
// reference architecture; the byte schedule and timing are this design's own.
module aes_core8
  import aes_pkg::*;
#(
  parameter bit SBOX_PIPELINED = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load_in,
  input  logic  unload_in,
  input  logic  start_in,
  input  byte_t key_in,
  input  byte_t data_in,
  output byte_t data_out,
  output logic  busy_out
);

  logic       load_en, unload_en, sr_en, rd_valid, kx_go, mc_clear, mc_bypass;
  logic [3:0] rd_idx, wr_idx, round;
  logic       sb_valid, ks_valid, ks_out_valid, col_valid, p2s_valid, kx_busy;
  byte_t      sb_byte, ks_in, ks_out, p2s_byte, rk_byte, rcon;
  column_t    col;
  state_t     rk_all;

  aes_ctrl u_ctrl (
    .clk, .rst_n,
    .load_in, .unload_in, .start_in, .busy_out,
    .load_en, .unload_en, .sr_en, .rd_valid, .rd_idx, .kx_go,
    .mc_clear, .mc_bypass,
    .wr_valid(p2s_valid), .wr_idx, .round
  );

  aes_byte_perm #(.SBOX_PIPELINED(SBOX_PIPELINED)) u_bperm (
    .clk, .rst_n,
    .load_en, .load_data(data_in), .load_key(key_in),
    .unload_en, .out_byte(data_out),
    .sr_en,
    .rd_valid, .rd_idx, .sb_valid, .sb_byte,
    .wr_valid(p2s_valid), .wr_idx, .wr_byte(p2s_byte), .wr_key(rk_byte),
    .ks_valid, .ks_in, .ks_out_valid, .ks_out
  );

  aes_key_exp u_kexp (
    .clk, .rst_n,
    .load_en, .load_key(key_in),
    .go(kx_go), .busy(kx_busy),
    .ks_valid, .ks_in, .ks_out_valid, .ks_out,
    .rk_idx(wr_idx), .rk_byte, .rk_all, .rcon
  );

  aes_mixcol u_mixcol (
    .clk, .rst_n,
    .clear(mc_clear), .bypass(mc_bypass),
    .in_valid(sb_valid), .in_byte(sb_byte),
    .col_valid, .col_out(col)
  );

  aes_p2s u_p2s (
    .clk, .rst_n,
    .load(col_valid), .col_in(col),
    .out_valid(p2s_valid), .out_byte(p2s_byte)
  );

  // The round key must be complete before the last byte of a round is
  // written back: the key expansion unit runs ahead of the data path.
  a_key_ready: assert property (@(posedge clk) disable iff (!rst_n)
    (p2s_valid && wr_idx == 4'd15) |-> !kx_busy);

endmodule
