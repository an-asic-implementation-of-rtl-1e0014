// aes_key_exp: byte-serial AES-128 key expansion unit.
//
// The 16-byte key register holds the current round key (byte i = key byte
// i). While load_en is high one key byte enters per cycle at byte 15 and the
// register shifts down, in step with the data load, so after 16 cycles it
// holds the cipher key (round key 0) and the round constant is reset to {01}.
//
// A pulse on go replaces round key n by round key n+1 in place, one byte per
// cycle, using the relation of the AES-128 key schedule
//     k'[j] = k[j] ^ S(k[12 + (j+1) mod 4]) ^ (j == 0 ? rcon : 0)   j = 0..3
//     k'[j] = k[j] ^ k'[j-4]                                        j = 4..15
// Updating in order j = 0..15 works in place: k'[j-4] is already written
// when byte j is computed, and bytes 12..15 are still the old ones when
// they are sent to the S-box. The four S-box lookups (bytes 13, 14, 15, 12,
// i.e. RotWord) are issued on the go cycle and the three cycles after it
// through ks_valid/ks_in; the S-box (S-box 2 of the byte permutation unit)
// answers LATENCY cycles later on ks_out_valid/ks_out. Byte j is written on
// the edge that ends cycle go + LATENCY + j, so the update takes
// 16 + LATENCY cycles; busy is high meanwhile. After the last byte the round
// constant is doubled in GF(2^8).
//
// rk_idx selects a byte of the current key for the AddRoundKey (rk_byte,
// combinational); rk_all shows the whole register.
// That the key expansion is a unit of its own next to the data path is from
// the reference architecture; the byte-serial in-place schedule is this design's choice.
module aes_key_exp
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load_en,
  input  byte_t      load_key,
  input  logic       go,
  output logic       busy,
  // S-box 2
  output logic       ks_valid,
  output byte_t      ks_in,
  input  logic       ks_out_valid,
  input  byte_t      ks_out,
  // round key read port
  input  logic [3:0] rk_idx,
  output byte_t      rk_byte,
  output state_t     rk_all,
  output byte_t      rcon
);

  state_t     key_q;
  byte_t      rcon_q;
  logic [1:0] req_cnt_q;     // which of the four S-box requests is next
  logic       req_act_q;     // requests 1..3 still to issue
  logic [3:0] upd_idx_q;     // next byte to update
  logic       upd_act_q;     // updates 4..15 in progress
  logic       busy_q;

  // S-box requests: RotWord order 13, 14, 15, 12.
  logic [1:0] req_sel;
  always_comb begin
    req_sel  = go ? 2'd0 : req_cnt_q;
    ks_valid = go | req_act_q;
    ks_in    = key_q[12 + ((int'(req_sel) + 1) % 4)];
  end

  // Byte update: j = 0..3 when an S-box answer arrives, j = 4..15 after.
  logic  upd_en;
  byte_t upd_val;
  always_comb begin
    upd_en  = 1'b0;
    upd_val = '0;
    if (ks_out_valid && upd_idx_q < 4'd4) begin
      upd_en  = 1'b1;
      upd_val = key_q[upd_idx_q] ^ ks_out ^ ((upd_idx_q == 4'd0) ? rcon_q : 8'h00);
    end else if (upd_act_q) begin
      upd_en  = 1'b1;
      upd_val = key_q[upd_idx_q] ^ key_q[upd_idx_q - 4'd4];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_q     <= '0;
      rcon_q    <= RCON_FIRST;
      req_cnt_q <= '0;
      req_act_q <= 1'b0;
      upd_idx_q <= '0;
      upd_act_q <= 1'b0;
      busy_q    <= 1'b0;
    end else if (load_en) begin
      key_q     <= {load_key, key_q[15:1]};
      rcon_q    <= RCON_FIRST;
      req_cnt_q <= '0;
      req_act_q <= 1'b0;
      upd_idx_q <= '0;
      upd_act_q <= 1'b0;
      busy_q    <= 1'b0;
    end else begin
      if (go) begin
        busy_q    <= 1'b1;
        req_cnt_q <= 2'd1;
        req_act_q <= 1'b1;
      end else if (req_act_q) begin
        req_cnt_q <= req_cnt_q + 2'd1;
        if (req_cnt_q == 2'd3) req_act_q <= 1'b0;
      end
      if (upd_en) begin
        key_q[upd_idx_q] <= upd_val;
        upd_idx_q        <= upd_idx_q + 4'd1;
        upd_act_q        <= (upd_idx_q >= 4'd3) && (upd_idx_q != 4'd15);
        if (upd_idx_q == 4'd15) begin
          busy_q <= 1'b0;
          rcon_q <= xtime(rcon_q);
        end
      end
    end
  end

  assign busy    = busy_q | go;
  assign rk_byte = key_q[rk_idx];
  assign rk_all  = key_q;
  assign rcon    = rcon_q;

  // A new round may only start once the previous update has finished.
  a_go_idle: assert property (@(posedge clk) disable iff (!rst_n) go |-> !busy_q);

endmodule
