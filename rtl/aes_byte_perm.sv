// aes_byte_perm: byte permutation unit of the 8-bit AES core.
//
// It holds the 128-bit state as 16 byte registers and does everything that
// moves or substitutes bytes:
//   * load:   while load_en is high, one byte enters per cycle at byte 15 and
//             the state shifts down one byte, so after 16 cycles the first
//             byte loaded is byte 0. The byte stored is load_data ^ load_key,
//             which is the initial AddRoundKey.
//   * unload: while unload_en is high the state rotates down one byte per
//             cycle; out_byte is always byte 0, so 16 unload cycles present
//             bytes 0..15 in order and leave the state as it was.
//   * ShiftRows: when sr_en is high the whole state is permuted in one
//             cycle (wiring only).
//   * SubBytes: when rd_valid is high, byte rd_idx is sent through S-box 1;
//             sb_valid/sb_byte appear LATENCY cycles later (0 or 3).
//   * write-back: when wr_valid is high, byte wr_idx is overwritten with
//             wr_byte ^ wr_key (the AddRoundKey of a round).
//   * S-box 2: a second S-box for the key expansion unit; ks_valid/ks_in in,
//             ks_out_valid/ks_out LATENCY cycles later.
// Only one of load, unload, ShiftRows and write-back is expected in a
// cycle; the priority is load, unload, ShiftRows, write-back. A write-back
// to a byte that is read in the same cycle returns the old value, which is
// what lets a round update the state in place.
// That the unit contains S-box 1 and S-box 2 is from the reference architecture; holding
// the state here, the load/unload order and doing ShiftRows as one
// permutation of the register are this design's choices.
module aes_byte_perm
  import aes_pkg::*;
#(
  parameter bit SBOX_PIPELINED = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  // load / unload
  input  logic       load_en,
  input  byte_t      load_data,
  input  byte_t      load_key,
  input  logic       unload_en,
  output byte_t      out_byte,
  // ShiftRows
  input  logic       sr_en,
  // SubBytes stream (S-box 1)
  input  logic       rd_valid,
  input  logic [3:0] rd_idx,
  output logic       sb_valid,
  output byte_t      sb_byte,
  // AddRoundKey write-back
  input  logic       wr_valid,
  input  logic [3:0] wr_idx,
  input  byte_t      wr_byte,
  input  byte_t      wr_key,
  // S-box 2 for the key expansion unit
  input  logic       ks_valid,
  input  byte_t      ks_in,
  output logic       ks_out_valid,
  output byte_t      ks_out
);

  localparam int unsigned LATENCY = SBOX_PIPELINED ? 3 : 0;

  state_t state_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
    end else if (load_en) begin
      state_q <= {load_data ^ load_key, state_q[15:1]};
    end else if (unload_en) begin
      state_q <= {state_q[0], state_q[15:1]};
    end else if (sr_en) begin
      state_q <= shift_rows(state_q);
    end else if (wr_valid) begin
      state_q[wr_idx] <= wr_byte ^ wr_key;
    end
  end

  assign out_byte = state_q[0];

  aes_sbox #(.PIPELINED(SBOX_PIPELINED)) u_sbox1 (
    .clk, .rst_n, .sbox_in(state_q[rd_idx]), .sbox_out(sb_byte)
  );

  aes_sbox #(.PIPELINED(SBOX_PIPELINED)) u_sbox2 (
    .clk, .rst_n, .sbox_in(ks_in), .sbox_out(ks_out)
  );

  // Valid flags travel alongside the S-box pipelines.
  if (LATENCY == 0) begin : g_v0
    assign sb_valid     = rd_valid;
    assign ks_out_valid = ks_valid;
  end else begin : g_vp
    logic [LATENCY-1:0] sb_v_q, ks_v_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        sb_v_q <= '0;
        ks_v_q <= '0;
      end else begin
        sb_v_q <= {sb_v_q[LATENCY-2:0], rd_valid};
        ks_v_q <= {ks_v_q[LATENCY-2:0], ks_valid};
      end
    end
    assign sb_valid     = sb_v_q[LATENCY-1];
    assign ks_out_valid = ks_v_q[LATENCY-1];
  end

  // Only one state operation per cycle.
  a_one_op: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({load_en, unload_en, sr_en, wr_valid}));

endmodule
