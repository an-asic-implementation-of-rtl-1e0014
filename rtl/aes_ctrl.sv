// aes_ctrl: controller of the 8-bit AES core.
//
// It turns the three host controls into the byte schedule of the data path:
//   * load_in  (idle only): every cycle it is high, one data byte and one key
//              byte are taken (load_en).
//   * unload_in (idle only): every cycle it is high, one result byte is
//              presented and the state rotates (unload_en).
//   * start_in (idle only): runs the ten rounds; busy_out is high from the
//              cycle after start_in until the result is in the state
//              register, and falls when the result can be read.
// Each round is
//   SR     1 cycle : ShiftRows of the whole state (sr_en).
//   ISSUE 16 cycles: bytes 0..15 are read into S-box 1 (rd_valid, rd_idx);
//                    on the first of them the key expansion is started
//                    (kx_go).
//   DRAIN          : waits until the sixteenth AddRoundKey write-back
//                    (wr_valid with wr_idx = 15) has happened.
// Write-backs are counted here (wr_idx) whatever the state, since they
// begin while bytes are still being issued. In round 10 MixColumns is
// bypassed (mc_bypass). With S-box latency L a round takes 21 + L cycles,
// so an encryption takes 10 * (21 + L) cycles from start_in to busy_out
// falling (210 with the combinational S-box, 240 with the pipelined one).
// The control signals and their meaning are from the reference architecture; the state
// machine and its timing are this design's choice.
module aes_ctrl
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load_in,
  input  logic       unload_in,
  input  logic       start_in,
  output logic       busy_out,
  // data path control
  output logic       load_en,
  output logic       unload_en,
  output logic       sr_en,
  output logic       rd_valid,
  output logic [3:0] rd_idx,
  output logic       kx_go,
  output logic       mc_clear,
  output logic       mc_bypass,
  input  logic       wr_valid,
  output logic [3:0] wr_idx,
  output logic [3:0] round
);

  typedef enum logic [1:0] {S_IDLE, S_SR, S_ISSUE, S_DRAIN} ctrl_state_e;

  ctrl_state_e state_q;
  logic [3:0]  cnt_q;
  logic [3:0]  round_q;
  logic [3:0]  wr_idx_q;

  wire idle       = (state_q == S_IDLE);
  wire round_done = wr_valid && (wr_idx_q == 4'd15);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      cnt_q    <= '0;
      round_q  <= '0;
      wr_idx_q <= '0;
    end else begin
      if (wr_valid) wr_idx_q <= wr_idx_q + 4'd1;
      unique case (state_q)
        S_IDLE: begin
          if (start_in && !load_in && !unload_in) begin
            state_q  <= S_SR;
            round_q  <= 4'd1;
            wr_idx_q <= '0;
          end
        end
        S_SR: begin
          state_q <= S_ISSUE;
          cnt_q   <= '0;
        end
        S_ISSUE: begin
          cnt_q <= cnt_q + 4'd1;
          if (cnt_q == 4'd15) state_q <= S_DRAIN;
        end
        S_DRAIN: begin
          if (round_done) begin
            if (round_q == 4'(NUM_ROUNDS)) begin
              state_q <= S_IDLE;
            end else begin
              state_q <= S_SR;
              round_q <= round_q + 4'd1;
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    load_en   = idle && load_in;
    unload_en = idle && unload_in && !load_in;
    sr_en     = (state_q == S_SR);
    rd_valid  = (state_q == S_ISSUE);
    rd_idx    = cnt_q;
    kx_go     = (state_q == S_ISSUE) && (cnt_q == 4'd0);
    mc_clear  = idle;
    mc_bypass = (round_q == 4'(NUM_ROUNDS));
    busy_out  = !idle;
    wr_idx    = wr_idx_q;
    round     = round_q;
  end

  // Write-backs only happen inside a round.
  a_wr_in_round: assert property (@(posedge clk) disable iff (!rst_n)
    wr_valid |-> (state_q == S_ISSUE || state_q == S_DRAIN));

endmodule
