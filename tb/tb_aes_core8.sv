// tb_aes_core8: end-to-end test of the 8-bit AES-128 core in both S-box
// configurations (combinational and three-stage pipelined), side by side.
// Each block is loaded over 16 cycles, started, and unloaded over 16
// cycles; the ciphertext is compared with the FIPS-197 Appendix C.1 vector
// (plaintext 00112233..ff, key 00010203..0f -> 69c4e0d8..c55a) and with the
// reference model for random plaintexts and keys. busy_out must last
// exactly 10 * (21 + L) cycles (210 and 240). It also counts that every
// mechanism of the core was exercised: loads, starts, unloads, host
// commands ignored while busy, rounds with and without MixColumns, and
// S-box 2 lookups of the key schedule.
module tb_aes_core8;
  import aes_ref_pkg::*;

  localparam int NUM_RANDOM = 20;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic load_in, unload_in, start_in;
  logic [7:0] key_in, data_in;
  logic [7:0] data_out [2];
  logic busy_out [2];

  aes_core8 #(.SBOX_PIPELINED(1'b0)) dut0 (.clk, .rst_n, .load_in, .unload_in, .start_in,
    .key_in, .data_in, .data_out(data_out[0]), .busy_out(busy_out[0]));
  aes_core8 #(.SBOX_PIPELINED(1'b1)) dut1 (.clk, .rst_n, .load_in, .unload_in, .start_in,
    .key_in, .data_in, .data_out(data_out[1]), .busy_out(busy_out[1]));

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_load, n_start, n_unload, n_ignored, n_mix_rounds, n_bypass_rounds, n_key_sbox;
  always @(posedge clk) begin
    if (dut0.sr_en && !dut0.mc_bypass) n_mix_rounds++;
    if (dut0.sr_en &&  dut0.mc_bypass) n_bypass_rounds++;
    if (dut1.ks_valid) n_key_sbox++;
  end

  task automatic run_block(input rblock_t pt, input rblock_t key, input rblock_t exp_ct);
    int cyc [2];
    bit  done [2];
    load_in = 1'b1;
    for (int i = 0; i < 16; i++) begin
      data_in = pt[i]; key_in = key[i];
      @(posedge clk); #1;
    end
    load_in = 1'b0; n_load++;
    start_in = 1'b1;
    @(posedge clk); #1;
    start_in = 1'b0; n_start++;
    cyc = '{0, 0}; done = '{0, 0};
    while (!(done[0] && done[1])) begin
      for (int d = 0; d < 2; d++)
        if (!done[d]) begin
          if (busy_out[d]) cyc[d]++;
          else done[d] = 1;
        end
      // a second start, a load and an unload while busy are ignored
      if (cyc[0] == 50) begin
        start_in = 1'b1; n_ignored++;
      end else if (cyc[0] == 60) begin
        load_in = 1'b1; data_in = 8'hEE; key_in = 8'hEE; n_ignored++;
      end else if (cyc[0] == 70) begin
        unload_in = 1'b1; n_ignored++;
      end
      @(posedge clk); #1;
      start_in = 1'b0; load_in = 1'b0; unload_in = 1'b0;
    end
    checks++;
    if (cyc[0] != 210 || cyc[1] != 240) begin
      failures++;
      $display("latency %0d / %0d cycles, expected 210 / 240", cyc[0], cyc[1]);
    end
    unload_in = 1'b1;
    for (int i = 0; i < 16; i++) begin
      for (int d = 0; d < 2; d++) begin
        checks++;
        if (data_out[d] !== exp_ct[i]) begin
          failures++;
          $display("core %0d byte %0d = %02h expected %02h", d, i, data_out[d], exp_ct[i]);
        end
      end
      @(posedge clk); #1;
    end
    unload_in = 1'b0; n_unload++;
  endtask

  rblock_t pt, key, ct;

  initial begin
    load_in = 0; unload_in = 0; start_in = 0; key_in = '0; data_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // FIPS-197 Appendix C.1
    for (int i = 0; i < 16; i++) begin
      pt[i]  = 8'(i * 8'h11);
      key[i] = 8'(i);
    end
    ct = '{8'h69, 8'hc4, 8'he0, 8'hd8, 8'h6a, 8'h7b, 8'h04, 8'h30,
           8'hd8, 8'hcd, 8'hb7, 8'h80, 8'h70, 8'hb4, 8'hc5, 8'h5a};
    checks++;
    if (ref_encrypt(pt, key) != ct) begin failures++; $display("reference model disagrees with the known vector"); end
    run_block(pt, key, ct);
    for (int n = 0; n < NUM_RANDOM; n++) begin
      for (int i = 0; i < 16; i++) begin pt[i] = 8'($urandom); key[i] = 8'($urandom); end
      run_block(pt, key, ref_encrypt(pt, key));
    end
    $display("mechanisms: loads %0d starts %0d unloads %0d ignored %0d mix rounds %0d bypass rounds %0d key S-box lookups %0d",
             n_load, n_start, n_unload, n_ignored, n_mix_rounds, n_bypass_rounds, n_key_sbox);
    checks++;
    if (n_load == 0 || n_start == 0 || n_unload == 0 || n_ignored == 0 ||
        n_mix_rounds == 0 || n_bypass_rounds == 0 || n_key_sbox == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
