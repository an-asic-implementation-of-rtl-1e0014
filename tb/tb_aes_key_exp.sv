// tb_aes_key_exp: runs the key expansion unit through all ten rounds for
// the FIPS-197 key and for random keys, once with a combinational S-box and
// once with a three-cycle S-box (both modelled here with the reference
// S-box). After every clock edge of an update it checks that exactly the
// bytes that should be done (0 .. t - L) hold the new round key and the
// others still hold the old one, that busy lasts 16 + L cycles, and that
// the round constant doubles. The FIPS-197 round-10 key is checked too.
module tb_aes_key_exp;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic  load_en, go;
  byte_t load_key;
  logic  [1:0] busy, ks_valid, ks_out_valid;
  byte_t ks_in [2], ks_out [2];
  state_t rk_all [2];
  byte_t rk_byte [2], rcon [2];
  logic [3:0] rk_idx;

  // instance 0: S-box answers in the same cycle
  aes_key_exp dut0 (.clk, .rst_n, .load_en, .load_key, .go, .busy(busy[0]),
    .ks_valid(ks_valid[0]), .ks_in(ks_in[0]), .ks_out_valid(ks_out_valid[0]), .ks_out(ks_out[0]),
    .rk_idx, .rk_byte(rk_byte[0]), .rk_all(rk_all[0]), .rcon(rcon[0]));
  always_comb begin
    ks_out_valid[0] = ks_valid[0];
    ks_out[0]       = ref_sbox(ks_in[0]);
  end

  // instance 1: S-box answers three cycles later
  aes_key_exp dut1 (.clk, .rst_n, .load_en, .load_key, .go, .busy(busy[1]),
    .ks_valid(ks_valid[1]), .ks_in(ks_in[1]), .ks_out_valid(ks_out_valid[1]), .ks_out(ks_out[1]),
    .rk_idx, .rk_byte(rk_byte[1]), .rk_all(rk_all[1]), .rcon(rcon[1]));
  logic [2:0] v_d;
  byte_t      b_d [3];
  always_ff @(posedge clk) begin
    v_d <= {v_d[1:0], ks_valid[1]};
    b_d[0] <= ref_sbox(ks_in[1]);
    b_d[1] <= b_d[0];
    b_d[2] <= b_d[1];
  end
  assign ks_out_valid[1] = v_d[2];
  assign ks_out[1]       = b_d[2];

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rblock_t key, oldk, newk;
  rbyte_t  rc;
  int      lat [2] = '{0, 3};

  task automatic run_key(input rblock_t k, input logic check_fips);
    load_en = 1'b1;
    for (int i = 0; i < 16; i++) begin
      load_key = k[i];
      @(posedge clk); #1;
    end
    load_en = 1'b0;
    oldk = k;
    rc = 8'h01;
    for (int rnd = 1; rnd <= 10; rnd++) begin
      newk = ref_next_key(oldk, rnd);
      for (int d = 0; d < 2; d++) begin
        checks++;
        if (rcon[d] !== rc) begin failures++; $display("rcon %02h expected %02h", rcon[d], rc); end
      end
      go = 1'b1;
      for (int t = 0; t < 20; t++) begin
        @(posedge clk); #1;
        go = 1'b0;
        for (int d = 0; d < 2; d++) begin
          for (int j = 0; j < 16; j++) begin
            checks++;
            if (rk_all[d][j] !== ((j <= t - lat[d]) ? newk[j] : oldk[j])) begin
              failures++;
              $display("inst %0d round %0d t=%0d byte %0d = %02h", d, rnd, t, j, rk_all[d][j]);
            end
          end
          // busy: high through the edge that writes byte 15
          checks++;
          if (busy[d] !== (t < 15 + lat[d])) begin
            failures++;
            $display("inst %0d busy=%b at t=%0d", d, busy[d], t);
          end
        end
      end
      // byte read port
      rk_idx = 4'($urandom);
      #1;
      for (int d = 0; d < 2; d++) begin
        checks++;
        if (rk_byte[d] !== newk[rk_idx]) failures++;
      end
      oldk = newk;
      rc = ref_gmul(rc, 8'h02);
    end
    if (check_fips) begin
      // FIPS-197 Appendix A.1: round 10 key d014f9a8 c9ee2589 e13f0cc8 b6630ca6
      checks++;
      if (rk_all[0] !== 128'ha60c63b6c80c3fe18925eec9a8f914d0) begin
        failures++;
        $display("FIPS round-10 key mismatch %h", rk_all[0]);
      end
    end
  endtask

  initial begin
    load_en = 1'b0; go = 1'b0; load_key = '0; rk_idx = '0;
    @(posedge clk); #1 rst_n = 1'b1;
    key = '{8'h2b, 8'h7e, 8'h15, 8'h16, 8'h28, 8'hae, 8'hd2, 8'ha6,
            8'hab, 8'hf7, 8'h15, 8'h88, 8'h09, 8'hcf, 8'h4f, 8'h3c};
    run_key(key, 1'b1);
    for (int n = 0; n < 4; n++) begin
      for (int i = 0; i < 16; i++) key[i] = 8'($urandom);
      run_key(key, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
