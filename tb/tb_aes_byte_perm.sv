// tb_aes_byte_perm: exercises the byte permutation unit with the
// combinational and with the pipelined S-boxes. Every check goes through
// the unit's outputs: the state is read back with 16 unload cycles and
// compared with a model kept here (load stores data ^ key, ShiftRows moves
// row r left by r, write-back stores byte ^ key). SubBytes reads of random
// bytes and S-box 2 lookups are compared with the reference S-box exactly
// L cycles after they were issued (L = 0 or 3).
module tb_aes_byte_perm;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic load_en, unload_en, sr_en, rd_valid, wr_valid, ks_valid;
  logic [3:0] rd_idx, wr_idx;
  byte_t load_data, load_key, wr_byte, wr_key, ks_in;
  byte_t out_byte [2], sb_byte [2], ks_out [2];
  logic  sb_valid [2], ks_out_valid [2];

  aes_byte_perm #(.SBOX_PIPELINED(1'b0)) dut0 (.clk, .rst_n, .load_en, .load_data, .load_key,
    .unload_en, .out_byte(out_byte[0]), .sr_en, .rd_valid, .rd_idx,
    .sb_valid(sb_valid[0]), .sb_byte(sb_byte[0]), .wr_valid, .wr_idx, .wr_byte, .wr_key,
    .ks_valid, .ks_in, .ks_out_valid(ks_out_valid[0]), .ks_out(ks_out[0]));
  aes_byte_perm #(.SBOX_PIPELINED(1'b1)) dut1 (.clk, .rst_n, .load_en, .load_data, .load_key,
    .unload_en, .out_byte(out_byte[1]), .sr_en, .rd_valid, .rd_idx,
    .sb_valid(sb_valid[1]), .sb_byte(sb_byte[1]), .wr_valid, .wr_idx, .wr_byte, .wr_key,
    .ks_valid, .ks_in, .ks_out_valid(ks_out_valid[1]), .ks_out(ks_out[1]));

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rbyte_t model [16];
  rbyte_t tmp [16];

  task automatic idle_inputs();
    load_en = 0; unload_en = 0; sr_en = 0; rd_valid = 0; wr_valid = 0; ks_valid = 0;
  endtask

  task automatic check_state(input string what);
    unload_en = 1'b1;
    for (int i = 0; i < 16; i++) begin
      for (int d = 0; d < 2; d++) begin
        checks++;
        if (out_byte[d] !== model[i]) begin
          failures++;
          $display("%s: inst %0d byte %0d = %02h expected %02h", what, d, i, out_byte[d], model[i]);
        end
      end
      @(posedge clk); #1;
    end
    unload_en = 1'b0;
  endtask

  // requests issued per cycle, for the pipelined instance
  logic   h_sv [24], h_kv [24];
  rbyte_t h_sb [24], h_kb [24];

  initial begin
    idle_inputs();
    load_data = '0; load_key = '0; rd_idx = '0; wr_idx = '0; wr_byte = '0; wr_key = '0; ks_in = '0;
    @(posedge clk); #1 rst_n = 1'b1;
    for (int rep = 0; rep < 20; rep++) begin
      // load
      load_en = 1'b1;
      for (int i = 0; i < 16; i++) begin
        load_data = 8'($urandom); load_key = 8'($urandom);
        model[i] = load_data ^ load_key;
        @(posedge clk); #1;
      end
      load_en = 1'b0;
      check_state("load");
      check_state("unload twice");
      // ShiftRows
      sr_en = 1'b1;
      @(posedge clk); #1;
      sr_en = 1'b0;
      tmp = model;
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++) model[r + 4*c] = tmp[r + 4*((c + r) % 4)];
      check_state("shiftrows");
      // SubBytes reads and S-box 2 lookups, random indices, 20 cycles + drain
      for (int t = 0; t < 24; t++) begin
        rd_valid = (t < 20);
        ks_valid = (t < 20) && ($urandom_range(1) == 1);
        rd_idx   = 4'($urandom);
        ks_in    = 8'($urandom);
        #1;
        // combinational instance: same cycle
        if (rd_valid) begin
          checks++;
          if (!sb_valid[0] || sb_byte[0] !== ref_sbox(model[rd_idx])) begin
            failures++; $display("sbox1 comb idx %0d", rd_idx);
          end
        end
        if (ks_valid) begin
          checks++;
          if (!ks_out_valid[0] || ks_out[0] !== ref_sbox(ks_in)) begin
            failures++; $display("sbox2 comb");
          end
        end
        // pipelined instance: result of the request three cycles back
        h_sv[t] = rd_valid; h_sb[t] = ref_sbox(model[rd_idx]);
        h_kv[t] = ks_valid; h_kb[t] = ref_sbox(ks_in);
        checks++;
        if (sb_valid[1] !== (t >= 3 && h_sv[t-3 < 0 ? 0 : t-3]) ||
            ks_out_valid[1] !== (t >= 3 && h_kv[t-3 < 0 ? 0 : t-3])) begin
          failures++; $display("pipe valid flags wrong at t=%0d", t);
        end
        if (t >= 3 && h_sv[t-3]) begin
          checks++;
          if (sb_byte[1] !== h_sb[t-3]) begin failures++; $display("sbox1 pipe data t=%0d", t); end
        end
        if (t >= 3 && h_kv[t-3]) begin
          checks++;
          if (ks_out[1] !== h_kb[t-3]) begin failures++; $display("sbox2 pipe data t=%0d", t); end
        end
        @(posedge clk); #1;
      end
      rd_valid = 1'b0; ks_valid = 1'b0;
      // write-back of random bytes
      for (int n = 0; n < 10; n++) begin
        wr_valid = 1'b1;
        wr_idx = 4'($urandom); wr_byte = 8'($urandom); wr_key = 8'($urandom);
        model[wr_idx] = wr_byte ^ wr_key;
        @(posedge clk); #1;
      end
      wr_valid = 1'b0;
      check_state("write-back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
