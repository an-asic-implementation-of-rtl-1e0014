// tb_aes_core8_full: the core exactly as delivered (default parameters,
// combinational S-box) taken through complete encryptions: load, start,
// wait for busy_out to fall, unload. It checks the FIPS-197 Appendix C.1
// vector and a chain of 8 random blocks in which each ciphertext is the
// next plaintext, all against the reference model, and that each
// encryption keeps busy_out high for 210 cycles.
module tb_aes_core8_full;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic load_in, unload_in, start_in, busy_out;
  logic [7:0] key_in, data_in, data_out;

  aes_core8 dut (.clk, .rst_n, .load_in, .unload_in, .start_in,
    .key_in, .data_in, .data_out, .busy_out);

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic encrypt(input rblock_t pt, input rblock_t key, output rblock_t ct);
    int cyc = 0;
    load_in = 1'b1;
    for (int i = 0; i < 16; i++) begin
      data_in = pt[i]; key_in = key[i];
      @(posedge clk); #1;
    end
    load_in = 1'b0; start_in = 1'b1;
    @(posedge clk); #1;
    start_in = 1'b0;
    while (busy_out) begin cyc++; @(posedge clk); #1; end
    checks++;
    if (cyc != 210) begin failures++; $display("busy for %0d cycles, expected 210", cyc); end
    unload_in = 1'b1;
    for (int i = 0; i < 16; i++) begin
      ct[i] = data_out;
      @(posedge clk); #1;
    end
    unload_in = 1'b0;
  endtask

  rblock_t pt, key, ct, exp_ct;

  initial begin
    load_in = 0; unload_in = 0; start_in = 0; key_in = '0; data_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 16; i++) begin pt[i] = 8'(i * 8'h11); key[i] = 8'(i); end
    exp_ct = '{8'h69, 8'hc4, 8'he0, 8'hd8, 8'h6a, 8'h7b, 8'h04, 8'h30,
               8'hd8, 8'hcd, 8'hb7, 8'h80, 8'h70, 8'hb4, 8'hc5, 8'h5a};
    encrypt(pt, key, ct);
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (ct[i] !== exp_ct[i]) begin failures++; $display("byte %0d = %02h expected %02h", i, ct[i], exp_ct[i]); end
    end
    for (int i = 0; i < 16; i++) key[i] = 8'($urandom);
    for (int n = 0; n < 8; n++) begin
      pt = ct;
      exp_ct = ref_encrypt(pt, key);
      encrypt(pt, key, ct);
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (ct[i] !== exp_ct[i]) begin failures++; $display("block %0d byte %0d = %02h expected %02h", n, i, ct[i], exp_ct[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
