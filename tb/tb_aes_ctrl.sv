// tb_aes_ctrl: drives the controller with a model of the data path that
// returns each issued byte as a write-back 4 + L cycles later (L = 0, the
// combinational S-box). It checks the schedule cycle by cycle: one ShiftRows
// cycle, then bytes 0..15 issued in order with the key expansion started on
// the first, write-back indices 0..15, MixColumns bypass only in round 10,
// busy_out high for exactly 10 * 21 = 210 cycles, load/unload passed through
// only while idle, and start_in, load_in and unload_in ignored while busy.
module tb_aes_ctrl;
  import aes_pkg::*;

  localparam int L = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic load_in, unload_in, start_in, busy_out;
  logic load_en, unload_en, sr_en, rd_valid, kx_go, mc_clear, mc_bypass, wr_valid;
  logic [3:0] rd_idx, wr_idx, round;

  aes_ctrl dut (.clk, .rst_n, .load_in, .unload_in, .start_in, .busy_out,
    .load_en, .unload_en, .sr_en, .rd_valid, .rd_idx, .kx_go, .mc_clear, .mc_bypass,
    .wr_valid, .wr_idx, .round);

  // data path model: write-back 4 + L cycles after the read
  logic [4+L-1:0] dly;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) dly <= '0;
    else        dly <= {dly[4+L-2:0], rd_valid};
  assign wr_valid = dly[4+L-1];

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("t=%0t %s", $time, msg); end
  endtask

  int busy_cycles, sr_cnt, go_cnt, exp_rd, exp_wr, exp_round;

  task automatic encrypt_and_watch();
    start_in = 1'b1;
    @(posedge clk); #1;
    start_in = 1'b0;
    busy_cycles = 0; sr_cnt = 0; go_cnt = 0; exp_rd = 0; exp_wr = 0; exp_round = 0;
    while (busy_out) begin
      busy_cycles++;
      // host noise while busy must be ignored
      load_in   = ($urandom_range(3) == 0);
      unload_in = ($urandom_range(3) == 0);
      start_in  = ($urandom_range(3) == 0);
      #1;
      chk(!load_en && !unload_en, "load/unload passed while busy");
      if (sr_en) begin
        sr_cnt++; exp_round++;
        chk(exp_rd == 0 && exp_wr == 0, "ShiftRows before the previous round finished");
        chk(round == 4'(exp_round), "round number");
      end
      if (rd_valid) begin
        chk(rd_idx == 4'(exp_rd), "read index");
        chk(kx_go == (exp_rd == 0), "key expansion start");
        exp_rd++;
      end else chk(!kx_go, "kx_go without read");
      if (wr_valid) begin
        chk(wr_idx == 4'(exp_wr), "write index");
        chk(mc_bypass == (exp_round == 10), "MixColumns bypass");
        exp_wr++;
        if (exp_wr == 16) begin exp_wr = 0; exp_rd = 0; end
      end
      chk(!mc_clear, "mixcol cleared during a round");
      @(posedge clk); #1;
    end
    load_in = 1'b0; unload_in = 1'b0; start_in = 1'b0;
    chk(busy_cycles == 10 * (21 + L), $sformatf("busy for %0d cycles", busy_cycles));
    chk(sr_cnt == 10, "ten ShiftRows cycles");
  endtask

  initial begin
    load_in = 0; unload_in = 0; start_in = 0;
    @(posedge clk); #1 rst_n = 1'b1;
    for (int rep = 0; rep < 3; rep++) begin
      load_in = 1'b1;
      repeat (16) begin
        #1 chk(load_en && !busy_out && mc_clear, "load while idle");
        @(posedge clk); #1;
      end
      load_in = 1'b0;
      #1 chk(!load_en, "load_en follows load_in");
      encrypt_and_watch();
      unload_in = 1'b1;
      repeat (16) begin
        #1 chk(unload_en && !load_en && !busy_out, "unload while idle");
        @(posedge clk); #1;
      end
      unload_in = 1'b0;
      // start together with load is ignored
      load_in = 1'b1; start_in = 1'b1;
      @(posedge clk); #1;
      load_in = 1'b0; start_in = 1'b0;
      chk(!busy_out, "start ignored during load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
