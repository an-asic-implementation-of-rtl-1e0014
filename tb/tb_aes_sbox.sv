// tb_aes_sbox: checks the composite-field S-box against a reference S-box
// computed by brute-force inversion in GF(2^8) plus the affine transform.
// Both variants are instantiated: the combinational one is checked in the
// same cycle, the three-stage pipelined one is fed a new byte every cycle
// and checked exactly three edges later (its documented latency).
module tb_aes_sbox;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [7:0] din, dout_c, dout_p;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_sbox #(.PIPELINED(1'b0)) dut_c (.clk, .rst_n, .sbox_in(din), .sbox_out(dout_c));
  aes_sbox #(.PIPELINED(1'b1)) dut_p (.clk, .rst_n, .sbox_in(din), .sbox_out(dout_p));

  rbyte_t ref_tab [256];
  logic [7:0] hist [4];

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) ref_tab[v] = ref_sbox(rbyte_t'(v));
    // spot values of the standard table
    checks++; if (ref_tab[8'h00] != 8'h63 || ref_tab[8'h53] != 8'hED) failures++;
    din = 8'h00;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 256 + 2; v++) begin
      din = 8'(v);
      #1;
      if (v < 256) begin
        checks++;
        if (dout_c !== ref_tab[v]) begin
          failures++;
          $display("comb  sbox(%02h)=%02h expected %02h", v[7:0], dout_c, ref_tab[v]);
        end
      end
      @(posedge clk);
      #1;
      // value that entered three edges ago
      if (v >= 2) begin
        checks++;
        if (dout_p !== ref_tab[v-2]) begin
          failures++;
          $display("pipe  sbox(%02h)=%02h expected %02h", 8'(v-2), dout_p, ref_tab[v-2]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
