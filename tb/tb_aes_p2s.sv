// tb_aes_p2s: loads random columns, sometimes back to back (load in the
// cycle of the previous column's last byte), sometimes with gaps, and checks
// that each column leaves as rows 0..3 on four consecutive cycles starting
// the cycle after the load, with out_valid low otherwise.
module tb_aes_p2s;
  import aes_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load, out_valid;
  column_t col_in;
  byte_t out_byte;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_p2s dut (.clk, .rst_n, .load, .col_in, .out_valid, .out_byte);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  column_t cur;
  int gap;

  initial begin
    load = 1'b0; col_in = '0;
    @(posedge clk); #1 rst_n = 1'b1;
    checks++; if (out_valid !== 1'b0) failures++;
    // first load
    cur = {8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom)};
    load = 1'b1; col_in = cur;
    @(posedge clk); #1 load = 1'b0;
    for (int n = 0; n < 300; n++) begin
      gap = ($urandom_range(2) == 0) ? int'($urandom_range(3)) : 0;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (out_valid !== 1'b1 || out_byte !== cur[k]) begin
          failures++;
          $display("col %0d byte %0d: valid=%b got %02h expected %02h", n, k, out_valid, out_byte, cur[k]);
        end
        if (k == 3 && gap == 0) begin
          cur = {8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom)};
          load = 1'b1; col_in = cur;
        end
        @(posedge clk); #1 load = 1'b0;
      end
      if (gap != 0) begin
        repeat (gap) begin
          checks++;
          if (out_valid !== 1'b0) begin failures++; $display("valid during gap"); end
          @(posedge clk); #1;
        end
        cur = {8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom)};
        load = 1'b1; col_in = cur;
        @(posedge clk); #1 load = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
