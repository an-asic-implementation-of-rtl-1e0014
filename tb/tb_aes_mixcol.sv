// tb_aes_mixcol: feeds random columns a byte per cycle, with and without
// bypass, and compares each completed column with MixColumns worked out by
// the reference GF(2^8) multiplier. Also checks that col_valid is high only
// on the fourth byte and that clear restarts the byte count.
module tb_aes_mixcol;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, bypass, in_valid, col_valid;
  byte_t in_byte;
  column_t col_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_mixcol dut (.clk, .rst_n, .clear, .bypass, .in_valid, .in_byte, .col_valid, .col_out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_column(input rbyte_t a [4], input logic byp);
    rbyte_t e;
    bypass = byp;
    for (int r = 0; r < 4; r++) begin
      in_valid = 1'b1;
      in_byte  = a[r];
      #1;
      checks++;
      if (col_valid !== (r == 3)) begin
        failures++;
        $display("col_valid=%b at byte %0d", col_valid, r);
      end
      if (r == 3)
        for (int k = 0; k < 4; k++) begin
          e = byp ? a[k] : (ref_gmul(a[k], 8'h02) ^ ref_gmul(a[(k+1)%4], 8'h03) ^ a[(k+2)%4] ^ a[(k+3)%4]);
          checks++;
          if (col_out[k] !== e) begin
            failures++;
            $display("row %0d got %02h expected %02h (bypass %b)", k, col_out[k], e, byp);
          end
        end
      @(posedge clk);
      #1;
      // an idle cycle now and then must not disturb the count
      if ($urandom_range(3) == 0) begin
        in_valid = 1'b0;
        @(posedge clk);
        #1;
      end
    end
    in_valid = 1'b0;
  endtask

  rbyte_t col [4];

  initial begin
    clear = 1'b0; bypass = 1'b0; in_valid = 1'b0; in_byte = '0;
    @(posedge clk); #1 rst_n = 1'b1;
    // FIPS-197 MixColumns example column db 13 53 45 -> 8e 4d a1 bc
    col = '{8'hdb, 8'h13, 8'h53, 8'h45};
    send_column(col, 1'b0);
    for (int n = 0; n < 200; n++) begin
      for (int r = 0; r < 4; r++) col[r] = 8'($urandom);
      send_column(col, ($urandom_range(4) == 0));
    end
    // half a column, then clear: the next byte must count as row 0
    in_valid = 1'b1; in_byte = 8'h11;
    @(posedge clk); #1;
    @(posedge clk); #1;
    in_valid = 1'b0; clear = 1'b1;
    @(posedge clk); #1;
    clear = 1'b0;
    col = '{8'hf2, 8'h0a, 8'h22, 8'h5c};
    send_column(col, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
