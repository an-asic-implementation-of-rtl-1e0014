// aes_sbox: AES SubBytes S-box built from logic instead of a 256-byte table.
//
// The byte is mapped by delta into GF((2^4)^2) as b*x + c (b = high nibble,
// c = low nibble). With the field polynomial x^2 + x + lambda its inverse is
//     (b*x + c)^-1 = b*d^-1 * x + (b + c)*d^-1,  d = lambda*b^2 + c*(b + c),
// so one GF(2^4) squarer, one multiply by the constant lambda, three GF(2^4)
// multipliers and one GF(2^4) inverter replace the GF(2^8) inversion. The
// result is mapped back by delta^-1 and passed through the AES affine
// transform (0 maps to {63}, as in the standard).
//
// PIPELINED = 0 is the purely combinational S-box (LATENCY = 0): sbox_out
// follows sbox_in in the same cycle and clk/rst_n are unused.
// PIPELINED = 1 is the three-stage pipelined S-box (LATENCY = 3), with a
// register after each stage:
//   stage 1: delta, squarer, lambda multiplier and c*(b+c) -> d, b, c
//   stage 2: GF(2^4) inversion of d                        -> d^-1, b, c
//   stage 3: the two output multipliers, delta^-1, affine   -> sbox_out
// The pipeline has no enable: a new byte may enter every cycle and its
// result leaves three clock edges later. The registers reset to zero.
// The structure and both variants follow the reference architecture; where the three
// pipeline cuts sit is this design's choice of a balanced split.
module aes_sbox
  import aes_pkg::*;
#(
  parameter bit PIPELINED = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  byte_t sbox_in,
  output byte_t sbox_out
);

  // Stage 1 (combinational part)
  byte_t a;
  nib_t  s1_b, s1_c, s1_d;
  always_comb begin
    a    = iso_map(sbox_in);
    s1_b = a[7:4];
    s1_c = a[3:0];
    s1_d = gf4_mul_lambda(gf4_sq(s1_b)) ^ gf4_mul(s1_c, s1_b ^ s1_c);
  end

  if (PIPELINED) begin : g_pipe
    nib_t s2_b, s2_c, s2_d;      // after stage 1
    nib_t s3_b, s3_c, s3_dinv;   // after stage 2
    byte_t out_q;                // after stage 3

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s2_b <= '0; s2_c <= '0; s2_d <= '0;
        s3_b <= '0; s3_c <= '0; s3_dinv <= '0;
        out_q <= '0;
      end else begin
        s2_b    <= s1_b;
        s2_c    <= s1_c;
        s2_d    <= s1_d;
        s3_b    <= s2_b;
        s3_c    <= s2_c;
        s3_dinv <= gf4_inv(s2_d);
        out_q   <= affine(inv_iso_map({gf4_mul(s3_b, s3_dinv),
                                       gf4_mul(s3_b ^ s3_c, s3_dinv)}));
      end
    end
    assign sbox_out = out_q;
  end else begin : g_comb
    nib_t dinv;
    always_comb begin
      dinv     = gf4_inv(s1_d);
      sbox_out = affine(inv_iso_map({gf4_mul(s1_b, dinv), gf4_mul(s1_b ^ s1_c, dinv)}));
    end
  end

endmodule
