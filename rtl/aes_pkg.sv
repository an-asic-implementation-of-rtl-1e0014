// aes_pkg: types and arithmetic shared by the 8-bit AES-128 encryption core.
//
// The state is kept as 16 bytes in the standard AES order: byte i holds row
// (i mod 4) of column (i / 4), so the first byte loaded is byte 0. The
// package gives:
//   * the GF(2^8) doubling (xtime) used by MixColumns and the round constant;
//   * the ShiftRows permutation of a whole 16-byte state (pure wiring);
//   * the GF(2^4) and GF(2^2) operations of the composite-field S-box:
//     GF(2^8) is built as GF((2^4)^2) with x^2 + x + lambda, lambda = {1100};
//     GF(2^4) is in turn GF((2^2)^2) with x^2 + x + phi, phi = {10};
//     GF(2^2) uses x^2 + x + 1;
//   * the isomorphic mapping (delta) into the composite field, and its
//     inverse merged in front of the AES affine transform.
// The field polynomials, lambda and the split into squarer, lambda multiplier,
// inverter and multipliers follow the S-box description this core is built
// on. The bit equations of delta and delta^-1 are the ones that map the AES
// polynomial x^8 + x^4 + x^3 + x + 1 onto that composite field (the element
// {5f} of the composite field plays the role of x); they were derived for
// this design and the S-box testbench checks all 256 inputs.
// Everything here is combinational.
package aes_pkg;

  typedef logic [7:0]        byte_t;
  typedef logic [3:0]        nib_t;
  typedef byte_t [15:0]      state_t;   // state_t[i] is AES byte i
  typedef byte_t [3:0]       column_t;  // column_t[r] is row r

  localparam int unsigned NUM_ROUNDS = 10;   // AES-128
  localparam byte_t       RCON_FIRST = 8'h01;
  localparam byte_t       AFFINE_C   = 8'h63;

  // Multiply by {02} in GF(2^8), AES polynomial 0x11B.
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  // ShiftRows: row r of the result is row r of the input rotated left by r.
  // out[r][c] = in[r][(c + r) mod 4], with byte index r + 4c.
  function automatic state_t shift_rows(input state_t s);
    state_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[r + 4*c] = s[r + 4*((c + r) % 4)];
    return o;
  endfunction

  // MixColumns on one column.
  function automatic column_t mix_column(input column_t a);
    column_t o;
    for (int r = 0; r < 4; r++)
      o[r] = xtime(a[r]) ^ (xtime(a[(r+1)%4]) ^ a[(r+1)%4]) ^ a[(r+2)%4] ^ a[(r+3)%4];
    return o;
  endfunction

  // ---------------- GF(2^2), polynomial x^2 + x + 1 ----------------
  function automatic logic [1:0] gf2_mul(input logic [1:0] a, input logic [1:0] b);
    return {(a[1] & b[1]) ^ (a[0] & b[1]) ^ (a[1] & b[0]),
            (a[1] & b[1]) ^ (a[0] & b[0])};
  endfunction

  // Multiply by phi = {10}.
  function automatic logic [1:0] gf2_mul_phi(input logic [1:0] a);
    return {a[1] ^ a[0], a[1]};
  endfunction

  // ---------------- GF(2^4) = GF((2^2)^2), x^2 + x + phi ----------------
  function automatic nib_t gf4_mul(input nib_t a, input nib_t b);
    logic [1:0] hh, hl, lh, ll;
    hh = gf2_mul(a[3:2], b[3:2]);
    hl = gf2_mul(a[3:2], b[1:0]);
    lh = gf2_mul(a[1:0], b[3:2]);
    ll = gf2_mul(a[1:0], b[1:0]);
    return {hh ^ hl ^ lh, gf2_mul_phi(hh) ^ ll};
  endfunction

  // Squarer x^2 in GF(2^4) (linear, XORs only).
  function automatic nib_t gf4_sq(input nib_t q);
    return {q[3], q[3] ^ q[2], q[2] ^ q[1], q[3] ^ q[1] ^ q[0]};
  endfunction

  // Multiply by the constant lambda = {1100} (linear, XORs only).
  function automatic nib_t gf4_mul_lambda(input nib_t q);
    return {q[2] ^ q[0], q[3] ^ q[2] ^ q[1] ^ q[0], q[3], q[2]};
  endfunction

  // Multiplicative inverse in GF(2^4) as sum-of-products (0 maps to 0).
  function automatic nib_t gf4_inv(input nib_t q);
    nib_t a;
    a[3] = q[3] ^ (q[3] & q[2] & q[1]) ^ (q[3] & q[0]) ^ q[2];
    a[2] = (q[3] & q[2] & q[1]) ^ (q[3] & q[2] & q[0]) ^ (q[3] & q[0]) ^ q[2] ^ (q[2] & q[1]);
    a[1] = q[3] ^ (q[3] & q[2] & q[1]) ^ (q[3] & q[1] & q[0]) ^ q[2] ^ (q[2] & q[0]) ^ q[1];
    a[0] = (q[3] & q[2] & q[1]) ^ (q[3] & q[2] & q[0]) ^ (q[3] & q[1]) ^ (q[3] & q[1] & q[0])
         ^ (q[3] & q[0]) ^ q[2] ^ (q[2] & q[1]) ^ (q[2] & q[1] & q[0]) ^ q[1] ^ q[0];
    return a;
  endfunction

  // delta: AES byte -> composite field element {high nibble, low nibble}.
  function automatic byte_t iso_map(input byte_t q);
    byte_t d;
    d[7] = q[7] ^ q[5];
    d[6] = q[7] ^ q[6] ^ q[4] ^ q[3] ^ q[2] ^ q[1];
    d[5] = q[7] ^ q[5] ^ q[3] ^ q[2];
    d[4] = q[7] ^ q[5] ^ q[3] ^ q[2] ^ q[1];
    d[3] = q[7] ^ q[6] ^ q[2] ^ q[1];
    d[2] = q[7] ^ q[4] ^ q[3] ^ q[2] ^ q[1];
    d[1] = q[6] ^ q[4] ^ q[1];
    d[0] = q[6] ^ q[1] ^ q[0];
    return d;
  endfunction

  // delta^-1: composite field element -> AES byte.
  function automatic byte_t inv_iso_map(input byte_t a);
    byte_t x;
    x[7] = a[7] ^ a[6] ^ a[5] ^ a[1];
    x[6] = a[6] ^ a[2];
    x[5] = a[6] ^ a[5] ^ a[1];
    x[4] = a[6] ^ a[5] ^ a[4] ^ a[2] ^ a[1];
    x[3] = a[5] ^ a[4] ^ a[3] ^ a[2] ^ a[1];
    x[2] = a[7] ^ a[4] ^ a[3] ^ a[2] ^ a[1];
    x[1] = a[5] ^ a[4];
    x[0] = a[6] ^ a[5] ^ a[4] ^ a[2] ^ a[0];
    return x;
  endfunction

  // AES affine transform: y_i = x_i ^ x_(i+4) ^ x_(i+5) ^ x_(i+6) ^ x_(i+7) ^ c_i,
  // indices mod 8, c = {63}.
  function automatic byte_t affine(input byte_t x);
    byte_t y;
    for (int i = 0; i < 8; i++)
      y[i] = x[i] ^ x[(i+4)%8] ^ x[(i+5)%8] ^ x[(i+6)%8] ^ x[(i+7)%8] ^ AFFINE_C[i];
    return y;
  endfunction

endpackage
