// aes_ref_pkg: plain reference model of AES-128 encryption for the
// testbenches. It is written straight from the standard's definitions and
// shares no code with the design: GF(2^8) products are computed bit by bit
// modulo x^8 + x^4 + x^3 + x + 1, the S-box inverse is found by search, and
// the key schedule and rounds work on whole 16-byte arrays.
package aes_ref_pkg;

  typedef logic [7:0] rbyte_t;
  typedef rbyte_t     rblock_t [16];

  function automatic rbyte_t ref_gmul(input rbyte_t a, input rbyte_t b);
    rbyte_t r = 8'h00;
    rbyte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= x;
      x = x[7] ? ((x << 1) ^ 8'h1B) : (x << 1);
    end
    return r;
  endfunction

  function automatic rbyte_t ref_sbox(input rbyte_t a);
    rbyte_t inv = 8'h00;
    rbyte_t y;
    if (a != 0)
      for (int v = 1; v < 256; v++)
        if (ref_gmul(a, rbyte_t'(v)) == 8'h01) inv = rbyte_t'(v);
    for (int i = 0; i < 8; i++)
      y[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ ((8'h63 >> i) & 1'b1);
    return y;
  endfunction

  // Round key n+1 from round key n (AES-128), round number n+1 = rnd.
  function automatic rblock_t ref_next_key(input rblock_t k, input int rnd);
    rblock_t o;
    rbyte_t rc = 8'h01;
    for (int i = 1; i < rnd; i++) rc = ref_gmul(rc, 8'h02);
    o[0] = k[0] ^ ref_sbox(k[13]) ^ rc;
    o[1] = k[1] ^ ref_sbox(k[14]);
    o[2] = k[2] ^ ref_sbox(k[15]);
    o[3] = k[3] ^ ref_sbox(k[12]);
    for (int j = 4; j < 16; j++) o[j] = k[j] ^ o[j-4];
    return o;
  endfunction

  function automatic rblock_t ref_encrypt(input rblock_t pt, input rblock_t key);
    rblock_t s, t, k;
    k = key;
    for (int i = 0; i < 16; i++) s[i] = pt[i] ^ k[i];
    for (int rnd = 1; rnd <= 10; rnd++) begin
      for (int i = 0; i < 16; i++) t[i] = ref_sbox(s[i]);
      for (int c = 0; c < 4; c++)                      // ShiftRows
        for (int r = 0; r < 4; r++) s[r + 4*c] = t[r + 4*((c + r) % 4)];
      if (rnd != 10)
        for (int c = 0; c < 4; c++) begin              // MixColumns
          for (int r = 0; r < 4; r++) t[r] = s[r + 4*c];
          for (int r = 0; r < 4; r++)
            s[r + 4*c] = ref_gmul(t[r], 8'h02) ^ ref_gmul(t[(r+1)%4], 8'h03)
                       ^ t[(r+2)%4] ^ t[(r+3)%4];
        end
      k = ref_next_key(k, rnd);
      for (int i = 0; i < 16; i++) s[i] ^= k[i];
    end
    return s;
  endfunction

endpackage
