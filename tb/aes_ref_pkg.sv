// Reference model for the testbenches, written independently of the RTL:
// GF(2^8) arithmetic by shift-and-add, the S-box as the affine map of
// a^254, the AES round and key schedule straight from their definitions,
// and composite-field GF(2^2)/GF(2^4) arithmetic by polynomial
// multiplication and reduction loops.
package aes_ref_pkg;
  typedef logic [127:0] blk_t;

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return r;
  endfunction

  function automatic logic [7:0] ginv(input logic [7:0] a);  // a^254
    logic [7:0] r = 8'h01;
    for (int i = 0; i < 254; i++) r = gmul(r, a);
    return r;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] x, input int n);
    return (x << n) | (x >> (8 - n));
  endfunction

  function automatic logic [7:0] affine(input logic [7:0] b);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] a);
    return affine(ginv(a));
  endfunction

  function automatic logic [7:0] get(input blk_t s, input int r, input int c);
    return s[127 - 8 * (4 * c + r) -: 8];
  endfunction

  function automatic blk_t sub_bytes(input blk_t s);
    blk_t q;
    for (int k = 0; k < 16; k++) q[8 * k +: 8] = sbox(s[8 * k +: 8]);
    return q;
  endfunction

  function automatic blk_t shift_rows(input blk_t s);
    blk_t q;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) q[127 - 8 * (4 * c + r) -: 8] = get(s, r, (c + r) % 4);
    return q;
  endfunction

  function automatic blk_t mix_columns(input blk_t s);
    blk_t q;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        q[127 - 8 * (4 * c + r) -: 8] = gmul(8'h02, get(s, r, c)) ^ gmul(8'h03, get(s, (r + 1) % 4, c))
                                      ^ get(s, (r + 2) % 4, c) ^ get(s, (r + 3) % 4, c);
    return q;
  endfunction

  function automatic blk_t round_fn(input blk_t s, input blk_t k, input bit final_round);
    blk_t t = shift_rows(sub_bytes(s));
    if (!final_round) t = mix_columns(t);
    return t ^ k;
  endfunction

  // next AES-128 round key from the previous one; rc is the round constant
  function automatic blk_t next_key(input blk_t k, input logic [7:0] rc);
    logic [31:0] w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = k;
    t = {sbox(w3[23:16]) ^ rc, sbox(w3[15:8]), sbox(w3[7:0]), sbox(w3[31:24])};
    w0 ^= t; w1 ^= w0; w2 ^= w1; w3 ^= w2;
    return {w0, w1, w2, w3};
  endfunction

  function automatic logic [7:0] rc_of(input int r);  // r = 1..10
    logic [7:0] c = 8'h01;
    for (int i = 1; i < r; i++) c = gmul(c, 8'h02);
    return c;
  endfunction

  function automatic blk_t encrypt(input blk_t pt, input blk_t key);
    blk_t s = pt ^ key, k = key;
    for (int r = 1; r <= 10; r++) begin
      k = next_key(k, rc_of(r));
      s = round_fn(s, k, r == 10);
    end
    return s;
  endfunction

  // GF(2^2) = GF(2)[y]/(y^2+y+1), by polynomial product and reduction
  function automatic logic [1:0] m2(input logic [1:0] a, input logic [1:0] b);
    logic [2:0] p = 0;
    for (int i = 0; i < 2; i++) if (b[i]) p ^= 3'(a) << i;
    if (p[2]) p ^= 3'b111;
    return p[1:0];
  endfunction

  // GF(2^4) = GF(2^2)[x]/(x^2+x+phi), phi = 2'b10
  function automatic logic [3:0] m4(input logic [3:0] a, input logic [3:0] b);
    logic [1:0] c2, c1, c0;
    c2 = m2(a[3:2], b[3:2]);
    c1 = m2(a[3:2], b[1:0]) ^ m2(a[1:0], b[3:2]);
    c0 = m2(a[1:0], b[1:0]);
    // x^2 = x + phi
    return {c1 ^ c2, c0 ^ m2(c2, 2'b10)};
  endfunction

  // GF(2^8) = GF(2^4)[x]/(x^2+x+lambda), lambda = 4'b1100
  function automatic logic [7:0] m8c(input logic [7:0] a, input logic [7:0] b);
    logic [3:0] c2, c1, c0;
    c2 = m4(a[7:4], b[7:4]);
    c1 = m4(a[7:4], b[3:0]) ^ m4(a[3:0], b[7:4]);
    c0 = m4(a[3:0], b[3:0]);
    return {c1 ^ c2, c0 ^ m4(c2, 4'b1100)};
  endfunction
endpackage
