// aes_pkg: types and Galois-field helpers shared by the AES-128 datapath.
//
// The S-box is computed in the composite field GF((2^4)^2) rather than with a
// 256-entry table. GF(2^4) uses the polynomial x^4 + x + 1; GF((2^4)^2) uses
// y^2 + y + lambda with lambda = {1100}. The two 8x8 bit matrices below map a
// byte of the AES field GF(2^8) (polynomial x^8+x^4+x^3+x+1) into the composite
// field and back. They follow from choosing g = 0x5C (a root of x^4+x+1 in the
// AES field) and Y = 0xF2 (a root of y^2+y+lambda(g)): composite bit j of the
// low nibble maps to g^j, bit j of the high nibble to g^j*Y; TO_COMP is the
// inverse of that map. Row i of a matrix holds the input bits XORed into
// output bit i.
package aes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;
  typedef logic [3:0]   nib_t;

  localparam byte_t TO_COMP [8] = '{8'h73, 8'h7a, 8'hf0, 8'hc8, 8'h70, 8'hd2, 8'hac, 8'ha0};
  localparam byte_t TO_AES  [8] = '{8'ha1, 8'hb0, 8'h62, 8'ha2, 8'h3a, 8'h94, 8'hbe, 8'h14};

  function automatic byte_t mat8(input byte_t rows [8], input byte_t x);
    byte_t y;
    for (int i = 0; i < 8; i++) y[i] = ^(rows[i] & x);
    return y;
  endfunction

  function automatic byte_t to_comp(input byte_t x);
    return mat8(TO_COMP, x);
  endfunction

  function automatic byte_t to_aes(input byte_t x);
    return mat8(TO_AES, x);
  endfunction

  // GF(2^4) multiply modulo x^4 + x + 1.
  function automatic nib_t gf4_mul(input nib_t a, input nib_t b);
    logic [6:0] p;
    p = '0;
    for (int i = 0; i < 4; i++) if (b[i]) p ^= 7'(a) << i;
    for (int i = 6; i >= 4; i--) if (p[i]) p ^= 7'(5'b10011) << (i - 4);
    return p[3:0];
  endfunction

  // lambda * h^2, the first branch of the norm (S-box stage 2).
  function automatic nib_t gf4_lambda_sq(input nib_t h);
    return gf4_mul(4'hc, gf4_mul(h, h));
  endfunction

  // GF(2^4) inverse as a^14 (0 maps to 0).
  function automatic nib_t gf4_inv(input nib_t a);
    nib_t a2, a4, a8;
    a2 = gf4_mul(a, a);
    a4 = gf4_mul(a2, a2);
    a8 = gf4_mul(a4, a4);
    return gf4_mul(gf4_mul(a8, a4), a2);
  endfunction

  // AES affine transform and its inverse.
  function automatic byte_t affine(input byte_t x);
    byte_t y;
    for (int i = 0; i < 8; i++)
      y[i] = x[i] ^ x[(i+4)%8] ^ x[(i+5)%8] ^ x[(i+6)%8] ^ x[(i+7)%8];
    return y ^ 8'h63;
  endfunction

  function automatic byte_t inv_affine(input byte_t y);
    byte_t x;
    for (int i = 0; i < 8; i++)
      x[i] = y[(i+2)%8] ^ y[(i+5)%8] ^ y[(i+7)%8];
    return x ^ 8'h05;
  endfunction

  // Multiplicative inverse in GF(2^8) through the composite field, unpipelined.
  function automatic byte_t comp_inv(input byte_t c);
    nib_t h, l, d, di;
    h  = c[7:4];
    l  = c[3:0];
    d  = gf4_lambda_sq(h) ^ gf4_mul(h ^ l, l);
    di = gf4_inv(d);
    return {gf4_mul(di, h), gf4_mul(di, h ^ l)};
  endfunction

  // Forward S-box, unpipelined (used by the key expansion).
  function automatic byte_t sbox_fwd(input byte_t x);
    return affine(to_aes(comp_inv(to_comp(x))));
  endfunction

  function automatic byte_t xtime(input byte_t x);
    return {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
  endfunction

  // State byte k (k = row + 4*column) sits at bits [127-8k -: 8].
  function automatic byte_t st_byte(input block_t s, input int k);
    return s[127-8*k -: 8];
  endfunction

  function automatic block_t shift_rows(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(r+4*c) -: 8] = st_byte(s, r + 4*((c + r) % 4));
    return o;
  endfunction

  function automatic block_t inv_shift_rows(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(r+4*c) -: 8] = st_byte(s, r + 4*((c + 4 - r) % 4));
    return o;
  endfunction

endpackage
