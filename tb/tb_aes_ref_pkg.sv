// tb_aes_ref_pkg: plain reference model of AES-128 for the testbenches.
// It is written independently of the RTL: the S-box is found by searching
// for the multiplicative inverse in GF(2^8) and applying the affine map, and
// the cipher follows the textbook round order of FIPS-197.
package tb_aes_ref_pkg;

  typedef logic [127:0] blk_t;

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] x);
    logic [7:0] inv = 0, s;
    for (int c = 1; c < 256; c++) if (gmul(x, 8'(c)) == 8'h01) inv = 8'(c);
    s = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]} ^ {inv[3:0], inv[7:4]} ^ 8'h63;
    return s;
  endfunction

  // tables filled on first use
  logic [7:0] sb_t [256];
  logic [7:0] isb_t [256];
  bit         tables_ok = 0;

  function automatic void fill_tables();
    if (tables_ok) return;
    for (int c = 0; c < 256; c++) begin
      sb_t[c] = ref_sbox(8'(c));
      isb_t[sb_t[c]] = 8'(c);
    end
    tables_ok = 1;
  endfunction

  // byte k of the state, k = row + 4*col
  function automatic logic [7:0] gb(input blk_t s, input int k);
    return s[127-8*k -: 8];
  endfunction

  function automatic void expand(input blk_t key, output blk_t rk [11]);
    logic [31:0] w [44];
    logic [7:0] rc = 8'h01;
    fill_tables();
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb_t[t[31:24]] ^ rc, sb_t[t[23:16]], sb_t[t[15:8]], sb_t[t[7:0]]};
        rc = gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic blk_t mixcol(input blk_t s, input bit inv);
    blk_t o;
    logic [7:0] m [4][4];
    m = inv ? '{'{14,11,13,9}, '{9,14,11,13}, '{13,9,14,11}, '{11,13,9,14}}
            : '{'{2,3,1,1}, '{1,2,3,1}, '{1,1,2,3}, '{3,1,1,2}};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        logic [7:0] acc = 0;
        for (int j = 0; j < 4; j++) acc ^= gmul(m[r][j], gb(s, j + 4*c));
        o[127-8*(r+4*c) -: 8] = acc;
      end
    return o;
  endfunction

  function automatic blk_t shrows(input blk_t s, input bit inv);
    blk_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(r+4*c) -: 8] = inv ? gb(s, r + 4*((c + 4 - r) % 4)) : gb(s, r + 4*((c + r) % 4));
    return o;
  endfunction

  function automatic blk_t subb(input blk_t s, input bit inv);
    fill_tables();
    for (int k = 0; k < 16; k++) s[127-8*k -: 8] = inv ? isb_t[gb(s, k)] : sb_t[gb(s, k)];
    return s;
  endfunction

  function automatic blk_t aes_enc(input blk_t key, input blk_t pt);
    blk_t rk [11];
    blk_t s;
    expand(key, rk);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = shrows(subb(s, 0), 0);
      if (r != 10) s = mixcol(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic blk_t aes_dec(input blk_t key, input blk_t ct);
    blk_t rk [11];
    blk_t s;
    expand(key, rk);
    s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = subb(shrows(s, 1), 1);
      s ^= rk[r];
      if (r != 0) s = mixcol(s, 1);
    end
    return s;
  endfunction

endpackage
