// tb_des_ref_pkg: sequential reference model of DES and 3DES (EDE) for the
// testbenches, written as the textbook loop of 16 rounds. It reuses the
// standard tables of des_pkg; known-answer vectors in the testbenches anchor
// those tables to the published values.
package tb_des_ref_pkg;
  import des_pkg::*;

  function automatic logic [31:0] ref_f(input logic [31:0] r, input subkey_t k);
    logic [47:0] x = expand(r) ^ k;
    logic [31:0] s;
    for (int n = 0; n < 8; n++) s[31-4*n -: 4] = sbox_entry(3'(n), x[47-6*n -: 6]);
    return pperm(s);
  endfunction

  function automatic dblock_t des_crypt(input dblock_t key, input dblock_t x, input bit decrypt);
    subkey_t ks [16];
    logic [31:0] l, r, t;
    dblock_t y;
    key_schedule(key, ks);
    y = ip(x);
    l = y[63:32];
    r = y[31:0];
    for (int i = 0; i < 16; i++) begin
      t = r;
      r = l ^ ref_f(r, ks[decrypt ? 15 - i : i]);
      l = t;
    end
    return fp({r, l});
  endfunction

  function automatic dblock_t tdes_enc(input dblock_t k1, input dblock_t k2, input dblock_t k3,
                                       input dblock_t x);
    return des_crypt(k3, des_crypt(k2, des_crypt(k1, x, 0), 1), 0);
  endfunction

endpackage
