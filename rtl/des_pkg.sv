// des_pkg: the fixed permutations, S-box contents and key schedule of DES
// (FIPS 46-3), shared by the pipelined 3DES-CBC engine. All permutations are
// pure rewiring. Bit numbering follows the standard: bit 1 is the most
// significant bit of a word.
//
// SBOX[n] holds the 64 4-bit entries of S-box n+1 as one 256-bit word: entry
// number x (the raw 6-bit S-box input) sits in nibble x, i.e. bits [4x+3:4x].
// The standard table is indexed by row = {x[5], x[0]} and column = x[4:1];
// this layout lets the multiplexer tree of des_sbox select directly with the
// input bits, least significant first.
package des_pkg;

  typedef logic [63:0] dblock_t;
  typedef logic [47:0] subkey_t;

  localparam logic [255:0] SBOX [8] = '{
    256'hd0650aa3e739bc5f7b12964d288ec1f487305995bcc66aa318db2fe2417df40e,
    256'h9fe25309c67c68b5214df43a1ba78ed05ab5906cad1207c9e4832bf67e48d13f,
    256'hc72e5ab53ce2f14b70839f6809d4a61d18f2b4cbe75c8d21a56f43369e0970da,
    256'he42872c5be53419f8dd71bac6009f63a9fe4ac1bc52872413a09f66053be8dd7,
    256'h3e5043a6950cf96fd827ed1a7bc182b4698e903daff3055816db7a47c124bce2,
    256'hd68b0d617a14e0b7a3fc5892c52f3e498b35b70ee4d31d605896c2792f4af1ac,
    256'hc23925e0f8065f9a7ea7431c8ddbb4616186fa25c7593ce3ad18904f7eb20bd4,
    256'hb865533f0d9ac6f0d28eac4971e41b27279ce005be6359ca417b3fa684d8f21d
  };

  localparam byte IP_T [64] = '{
    58,50,42,34,26,18,10,2, 60,52,44,36,28,20,12,4, 62,54,46,38,30,22,14,6, 64,56,48,40,32,24,16,8,
    57,49,41,33,25,17,9,1, 59,51,43,35,27,19,11,3, 61,53,45,37,29,21,13,5, 63,55,47,39,31,23,15,7};
  localparam byte FP_T [64] = '{
    40,8,48,16,56,24,64,32, 39,7,47,15,55,23,63,31, 38,6,46,14,54,22,62,30, 37,5,45,13,53,21,61,29,
    36,4,44,12,52,20,60,28, 35,3,43,11,51,19,59,27, 34,2,42,10,50,18,58,26, 33,1,41,9,49,17,57,25};
  localparam byte E_T [48] = '{
    32,1,2,3,4,5, 4,5,6,7,8,9, 8,9,10,11,12,13, 12,13,14,15,16,17,
    16,17,18,19,20,21, 20,21,22,23,24,25, 24,25,26,27,28,29, 28,29,30,31,32,1};
  localparam byte P_T [32] = '{
    16,7,20,21,29,12,28,17, 1,15,23,26,5,18,31,10, 2,8,24,14,32,27,3,9, 19,13,30,6,22,11,4,25};
  localparam byte PC1_T [56] = '{
    57,49,41,33,25,17,9, 1,58,50,42,34,26,18, 10,2,59,51,43,35,27, 19,11,3,60,52,44,36,
    63,55,47,39,31,23,15, 7,62,54,46,38,30,22, 14,6,61,53,45,37,29, 21,13,5,28,20,12,4};
  localparam byte PC2_T [48] = '{
    14,17,11,24,1,5, 3,28,15,6,21,10, 23,19,12,4,26,8, 16,7,27,20,13,2,
    41,52,31,37,47,55, 30,40,51,45,33,48, 44,49,39,56,34,53, 46,42,50,36,29,32};
  localparam byte SHIFTS [16] = '{1,1,2,2,2,2,2,2,1,2,2,2,2,2,2,1};

  function automatic dblock_t ip(input dblock_t x);
    dblock_t y;
    for (int i = 0; i < 64; i++) y[63-i] = x[64-IP_T[i]];
    return y;
  endfunction

  function automatic dblock_t fp(input dblock_t x);
    dblock_t y;
    for (int i = 0; i < 64; i++) y[63-i] = x[64-FP_T[i]];
    return y;
  endfunction

  function automatic logic [47:0] expand(input logic [31:0] r);
    logic [47:0] y;
    for (int i = 0; i < 48; i++) y[47-i] = r[32-E_T[i]];
    return y;
  endfunction

  function automatic logic [31:0] pperm(input logic [31:0] x);
    logic [31:0] y;
    for (int i = 0; i < 32; i++) y[31-i] = x[32-P_T[i]];
    return y;
  endfunction

  // Entry x of S-box n (n = 0..7).
  function automatic logic [3:0] sbox_entry(input logic [2:0] n, input logic [5:0] x);
    return SBOX[n][4*x +: 4];
  endfunction

  // The 16 round subkeys of one DES key, subkey 1 first.
  function automatic void key_schedule(input dblock_t key, output subkey_t ks [16]);
    logic [55:0] cd;
    logic [27:0] c, d;
    for (int i = 0; i < 56; i++) cd[55-i] = key[64-PC1_T[i]];
    c = cd[55:28];
    d = cd[27:0];
    for (int r = 0; r < 16; r++) begin
      for (int s = 0; s < int'(SHIFTS[r]); s++) begin
        c = {c[26:0], c[27]};
        d = {d[26:0], d[27]};
      end
      cd = {c, d};
      for (int i = 0; i < 48; i++) ks[r][47-i] = cd[56-PC2_T[i]];
    end
  endfunction

endpackage
