// aes_sbox: one byte of the combined SubBytes / InvSubBytes, pipelined over
// four register stages in the composite field GF((2^4)^2).
//
// Stage 1 (pre_process): map the byte into the composite field; for
//   decryption the inverse affine transform is applied first. A multiplexer
//   picks the encryption or decryption form.
// Stage 2: norm d = lambda*h^2 + (h+l)*l of the element h*y + l.
// Stage 3: GF(2^4) inverse of d.
// Stage 4: the two GF(2^4) products d^-1*h and d^-1*(h+l).
// Output (post_process, combinational after the stage-4 register): map back
//   to GF(2^8); for encryption the affine transform follows.
// This four-stage split follows the source architecture of the pipelined AES
// round.
// The isomorphism matrices are this design's own choice (see aes_pkg); any
// valid choice gives the same S-box.
//
// Timing: y is the S-box (dec=0) or inverse S-box (dec=1) of the x presented
// four clock edges earlier. dec_pre goes with x; dec_post must be the mode of
// the byte now leaving stage 4 (the caller pipelines the mode bit).
module aes_sbox
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  dec_pre,
  input  byte_t x,
  input  logic  dec_post,
  output byte_t y
);

  byte_t s1;
  nib_t  s2_h, s2_hl, s2_d;
  nib_t  s3_h, s3_hl, s3_di;
  byte_t s4;

  always_ff @(posedge clk) begin
    // stage 1: pre_process
    s1 <= dec_pre ? to_comp(inv_affine(x)) : to_comp(x);
    // stage 2: norm
    s2_h  <= s1[7:4];
    s2_hl <= s1[7:4] ^ s1[3:0];
    s2_d  <= gf4_lambda_sq(s1[7:4]) ^ gf4_mul(s1[7:4] ^ s1[3:0], s1[3:0]);
    // stage 3: GF(2^4) inversion
    s3_h  <= s2_h;
    s3_hl <= s2_hl;
    s3_di <= gf4_inv(s2_d);
    // stage 4: output multipliers
    s4 <= {gf4_mul(s3_di, s3_h), gf4_mul(s3_di, s3_hl)};
  end

  // post_process
  always_comb begin
    y = dec_post ? to_aes(s4) : affine(to_aes(s4));
  end

endmodule
