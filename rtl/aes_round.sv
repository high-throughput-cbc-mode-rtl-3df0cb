// aes_round: one pipelined AES-128 round that encrypts or decrypts per block.
//
// Stages 1-4: 16 copies of aes_sbox (SubBytes or InvSubBytes).
// Stage 5:    post_process, then ShiftRows (encryption) or InvShiftRows
//             followed by AddRoundKey (decryption); a multiplexer selects.
// Stage 6:    part I of the integrated MixColumns / InvMixColumns.
// Stage 7:    encryption: MixColumns result XOR round key; decryption:
//             InvMixColumns part II; a multiplexer selects.
// With LAST = 1 there is no MixColumns: stage 6 adds the round key for
// encryption (decryption already added it in stage 5), so the last round
// has six stages.
// Decryption uses the direct inverse-cipher order (InvSubBytes,
// InvShiftRows, AddRoundKey, InvMixColumns); InvSubBytes and InvShiftRows
// commute, so doing the S-box first matches the encryption datapath.
//
// Interface: st_i/dec_i enter together; rk_enc and rk_dec are the round keys
// this round uses for encryption and decryption (held stable by the caller).
// Timing: st_o/dec_o appear LAT = 7 (LAST = 6) clock edges after st_i.
//
// The seven-stage split (six for the last round) and the position of the
// multiplexers follow the source architecture; how the last round adds its
// key is this design's own choice.
module aes_round
  import aes_pkg::*;
#(
  parameter bit LAST = 1'b0
) (
  input  logic   clk,
  input  block_t st_i,
  input  logic   dec_i,
  input  block_t rk_enc,
  input  block_t rk_dec,
  output block_t st_o,
  output logic   dec_o
);

  localparam int LAT = LAST ? 6 : 7;

  // mode bit of the data held in the register at the end of stage k
  logic [LAT:1] dq;
  always_ff @(posedge clk) dq <= {dq[LAT-1:1], dec_i};

  // stages 1-4
  block_t sb;
  for (genvar k = 0; k < 16; k++) begin : g_sbox
    aes_sbox u_sbox (
      .clk     (clk),
      .dec_pre (dec_i),
      .x       (st_i[127-8*k -: 8]),
      .dec_post(dq[4]),
      .y       (sb[127-8*k -: 8])
    );
  end

  // stage 5
  block_t s5;
  always_ff @(posedge clk) s5 <= dq[4] ? (inv_shift_rows(sb) ^ rk_dec) : shift_rows(sb);

  if (LAST) begin : g_last
    // stage 6
    always_ff @(posedge clk) st_o <= dq[5] ? s5 : (s5 ^ rk_enc);
  end else begin : g_full
    // stage 6: MixColumns / InvMixColumns part I (register inside aes_mixcol)
    block_t mix, inv;
    for (genvar c = 0; c < 4; c++) begin : g_col
      aes_mixcol u_mix (
        .clk(clk),
        .col(s5[127-32*c -: 32]),
        .mix(mix[127-32*c -: 32]),
        .inv(inv[127-32*c -: 32])
      );
    end
    // stage 7
    always_ff @(posedge clk) st_o <= dq[6] ? inv : (mix ^ rk_enc);
  end

  assign dec_o = dq[LAT];

endmodule
