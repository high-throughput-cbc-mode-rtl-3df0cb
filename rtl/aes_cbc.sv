// aes_cbc: folded multi-channel AES-128-CBC engine, encryption and decryption.
//
// Ten AES rounds are unrolled and each is pipelined (aes_round: 7 stages,
// 6 for the last), behind one input stage that XORs the CBC chaining value
// and the initial round key. The pipeline is LAT = 1 + 9*7 + 6 = 70 stages
// deep. CBC encryption cannot feed one channel's blocks back to back into such
// a pipeline, since each block needs the previous ciphertext. Instead the
// entrance is given to NCH channels in round-robin order (cbc_chain); with
// NCH = LAT a channel's ciphertext leaves the pipeline in the same cycle that
// channel's next slot arrives and is bypassed straight to the input XOR.
// Every stage then holds a block, and one 128-bit block completes per cycle.
//
// Encryption: C_i = E(P_i ^ C_{i-1}), C_{-1} = IV; the pipeline output is
// both the result and the new chaining value.
// Decryption: P_i = D(C_i) ^ C_{i-1}; the incoming C_i becomes the chaining
// value at the entrance, and the previous chaining value is parked in a
// per-channel mask register until the block leaves. Decryption uses the round
// keys in reverse order (rk[10] first).
// Mode is chosen per block (in_dec); all channels share one key.
//
// Interface: load a key with key_load/key and wait until key_busy falls; do
// not reload it while blocks are in flight. Each cycle slot_ch names the
// channel that may enter; the host presents that channel's block with
// in_valid (in_first selects in_iv as chaining value). in_ready tells whether
// it was taken. Results come out LAT cycles later on out_* tagged with the
// channel; they are combinational from the last pipeline register.
//
// The unrolled ten-round pipeline and the folded channel schedule follow the
// source architecture; the channel count, the decryption masking, the shared
// key and the host interface are this design's own choices.
module aes_cbc
  import aes_pkg::*;
#(
  parameter int NCH = 70,
  localparam int CW = (NCH > 1) ? $clog2(NCH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          key_load,
  input  block_t        key,
  output logic          key_busy,
  output logic [CW-1:0] slot_ch,
  input  logic          in_valid,
  input  logic          in_first,
  input  logic          in_dec,
  input  block_t        in_data,
  input  block_t        in_iv,
  output logic          in_ready,
  output logic          out_valid,
  output logic [CW-1:0] out_ch,
  output logic          out_dec,
  output block_t        out_data
);

  localparam int LAT = 1 + 9 * 7 + 6;

  typedef struct packed {
    logic          valid;
    logic [CW-1:0] ch;
  } tag_t;

  block_t rk [11];
  aes_key_expand u_key (
    .clk(clk), .rst_n(rst_n), .load(key_load), .key(key), .rk(rk), .busy(key_busy)
  );

  // round-robin scheduling and chaining values
  logic   accept;
  block_t chain;
  block_t res;
  logic   res_dec;
  tag_t   tq [LAT];

  cbc_chain #(.W(128), .NCH(NCH)) u_chain (
    .clk(clk), .rst_n(rst_n), .slot_ch(slot_ch), .recirc(1'b0),
    .in_valid(in_valid), .in_first(in_first), .in_iv(in_iv),
    .in_ready(in_ready), .accept(accept), .chain_o(chain),
    .in_upd(in_dec), .in_upd_data(in_data),
    .fin_valid(tq[LAT-1].valid), .fin_ch(tq[LAT-1].ch),
    .upd_valid(tq[LAT-1].valid && !res_dec), .upd_ch(tq[LAT-1].ch), .upd_data(res)
  );

  // decryption: previous ciphertext of each channel, XORed at the output
  block_t mask [NCH];
  always_ff @(posedge clk) if (accept && in_dec) mask[slot_ch] <= chain;

  // input stage: CBC XOR (encryption) and initial AddRoundKey
  block_t st0;
  logic   dec0;
  always_ff @(posedge clk) begin
    st0  <= in_dec ? (in_data ^ rk[10]) : (in_data ^ chain ^ rk[0]);
    dec0 <= in_dec;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < LAT; k++) tq[k] <= '0;
    end else begin
      tq[0] <= '{valid: accept, ch: slot_ch};
      for (int k = 1; k < LAT; k++) tq[k] <= tq[k-1];
    end
  end

  // ten unrolled rounds
  block_t st  [11];
  logic   dec [11];
  assign st[0]  = st0;
  assign dec[0] = dec0;
  for (genvar r = 1; r <= 10; r++) begin : g_round
    aes_round #(.LAST(r == 10)) u_round (
      .clk(clk), .st_i(st[r-1]), .dec_i(dec[r-1]),
      .rk_enc(rk[r]), .rk_dec(rk[10-r]),
      .st_o(st[r]), .dec_o(dec[r])
    );
  end

  assign res     = st[10];
  assign res_dec = dec[10];

  always_comb begin
    out_valid = tq[LAT-1].valid;
    out_ch    = tq[LAT-1].ch;
    out_dec   = res_dec;
    out_data  = res_dec ? (res ^ mask[tq[LAT-1].ch]) : res;
  end

endmodule
