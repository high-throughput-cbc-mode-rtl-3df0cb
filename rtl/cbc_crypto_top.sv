// cbc_crypto_top: the two folded multi-channel CBC engines side by side.
//
// The AES-128-CBC engine (aes_cbc, encryption and decryption, one 128-bit
// block per cycle with AES_NCH = 70 channels) and the 3DES-CBC engine
// (tdes_cbc, encryption, one 64-bit block every third cycle with DES_NCH =
// 32 channels and 2-stage S-boxes) are independent circuits that share only
// clock and reset; each has its own ports, prefixed aes_ and des_. See the
// two engines for the scheduling protocol: every cycle an engine names the
// channel whose slot it is (slot_ch), and the host presents that channel's
// next block.
//
// Placing the two engines side by side is this design's own choice; the
// source architecture evaluates them separately.
module cbc_crypto_top
  import aes_pkg::*;
  import des_pkg::*;
#(
  parameter int AES_NCH    = 70,
  parameter int DES_STAGES = 2,
  parameter int DES_NCH    = 16 * DES_STAGES,
  localparam int ACW = (AES_NCH > 1) ? $clog2(AES_NCH) : 1,
  localparam int DCW = (DES_NCH > 1) ? $clog2(DES_NCH) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // AES-128-CBC
  input  logic           aes_key_load,
  input  block_t         aes_key,
  output logic           aes_key_busy,
  output logic [ACW-1:0] aes_slot_ch,
  input  logic           aes_in_valid,
  input  logic           aes_in_first,
  input  logic           aes_in_dec,
  input  block_t         aes_in_data,
  input  block_t         aes_in_iv,
  output logic           aes_in_ready,
  output logic           aes_out_valid,
  output logic [ACW-1:0] aes_out_ch,
  output logic           aes_out_dec,
  output block_t         aes_out_data,
  // 3DES-CBC
  input  logic           des_key_load,
  input  dblock_t        des_k1,
  input  dblock_t        des_k2,
  input  dblock_t        des_k3,
  output logic [DCW-1:0] des_slot_ch,
  input  logic           des_in_valid,
  input  logic           des_in_first,
  input  dblock_t        des_in_data,
  input  dblock_t        des_in_iv,
  output logic           des_in_ready,
  output logic           des_out_valid,
  output logic [DCW-1:0] des_out_ch,
  output dblock_t        des_out_data
);

  aes_cbc #(.NCH(AES_NCH)) u_aes (
    .clk(clk), .rst_n(rst_n),
    .key_load(aes_key_load), .key(aes_key), .key_busy(aes_key_busy),
    .slot_ch(aes_slot_ch),
    .in_valid(aes_in_valid), .in_first(aes_in_first), .in_dec(aes_in_dec),
    .in_data(aes_in_data), .in_iv(aes_in_iv), .in_ready(aes_in_ready),
    .out_valid(aes_out_valid), .out_ch(aes_out_ch), .out_dec(aes_out_dec),
    .out_data(aes_out_data)
  );

  tdes_cbc #(.STAGES(DES_STAGES), .NCH(DES_NCH)) u_tdes (
    .clk(clk), .rst_n(rst_n),
    .key_load(des_key_load), .k1(des_k1), .k2(des_k2), .k3(des_k3),
    .slot_ch(des_slot_ch),
    .in_valid(des_in_valid), .in_first(des_in_first),
    .in_data(des_in_data), .in_iv(des_in_iv), .in_ready(des_in_ready),
    .out_valid(des_out_valid), .out_ch(des_out_ch), .out_data(des_out_data)
  );

endmodule
