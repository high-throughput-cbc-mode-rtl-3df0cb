// cbc_chain: round-robin channel scheduler and CBC chaining-value store for
// a folded (multi-channel) pipelined block cipher.
//
// The slot counter gives each of the NCH channels the pipeline entrance in
// turn, one channel per cycle. When NCH equals the pipeline latency, the
// ciphertext of a channel's block leaves the pipeline exactly when that
// channel's next slot comes round, so the next block can be chained to it
// with no stall and every stage always holds a block of some channel.
//
// Per channel the store keeps the chaining value (the last ciphertext) and a
// busy bit (a block of the channel is in flight). In a slot:
//   - recirc: the entrance is taken by a block making another pass (3DES);
//     nothing new is accepted.
//   - otherwise a block of slot_ch is accepted when in_valid is high and the
//     channel has no block in flight, or its block is leaving this very
//     cycle (fin_valid, fin_ch == slot_ch).
//   - chain_o is the value to XOR with it: in_iv when in_first (first block
//     of a message), else the stored chaining value, bypassed from upd_data
//     when that channel's ciphertext is being written this same cycle.
// Two write ports: upd_* from the pipeline output (encryption writes its
// ciphertext) and in_upd/in_upd_data at the entrance (decryption writes the
// incoming ciphertext when the block is accepted; it wins if both hit the
// same channel). The channel queues in front of and behind the engine are
// outside this block; the host presents data for slot_ch combinationally.
// Chaining values are not reset: the first block of each channel must set
// in_first. Busy bits reset to 0.
//
// The round-robin slot order and the direct output-to-input feedback follow
// the source architecture; the chaining registers, busy bits, IV input and
// the entrance write port are this design's own additions.
module cbc_chain #(
  parameter int W   = 128,
  parameter int NCH = 70,
  localparam int CW = (NCH > 1) ? $clog2(NCH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [CW-1:0] slot_ch,
  input  logic          recirc,
  input  logic          in_valid,
  input  logic          in_first,
  input  logic [W-1:0]  in_iv,
  output logic          in_ready,
  output logic          accept,
  output logic [W-1:0]  chain_o,
  input  logic          in_upd,
  input  logic [W-1:0]  in_upd_data,
  input  logic          fin_valid,
  input  logic [CW-1:0] fin_ch,
  input  logic          upd_valid,
  input  logic [CW-1:0] upd_ch,
  input  logic [W-1:0]  upd_data
);

  logic [W-1:0]   chain [NCH];
  logic [NCH-1:0] busy;
  logic           fin_here, byp_here;

  always_comb begin
    fin_here = fin_valid && (fin_ch == slot_ch);
    byp_here = upd_valid && (upd_ch == slot_ch);
    in_ready = !recirc && (!busy[slot_ch] || fin_here);
    accept   = in_valid && in_ready;
    if (in_first)      chain_o = in_iv;
    else if (byp_here) chain_o = upd_data;
    else               chain_o = chain[slot_ch];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_ch <= '0;
      busy    <= '0;
    end else begin
      slot_ch <= (slot_ch == CW'(NCH - 1)) ? '0 : slot_ch + 1'b1;
      if (fin_valid) busy[fin_ch] <= 1'b0;
      if (accept)    busy[slot_ch] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (upd_valid)           chain[upd_ch]  <= upd_data;
    if (accept && in_upd)    chain[slot_ch] <= in_upd_data;
  end

  // A block can only leave for a channel that has one in flight.
  always_ff @(posedge clk)
    if (fin_valid) assert (busy[fin_ch]) else $error("cbc_chain: output for idle channel");

endmodule
