// tdes_cbc: folded multi-channel 3DES-CBC encryption engine.
//
// Sixteen pipelined DES rounds are unrolled once and reused three times for
// the 48 rounds of 3DES (EDE: encrypt K1, decrypt K2, encrypt K3). The round
// 16 output either leaves as ciphertext (third pass) or loops back through a
// multiplexer in front of round 1 for the next pass; the same multiplexer
// otherwise takes a new plaintext XORed with the channel's chaining value
// (the initialization vector for a channel's first block). Between passes the
// final and initial permutations cancel, so only the L/R halves are swapped.
//
// Pipeline: an input register, rounds 1-15 with STAGES registers each and
// round 16 with STAGES-1 (its result is used directly): LAT = 16*STAGES
// stages (32 with the default 2-stage S-box). The entrance is shared out
// round-robin over NCH channels by cbc_chain; a block coming back for another
// pass has priority and the slot's own channel then waits. With NCH = LAT a
// channel's slot always meets its own block: twice to recirculate it, the
// third time to emit the ciphertext and, in the same cycle, chain the
// channel's next plaintext to it. Every stage carries a block, and one
// ciphertext leaves every third cycle on average.
// Each block carries its channel number and pass count; the subkey of a
// round is picked by the pass count of the block entering it.
//
// Interface: key_load with k1..k3 (not while blocks are in flight). Each
// cycle slot_ch names the channel that may enter; in_valid/in_first/in_data/
// in_iv present its block and in_ready tells whether it was taken. Results
// appear on out_* tagged with the channel, combinational from round 16.
//
// The 16-round pipeline reused for 48 rounds, the feedback multiplexer and the
// IV multiplexer follow the source architecture; tags, pass-count key
// selection, recirculation priority and the host interface are this design's
// own. Note that this structure yields one block per three cycles.
module tdes_cbc
  import des_pkg::*;
#(
  parameter int STAGES = 2,
  parameter int NCH    = 16 * STAGES,
  localparam int CW    = (NCH > 1) ? $clog2(NCH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          key_load,
  input  dblock_t       k1,
  input  dblock_t       k2,
  input  dblock_t       k3,
  output logic [CW-1:0] slot_ch,
  input  logic          in_valid,
  input  logic          in_first,
  input  dblock_t       in_data,
  input  dblock_t       in_iv,
  output logic          in_ready,
  output logic          out_valid,
  output logic [CW-1:0] out_ch,
  output dblock_t       out_data
);

  localparam int LAT = 16 * STAGES;

  typedef struct packed {
    logic          valid;
    logic [CW-1:0] ch;
    logic [1:0]    pass;
  } tag_t;

  subkey_t sk [3][16];
  des_key_sched u_keys (.clk(clk), .load(key_load), .k1(k1), .k2(k2), .k3(k3), .sk(sk));

  tag_t    tq [LAT];
  logic    recirc, accept, fin;
  dblock_t chain, ct;
  logic [31:0] l16, r16;

  assign recirc = tq[LAT-1].valid && (tq[LAT-1].pass != 2'd2);
  assign fin    = tq[LAT-1].valid && (tq[LAT-1].pass == 2'd2);
  assign ct     = fp({r16, l16});

  cbc_chain #(.W(64), .NCH(NCH)) u_chain (
    .clk(clk), .rst_n(rst_n), .slot_ch(slot_ch), .recirc(recirc),
    .in_valid(in_valid), .in_first(in_first), .in_iv(in_iv),
    .in_ready(in_ready), .accept(accept), .chain_o(chain),
    .in_upd(1'b0), .in_upd_data('0),
    .fin_valid(fin), .fin_ch(tq[LAT-1].ch),
    .upd_valid(fin), .upd_ch(tq[LAT-1].ch), .upd_data(ct)
  );

  // input multiplexer and register
  logic [31:0] l0, r0;
  always_ff @(posedge clk) begin
    if (recirc) {l0, r0} <= {r16, l16};
    else        {l0, r0} <= ip(in_data ^ chain);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < LAT; k++) tq[k] <= '0;
    end else begin
      if (recirc) tq[0] <= '{valid: 1'b1, ch: tq[LAT-1].ch, pass: tq[LAT-1].pass + 2'd1};
      else        tq[0] <= '{valid: accept, ch: slot_ch, pass: 2'd0};
      for (int k = 1; k < LAT; k++) tq[k] <= tq[k-1];
    end
  end

  // sixteen rounds
  logic [31:0] l [17];
  logic [31:0] r [17];
  assign l[0] = l0;
  assign r[0] = r0;
  for (genvar i = 0; i < 16; i++) begin : g_round
    logic [1:0] pass;
    assign pass = tq[i*STAGES].pass;
    des_round #(.STAGES(STAGES), .OUT_REG(i != 15)) u_round (
      .clk(clk), .l_i(l[i]), .r_i(r[i]),
      .k  ((pass == 2'd0) ? sk[0][i] : (pass == 2'd1) ? sk[1][i] : sk[2][i]),
      .l_o(l[i+1]), .r_o(r[i+1])
    );
  end
  assign l16 = l[16];
  assign r16 = r[16];

  assign out_valid = fin;
  assign out_ch    = tq[LAT-1].ch;
  assign out_data  = ct;

endmodule
