// des_round: one pipelined DES Feistel round.
//
//   L_i = R_{i-1}
//   R_i = L_{i-1} ^ P(S(E(R_{i-1}) ^ K_i))
// The first stage holds the expansion E (wiring), the subkey XOR and the
// first multiplexer level of the S-boxes; the last stage holds the last
// S-box level, the permutation P (wiring) and the XOR with L. With the
// default 2-stage S-box this is the two-stage round of the 3DES-CBC engine;
// STAGES = 3 or 6 gives deeper rounds with shorter multiplexers.
// L and R travel beside the S-box through the same registers.
//
// Interface: l_i, r_i and the subkey k are used in the same cycle.
// Timing: l_o/r_o follow STAGES-1 clock edges later, plus one more when
// OUT_REG = 1 (register at the end of the round; the last round of the
// engine leaves it out and feeds the output directly).
//
// The two-stage round with the register between the S-box parts follows the
// source architecture; the deeper variants are this design's extension.
module des_round
  import des_pkg::*;
#(
  parameter int STAGES  = 2,
  parameter bit OUT_REG = 1'b1
) (
  input  logic        clk,
  input  logic [31:0] l_i,
  input  logic [31:0] r_i,
  input  subkey_t     k,
  output logic [31:0] l_o,
  output logic [31:0] r_o
);

  logic [31:0] s_out;
  des_sbox #(.STAGES(STAGES)) u_sbox (
    .clk(clk),
    .x  (expand(r_i) ^ k),
    .y  (s_out)
  );

  // L and R delayed to line up with the S-box output
  logic [31:0] ld [STAGES];
  logic [31:0] rd [STAGES];
  assign ld[0] = l_i;
  assign rd[0] = r_i;
  for (genvar s = 1; s < STAGES; s++) begin : g_dly
    always_ff @(posedge clk) begin
      ld[s] <= ld[s-1];
      rd[s] <= rd[s-1];
    end
  end

  logic [31:0] l_n, r_n;
  assign l_n = rd[STAGES-1];
  assign r_n = ld[STAGES-1] ^ pperm(s_out);

  if (OUT_REG) begin : g_oreg
    always_ff @(posedge clk) begin
      l_o <= l_n;
      r_o <= r_n;
    end
  end else begin : g_comb
    assign l_o = l_n;
    assign r_o = r_n;
  end

endmodule
