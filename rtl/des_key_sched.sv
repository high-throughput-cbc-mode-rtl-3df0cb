// des_key_sched: subkeys of the three 3DES keys, ordered for the passes of
// the 3DES-CBC engine.
//
// 3DES encryption is E_K3(D_K2(E_K1(x))). Pass 0 uses the 16 DES subkeys of
// K1 in order, pass 1 those of K2 in reverse order (DES decryption), pass 2
// those of K3 in order, so sk[p][r] is the subkey of round r in pass p. The
// DES key schedule (PC-1, left rotations, PC-2) is pure wiring; this block
// registers its result when a key set is loaded, so the datapath sees stable
// subkeys. Parity bits of the keys are ignored, as in DES.
//
// Interface: pulse load with k1..k3; sk is valid from the next cycle on.
//
// The key schedule itself is standard DES; the source architecture only
// shows a subkey input per round, so this block is this design's own.
module des_key_sched
  import des_pkg::*;
(
  input  logic    clk,
  input  logic    load,
  input  dblock_t k1,
  input  dblock_t k2,
  input  dblock_t k3,
  output subkey_t sk [3][16]
);

  subkey_t s1 [16], s2 [16], s3 [16];

  always_comb begin
    key_schedule(k1, s1);
    key_schedule(k2, s2);
    key_schedule(k3, s3);
  end

  always_ff @(posedge clk) begin
    if (load) begin
      for (int r = 0; r < 16; r++) begin
        sk[0][r] <= s1[r];
        sk[1][r] <= s2[15-r];
        sk[2][r] <= s3[r];
      end
    end
  end

endmodule
