// des_sbox: the eight DES S-boxes, each built as a pipelined multiplexer tree.
//
// A DES S-box is a 64-to-1 multiplexer of 4-bit constants selected by its
// 6-bit input. Here the multiplexer is split into STAGES levels of smaller
// multiplexers with a register between levels, so that each pipeline stage
// holds only a short mux:
//   STAGES = 2: two levels of 8-to-1 multiplexers (the configuration used in
//               the pipelined 3DES round),
//   STAGES = 3: three levels of 4-to-1 multiplexers,
//   STAGES = 6: six levels of 2-to-1 multiplexers.
// Level k selects with input bits [k*B-1 : (k-1)*B], B = 6/STAGES, least
// significant bits first; the leaf order of des_pkg::SBOX matches this.
//
// Interface: x holds the eight 6-bit S-box inputs, S1 in x[47:42]; y holds the
// eight 4-bit outputs, S1 in y[31:28]. Timing: y is combinational from the
// last level and corresponds to the x presented STAGES-1 clock edges earlier
// (the first level is combinational from x).
//
// The multiplexer-tree S-box and its 2-, 3- and 6-level forms follow the
// source architecture; the bit order of the select inputs is this design's
// own choice.
module des_sbox
  import des_pkg::*;
#(
  parameter int STAGES = 2
) (
  input  logic        clk,
  input  logic [47:0] x,
  output logic [31:0] y
);

  localparam int B = 6 / STAGES;
  localparam int R = 1 << B;

  initial assert (STAGES == 2 || STAGES == 3 || STAGES == 6)
    else $error("des_sbox: STAGES must be 2, 3 or 6");

  for (genvar n = 0; n < 8; n++) begin : g_box
    // lvl[k] = candidates left after level k (only the first 64/R^k are used)
    logic [3:0] lvl  [STAGES+1][64];
    logic [3:0] held [STAGES+1][64];  // register after level k
    logic [5:0] sel  [STAGES+1];      // input bits travelling with level k
    logic [5:0] selq [STAGES+1];

    always_comb begin
      for (int i = 0; i < 64; i++) lvl[0][i] = sbox_entry(3'(n), 6'(i));
      sel[0] = x[47-6*n -: 6];
      for (int k = 1; k <= STAGES; k++) sel[k] = selq[k];
      for (int k = 1; k <= STAGES; k++) begin
        for (int g = 0; g < 64; g++) lvl[k][g] = 4'h0;
        for (int g = 0; g < (64 >> (B*k)); g++)
          lvl[k][g] = (k == 1) ? lvl[0][g*R + int'(sel[0][0 +: B])]
                               : held[k-1][g*R + int'(sel[k-1][(k-1)*B +: B])];
      end
    end

    always_ff @(posedge clk) begin
      for (int k = 1; k < STAGES; k++) begin
        held[k] <= lvl[k];
        selq[k] <= sel[k-1];
      end
    end

    assign y[31-4*n -: 4] = lvl[STAGES][0];
  end

endmodule
