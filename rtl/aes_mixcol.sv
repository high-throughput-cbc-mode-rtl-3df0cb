// aes_mixcol: integrated MixColumns / InvMixColumns of one 32-bit column,
// split by one register into part I and part II.
//
// Part I (before the register) computes the four MixColumns bytes
// a'..d' = (2,3,1,1)-circulant of (a,b,c,d) using shared XORs and four
// xtime units, and the two correction terms u = 4*(a^c), v = 4*(b^d) with
// two xtime units each. Part II (after the register) builds InvMixColumns from
// the same MixColumns result, using InvMix(x) = Mix(x) ^ Mix(u,v,u,v):
//   w = 2*(u^v);  W = a'^w^u,  X = b'^w^v,  Y = c'^w^u,  Z = d'^w^v.
// Both results are produced for every column; the round selects one.
// Column byte a is the most significant byte (row 0).
//
// Timing: mix and inv correspond to the column presented one clock edge
// earlier; part II is combinational after the register.
//
// The shared MixColumns/InvMixColumns structure and its split into two parts
// follow the source architecture; the single register between the parts is
// this design's reading of it.
module aes_mixcol
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic [31:0] col,
  output logic [31:0] mix,
  output logic [31:0] inv
);

  byte_t a, b, c, d;
  byte_t ma, mb, mc, md, u, v;
  byte_t qa, qb, qc, qd, qu, qv, w;

  always_comb begin
    {a, b, c, d} = col;
    ma = xtime(a ^ b) ^ b ^ c ^ d;
    mb = xtime(b ^ c) ^ c ^ d ^ a;
    mc = xtime(c ^ d) ^ d ^ a ^ b;
    md = xtime(d ^ a) ^ a ^ b ^ c;
    u  = xtime(xtime(a ^ c));
    v  = xtime(xtime(b ^ d));
  end

  always_ff @(posedge clk) begin
    {qa, qb, qc, qd} <= {ma, mb, mc, md};
    qu <= u;
    qv <= v;
  end

  always_comb begin
    w   = xtime(qu ^ qv);
    mix = {qa, qb, qc, qd};
    inv = {qa ^ w ^ qu, qb ^ w ^ qv, qc ^ w ^ qu, qd ^ w ^ qv};
  end

endmodule
