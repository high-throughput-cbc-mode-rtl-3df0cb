// aes_key_expand: AES-128 key expansion into the 11 round keys.
//
// The pipelined rounds take their round keys as static inputs. This block
// computes them once per key load, one round key per clock, with four
// unpipelined composite-field S-boxes (SubWord) and the round constant.
// The expansion is the standard one of FIPS-197; the sequential one-key-per-
// cycle organisation is this design's own choice.
//
// Interface: pulse load with key; busy is high for the next 10 cycles while
// rk[1..10] are produced; rk[0] = key appears right after load. rk must not
// be used by the datapath while busy is high.
module aes_key_expand
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  block_t       key,
  output block_t       rk [11],
  output logic         busy
);

  logic [3:0] idx;      // index of the round key produced next
  byte_t      rcon;
  block_t     prev, next;
  logic [31:0] w0, w1, w2, w3, t;

  always_comb begin
    prev = rk[idx - 4'd1];
    {w0, w1, w2, w3} = prev;
    t  = {sbox_fwd(w3[23:16]) ^ rcon, sbox_fwd(w3[15:8]), sbox_fwd(w3[7:0]), sbox_fwd(w3[31:24])};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    next = {w0, w1, w2, w3};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx  <= 4'd11;
      rcon <= 8'h01;
      busy <= 1'b0;
    end else if (load) begin
      idx  <= 4'd1;
      rcon <= 8'h01;
      busy <= 1'b1;
    end else if (busy) begin
      idx  <= idx + 4'd1;
      rcon <= xtime(rcon);
      busy <= (idx != 4'd10);
    end
  end

  always_ff @(posedge clk) begin
    if (load)      rk[0]   <= key;
    else if (busy) rk[idx] <= next;
  end

endmodule
