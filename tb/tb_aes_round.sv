// tb_aes_round: a full round (7 stages) and a last round (6 stages) are fed
// a new random state every cycle with a random mode per block. Results are
// compared, exactly 7 and 6 cycles later, with the reference:
//   encryption: MixColumns(ShiftRows(SubBytes(s))) ^ rk_enc (no MixColumns
//               in the last round),
//   decryption: InvMixColumns(InvSubBytes(InvShiftRows(s)) ^ rk_dec) (no
//               InvMixColumns in the last round).
module tb_aes_round;
  import tb_aes_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  blk_t st = 0, rk_enc, rk_dec, o_full, o_last;
  logic dec = 0, d_full, d_last;

  aes_round #(.LAST(1'b0)) u_full (.clk(clk), .st_i(st), .dec_i(dec), .rk_enc(rk_enc),
                                   .rk_dec(rk_dec), .st_o(o_full), .dec_o(d_full));
  aes_round #(.LAST(1'b1)) u_last (.clk(clk), .st_i(st), .dec_i(dec), .rk_enc(rk_enc),
                                   .rk_dec(rk_dec), .st_o(o_last), .dec_o(d_last));

  int checks = 0, failures = 0;
  blk_t hs [$];
  logic hd [$];

  function automatic blk_t ref_round(input blk_t s, input bit d, input bit last);
    if (!d) begin
      s = shrows(subb(s, 0), 0);
      if (!last) s = mixcol(s, 0);
      return s ^ rk_enc;
    end
    s = subb(shrows(s, 1), 1) ^ rk_dec;
    return last ? s : mixcol(s, 1);
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rk_enc = {$urandom, $urandom, $urandom, $urandom};
    rk_dec = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      // hs[k] = input presented k cycles ago, hs[0] the newest
      if (hs.size() >= 7) begin
        checks++;
        if (o_full !== ref_round(hs[6], hd[6], 0) || d_full !== hd[6]) begin
          failures++;
          $display("FAIL full round dec=%0d", hd[6]);
        end
      end
      if (hs.size() >= 6) begin
        checks++;
        if (o_last !== ref_round(hs[5], hd[5], 1) || d_last !== hd[5]) begin
          failures++;
          $display("FAIL last round dec=%0d", hd[5]);
        end
      end
      st  = {$urandom, $urandom, $urandom, $urandom};
      dec = $urandom % 2;
      hs.push_front(st);
      hd.push_front(dec);
      if (hs.size() > 8) begin void'(hs.pop_back()); void'(hd.pop_back()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
