// tb_aes_cbc: self-checking test of the folded multi-channel AES-128-CBC
// engine.
//  1. FIPS-197 known answer (key 000102..0f, zero IV) and the two-block CBC
//     example of NIST SP 800-38A (F.2.1 encrypt, F.2.2 decrypt), with a key
//     reload in between; latency must be exactly LAT cycles.
//  2. All NCH channels run interleaved messages of random length, half of
//     them decrypting, with random idle slots, against the reference model.
//     With NCH = LAT a waiting block must always be accepted in its slot.
//  3. Full load: all channels send back to back; one block must leave per
//     clock for 3*NCH cycles (the one-block-per-cycle rate of the design).
// Counted mechanisms: IV loads, chaining-value bypasses (a channel re-enters
// in the cycle its previous ciphertext leaves), encryptions, decryptions,
// idle slots, key reloads; each must occur at least once.
module tb_aes_cbc;
  import tb_aes_ref_pkg::*;

  localparam int NCH  = 70;
  localparam int LAT  = 70;
  localparam int CW   = $clog2(NCH);
  localparam int MAXB = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          key_load = 0, key_busy;
  blk_t          key = '0;
  logic [CW-1:0] slot_ch, out_ch;
  logic          in_valid = 0, in_first = 0, in_dec = 0, in_ready;
  blk_t          in_data = '0, in_iv = '0, out_data;
  logic          out_valid, out_dec;

  aes_cbc #(.NCH(NCH)) dut (.*);

  int checks = 0, failures = 0;
  int n_iv = 0, n_bypass = 0, n_enc = 0, n_dec = 0, n_idle = 0, n_rekey = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_key(input blk_t k);
    @(negedge clk);
    key = k; key_load = 1;
    @(negedge clk);
    key_load = 0;
    while (key_busy) @(negedge clk);
    n_rekey++;
  endtask

  // drive one block into channel ch; returns the accept cycle
  task automatic send(input int ch, input bit first, input bit dec, input blk_t d, input blk_t iv,
                      output longint t);
    @(negedge clk);
    while (slot_ch != CW'(ch)) @(negedge clk);
    in_valid = 1; in_first = first; in_dec = dec; in_data = d; in_iv = iv;
    #1;
    check(in_ready, "ready for known-answer block");
    t = cyc;
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic expect_out(input int ch, input blk_t exp, input longint t_in);
    while (!out_valid) @(negedge clk);
    check(out_ch == CW'(ch) && out_data == exp, $sformatf("known answer %h", exp));
    check(cyc - t_in == longint'(LAT), $sformatf("latency %0d", cyc - t_in));
  endtask

  // random multi-channel traffic
  blk_t msg [NCH][MAXB];
  blk_t exp_o [NCH][MAXB];
  blk_t ivs [NCH];
  bit   mdec [NCH];
  int   len [NCH], sent [NCH], rcvd [NCH];
  blk_t rk_unused;

  initial begin : main
    longint t;
    blk_t k2;
    blk_t prev;
    int total, done;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1a. FIPS-197 C.1 with IV = 0
    load_key(128'h000102030405060708090a0b0c0d0e0f);
    send(3, 1, 0, 128'h00112233445566778899aabbccddeeff, '0, t);
    expect_out(3, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, t);
    send(5, 1, 1, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, '0, t);
    expect_out(5, 128'h00112233445566778899aabbccddeeff, t);

    // 1b. SP 800-38A CBC-AES128
    k2 = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    load_key(k2);
    send(0, 1, 0, 128'h6bc1bee22e409f96e93d7e117393172a, 128'h000102030405060708090a0b0c0d0e0f, t);
    expect_out(0, 128'h7649abac8119b246cee98e9b12e9197d, t);
    send(0, 0, 0, 128'hae2d8a571e03ac9c9eb76fac45af8e51, '0, t);
    expect_out(0, 128'h5086cb9b507219ee95db113a917678b2, t);
    send(9, 1, 1, 128'h7649abac8119b246cee98e9b12e9197d, 128'h000102030405060708090a0b0c0d0e0f, t);
    expect_out(9, 128'h6bc1bee22e409f96e93d7e117393172a, t);
    send(9, 0, 1, 128'h5086cb9b507219ee95db113a917678b2, '0, t);
    expect_out(9, 128'hae2d8a571e03ac9c9eb76fac45af8e51, t);

    // 2. all channels at once
    total = 0;
    for (int c = 0; c < NCH; c++) begin
      mdec[c] = c[0];
      len[c]  = 2 + ($urandom % (MAXB - 1));
      ivs[c]  = {$urandom, $urandom, $urandom, $urandom};
      prev    = ivs[c];
      for (int b = 0; b < len[c]; b++) begin
        msg[c][b] = {$urandom, $urandom, $urandom, $urandom};
        if (mdec[c]) begin
          exp_o[c][b] = aes_dec(k2, msg[c][b]) ^ prev;
          prev = msg[c][b];
        end else begin
          exp_o[c][b] = aes_enc(k2, msg[c][b] ^ prev);
          prev = exp_o[c][b];
        end
      end
      sent[c] = 0; rcvd[c] = 0;
      total += len[c];
    end
    done = 0;
    fork
      // driver
      begin
        int c;
        while (1) begin
          @(negedge clk);
          c = int'(slot_ch);
          in_valid = 0;
          if (sent[c] < len[c] && ($urandom % 8 != 0)) begin
            in_valid = 1;
            in_first = (sent[c] == 0);
            in_dec   = mdec[c];
            in_data  = msg[c][sent[c]];
            in_iv    = ivs[c];
          end else begin
            n_idle++;
          end
          #1;
          if (in_valid) begin
            check(in_ready, "slot accepted with NCH = LAT");
            if (in_ready) begin
              if (in_first) n_iv++;
              if (out_valid && out_ch == slot_ch) n_bypass++;
              if (in_dec) n_dec++; else n_enc++;
              sent[c]++;
            end
          end
        end
      end
      // monitor
      begin
        int c;
        while (done < total) begin
          @(negedge clk);
          if (out_valid) begin
            c = int'(out_ch);
            if (rcvd[c] >= len[c]) begin
              check(0, $sformatf("extra output on channel %0d", c));
            end else begin
              check(out_data == exp_o[c][rcvd[c]] && out_dec == mdec[c],
                    $sformatf("ch %0d block %0d", c, rcvd[c]));
              rcvd[c]++;
              done++;
            end
          end
        end
      end
    join_any
    disable fork;
    in_valid = 0;

    // 3. full load: every channel sends three blocks with no idle slot; the
    //    engine must then deliver one block per clock for 3*NCH cycles
    begin
      int nout, gaps;
      longint t_first, t_last;
      for (int c = 0; c < NCH; c++) begin
        prev = ivs[c];
        for (int b = 0; b < 3; b++) begin
          msg[c][b]   = {$urandom, $urandom, $urandom, $urandom};
          exp_o[c][b] = aes_enc(k2, msg[c][b] ^ prev);
          prev        = exp_o[c][b];
        end
        sent[c] = 0; rcvd[c] = 0;
      end
      nout = 0; gaps = 0; t_first = 0; t_last = 0;
      fork
        begin
          int c;
          while (1) begin
            @(negedge clk);
            c = int'(slot_ch);
            in_valid = (sent[c] < 3);
            in_first = (sent[c] == 0);
            in_dec   = 0;
            in_data  = msg[c][sent[c] % 3];
            in_iv    = ivs[c];
            #1;
            if (in_valid && in_ready) sent[c]++;
          end
        end
        begin
          int c;
          while (nout < 3 * NCH) begin
            @(negedge clk);
            if (out_valid) begin
              c = int'(out_ch);
              check(rcvd[c] < 3 && out_data == exp_o[c][rcvd[c] % 3], $sformatf("full load ch %0d", c));
              rcvd[c]++;
              if (nout == 0) t_first = cyc;
              t_last = cyc;
              nout++;
            end else if (nout > 0) gaps++;
          end
        end
      join_any
      disable fork;
      in_valid = 0;
      $display("full load: %0d blocks in %0d cycles, %0d empty output cycles", nout, t_last - t_first + 1, gaps);
      check(t_last - t_first + 1 == 3 * NCH && gaps == 0, "one block per clock at full load");
    end

    $display("mechanisms: iv=%0d bypass=%0d enc=%0d dec=%0d idle=%0d rekey=%0d",
             n_iv, n_bypass, n_enc, n_dec, n_idle, n_rekey);
    check(n_iv > 0, "IV load happened");
    check(n_bypass > 0, "chaining bypass happened");
    check(n_enc > 0 && n_dec > 0, "both modes happened");
    check(n_idle > 0, "idle slot happened");
    check(n_rekey > 1, "key reload happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
