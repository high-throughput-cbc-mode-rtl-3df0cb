// tb_cbc_crypto_top: end-to-end test of both CBC engines at their default
// sizes (70 AES channels, 32 3DES channels), running at the same time.
// Each engine first encrypts one known-answer block (FIPS-197 C.1 and the
// single-DES example with K1 = K2 = K3), then every channel of both engines
// processes a random-length CBC message (AES channels alternate between
// encryption and decryption) with random idle slots. All results are
// compared with the reference models.
// Counted mechanisms, each required at least once: AES IV loads, AES
// chaining bypasses, AES encryptions and decryptions, AES idle slots; 3DES IV
// loads, recirculations, stalls, chaining bypasses, idle slots.
module tb_cbc_crypto_top;
  import tb_aes_ref_pkg::*;
  import tb_des_ref_pkg::*;
  import des_pkg::dblock_t;

  localparam int ANCH = 70, ALAT = 70, ACW = 7;
  localparam int DNCH = 32, DLAT = 32, DCW = 5;
  localparam int MAXB = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic           aes_key_load = 0, aes_key_busy;
  blk_t           aes_key = '0;
  logic [ACW-1:0] aes_slot_ch, aes_out_ch;
  logic           aes_in_valid = 0, aes_in_first = 0, aes_in_dec = 0, aes_in_ready;
  blk_t           aes_in_data = '0, aes_in_iv = '0, aes_out_data;
  logic           aes_out_valid, aes_out_dec;

  logic           des_key_load = 0;
  dblock_t        des_k1 = '0, des_k2 = '0, des_k3 = '0;
  logic [DCW-1:0] des_slot_ch, des_out_ch;
  logic           des_in_valid = 0, des_in_first = 0, des_in_ready, des_out_valid;
  dblock_t        des_in_data = '0, des_in_iv = '0, des_out_data;

  cbc_crypto_top dut (.*);

  int checks = 0, failures = 0;
  int a_iv = 0, a_byp = 0, a_enc = 0, a_dec = 0, a_idle = 0;
  int d_iv = 0, d_rec = 0, d_stall = 0, d_byp = 0, d_idle = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (dut.u_tdes.recirc) d_rec++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-channel messages and expected results
  blk_t    am [ANCH][MAXB], ae [ANCH][MAXB], aiv [ANCH];
  int      alen [ANCH], asent [ANCH], arcvd [ANCH];
  dblock_t dm [DNCH][MAXB], de [DNCH][MAXB], div_ [DNCH];
  int      dlen [DNCH], dsent [DNCH], drcvd [DNCH];
  int      atotal = 0, dtotal = 0, adone = 0, ddone = 0;

  blk_t    AK = 128'h000102030405060708090a0b0c0d0e0f;
  dblock_t DK = 64'h133457799BBCDFF1;

  initial begin : main
    blk_t prev;
    dblock_t dprev;
    // known-answer blocks go first on channel 0 of each engine
    alen[0] = 1; am[0][0] = 128'h00112233445566778899aabbccddeeff; aiv[0] = '0;
    ae[0][0] = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    dlen[0] = 1; dm[0][0] = 64'h0123456789ABCDEF; div_[0] = '0; de[0][0] = 64'h85E813540F0AB405;
    for (int c = 1; c < ANCH; c++) begin
      alen[c] = 2 + ($urandom % (MAXB - 1));
      aiv[c]  = {$urandom, $urandom, $urandom, $urandom};
      prev    = aiv[c];
      for (int b = 0; b < alen[c]; b++) begin
        am[c][b] = {$urandom, $urandom, $urandom, $urandom};
        if (c[0]) begin
          ae[c][b] = aes_dec(AK, am[c][b]) ^ prev;
          prev = am[c][b];
        end else begin
          ae[c][b] = aes_enc(AK, am[c][b] ^ prev);
          prev = ae[c][b];
        end
      end
    end
    for (int c = 1; c < DNCH; c++) begin
      dlen[c] = 2 + ($urandom % (MAXB - 1));
      div_[c] = {$urandom, $urandom};
      dprev   = div_[c];
      for (int b = 0; b < dlen[c]; b++) begin
        dm[c][b] = {$urandom, $urandom};
        de[c][b] = tdes_enc(DK, DK, DK, dm[c][b] ^ dprev);
        dprev    = de[c][b];
      end
    end
    for (int c = 0; c < ANCH; c++) begin atotal += alen[c]; asent[c] = 0; arcvd[c] = 0; end
    for (int c = 0; c < DNCH; c++) begin dtotal += dlen[c]; dsent[c] = 0; drcvd[c] = 0; end

    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    aes_key = AK; aes_key_load = 1;
    des_k1 = DK; des_k2 = DK; des_k3 = DK; des_key_load = 1;
    @(negedge clk);
    aes_key_load = 0; des_key_load = 0;
    while (aes_key_busy) @(negedge clk);

    fork
      // AES driver
      while (1) begin
        int c;
        @(negedge clk);
        c = int'(aes_slot_ch);
        aes_in_valid = 0;
        if (asent[c] < alen[c] && (c == 0 || $urandom % 6 != 0)) begin
          aes_in_valid = 1;
          aes_in_first = (asent[c] == 0);
          aes_in_dec   = c[0];
          aes_in_data  = am[c][asent[c]];
          aes_in_iv    = aiv[c];
        end else a_idle++;
        #1;
        if (aes_in_valid) begin
          check(aes_in_ready, "AES slot accepted");
          if (aes_in_ready) begin
            if (aes_in_first) a_iv++;
            if (aes_out_valid && aes_out_ch == aes_slot_ch) a_byp++;
            if (aes_in_dec) a_dec++; else a_enc++;
            asent[c]++;
          end
        end
      end
      // 3DES driver
      while (1) begin
        int c;
        @(negedge clk);
        c = int'(des_slot_ch);
        des_in_valid = 0;
        if (dsent[c] < dlen[c] && (c == 0 || $urandom % 6 != 0)) begin
          des_in_valid = 1;
          des_in_first = (dsent[c] == 0);
          des_in_data  = dm[c][dsent[c]];
          des_in_iv    = div_[c];
        end else d_idle++;
        #1;
        if (des_in_valid) begin
          if (des_in_ready) begin
            if (des_in_first) d_iv++;
            if (des_out_valid && des_out_ch == des_slot_ch) d_byp++;
            dsent[c]++;
          end else d_stall++;
        end
      end
      // monitors
      while (1) begin
        int c;
        @(negedge clk);
        if (aes_out_valid) begin
          c = int'(aes_out_ch);
          if (arcvd[c] < alen[c]) begin
            check(aes_out_data == ae[c][arcvd[c]] && aes_out_dec == c[0],
                  $sformatf("AES ch %0d block %0d", c, arcvd[c]));
            arcvd[c]++;
            adone++;
          end else check(0, "AES extra output");
        end
        if (des_out_valid) begin
          c = int'(des_out_ch);
          if (drcvd[c] < dlen[c]) begin
            check(des_out_data == de[c][drcvd[c]], $sformatf("3DES ch %0d block %0d", c, drcvd[c]));
            drcvd[c]++;
            ddone++;
          end else check(0, "3DES extra output");
        end
      end
      wait (adone == atotal && ddone == dtotal);
    join_any
    disable fork;

    $display("AES:  iv=%0d bypass=%0d enc=%0d dec=%0d idle=%0d", a_iv, a_byp, a_enc, a_dec, a_idle);
    $display("3DES: iv=%0d recirc=%0d stall=%0d bypass=%0d idle=%0d", d_iv, d_rec, d_stall, d_byp, d_idle);
    check(a_iv > 0 && a_byp > 0 && a_enc > 0 && a_dec > 0 && a_idle > 0, "all AES mechanisms seen");
    check(d_iv > 0 && d_rec > 0 && d_stall > 0 && d_byp > 0 && d_idle > 0, "all 3DES mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
