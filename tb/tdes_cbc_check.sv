// tdes_cbc_check: reusable self-checking driver for one tdes_cbc engine with
// STAGES-level S-boxes and NCH = 16*STAGES channels.
//  1. Known answers: single DES (K1 = K2 = K3 = 133457799BBCDFF1, plaintext
//     0123456789ABCDEF -> 85E813540F0AB405) and the three-key example of NIST
//     SP 800-67 ("The qufck brown fox jump"), block by block with a zero IV;
//     latency must be exactly 3*LAT cycles (three passes).
//  2. All channels encrypt interleaved CBC messages of random length with
//     random idle slots; results are compared with the reference model.
// Counted mechanisms: IV loads, recirculations, stalls (a channel with data
// finds its slot taken by a recirculating block), chaining bypasses and idle
// slots; each must occur at least once. With all channels busy, NCH blocks
// must leave in every 3*LAT cycles. Raises done when finished.
module tdes_cbc_check
  import des_pkg::*;
  import tb_des_ref_pkg::*;
#(
  parameter int STAGES = 2
) (
  input  logic clk,
  output bit   done,
  output int   checks,
  output int   failures
);

  localparam int LAT    = 16 * STAGES;
  localparam int NCH    = LAT;
  localparam int CW     = $clog2(NCH);
  localparam int MAXB   = 8;

  logic rst_n = 0;

  logic          key_load = 0;
  dblock_t       k1 = '0, k2 = '0, k3 = '0;
  logic [CW-1:0] slot_ch, out_ch;
  logic          in_valid = 0, in_first = 0, in_ready, out_valid;
  dblock_t       in_data = '0, in_iv = '0, out_data;

  tdes_cbc #(.STAGES(STAGES), .NCH(NCH)) dut (.*);

  int n_iv = 0, n_recirc = 0, n_stall = 0, n_bypass = 0, n_idle = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (dut.recirc) n_recirc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask


  task automatic load_keys(input dblock_t a, input dblock_t b, input dblock_t c);
    @(negedge clk);
    k1 = a; k2 = b; k3 = c; key_load = 1;
    @(negedge clk);
    key_load = 0;
  endtask

  task automatic kat(input int ch, input dblock_t pt, input dblock_t exp);
    longint t;
    @(negedge clk);
    while (slot_ch != CW'(ch)) @(negedge clk);
    in_valid = 1; in_first = 1; in_data = pt; in_iv = '0;
    #1;
    check(in_ready, "ready for known-answer block");
    t = cyc;
    @(negedge clk);
    in_valid = 0;
    while (!out_valid) @(negedge clk);
    check(out_ch == CW'(ch) && out_data == exp, $sformatf("known answer %h got %h", exp, out_data));
    check(cyc - t == 3 * LAT, $sformatf("latency %0d", cyc - t));
  endtask

  dblock_t msg [NCH][MAXB];
  dblock_t exp_o [NCH][MAXB];
  dblock_t ivs [NCH];
  int      len [NCH], sent [NCH], rcvd [NCH];

  initial begin : main
    dblock_t ka, kb, kc, prev;
    int total, ndone;
    longint first_full, outs_full;
    done = 0; checks = 0; failures = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. known answers
    load_keys(64'h133457799BBCDFF1, 64'h133457799BBCDFF1, 64'h133457799BBCDFF1);
    kat(0, 64'h0123456789ABCDEF, 64'h85E813540F0AB405);
    ka = 64'h0123456789ABCDEF; kb = 64'h23456789ABCDEF01; kc = 64'h456789ABCDEF0123;
    load_keys(ka, kb, kc);
    kat(4, 64'h5468652071756663, 64'hA826FD8CE53B855F);
    kat(4, 64'h6B2062726F776E20, 64'hCCE21C8112256FE6);
    kat(7, 64'h666F78206A756D70, 64'h68D5C05DD9B6B900);

    // 2. all channels at once
    total = 0;
    for (int c = 0; c < NCH; c++) begin
      len[c] = 3 + ($urandom % (MAXB - 2));
      ivs[c] = {$urandom, $urandom};
      prev   = ivs[c];
      for (int b = 0; b < len[c]; b++) begin
        msg[c][b]   = {$urandom, $urandom};
        exp_o[c][b] = tdes_enc(ka, kb, kc, msg[c][b] ^ prev);
        prev        = exp_o[c][b];
      end
      sent[c] = 0; rcvd[c] = 0;
      total += len[c];
    end
    ndone = 0;
    first_full = -1;
    outs_full = 0;
    fork
      begin
        int c;
        while (1) begin
          @(negedge clk);
          c = int'(slot_ch);
          in_valid = 0;
          // idle slots only in the second half of the run
          if (sent[c] < len[c] && (sent[c] < 2 || $urandom % 4 != 0)) begin
            in_valid = 1;
            in_first = (sent[c] == 0);
            in_data  = msg[c][sent[c]];
            in_iv    = ivs[c];
          end else begin
            n_idle++;
          end
          #1;
          if (in_valid) begin
            if (in_ready) begin
              if (in_first) n_iv++;
              if (out_valid && out_ch == slot_ch) n_bypass++;
              sent[c]++;
            end else begin
              n_stall++;
            end
          end
        end
      end
      begin
        int c;
        while (ndone < total) begin
          @(negedge clk);
          if (out_valid) begin
            c = int'(out_ch);
            if (rcvd[c] >= len[c]) begin
              check(0, $sformatf("extra output on channel %0d", c));
            end else begin
              check(out_data == exp_o[c][rcvd[c]], $sformatf("ch %0d block %0d", c, rcvd[c]));
              rcvd[c]++;
              ndone++;
            end
            // steady state: the first two blocks of every channel are sent
            // without a gap, so NCH blocks leave in every 3*LAT cycles
            if (ndone == 1) first_full = cyc;
            if (ndone == NCH + 1) outs_full = cyc - first_full;
          end
        end
      end
    join_any
    disable fork;
    in_valid = 0;

    $display("STAGES=%0d mechanisms: iv=%0d recirc=%0d stall=%0d bypass=%0d idle=%0d; %0d blocks in %0d cycles", STAGES,
             n_iv, n_recirc, n_stall, n_bypass, n_idle, NCH, outs_full);
    check(outs_full == 3 * LAT, "NCH blocks per 3*LAT cycles");
    check(n_iv > 0, "IV load happened");
    check(n_recirc > 0, "recirculation happened");
    check(n_stall > 0, "stall happened");
    check(n_bypass > 0, "chaining bypass happened");
    check(n_idle > 0, "idle slot happened");
    $display("STAGES=%0d done", STAGES);
    done = 1;
  end

endmodule
