// tb_cbc_chain: random test of the round-robin slot counter and chaining
// store against a behavioural model. Each cycle it draws a recirculation, an
// input block (with or without IV), an entrance write, and possibly a block
// leaving for a busy channel with or without a chaining update, then
// compares slot_ch, in_ready, accept and chain_o with the model.
// Counted mechanisms (each required): IV selection, bypass of a same-cycle
// update, blocked slot (busy channel), recirculation.
module tb_cbc_chain;
  localparam int W = 16, NCH = 5, CW = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [CW-1:0] slot_ch, fin_ch = 0, upd_ch = 0;
  logic          recirc = 0, in_valid = 0, in_first = 0, in_upd = 0, fin_valid = 0, upd_valid = 0;
  logic [W-1:0]  in_iv = 0, in_upd_data = 0, upd_data = 0, chain_o;
  logic          in_ready, accept;

  cbc_chain #(.W(W), .NCH(NCH)) dut (.*);

  int checks = 0, failures = 0;
  int n_iv = 0, n_byp = 0, n_block = 0, n_rec = 0;
  int m_slot = 1;  // one clock edge passes between reset release and the first check
  bit m_busy [NCH];
  logic [W-1:0] m_chain [NCH];
  bit m_known [NCH];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NCH; c++) begin m_busy[c] = 0; m_known[c] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      bit exp_ready, exp_acc, byp;
      logic [W-1:0] exp_chain;
      int busy_list [$];
      @(negedge clk);
      recirc    = ($urandom % 5 == 0);
      in_valid  = ($urandom % 4 != 0);
      in_first  = ($urandom % 3 == 0);
      in_iv     = W'($urandom);
      in_upd    = ($urandom % 4 == 0);
      in_upd_data = W'($urandom);
      busy_list.delete();
      for (int c = 0; c < NCH; c++) if (m_busy[c]) busy_list.push_back(c);
      fin_valid = (busy_list.size() > 0) && ($urandom % 2 == 0);
      fin_ch    = fin_valid ? CW'(busy_list[$urandom % busy_list.size()]) : '0;
      upd_valid = fin_valid && ($urandom % 3 != 0);
      upd_ch    = fin_ch;
      upd_data  = W'($urandom);
      #1;
      // model
      byp       = upd_valid && int'(upd_ch) == m_slot;
      exp_ready = !recirc && (!m_busy[m_slot] || (fin_valid && int'(fin_ch) == m_slot));
      exp_acc   = in_valid && exp_ready;
      exp_chain = in_first ? in_iv : byp ? upd_data : m_chain[m_slot];
      check(int'(slot_ch) == m_slot, "slot order");
      check(in_ready == exp_ready && accept == exp_acc, "ready/accept");
      if (in_first || byp || m_known[m_slot]) check(chain_o == exp_chain, "chaining value");
      if (exp_acc && in_first) n_iv++;
      if (exp_acc && !in_first && byp) n_byp++;
      if (in_valid && !recirc && !exp_ready) n_block++;
      if (in_valid && recirc) n_rec++;
      // state update at the coming edge
      if (upd_valid) begin m_chain[upd_ch] = upd_data; m_known[upd_ch] = 1; end
      if (exp_acc && in_upd) begin m_chain[m_slot] = in_upd_data; m_known[m_slot] = 1; end
      if (fin_valid) m_busy[fin_ch] = 0;
      if (exp_acc) m_busy[m_slot] = 1;
      m_slot = (m_slot + 1) % NCH;
    end
    $display("iv=%0d bypass=%0d blocked=%0d recirc=%0d", n_iv, n_byp, n_block, n_rec);
    check(n_iv > 0 && n_byp > 0 && n_block > 0 && n_rec > 0, "all mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
