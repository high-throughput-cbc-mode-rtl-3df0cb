// tb_des_round: pipelined DES rounds with 2-, 3- and 6-stage S-boxes, with
// and without the output register, fed random L, R and subkey every cycle.
// Outputs are compared with L' = R, R' = L ^ f(R, K) from the reference,
// STAGES-1 (+1 with the output register) cycles later.
module tb_des_round;
  import des_pkg::*;
  import tb_des_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] l = 0, r = 0;
  subkey_t     k = 0;
  logic [31:0] lo2, ro2, lo2c, ro2c, lo3, ro3, lo6, ro6;

  des_round #(.STAGES(2), .OUT_REG(1)) u2  (.clk(clk), .l_i(l), .r_i(r), .k(k), .l_o(lo2),  .r_o(ro2));
  des_round #(.STAGES(2), .OUT_REG(0)) u2c (.clk(clk), .l_i(l), .r_i(r), .k(k), .l_o(lo2c), .r_o(ro2c));
  des_round #(.STAGES(3), .OUT_REG(1)) u3  (.clk(clk), .l_i(l), .r_i(r), .k(k), .l_o(lo3),  .r_o(ro3));
  des_round #(.STAGES(6), .OUT_REG(1)) u6  (.clk(clk), .l_i(l), .r_i(r), .k(k), .l_o(lo6),  .r_o(ro6));

  int checks = 0, failures = 0;
  logic [31:0] hl [$], hr [$];
  subkey_t     hk [$];

  function automatic bit ok(input logic [31:0] lo, input logic [31:0] ro, input int d);
    return lo === hr[d] && ro === (hl[d] ^ ref_f(hr[d], hk[d]));
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      l = $urandom; r = $urandom; k = {$urandom, 16'($urandom)};
      hl.push_front(l); hr.push_front(r); hk.push_front(k);
      if (hl.size() > 7) begin void'(hl.pop_back()); void'(hr.pop_back()); void'(hk.pop_back()); end
      #1;
      if (hl.size() >= 7) begin
        checks++;
        if (!ok(lo2, ro2, 2) || !ok(lo2c, ro2c, 1) || !ok(lo3, ro3, 3) || !ok(lo6, ro6, 6)) begin
          failures++;
          $display("FAIL at %0d", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
