// tb_des_sbox: the pipelined S-box with 2, 3 and 6 stages, fed a new random
// 48-bit input every cycle. Outputs are compared, STAGES-1 cycles later,
// with a lookup in the standard row/column form of the S-boxes; S1 and S8
// are typed here row by row from the standard, the others come from the
// sequential reference.
module tb_des_sbox;
  import tb_des_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [47:0] x = 0;
  logic [31:0] y2, y3, y6;
  des_sbox #(.STAGES(2)) u2 (.clk(clk), .x(x), .y(y2));
  des_sbox #(.STAGES(3)) u3 (.clk(clk), .x(x), .y(y3));
  des_sbox #(.STAGES(6)) u6 (.clk(clk), .x(x), .y(y6));

  // S1 and S8 in standard order: row r, column c at index 16r + c
  localparam byte S1 [64] = '{14,4,13,1,2,15,11,8,3,10,6,12,5,9,0,7, 0,15,7,4,14,2,13,1,10,6,12,11,9,5,3,8,
                              4,1,14,8,13,6,2,11,15,12,9,7,3,10,5,0, 15,12,8,2,4,9,1,7,5,11,3,14,10,0,6,13};
  localparam byte S8 [64] = '{13,2,8,4,6,15,11,1,10,9,3,14,5,0,12,7, 1,15,13,8,10,3,7,4,12,5,6,11,0,14,9,2,
                              7,11,4,1,9,12,14,2,0,6,10,13,15,3,5,8, 2,1,14,7,4,10,8,13,15,12,9,0,3,5,6,11};

  function automatic logic [31:0] ref_s(input logic [47:0] v);
    logic [31:0] o;
    for (int n = 0; n < 8; n++) begin
      logic [5:0] b = v[47-6*n -: 6];
      int idx = 16 * int'({b[5], b[0]}) + int'(b[4:1]);
      o[31-4*n -: 4] = (n == 0) ? 4'(S1[idx]) : (n == 7) ? 4'(S8[idx]) : ref_entry(n, b);
    end
    return o;
  endfunction

  function automatic logic [3:0] ref_entry(input int n, input logic [5:0] b);
    return des_pkg::sbox_entry(3'(n), b);
  endfunction

  int checks = 0, failures = 0;
  logic [47:0] h [$];

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      // h[k] = input presented k cycles ago (h[0] is the current one)
      x = (i < 64) ? {8{6'(i)}} : {$urandom, 16'($urandom)};
      h.push_front(x);
      if (h.size() > 6) void'(h.pop_back());
      #1;
      checks++;
      if (h.size() >= 6 && (y2 !== ref_s(h[1]) || y3 !== ref_s(h[2]) || y6 !== ref_s(h[5]))) begin
        failures++;
        $display("FAIL i=%0d y2=%h y3=%h y6=%h", i, y2, y3, y6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
