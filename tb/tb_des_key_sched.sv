// tb_des_key_sched: loads three keys and checks the published subkeys of
// the DES example key 133457799BBCDFF1 (K1 = 1B02EFFC7072,
// K16 = CB3D8B0E17F5) in pass 0, the reversed order for pass 1 and the
// order for pass 2, and that the subkeys hold when load is low; then
// compares random key sets with the reference schedule.
module tb_des_key_sched;
  import des_pkg::*;

  logic clk = 0, load = 0;
  always #5 clk = ~clk;
  dblock_t k1 = 0, k2 = 0, k3 = 0;
  subkey_t sk [3][16];

  des_key_sched dut (.clk(clk), .load(load), .k1(k1), .k2(k2), .k3(k3), .sk(sk));

  int checks = 0, failures = 0;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_keys(input dblock_t a, input dblock_t b, input dblock_t c);
    @(negedge clk);
    k1 = a; k2 = b; k3 = c; load = 1;
    @(negedge clk);
    load = 0;
  endtask

  initial begin
    subkey_t r1 [16], r2 [16], r3 [16];
    load_keys(64'h133457799BBCDFF1, 64'h133457799BBCDFF1, 64'h133457799BBCDFF1);
    check(sk[0][0]  == 48'h1B02EFFC7072, "pass 0 round 1");
    check(sk[0][15] == 48'hCB3D8B0E17F5, "pass 0 round 16");
    check(sk[1][0]  == 48'hCB3D8B0E17F5, "pass 1 round 1 (reversed)");
    check(sk[1][15] == 48'h1B02EFFC7072, "pass 1 round 16 (reversed)");
    check(sk[2][0]  == 48'h1B02EFFC7072, "pass 2 round 1");
    k1 = '1;
    @(negedge clk);
    check(sk[0][0] == 48'h1B02EFFC7072, "hold without load");
    for (int i = 0; i < 30; i++) begin
      dblock_t a = {$urandom, $urandom}, b = {$urandom, $urandom}, c = {$urandom, $urandom};
      load_keys(a, b, c);
      key_schedule(a, r1);
      key_schedule(b, r2);
      key_schedule(c, r3);
      for (int r = 0; r < 16; r++)
        check(sk[0][r] == r1[r] && sk[1][r] == r2[15-r] && sk[2][r] == r3[r], "random key set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
