// tb_aes_key_expand: loads the FIPS-197 key 2b7e1516..., checks that busy
// lasts exactly 10 cycles, that the last round key is the published
// d014f9a8c9ee2589e13f0cc8b6630ca6, and that all 11 round keys match the
// reference expansion; then repeats with random keys.
module tb_aes_key_expand;
  import tb_aes_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, busy;
  blk_t key = 0;
  blk_t rk [11];
  always #5 clk = ~clk;

  aes_key_expand dut (.clk(clk), .rst_n(rst_n), .load(load), .key(key), .rk(rk), .busy(busy));

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input blk_t k, input bit kat);
    blk_t ref_rk [11];
    int n;
    expand(k, ref_rk);
    @(negedge clk);
    key = k; load = 1;
    @(negedge clk);
    load = 0;
    n = 0;
    while (busy) begin n++; @(negedge clk); end
    checks++;
    if (n != 10) begin failures++; $display("FAIL busy for %0d cycles", n); end
    for (int r = 0; r < 11; r++) begin
      checks++;
      if (rk[r] !== ref_rk[r]) begin failures++; $display("FAIL rk[%0d]=%h", r, rk[r]); end
    end
    if (kat) begin
      checks++;
      if (rk[10] !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin
        failures++;
        $display("FAIL known last round key");
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 1);
    for (int i = 0; i < 20; i++) run({$urandom, $urandom, $urandom, $urandom}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
