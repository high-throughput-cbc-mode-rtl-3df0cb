// tb_tdes_cbc: self-checking test of the 3DES-CBC engine in its default
// configuration (2-level S-boxes, 32 pipeline stages, 32 channels): known
// answers, exact three-pass latency, multi-channel CBC traffic and the rate
// of 32 blocks per 96 cycles (see tdes_cbc_check).
module tb_tdes_cbc;
  logic clk = 0;
  always #5 clk = ~clk;

  bit done;
  int checks, failures;
  tdes_cbc_check #(.STAGES(2)) u_check (.clk(clk), .done(done), .checks(checks), .failures(failures));

  initial begin
    for (int n = 0; n < 100000 && !done; n++) @(posedge clk);
    @(posedge clk);
    if (!done) begin
      $display("FAIL watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    end else begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    end
    $finish;
  end
endmodule
