// tb_tdes_cbc_deep: the 3DES-CBC engine in its deeper configurations, with
// 3-level (4-to-1) and 6-level (2-to-1) S-box multiplexer trees: 48 and 96
// pipeline stages and as many channels. Both run the full check of
// tdes_cbc_check side by side.
module tb_tdes_cbc_deep;
  logic clk = 0;
  always #5 clk = ~clk;

  bit done3, done6;
  int checks3, failures3, checks6, failures6;
  tdes_cbc_check #(.STAGES(3)) u_check3 (.clk(clk), .done(done3), .checks(checks3), .failures(failures3));
  tdes_cbc_check #(.STAGES(6)) u_check6 (.clk(clk), .done(done6), .checks(checks6), .failures(failures6));

  initial begin
    int f;
    for (int n = 0; n < 300000 && !(done3 && done6); n++) @(posedge clk);
    @(posedge clk);
    f = failures3 + failures6;
    if (!(done3 && done6)) begin
      $display("FAIL watchdog");
      f++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks3 + checks6, f);
    $finish;
  end
endmodule
