// tb_aes_mixcol: random columns through the integrated MixColumns /
// InvMixColumns unit, one per cycle; both outputs are compared one cycle
// later with the matrix products of the reference model (coefficients
// 2,3,1,1 and 14,11,13,9). Two fixed FIPS-197 columns are included.
module tb_aes_mixcol;
  import tb_aes_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] col = 0, mix, inv;
  aes_mixcol dut (.clk(clk), .col(col), .mix(mix), .inv(inv));

  int checks = 0, failures = 0;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] prev;
    blk_t b;
    for (int i = 0; i < 1002; i++) begin
      @(negedge clk);
      if (i > 0) begin
        b = {prev, 96'h0};
        checks++;
        if (mix !== mixcol(b, 0)[127:96] || inv !== mixcol(b, 1)[127:96]) begin
          failures++;
          $display("FAIL col=%h mix=%h inv=%h", prev, mix, inv);
        end
      end
      if (i == 1) begin
        checks++;
        if (mix !== 32'h046681e5) begin failures++; $display("FAIL FIPS column"); end
      end
      col  = (i == 0) ? 32'hd4bf5d30 : {$urandom};
      prev = col;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
