// tb_aes_sbox: streams all 256 bytes through the pipelined S-box, first in
// encryption and then in decryption mode with the mode bit changing every
// cycle, and compares each result, four cycles later, with the reference
// S-box (multiplicative inverse found by search, then the affine map).
module tb_aes_sbox;
  import tb_aes_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic       dec_pre = 0, dec_post;
  logic [7:0] x = 0, y;
  logic [7:0] xin [4];
  logic       din [4];

  aes_sbox dut (.clk(clk), .dec_pre(dec_pre), .x(x), .dec_post(dec_post), .y(y));

  // the caller's mode pipeline: mode of the byte leaving stage 4
  always_ff @(posedge clk) begin
    din[0] <= dec_pre;
    for (int i = 1; i < 4; i++) din[i] <= din[i-1];
  end
  assign dec_post = din[3];

  int checks = 0, failures = 0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fill_tables();
    for (int i = 0; i < 512 + 4; i++) begin
      @(negedge clk);
      if (i >= 4) begin
        logic [7:0] xi;
        logic       di;
        xi = 8'(i - 4);
        di = ((i - 4) >= 256) ? ((i % 2) == 0) : 1'b0;
        checks++;
        if (y !== (di ? isb_t[xi] : sb_t[xi])) begin
          failures++;
          $display("FAIL x=%h dec=%0d y=%h", xi, di, y);
        end
      end
      x       = 8'(i);
      dec_pre = (i >= 256) ? ((i % 2) == 0) : 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
