// tb_display_view: steps through the four pages and checks the label
// glyphs, the two hex digits and the lamp-test digits of each.
module tb_display_view;
  import crypto_pkg::*;
  logic clk = 0, rst = 1, step = 0;
  logic [7:0] plaintext = 8'h65, key = 8'h22, ciphertext = 8'h7f, decrypted = 8'h65;
  logic [1:0] page;
  digits_t digits;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  display_view dut (.clk, .rst, .step, .plaintext, .key, .ciphertext, .decrypted, .page, .digits);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    glyph_e exp_hi[4] = '{GL_P, GL_A, GL_C, GL_D};
    glyph_e exp_lo[4] = '{GL_T, GL_Y, GL_T, GL_P};
    logic [7:0] val[4];
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int round = 0; round < 3; round++) begin
      for (int p = 0; p < 4; p++) begin
        plaintext = 8'($urandom); key = 8'($urandom); ciphertext = 8'($urandom); decrypted = 8'($urandom);
        val = '{plaintext, key, ciphertext, decrypted};
        #1;
        check(page == 2'(p), $sformatf("page %0d exp %0d", page, p));
        check(digits[3] == exp_hi[p] && digits[2] == exp_lo[p], $sformatf("label page %0d", p));
        check(digits[1] == glyph_e'({1'b0, val[p][7:4]}) && digits[0] == glyph_e'({1'b0, val[p][3:0]}),
              $sformatf("value page %0d", p));
        check(digits[7] == GL_HEX8 && digits[4] == GL_HEX8, "left digits");
        @(posedge clk); step <= 1; @(posedge clk); step <= 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
