// tb_aes_dec: decrypts reference ciphertexts of random bytes under random
// keys; checks the recovered plaintext and the 10-cycle latency.
module tb_aes_dec;
  import crypto_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1, start = 0;
  logic [7:0] ct = 0, pt;
  round_keys_t rk;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_dec dut (.clk, .rst, .start, .ct, .round_keys(rk), .pt, .busy, .done);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    logic [7:0] key, p;
    for (int r = 0; r <= 10; r++) rk[r] = 8'h00;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 200; n++) begin
      key = 8'($urandom);
      p   = 8'($urandom);
      for (int r = 0; r <= 10; r++) rk[r] = ref_round_key(key, r);
      @(posedge clk);
      ct <= ref_aes_enc(p, key); start <= 1;
      @(posedge clk);
      start <= 0;
      cyc = 0;
      do begin @(posedge clk); cyc++; end while (!done && cyc < 50);
      checks += 2;
      // the 10th round clock after the start edge registers the result,
      // which the next edge samples as the 11th
      if (cyc != 11) begin failures++; $display("FAIL latency %0d", cyc); end
      if (pt !== p) begin
        failures++;
        $display("FAIL key %02h: pt %02h exp %02h", key, pt, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
