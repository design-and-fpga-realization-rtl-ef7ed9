// tb_aes_enc: encrypts random and corner bytes under random keys, with the
// round keys supplied by the reference schedule; checks each ciphertext
// and that `done` comes exactly 10 cycles after `start`.
module tb_aes_enc;
  import crypto_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1, start = 0;
  logic [7:0] pt = 0, ct;
  round_keys_t rk;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_enc dut (.clk, .rst, .start, .pt, .round_keys(rk), .ct, .busy, .done);

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
      key = (n < 4) ? 8'h36 : 8'($urandom);
      p   = (n < 4) ? 8'(n * 85) : 8'($urandom);
      for (int r = 0; r <= 10; r++) rk[r] = ref_round_key(key, r);
      @(posedge clk);
      pt <= p; start <= 1;
      @(posedge clk);
      start <= 0;
      cyc = 0;
      do begin @(posedge clk); cyc++; end while (!done && cyc < 50);
      checks += 2;
      // the 10th round clock after the start edge registers the result,
      // which the next edge samples as the 11th
      if (cyc != 11) begin failures++; $display("FAIL latency %0d", cyc); end
      if (ct !== ref_aes_enc(p, key)) begin
        failures++;
        $display("FAIL pt %02h key %02h: ct %02h exp %02h", p, key, ct, ref_aes_enc(p, key));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
