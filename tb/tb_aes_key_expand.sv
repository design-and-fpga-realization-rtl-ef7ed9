// tb_aes_key_expand: loads keys, checks `ready` rises exactly 10 cycles
// after `load` and all 11 round keys against the reference schedule.
module tb_aes_key_expand;
  import crypto_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1, load = 0;
  logic [7:0] key = 0;
  round_keys_t rk;
  logic ready;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_key_expand dut (.clk, .rst, .load, .key, .round_keys(rk), .ready);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    logic [7:0] keys [6] = '{8'h36, 8'h00, 8'hff, 8'h5a, 8'ha6, 8'h01};
    repeat (3) @(posedge clk);
    rst <= 0;
    foreach (keys[n]) begin
      @(posedge clk);
      key <= keys[n]; load <= 1;
      @(posedge clk);
      load <= 0;
      cyc = 0;
      do begin @(posedge clk); cyc++; end while (!ready && cyc < 50);
      checks++;
      // the 10th round clock after the start edge registers the result,
      // which the next edge samples as the 11th
      if (cyc != 11) begin failures++; $display("FAIL latency %0d", cyc); end
      for (int r = 0; r <= 10; r++) begin
        checks++;
        if (rk[r] !== ref_round_key(keys[n], r)) begin
          failures++;
          $display("FAIL key %02h round %0d: got %02h exp %02h", keys[n], r, rk[r], ref_round_key(keys[n], r));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
