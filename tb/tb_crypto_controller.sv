// tb_crypto_controller: the controller with the real AES and ECC engines
// and a testbench-driven key source. Checks the three modes in both
// directions against reference models, weak-key skipping, fresh keys with
// rng_enable and key reuse without it, the skipped key expansion for an
// unchanged key (AES latency), and the engine mutual exclusion.
module tb_crypto_controller;
  import crypto_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic start_crypto = 0, enc_not_dec = 1, rng_enable = 1;
  algo_e algo_select = ALGO_AES;
  logic [7:0] plaintext_val = 0;
  logic [7:0] rng_key;
  logic rng_key_avail, rng_pop;
  logic [1:0] rng_key_strength;
  logic ke_load, ke_ready;
  logic [7:0] ke_key;
  round_keys_t rk;
  logic aes_enc_start, aes_dec_start, aes_enc_done, aes_dec_done, aes_enc_busy, aes_dec_busy;
  logic [7:0] aes_din, aes_enc_dout, aes_dec_dout;
  logic ecc_start, ecc_done, ecc_busy, ecc_inf, ecc_ybit;
  logic [7:0] ecc_scalar, ecc_qx, ecc_qy;
  logic [7:0] ciphertext_out, decrypted_out, generated_key, stored_ciphertext, ecc_key_out, last_plaintext;
  logic valid_out, key_valid_out, busy_out, last_enc, key_rejected;
  logic [1:0] key_strength_out;
  algo_e last_algo;
  int checks = 0, failures = 0;
  int n_rejected = 0, n_newkey = 0;

  always #5 clk = ~clk;

  // key source: a queue the test fills; strength from the Hamming weight
  logic [7:0] keyq[$];
  // the source is updated between clock edges
  always @(negedge clk) begin
    rng_key_avail = keyq.size() > 0;
    rng_key = rng_key_avail ? keyq[0] : 8'h00;
  end
  assign rng_key_strength = ($countones(rng_key) inside {[3:5]}) ? 2'd2 :
                            ($countones(rng_key) inside {2, 6}) ? 2'd1 : 2'd0;
  always @(posedge clk) if (rng_pop && keyq.size() > 0) void'(keyq.pop_front());
  always @(posedge clk) begin
    if (!rst && key_rejected) n_rejected++;
    if (!rst && key_valid_out) n_newkey++;
  end

  aes_key_expand u_ke (.clk, .rst, .load(ke_load), .key(ke_key), .round_keys(rk), .ready(ke_ready));
  aes_enc u_enc (.clk, .rst, .start(aes_enc_start), .pt(aes_din), .round_keys(rk),
                 .ct(aes_enc_dout), .busy(aes_enc_busy), .done(aes_enc_done));
  aes_dec u_dec (.clk, .rst, .start(aes_dec_start), .ct(aes_din), .round_keys(rk),
                 .pt(aes_dec_dout), .busy(aes_dec_busy), .done(aes_dec_done));
  ecc_engine u_ecc (.clk, .rst, .start(ecc_start), .scalar(ecc_scalar), .px(ECC_GX), .py(ECC_GY),
                    .qx(ecc_qx), .qy(ecc_qy), .q_inf(ecc_inf), .q_ybit(ecc_ybit),
                    .busy(ecc_busy), .done(ecc_done));

  crypto_controller dut (
    .clk, .rst, .start_crypto, .enc_not_dec, .algo_select, .plaintext_val, .rng_enable,
    .rng_key, .rng_key_avail, .rng_key_strength, .rng_pop,
    .ke_load, .ke_key, .ke_ready,
    .aes_enc_start, .aes_dec_start, .aes_din, .aes_enc_dout, .aes_dec_dout,
    .aes_enc_done, .aes_dec_done, .aes_busy(aes_enc_busy || aes_dec_busy),
    .ecc_start, .ecc_scalar, .ecc_qx, .ecc_done, .ecc_busy,
    .ciphertext_out, .decrypted_out, .valid_out, .generated_key, .key_valid_out,
    .key_strength_out, .busy_out, .stored_ciphertext, .ecc_key_out,
    .last_algo, .last_enc, .last_plaintext, .key_rejected);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one operation; returns the cycles from the start edge to valid_out
  task automatic op(algo_e a, logic enc, logic [7:0] pt, output int cyc);
    @(posedge clk);
    algo_select <= a; enc_not_dec <= enc; plaintext_val <= pt; start_crypto <= 1;
    @(posedge clk);
    start_crypto <= 0;
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!valid_out && cyc < 2000);
    check(cyc < 2000, "operation timed out");
  endtask

  function automatic logic [7:0] ecc_x(logic [7:0] k);
    pt_t g, q;
    g.x = 0; g.y = 2; g.inf = 0;
    q = ref_mul(int'(k), g);
    return 8'(q.x);
  endfunction

  initial begin
    int cyc, cyc_first, cyc_cached;
    logic [7:0] pt, k, exp_ct;
    repeat (3) @(posedge clk);
    rst <= 0;

    // AES, fresh key: two weak bytes are skipped, 0x36 is taken
    keyq = '{8'h01, 8'hfe, 8'h36};
    rng_enable = 1;
    op(ALGO_AES, 1, 8'ha6, cyc_first);
    check(generated_key == 8'h36, $sformatf("key %02h", generated_key));
    check(key_strength_out == 2'd2, "strength");
    check(n_rejected == 2 && n_newkey == 1, $sformatf("rejected %0d new %0d", n_rejected, n_newkey));
    check(ciphertext_out == ref_aes_enc(8'ha6, 8'h36), "AES ct");
    check(stored_ciphertext == ciphertext_out && last_plaintext == 8'ha6, "stored ct / plaintext");
    check(last_algo == ALGO_AES && last_enc, "last op status");
    op(ALGO_AES, 0, 8'h00, cyc);
    check(decrypted_out == 8'ha6, $sformatf("AES decrypt %02h", decrypted_out));

    // AES, key held (rng_enable low): no new key, no key expansion
    rng_enable = 0;
    for (int i = 0; i < 20; i++) begin
      pt = 8'($urandom);
      op(ALGO_AES, 1, pt, cyc_cached);
      check(ciphertext_out == ref_aes_enc(pt, 8'h36), "AES ct (held key)");
      check(cyc_cached == 15, $sformatf("AES latency with held key %0d", cyc_cached));
      op(ALGO_AES, 0, 8'h00, cyc);
      check(decrypted_out == pt, "AES decrypt (held key)");
    end
    check(n_newkey == 1, "key changed while rng_enable low");
    check(cyc_first > cyc_cached + 9, "key expansion not run for a new key");

    // ECC and hybrid with fresh keys
    rng_enable = 1;
    for (int i = 0; i < 12; i++) begin
      algo_e a;
      a = (i % 3 == 0) ? ALGO_ECC : (i % 3 == 1) ? ALGO_HYBRID : ALGO_HYBRID2;
      do k = 8'($urandom); while (!($countones(k) inside {[3:5]}));
      keyq.push_back(k);
      pt = 8'($urandom);
      op(a, 1, pt, cyc);
      check(generated_key == k, "fresh key taken");
      check(ecc_key_out == ecc_x(k), $sformatf("Q.x for k=%02h: %02h exp %02h", k, ecc_key_out, ecc_x(k)));
      exp_ct = (a == ALGO_ECC) ? (pt ^ ecc_x(k)) : ref_aes_enc(pt, ecc_x(k));
      check(ciphertext_out == exp_ct, $sformatf("%s ct %02h exp %02h", a.name(), ciphertext_out, exp_ct));
      op(a, 0, 8'h00, cyc);
      check(decrypted_out == pt, $sformatf("%s decrypt %02h exp %02h", a.name(), decrypted_out, pt));
    end
    check(keyq.size() == 0, "keys left in source");
    $display("AES latency: %0d cycles with a new key, %0d with a held key", cyc_first, cyc_cached);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
