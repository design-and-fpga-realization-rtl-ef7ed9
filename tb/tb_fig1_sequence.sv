// tb_fig1_sequence: replays the kind of simulation run shown for the
// original design: one generated key (0x36, strength grade 2) held with
// rng_enable low while twelve plaintext bytes (a6 5a ff 00 a6 a7 a4 a2 ae
// 0f f0 aa) are encrypted and decrypted, first in AES mode (algo_select 0),
// then in ECC mode (algo_select 1). It checks the ciphertexts against the
// reference models, that every byte decrypts back, that the key and its
// grade never change, that AES takes the held-key latency of 15 clocks from
// the start edge, and that ECC mode masks every byte with one constant
// (x of 0x36*G), so ciphertext XOR plaintext is the same for all twelve.
// Absolute ciphertext values of the original run are not reproduced: they
// depend on byte-level round functions that were never published.
module tb_fig1_sequence;
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
    int cyc;
    logic [7:0] seq[12] = '{8'ha6, 8'h5a, 8'hff, 8'h00, 8'ha6, 8'ha7, 8'ha4, 8'ha2, 8'hae, 8'h0f, 8'hf0, 8'haa};
    logic [7:0] mask;
    repeat (3) @(posedge clk);
    rst <= 0;
    rng_enable = 1;
    keyq = '{8'h36};
    op(ALGO_AES, 1, seq[0], cyc);
    check(generated_key == 8'h36 && key_strength_out == 2'd2, "key 36 with grade 2");
    rng_enable = 0;
    for (int m = 0; m < 2; m++) begin
      algo_e a;
      a = (m == 0) ? ALGO_AES : ALGO_ECC;
      for (int i = 0; i < 12; i++) begin
        op(a, 1, seq[i], cyc);
        if (a == ALGO_AES) begin
          check(ciphertext_out == ref_aes_enc(seq[i], 8'h36), $sformatf("AES ct of %02h", seq[i]));
          if (i > 0) check(cyc == 15, $sformatf("AES latency %0d", cyc));
        end else begin
          if (i == 0) mask = ciphertext_out ^ seq[i];
          check(ciphertext_out == (seq[i] ^ ecc_x(8'h36)), $sformatf("ECC ct of %02h", seq[i]));
          check((ciphertext_out ^ seq[i]) == mask, "ECC mask not constant");
        end
        check(stored_ciphertext == ciphertext_out, "stored ciphertext");
        $display("algo %0d pt %02h -> ct %02h (%0d clocks)", m, seq[i], ciphertext_out, cyc);
        op(a, 0, 8'h00, cyc);
        check(decrypted_out == seq[i], $sformatf("decrypt of %02h gave %02h", seq[i], decrypted_out));
        check(generated_key == 8'h36 && key_strength_out == 2'd2, "key changed");
      end
    end
    check(n_newkey == 1, $sformatf("%0d keys taken", n_newkey));
    $display("ECC mask for key 36: %02h", mask);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
