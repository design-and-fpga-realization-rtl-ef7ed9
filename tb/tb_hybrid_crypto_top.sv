// tb_hybrid_crypto_top: end-to-end test of the whole design at its default
// parameters (100 MHz clock, 10 ms button debounce, 763 Hz display
// refresh), with the behavioural ring oscillator as entropy source.
//
// It runs encrypt/decrypt pairs in every mode with and without fresh keys,
// checks each ciphertext against the reference models using the key the
// design reports, checks every decryption, the LEDs, and reads the
// seven-segment display (page 0, then page 1 after a button press). It
// counts how often each mechanism happened (mode switches, fresh and held
// keys, weak-key skips, FIFO overflow, skipped key expansion, page step)
// and fails any that never did.
module tb_hybrid_crypto_top;
  import crypto_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic rng_enable = 1, enc_not_dec = 1, start_crypto = 0, btn_step = 0;
  logic [7:0] plaintext_val = 0;
  logic [1:0] algo_select = 0;
  logic [7:0] ciphertext_out, decrypted_out, generated_key, stored_ciphertext;
  logic valid_out, key_valid_out, busy_out, dp;
  logic [1:0] key_strength_out;
  logic [6:0] seg;
  logic [7:0] an;
  logic [15:0] led;
  int checks = 0, failures = 0;

  always #5000 clk = ~clk;   // 100 MHz with 1 ps time units

  hybrid_crypto_top dut (
    .clk, .rst, .rng_enable, .plaintext_val, .algo_select, .enc_not_dec,
    .start_crypto, .btn_step, .ciphertext_out, .decrypted_out, .valid_out,
    .generated_key, .key_valid_out, .key_strength_out, .busy_out,
    .stored_ciphertext, .seg, .dp, .an, .led);

  // mechanism counters
  int n_mode[4], n_fresh, n_held, n_reject, n_overflow, n_kexp, n_kskip, n_page, n_allled;
  always @(posedge clk) if (!rst) begin
    if (dut.u_ctrl.key_rejected) n_reject++;
    if (dut.u_rng.overflow) n_overflow++;
    if (dut.ke_load) n_kexp++;
    if (dut.step_press) n_page++;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] ecc_x(logic [7:0] k);
    pt_t g, q;
    g.x = 0; g.y = 2; g.inf = 0;
    q = ref_mul(int'(k), g);
    return 8'(q.x);
  endfunction

  task automatic op(logic [1:0] a, logic enc, logic [7:0] pt, output bit new_key);
    int cyc = 0;
    new_key = 0;
    @(posedge clk);
    algo_select <= a; enc_not_dec <= enc; plaintext_val <= pt; start_crypto <= 1;
    @(posedge clk);
    start_crypto <= 0;
    do begin
      @(posedge clk); cyc++;
      if (key_valid_out) new_key = 1;
    end while (!valid_out && cyc < 5000);
    check(cyc < 5000, "operation timed out");
    @(posedge clk);
  endtask

  // segment pattern {g..a} a glyph must light (written out independently)
  function automatic logic [6:0] pat_of(glyph_e ge);
    case (ge)
      GL_HEX0: return 7'h3f; GL_HEX1: return 7'h06; GL_HEX2: return 7'h5b; GL_HEX3: return 7'h4f;
      GL_HEX4: return 7'h66; GL_HEX5: return 7'h6d; GL_HEX6: return 7'h7d; GL_HEX7: return 7'h07;
      GL_HEX8: return 7'h7f; GL_HEX9: return 7'h6f; GL_HEXA: return 7'h77; GL_HEXB: return 7'h7c;
      GL_HEXC: return 7'h39; GL_HEXD: return 7'h5e; GL_HEXE: return 7'h79; GL_HEXF: return 7'h71;
      GL_P: return 7'h73; GL_T: return 7'h78; GL_C: return 7'h39; GL_D: return 7'h5e;
      GL_A: return 7'h77; GL_Y: return 7'h6e;
      default: return 7'h00;
    endcase
  endfunction

  function automatic bit shows(logic [6:0] seg_n, glyph_e ge);
    return ~seg_n == pat_of(ge);
  endfunction

  // watch one full display frame and return the glyphs of digits 3..0
  task automatic read_display(output logic [6:0] raw [8]);
    int seen = 0;
    while (seen != 8'hff) begin
      @(posedge clk); #1;
      for (int i = 0; i < 8; i++) if (an == ~(8'h01 << i)) begin raw[i] = seg; seen |= 1 << i; end
    end
  endtask

  initial begin
    bit nk;
    logic [7:0] pt, k, exp_ct, shown;
    logic [1:0] a;
    logic [6:0] raw [8];
    n_fresh = 0; n_held = 0; n_reject = 0; n_overflow = 0; n_kexp = 0; n_kskip = 0;
    n_page = 0; n_allled = 0;
    for (int i = 0; i < 4; i++) n_mode[i] = 0;
    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (200) @(posedge clk);

    for (int n = 0; n < 48; n++) begin
      int kexp_before;
      // pairs 8m+4 and 8m+5 are AES; the second reuses the held key
      a = (n % 8 == 5) ? 2'd0 : 2'(n % 4);
      rng_enable = (n % 8 != 5) && (n % 7 != 6);
      pt = 8'($urandom);
      kexp_before = n_kexp;
      op(a, 1'b1, pt, nk);
      k = generated_key;
      if (nk) n_fresh++; else n_held++;
      if (n > 0) check(nk == rng_enable, $sformatf("fresh key %0b with rng_enable %0b", nk, rng_enable));
      check(key_strength_out == 2'd2, "session key not balanced");
      check($countones(k) >= 3 && $countones(k) <= 5, $sformatf("key %02h outside 35..65%%", k));
      exp_ct = (a == 2'd0) ? ref_aes_enc(pt, k)
             : (a == 2'd1) ? (pt ^ ecc_x(k)) : ref_aes_enc(pt, ecc_x(k));
      check(ciphertext_out == exp_ct && stored_ciphertext == exp_ct,
            $sformatf("mode %0d pt %02h key %02h: ct %02h exp %02h", a, pt, k, ciphertext_out, exp_ct));
      if (a == 2'd0) begin
        check(led == 16'hffff, "LEDs not all lit after AES encryption");
        if (led == 16'hffff) n_allled++;
      end else begin
        check(led[7:0] == stored_ciphertext && led[9:8] == a, $sformatf("LED status %04h", led));
      end
      if (a == 2'd0 && !nk && n_kexp == kexp_before) n_kskip++;
      op(a, 1'b0, 8'h00, nk);
      check(!nk, "decryption took a new key");
      check(decrypted_out == pt, $sformatf("mode %0d decrypt %02h exp %02h", a, decrypted_out, pt));
      n_mode[a]++;
    end

    // display, page 0: "Pt" and the last plaintext
    read_display(raw);
    check(shows(raw[3], GL_P) && shows(raw[2], GL_T), "page 0 label");
    check(shows(raw[1], glyph_e'({1'b0, pt[7:4]})) && shows(raw[0], glyph_e'({1'b0, pt[3:0]})),
          "page 0 value");
    check(shows(raw[7], GL_HEX8) && shows(raw[4], GL_HEX8), "lamp-test digits");
    // press the step button with contact bounce; hold it past the debounce time
    for (int i = 0; i < 5; i++) begin btn_step <= ~btn_step; repeat (500) @(posedge clk); end
    btn_step <= 1;
    repeat (1_000_100) @(posedge clk);
    btn_step <= 0;
    read_display(raw);
    shown = (a == 2'd0) ? k : ecc_x(k);
    check(shows(raw[3], GL_A) && shows(raw[2], GL_Y), "page 1 label");
    check(shows(raw[1], glyph_e'({1'b0, shown[7:4]})) && shows(raw[0], glyph_e'({1'b0, shown[3:0]})),
          "page 1 value");

    $display("modes AES %0d ECC %0d hybrid %0d hybrid(code 3) %0d; fresh keys %0d, held %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_fresh, n_held);
    $display("weak keys skipped %0d, FIFO overflows %0d, key expansions %0d, skipped %0d, LED all-on %0d, page steps %0d",
             n_reject, n_overflow, n_kexp, n_kskip, n_allled, n_page);
    check(n_mode[0] > 0 && n_mode[1] > 0 && n_mode[2] > 0 && n_mode[3] > 0, "a mode never ran");
    check(n_fresh > 0, "no fresh key");
    check(n_held > 0, "no held key");
    check(n_reject > 0, "no weak key skipped");
    check(n_overflow > 0, "no FIFO overflow");
    check(n_kskip > 0, "key expansion never skipped");
    check(n_allled > 0, "LEDs never all lit");
    check(n_page == 1, $sformatf("page steps %0d", n_page));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
