// hybrid_crypto_top: hybrid AES + ECC encryption core with an on-chip
// random key generator, for a Nexys A7 (Artix-7) class FPGA board.
//
// Blocks: hybrid_rng (ring oscillator -> LFSR -> Von Neumann -> ChaCha
// mixer -> FIFO) supplies key bytes; key_strength grades the head byte;
// crypto_controller takes a balanced key, then runs aes_key_expand +
// aes_enc/aes_dec, ecc_engine, or ECC followed by AES, depending on
// algo_select; display_view and sevenseg_driver show plaintext, key,
// ciphertext and decrypted byte on the eight-digit display, one page per
// press of btn_step (debounced); the 16 LEDs show status.
//
// The ring oscillator (ring_osc) is a behavioural model; everything else
// is synthesizable. Control and result ports carry the names of the
// document's simulation signals. LEDs: all 16 light after an AES
// encryption completes (as the document shows on the board); otherwise
// led[15] busy, led[14] AES busy, led[13] ECC busy, led[12] key bytes
// available, led[11:10] key strength, led[9:8] mode of the last operation,
// led[7:0] the stored ciphertext. That LED assignment is this design's
// choice.
//
// Timing: 100 MHz clock, synchronous active-high reset. An operation
// starts on a rising edge of start_crypto and ends with a valid_out pulse.
module hybrid_crypto_top
  import crypto_pkg::*;
#(
  parameter int unsigned DEBOUNCE_CYCLES = 1_000_000,
  parameter int unsigned REFRESH_BITS    = 17,
  parameter int unsigned FIFO_DEPTH      = 4,
  parameter int unsigned RO_STAGES       = 5
) (
  input  logic       clk,
  input  logic       rst,
  // operator controls (slide switches and buttons)
  input  logic       rng_enable,
  input  logic [7:0] plaintext_val,
  input  logic [1:0] algo_select,
  input  logic       enc_not_dec,
  input  logic       start_crypto,
  input  logic       btn_step,
  // results
  output logic [7:0] ciphertext_out,
  output logic [7:0] decrypted_out,
  output logic       valid_out,
  output logic [7:0] generated_key,
  output logic       key_valid_out,
  output logic [1:0] key_strength_out,
  output logic       busy_out,
  output logic [7:0] stored_ciphertext,
  // board display and LEDs
  output logic [6:0] seg,
  output logic       dp,
  output logic [7:0] an,
  output logic [15:0] led
);

  localparam int unsigned RO_TAP_STEP = 2;
  localparam int unsigned RO_NTAPS    = (RO_STAGES + RO_TAP_STEP - 1) / RO_TAP_STEP;

  // ---------------- random key generation ----------------
  logic [RO_NTAPS-1:0] ro_taps;
  logic [7:0] rng_key;
  logic       rng_key_avail, rng_pop, rng_byte_valid, rng_overflow;
  logic [1:0] rng_strength;
  logic       rng_balanced;
  logic [3:0] rng_weight;

  ring_osc #(.STAGES(RO_STAGES), .TAP_STEP(RO_TAP_STEP)) u_ro (
    .enable(!rst), .taps(ro_taps));

  hybrid_rng #(.NTAPS(RO_NTAPS), .FIFO_DEPTH(FIFO_DEPTH)) u_rng (
    .clk, .rst, .ro_taps, .pop(rng_pop), .key_out(rng_key),
    .key_avail(rng_key_avail), .byte_valid(rng_byte_valid), .overflow(rng_overflow));

  key_strength #(.WIDTH(8)) u_kstr (
    .key(rng_key), .strength(rng_strength), .balanced(rng_balanced), .weight(rng_weight));

  // ---------------- cipher engines ----------------
  round_keys_t round_keys;
  logic       ke_load, ke_ready;
  logic [7:0] ke_key;
  logic       aes_enc_start, aes_dec_start, aes_enc_done, aes_dec_done;
  logic       aes_enc_busy, aes_dec_busy;
  logic [7:0] aes_din, aes_enc_dout, aes_dec_dout;
  logic       ecc_start, ecc_done, ecc_busy, ecc_inf, ecc_ybit;
  logic [7:0] ecc_scalar, ecc_qx, ecc_qy;

  aes_key_expand u_kexp (
    .clk, .rst, .load(ke_load), .key(ke_key), .round_keys, .ready(ke_ready));

  aes_enc u_aes_enc (
    .clk, .rst, .start(aes_enc_start), .pt(aes_din), .round_keys,
    .ct(aes_enc_dout), .busy(aes_enc_busy), .done(aes_enc_done));

  aes_dec u_aes_dec (
    .clk, .rst, .start(aes_dec_start), .ct(aes_din), .round_keys,
    .pt(aes_dec_dout), .busy(aes_dec_busy), .done(aes_dec_done));

  ecc_engine u_ecc (
    .clk, .rst, .start(ecc_start), .scalar(ecc_scalar), .px(ECC_GX), .py(ECC_GY),
    .qx(ecc_qx), .qy(ecc_qy), .q_inf(ecc_inf), .q_ybit(ecc_ybit),
    .busy(ecc_busy), .done(ecc_done));

  // ---------------- control ----------------
  logic [7:0] ecc_key_out;
  algo_e      last_algo;
  logic       last_enc, key_rejected;
  logic [7:0] last_pt;

  crypto_controller u_ctrl (
    .clk, .rst,
    .start_crypto, .enc_not_dec, .algo_select(algo_e'(algo_select)),
    .plaintext_val, .rng_enable,
    .rng_key, .rng_key_avail, .rng_key_strength(rng_strength), .rng_pop,
    .ke_load, .ke_key, .ke_ready,
    .aes_enc_start, .aes_dec_start, .aes_din, .aes_enc_dout, .aes_dec_dout,
    .aes_enc_done, .aes_dec_done, .aes_busy(aes_enc_busy || aes_dec_busy),
    .ecc_start, .ecc_scalar, .ecc_qx, .ecc_done, .ecc_busy,
    .ciphertext_out, .decrypted_out, .valid_out, .generated_key,
    .key_valid_out, .key_strength_out, .busy_out, .stored_ciphertext,
    .ecc_key_out, .last_algo, .last_enc, .last_plaintext(last_pt), .key_rejected);

  // ---------------- display and LEDs ----------------
  logic       step_level, step_press;
  logic [1:0] page;
  logic [2:0] digit_sel;
  digits_t    digits;
  logic [7:0] shown_key;
  logic       aes_enc_complete;

  button_debounce #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_btn (
    .clk, .rst, .btn_raw(btn_step), .level(step_level), .press(step_press));

  always_ff @(posedge clk) begin
    if (rst) begin
      aes_enc_complete <= 1'b0;
    end else begin
      if (valid_out)
        aes_enc_complete <= last_enc && (last_algo == ALGO_AES);
      else if (busy_out)
        aes_enc_complete <= 1'b0;
    end
  end

  assign shown_key = (last_algo == ALGO_AES) ? generated_key : ecc_key_out;

  display_view u_view (
    .clk, .rst, .step(step_press), .plaintext(last_pt), .key(shown_key),
    .ciphertext(stored_ciphertext), .decrypted(decrypted_out), .page, .digits);

  sevenseg_driver #(.REFRESH_BITS(REFRESH_BITS)) u_7seg (
    .clk, .rst, .digits, .seg, .dp, .an, .digit_sel);

  assign led = aes_enc_complete ? 16'hffff
             : {busy_out, aes_enc_busy || aes_dec_busy, ecc_busy, rng_key_avail,
                key_strength_out, last_algo, stored_ciphertext};

endmodule
