// crypto_controller: unified finite state machine that arbitrates between
// the AES engine, the ECC engine and the random number generator.
//
// Operation (one per rising edge of start_crypto while idle):
//   encrypt (enc_not_dec = 1) takes plaintext_val; decrypt takes the
//   stored ciphertext of the last encryption.
//   Session key: an encryption takes a fresh key byte from the generator
//   when rng_enable is set (or when no key is held yet); otherwise, and for
//   every decryption, the held key is reused. Key bytes whose strength
//   grade is not "balanced" (key_strength) are discarded and the next
//   byte is taken.
//   ALGO_AES    : AES with the session key.
//   ALGO_ECC    : Q = k*G with k = session key; result = input ^ Q.x.
//   ALGO_HYBRID : Q = k*G; Q.x is the AES key (ECC secures the key, AES
//                 the data).
// The AES round keys are expanded again only when the AES key changes.
// Only one engine is started at a time, so the two never run together.
// The mode field, the fresh on-chip key and the routing of plaintext, key
// and scalar to the engines follow the document; the use of Q.x as mask
// or AES key, the key-reuse rule and the weak-key skipping are this
// design's reading of it.
//
// Timing: busy_out is high from the accepted start to the clock after the
// result is registered; valid_out pulses for one clock with the result in
// ciphertext_out/stored_ciphertext (encrypt) or decrypted_out (decrypt).
// key_valid_out pulses when a new session key is taken. An AES operation
// with an unchanged key registers valid_out 14 clocks after the edge that
// samples start_crypto: dispatch, AES start, 10 rounds, result capture and
// output. A new key adds the key fetch and the 10-clock key expansion; ECC
// adds the point multiplication (31 to 206 clocks, depending on k).
module crypto_controller
  import crypto_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  // operator controls
  input  logic       start_crypto,
  input  logic       enc_not_dec,
  input  algo_e      algo_select,
  input  logic [7:0] plaintext_val,
  input  logic       rng_enable,
  // random key source (FIFO head with its strength grade)
  input  logic [7:0] rng_key,
  input  logic       rng_key_avail,
  input  logic [1:0] rng_key_strength,
  output logic       rng_pop,
  // AES key expansion and cores
  output logic       ke_load,
  output logic [7:0] ke_key,
  input  logic       ke_ready,
  output logic       aes_enc_start,
  output logic       aes_dec_start,
  output logic [7:0] aes_din,
  input  logic [7:0] aes_enc_dout,
  input  logic [7:0] aes_dec_dout,
  input  logic       aes_enc_done,
  input  logic       aes_dec_done,
  input  logic       aes_busy,
  // ECC engine
  output logic       ecc_start,
  output logic [7:0] ecc_scalar,
  input  logic [7:0] ecc_qx,
  input  logic       ecc_done,
  input  logic       ecc_busy,
  // results and status
  output logic [7:0] ciphertext_out,
  output logic [7:0] decrypted_out,
  output logic       valid_out,
  output logic [7:0] generated_key,
  output logic       key_valid_out,
  output logic [1:0] key_strength_out,
  output logic       busy_out,
  output logic [7:0] stored_ciphertext,
  output logic [7:0] ecc_key_out,      // last Q.x (mask or derived AES key)
  output algo_e      last_algo,        // mode of the last finished operation
  output logic       last_enc,         // direction of the last finished operation
  output logic [7:0] last_plaintext,   // plaintext of the last encryption
  output logic       key_rejected      // pulse: a weak key byte was skipped
);

  typedef enum logic [3:0] {
    S_IDLE, S_KEY, S_DISPATCH, S_ECC_GO, S_ECC_WAIT, S_KLOAD, S_KWAIT,
    S_AES_GO, S_AES_WAIT, S_DONE
  } state_e;

  state_e     state_q;
  logic       start_q;
  algo_e      algo_q;
  logic       enc_q;
  logic [7:0] din_q, result_q, aes_key_q, rk_key_q;
  logic       have_key_q, rk_valid_q;

  wire start_edge = start_crypto && !start_q;
  wire is_ecc     = (algo_q == ALGO_ECC);
  wire is_aes     = (algo_q == ALGO_AES);

  assign rng_pop       = (state_q == S_KEY) && rng_key_avail;
  assign ke_load       = (state_q == S_KLOAD);
  assign ke_key        = aes_key_q;
  assign aes_enc_start = (state_q == S_AES_GO) && enc_q;
  assign aes_dec_start = (state_q == S_AES_GO) && !enc_q;
  assign aes_din       = din_q;
  assign ecc_start     = (state_q == S_ECC_GO);
  assign ecc_scalar    = generated_key;
  assign busy_out      = (state_q != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q           <= S_IDLE;
      start_q           <= 1'b0;
      algo_q            <= ALGO_AES;
      enc_q             <= 1'b1;
      din_q             <= '0;
      result_q          <= '0;
      aes_key_q         <= '0;
      rk_key_q          <= '0;
      rk_valid_q        <= 1'b0;
      have_key_q        <= 1'b0;
      ciphertext_out    <= '0;
      decrypted_out     <= '0;
      stored_ciphertext <= '0;
      generated_key     <= '0;
      key_strength_out  <= '0;
      ecc_key_out       <= '0;
      valid_out         <= 1'b0;
      key_valid_out     <= 1'b0;
      key_rejected      <= 1'b0;
      last_algo         <= ALGO_AES;
      last_enc          <= 1'b1;
      last_plaintext    <= '0;
    end else begin
      start_q       <= start_crypto;
      valid_out     <= 1'b0;
      key_valid_out <= 1'b0;
      key_rejected  <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start_edge) begin
          algo_q  <= algo_select;
          enc_q   <= enc_not_dec;
          din_q   <= enc_not_dec ? plaintext_val : stored_ciphertext;
          state_q <= (enc_not_dec && (rng_enable || !have_key_q)) ? S_KEY : S_DISPATCH;
        end
        S_KEY: if (rng_key_avail) begin
          if (rng_key_strength == 2'd2) begin
            generated_key    <= rng_key;
            key_strength_out <= rng_key_strength;
            have_key_q       <= 1'b1;
            key_valid_out    <= 1'b1;
            state_q          <= S_DISPATCH;
          end else begin
            key_rejected <= 1'b1;
          end
        end
        S_DISPATCH: begin
          if (is_aes) begin
            aes_key_q <= generated_key;
            state_q   <= (rk_valid_q && rk_key_q == generated_key) ? S_AES_GO : S_KLOAD;
          end else begin
            state_q <= S_ECC_GO;
          end
        end
        S_ECC_GO: state_q <= S_ECC_WAIT;
        S_ECC_WAIT: if (ecc_done) begin
          ecc_key_out <= ecc_qx;
          if (is_ecc) begin
            result_q <= din_q ^ ecc_qx;
            state_q  <= S_DONE;
          end else begin
            aes_key_q <= ecc_qx;
            state_q   <= (rk_valid_q && rk_key_q == ecc_qx) ? S_AES_GO : S_KLOAD;
          end
        end
        S_KLOAD: begin
          rk_key_q   <= aes_key_q;
          rk_valid_q <= 1'b1;
          state_q    <= S_KWAIT;
        end
        S_KWAIT:  if (ke_ready) state_q <= S_AES_GO;
        S_AES_GO: state_q <= S_AES_WAIT;
        S_AES_WAIT: begin
          if (enc_q && aes_enc_done) begin
            result_q <= aes_enc_dout;
            state_q  <= S_DONE;
          end else if (!enc_q && aes_dec_done) begin
            result_q <= aes_dec_dout;
            state_q  <= S_DONE;
          end
        end
        S_DONE: begin
          if (enc_q) begin
            ciphertext_out    <= result_q;
            stored_ciphertext <= result_q;
            last_plaintext    <= din_q;
          end else begin
            decrypted_out <= result_q;
          end
          last_algo <= algo_q;
          last_enc  <= enc_q;
          valid_out <= 1'b1;
          state_q   <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // mutual exclusion of the two cipher engines
  a_excl_aes: assert property (@(posedge clk) disable iff (rst)
    (aes_enc_start || aes_dec_start) |-> !ecc_busy && !ecc_start);
  a_excl_ecc: assert property (@(posedge clk) disable iff (rst)
    ecc_start |-> !aes_busy);
  a_not_both: assert property (@(posedge clk) disable iff (rst)
    !(aes_busy && ecc_busy));

endmodule
