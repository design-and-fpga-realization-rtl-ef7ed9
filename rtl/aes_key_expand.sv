// aes_key_expand: key expansion unit of the 8-bit AES core.
//
// From one 8-bit session key it derives the 11 round keys k0..k10 used by
// the encryption and decryption cores. Following the AES-128 word
// recurrence w[i] = w[i-1] ^ SubWord(RotWord(w[i-1])) ^ Rcon, reduced to
// one byte: k[r] = k[r-1] ^ S(rotl(k[r-1], 4)) ^ Rcon[r]. The byte-sized
// recurrence is this design's choice; only the existence of an on-chip key
// expansion unit comes from the architecture description.
//
// Timing: a one-cycle pulse on `load` captures `key` as k0 and drops
// `ready`; one round key is produced per clock with a single S-box, so
// `ready` rises 10 cycles after `load` and the keys stay stable until the
// next load. round_keys is indexed by round number.
module aes_key_expand
  import crypto_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        load,
  input  logic [7:0]  key,
  output round_keys_t round_keys,
  output logic        ready
);

  logic [3:0] r_q;          // next round key to produce (1..10)
  logic [7:0] sb_in, sb_out;

  assign sb_in = rotl8(round_keys[r_q - 4'd1], 4);

  aes_sbox #(.INVERSE(1'b0)) u_sbox (.din(sb_in), .dout(sb_out));

  always_ff @(posedge clk) begin
    if (rst) begin
      r_q   <= 4'd1;
      ready <= 1'b0;
      for (int i = 0; i <= AES_ROUNDS; i++) round_keys[i] <= 8'h00;
    end else if (load) begin
      round_keys[0] <= key;
      r_q           <= 4'd1;
      ready         <= 1'b0;
    end else if (!ready) begin
      round_keys[r_q] <= round_keys[r_q - 4'd1] ^ sb_out ^ rcon(32'(r_q));
      if (r_q == 4'(AES_ROUNDS)) ready <= 1'b1;
      else                       r_q   <= r_q + 4'd1;
    end
  end

endmodule
