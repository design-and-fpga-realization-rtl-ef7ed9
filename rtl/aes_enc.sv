// aes_enc: 8-bit simplified AES encryption core, iterative, one round per
// clock.
//
// Algorithm (AES-128 structure on a one-byte state): initial Add Round Key
// with k0, then rounds 1..9 of Sub Bytes, Shift Rows, Mix Columns and Add
// Round Key, and a final round 10 without Mix Columns. Sub Bytes is the
// FIPS-197 S-box; the one-byte Shift Rows and Mix Columns are defined in
// crypto_pkg and are this design's choice.
//
// Timing: `start` (one cycle, while idle) loads pt ^ k0; the ten rounds run
// on the next ten clocks, so `done` pulses and `ct` is valid exactly 10
// cycles after `start` (the document's "one 8-bit encryption operation in
// ten clock cycles"). `busy` is high in between. round_keys must be stable
// while busy. `ct` holds its value until the next start.
module aes_enc
  import crypto_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [7:0]  pt,
  input  round_keys_t round_keys,
  output logic [7:0]  ct,
  output logic        busy,
  output logic        done
);

  logic [7:0] state_q, sub, next_state;
  logic [3:0] round_q;

  aes_sbox #(.INVERSE(1'b0)) u_sbox (.din(state_q), .dout(sub));

  always_comb begin
    next_state = shift_rows(sub);
    if (round_q != 4'(AES_ROUNDS)) next_state = mix_columns(next_state);
    next_state = next_state ^ round_keys[round_q];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= 8'h00;
      round_q <= 4'd1;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        state_q <= pt ^ round_keys[0];
        round_q <= 4'd1;
        busy    <= 1'b1;
      end else if (busy) begin
        state_q <= next_state;
        if (round_q == 4'(AES_ROUNDS)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          round_q <= round_q + 4'd1;
        end
      end
    end
  end

  assign ct = state_q;

endmodule
