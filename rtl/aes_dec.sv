// aes_dec: 8-bit simplified AES decryption core (inverse cipher),
// iterative, one round per clock.
//
// Algorithm: state = ct ^ k10, then for r = 9..0: Inverse Shift Rows,
// Inverse Sub Bytes, Add Round Key k[r], and Inverse Mix Columns for
// r >= 1. This undoes aes_enc exactly. The round keys come from the same
// key expansion unit and are read in reverse order.
//
// Timing: like aes_enc, `done` pulses and `pt` is valid 10 cycles after
// `start`; `busy` is high in between and `pt` holds until the next start.
module aes_dec
  import crypto_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [7:0]  ct,
  input  round_keys_t round_keys,
  output logic [7:0]  pt,
  output logic        busy,
  output logic        done
);

  logic [7:0] state_q, isub, next_state;
  logic [3:0] round_q;        // round key index applied next (9..0)

  aes_sbox #(.INVERSE(1'b1)) u_isbox (.din(shift_rows(state_q)), .dout(isub));

  always_comb begin
    next_state = isub ^ round_keys[round_q];
    if (round_q != 4'd0) next_state = inv_mix_columns(next_state);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= 8'h00;
      round_q <= 4'd9;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        state_q <= ct ^ round_keys[AES_ROUNDS];
        round_q <= 4'(AES_ROUNDS - 1);
        busy    <= 1'b1;
      end else if (busy) begin
        state_q <= next_state;
        if (round_q == 4'd0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          round_q <= round_q - 4'd1;
        end
      end
    end
  end

  assign pt = state_q;

endmodule
