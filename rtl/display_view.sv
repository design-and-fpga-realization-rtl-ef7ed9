// display_view: chooses what the eight-digit display shows.
//
// Four pages, stepped one at a time by `step` (a debounced push-button
// pulse) and wrapping around: each shows a two-letter label and a byte in
// two hex digits on the four right-hand digits:
//   page 0  "Pt" plaintext        page 2  "Ct" ciphertext
//   page 1  "Ay" key              page 3  "dP" decrypted plaintext
// The key page shows the AES session key after an AES operation and the
// ECC output Q.x after an ECC or hybrid one. The four left-hand digits
// show "8888" (all segments lit) as on the board photographs. The labels
// Pt, Ay, Ct, dP and the order plaintext, key, ciphertext, decrypted are
// the document's; the page layout is this design's choice.
//
// Timing: registered page counter, combinational digit codes.
module display_view
  import crypto_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       step,
  input  logic [7:0] plaintext,
  input  logic [7:0] key,
  input  logic [7:0] ciphertext,
  input  logic [7:0] decrypted,
  output logic [1:0] page,
  output digits_t    digits
);

  logic [7:0] value;
  glyph_e     lab_hi, lab_lo;

  always_ff @(posedge clk) begin
    if (rst)       page <= 2'd0;
    else if (step) page <= page + 2'd1;
  end

  always_comb begin
    unique case (page)
      2'd0: begin lab_hi = GL_P; lab_lo = GL_T; value = plaintext;  end
      2'd1: begin lab_hi = GL_A; lab_lo = GL_Y; value = key;        end
      2'd2: begin lab_hi = GL_C; lab_lo = GL_T; value = ciphertext; end
      default: begin lab_hi = GL_D; lab_lo = GL_P; value = decrypted; end
    endcase
    for (int i = 4; i < 8; i++) digits[i] = GL_HEX8;
    digits[3] = lab_hi;
    digits[2] = lab_lo;
    digits[1] = glyph_e'({1'b0, value[7:4]});
    digits[0] = glyph_e'({1'b0, value[3:0]});
  end

endmodule
