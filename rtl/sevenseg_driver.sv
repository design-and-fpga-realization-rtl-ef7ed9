// sevenseg_driver: time-multiplexed driver for an eight-digit common-anode
// seven-segment display (as on the Nexys A7 board).
//
// A free-running refresh counter selects one digit at a time; that digit's
// anode is driven low and its glyph decoded onto the cathodes. With the
// default REFRESH_BITS = 17 at 100 MHz each digit is lit for 2^14 clocks
// (164 us) and the whole display is redrawn 763 times a second, well above
// visible flicker. Outputs are registered and active low: seg[0..6] are
// segments a..g, dp is kept dark. The multiplexing of up to eight hex
// digits is the document's; refresh rate and glyph shapes are this
// design's choice.
module sevenseg_driver
  import crypto_pkg::*;
#(
  parameter int unsigned REFRESH_BITS = 17
) (
  input  logic       clk,
  input  logic       rst,
  input  digits_t    digits,
  output logic [6:0] seg,     // active low, seg[0] = a ... seg[6] = g
  output logic       dp,      // active low
  output logic [7:0] an,      // active low, an[0] = rightmost digit
  output logic [2:0] digit_sel
);

  logic [REFRESH_BITS-1:0] cnt;

  // segment pattern {g,f,e,d,c,b,a}, 1 = lit
  function automatic logic [6:0] decode(glyph_e g);
    unique case (g)
      GL_HEX0: return 7'h3f;  GL_HEX1: return 7'h06;  GL_HEX2: return 7'h5b;
      GL_HEX3: return 7'h4f;  GL_HEX4: return 7'h66;  GL_HEX5: return 7'h6d;
      GL_HEX6: return 7'h7d;  GL_HEX7: return 7'h07;  GL_HEX8: return 7'h7f;
      GL_HEX9: return 7'h6f;  GL_HEXA: return 7'h77;  GL_HEXB: return 7'h7c;
      GL_HEXC: return 7'h39;  GL_HEXD: return 7'h5e;  GL_HEXE: return 7'h79;
      GL_HEXF: return 7'h71;
      GL_P:  return 7'h73;
      GL_T:  return 7'h78;
      GL_C:  return 7'h39;
      GL_D:  return 7'h5e;
      GL_A:  return 7'h77;
      GL_Y:  return 7'h6e;
      default: return 7'h00;
    endcase
  endfunction

  assign digit_sel = cnt[REFRESH_BITS-1 -: 3];

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      seg <= 7'h7f;
      dp  <= 1'b1;
      an  <= 8'hff;
    end else begin
      cnt <= cnt + 1'b1;
      seg <= ~decode(digits[digit_sel]);
      dp  <= 1'b1;
      an  <= ~(8'h01 << digit_sel);
    end
  end

endmodule
