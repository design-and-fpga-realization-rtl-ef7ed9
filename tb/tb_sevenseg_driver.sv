// tb_sevenseg_driver: with a short refresh counter, checks that exactly one
// anode is active at a time, that each digit is visited for the same time
// in order, and that the cathodes carry the segment pattern of that
// digit's glyph (patterns written out by segment letters here).
module tb_sevenseg_driver;
  import crypto_pkg::*;
  logic clk = 0, rst = 1;
  digits_t digits;
  logic [6:0] seg;
  logic dp;
  logic [7:0] an;
  logic [2:0] digit_sel;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sevenseg_driver #(.REFRESH_BITS(6)) dut (.clk, .rst, .digits, .seg, .dp, .an, .digit_sel);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  // lit segments as a string of letters a..g
  function automatic string segs_of(glyph_e g);
    case (g)
      GL_HEX0: return "abcdef";  GL_HEX1: return "bc";      GL_HEX2: return "abdeg";
      GL_HEX3: return "abcdg";   GL_HEX4: return "bcfg";    GL_HEX5: return "acdfg";
      GL_HEX6: return "acdefg";  GL_HEX7: return "abc";     GL_HEX8: return "abcdefg";
      GL_HEX9: return "abcdfg";  GL_HEXA: return "abcefg";  GL_HEXB: return "cdefg";
      GL_HEXC: return "adef";    GL_HEXD: return "bcdeg";   GL_HEXE: return "adefg";
      GL_HEXF: return "aefg";
      GL_P: return "abefg";   GL_T: return "defg";    GL_C: return "adef";
      GL_D: return "bcdeg";   GL_A: return "abcefg";  GL_Y: return "bcdfg";
      default: return "";
    endcase
  endfunction

  function automatic logic [6:0] lit_of(string s);
    logic [6:0] m = '0;
    for (int i = 0; i < s.len(); i++) m[s[i] - "a"] = 1'b1;
    return m;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dwell [8];
    int prev;
    glyph_e pool[22];
    for (int i = 0; i < 16; i++) pool[i] = glyph_e'(i);
    pool[16] = GL_P; pool[17] = GL_T; pool[18] = GL_C;
    pool[19] = GL_D; pool[20] = GL_A; pool[21] = GL_Y;
    for (int i = 0; i < 8; i++) begin digits[i] = pool[i]; dwell[i] = 0; end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    prev = -1;
    for (int cyc = 0; cyc < 64 * 44; cyc++) begin
      int d;
      @(posedge clk); #1;
      if (cyc % 64 == 0)
        for (int i = 0; i < 8; i++) digits[i] = pool[$urandom_range(21)];
      check($countones(~an) == 1, $sformatf("anodes %08b", an));
      d = 0;
      for (int i = 0; i < 8; i++) if (!an[i]) d = i;
      if (cyc > 64 && cyc % 64 > 9) begin
        // outputs registered one clock after the digit code is read
        check(~seg == lit_of(segs_of(digits[d])), $sformatf("digit %0d seg %07b", d, seg));
        check(dp == 1'b1, "dp lit");
      end
      if (prev >= 0 && d != prev) check(d == (prev + 1) % 8, $sformatf("order %0d -> %0d", prev, d));
      dwell[d]++;
      prev = d;
    end
    for (int i = 0; i < 8; i++) check(dwell[i] >= 8 * 43 && dwell[i] <= 8 * 45, $sformatf("dwell %0d: %0d", i, dwell[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
