// tb_aes_sbox: checks both S-box tables against a brute-force reference
// for all 256 inputs, plus FIPS-197 spot values.
module tb_aes_sbox;
  import tb_ref_pkg::*;

  logic [7:0] din, fwd, inv;
  int checks = 0, failures = 0;

  aes_sbox #(.INVERSE(1'b0)) u_fwd (.din(din), .dout(fwd));
  aes_sbox #(.INVERSE(1'b1)) u_inv (.din(din), .dout(inv));

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // FIPS-197 spot values
    din = 8'h00; #1 check("S(00)", fwd, 8'h63);
    din = 8'h01; #1 check("S(01)", fwd, 8'h7c);
    din = 8'h53; #1 check("S(53)", fwd, 8'hed);
    din = 8'hff; #1 check("S(ff)", fwd, 8'h16);
    for (int i = 0; i < 256; i++) begin
      din = 8'(i);
      #1;
      check($sformatf("S(%02h)", i), fwd, ref_sbox(8'(i)));
      check($sformatf("InvS(%02h)", i), inv, ref_inv_sbox(8'(i)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
