// tb_key_strength: all 256 key bytes; grade and weight against a count of
// ones and the 35%..65% density window.
module tb_key_strength;
  logic clk = 0;
  logic [7:0] key;
  logic [1:0] strength;
  logic balanced;
  logic [3:0] weight;

  always #5 clk = ~clk;

  key_strength #(.WIDTH(8)) dut (.key, .strength, .balanced, .weight);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 256; k++) begin
      int w;
      real dens;
      key = 8'(k);
      #1;
      w = $countones(key);
      dens = w / 8.0;
      check(weight == 4'(w), "weight");
      check(balanced == (dens >= 0.35 && dens <= 0.65), $sformatf("balanced %02h", key));
      check(strength == ((dens >= 0.35 && dens <= 0.65) ? 2'd2 : (w == 2 || w == 6) ? 2'd1 : 2'd0),
            $sformatf("strength %02h = %0d", key, strength));
    end
    key = 8'h36; #1;
    check(strength == 2'd2, "key 0x36 grades 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
