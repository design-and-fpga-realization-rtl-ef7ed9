// tb_button_debounce: a bouncing press and release with a short stable
// time; checks one press pulse per press, none on bounce or release, and
// the settling delay.
module tb_button_debounce;
  logic clk = 0, rst = 1, btn_raw = 0;
  logic level, press;
  int checks = 0, failures = 0, presses = 0;

  always #5 clk = ~clk;

  button_debounce #(.STABLE_CYCLES(20)) dut (.clk, .rst, .btn_raw, .level, .press);

  always @(posedge clk) if (!rst && press) presses++;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("%0t FAIL %s", $time, msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bounce(logic final_level);
    for (int i = 0; i < 6; i++) begin
      btn_raw <= ~btn_raw;
      repeat ($urandom_range(1, 8)) @(posedge clk);
    end
    btn_raw <= final_level;
  endtask

  initial begin
    int t;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 5; n++) begin
      bounce(1'b1);
      t = 0;
      while (!level && t < 100) begin @(posedge clk); t++; end
      check(level, "level did not rise");
      check(t >= 20 && t <= 24, $sformatf("settle time %0d", t));
      repeat (30) @(posedge clk);
      check(presses == n + 1, $sformatf("presses %0d after press %0d", presses, n + 1));
      bounce(1'b0);
      repeat (40) @(posedge clk);
      check(!level, "level did not fall");
      check(presses == n + 1, "pulse on release or bounce");
    end
    // glitches shorter than the stable time are ignored
    btn_raw <= 1; repeat (10) @(posedge clk); btn_raw <= 0;
    repeat (40) @(posedge clk);
    check(presses == 5 && !level, "short glitch accepted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
