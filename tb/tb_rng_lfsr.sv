// tb_rng_lfsr: compares the register with a bit-serial model of the
// polynomial x^16+x^14+x^13+x^11+1 (two steps per clock, entropy into the
// first), checks the full 65535-state period without entropy and the
// recovery from the all-zero state.
module tb_rng_lfsr;
  logic clk = 0, rst = 1, enable = 0, entropy = 0;
  logic [1:0] raw_bits;
  logic [15:0] state;

  always #5 clk = ~clk;

  rng_lfsr dut (.clk, .rst, .enable, .entropy, .raw_bits, .state);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] step(logic [15:0] s, logic e);
    logic f = s[15] ^ s[13] ^ s[12] ^ s[10] ^ e;
    return {s[14:0], f};
  endfunction

  initial begin
    logic [15:0] m, start_state;
    int period;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(state == 16'hace1, "seed after reset");
    m = state;
    enable <= 1;
    for (int i = 0; i < 2000; i++) begin
      logic e;
      e = 1'($urandom);
      entropy <= e;
      @(posedge clk);
      #1;
      m = step(step(m, e), 1'b0);
      if (m == 0) m = 16'hace1;
      check(state == m, $sformatf("state %04h exp %04h", state, m));
      check(raw_bits == m[1:0], "raw bits");
    end
    // without entropy: two steps per clock on a maximal sequence of odd
    // length 65535 returns to the start after 65535 clocks
    entropy <= 0;
    @(posedge clk); #1;
    start_state = state;
    period = 0;
    do begin @(posedge clk); #1; period++; end while (state != start_state && period < 70000);
    check(period == 65535, $sformatf("period %0d", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
