// tb_ring_osc: checks that the oscillator model toggles each tap with a
// period near 2 * STAGES * (stage delay + mean jitter), that taps stay in
// their inverter relation, and that it stops while disabled.
module tb_ring_osc;
  logic clk = 0;
  logic enable = 0;
  logic [2:0] taps;

  always #5000 clk = ~clk;

  ring_osc dut (.enable, .taps);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int edges;
  longint t_first, t_last;
  always @(posedge taps[0]) begin
    if (edges == 0) t_first = $time;
    t_last = $time;
    edges++;
  end

  initial begin
    logic [2:0] frozen;
    edges = 0;
    #20000;
    check(edges == 0, "toggled while disabled");
    enable = 1;
    #2000000;
    // 5 stages x (310..370 ps) x 2 = 3.1 .. 3.7 ns period
    check(edges > 500, $sformatf("too few edges %0d", edges));
    check((t_last - t_first) / (edges - 1) >= 3100 && (t_last - t_first) / (edges - 1) <= 3700,
          $sformatf("period %0d ps", (t_last - t_first) / (edges - 1)));
    enable = 0;
    #1000;
    frozen = taps;
    edges = 0;
    #100000;
    check(edges == 0 && taps == frozen, "ring did not stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
