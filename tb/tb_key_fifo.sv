// tb_key_fifo: random push/pop traffic against a queue model, covering
// full, empty, overflow (dropped push) and simultaneous push and pop.
module tb_key_fifo;
  logic clk = 0, rst = 1, push = 0, pop = 0;
  logic [7:0] din = 0, dout;
  logic empty, full, overflow;

  always #5 clk = ~clk;

  key_fifo #(.WIDTH(8), .DEPTH(4)) dut (.clk, .rst, .push, .din, .pop, .dout, .empty, .full, .overflow);

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

  initial begin
    logic [7:0] q[$];
    int n_full = 0, n_ovf = 0, n_empty = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    for (int i = 0; i < 5000; i++) begin
      logic pu, po, drop;
      logic [7:0] d;
      pu = ($urandom_range(99) < 55);
      po = ($urandom_range(99) < 45) && q.size() > 0;
      d = 8'($urandom);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == 4), "full flag");
      if (q.size() > 0) check(dout == q[0], $sformatf("head %02h exp %02h", dout, q[0]));
      if (full) n_full++;
      if (empty) n_empty++;
      push <= pu; pop <= po; din <= d;
      drop = pu && q.size() == 4 && !po;
      if (po) void'(q.pop_front());
      if (pu && !drop) q.push_back(d);
      @(posedge clk); #1;
      check(overflow == drop, "overflow flag");
      if (overflow) n_ovf++;
    end
    check(n_full > 10 && n_ovf > 5 && n_empty > 10, $sformatf("coverage full=%0d ovf=%0d empty=%0d", n_full, n_ovf, n_empty));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
