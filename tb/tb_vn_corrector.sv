// tb_vn_corrector: all four input pairs with and without in_valid, and a
// biased random stream whose corrected output must come out near 50%.
module tb_vn_corrector;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [1:0] in_pair = 0;
  logic out_bit, out_valid;

  always #5 clk = ~clk;

  vn_corrector dut (.clk, .rst, .in_valid, .in_pair, .out_bit, .out_valid);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones = 0, total = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int v = 0; v < 2; v++)
      for (int p = 0; p < 4; p++) begin
        @(posedge clk);
        in_valid <= 1'(v); in_pair <= 2'(p);
        @(posedge clk);
        #1;
        check(out_valid == (v == 1 && (p == 1 || p == 2)), $sformatf("valid v=%0d p=%0d", v, p));
        if (out_valid) check(out_bit == (p == 2), $sformatf("bit p=%0d", p));
      end
    // stream with 80% ones
    in_valid <= 1;
    for (int i = 0; i < 50000; i++) begin
      @(posedge clk);
      in_pair <= {1'($urandom_range(99) < 80), 1'($urandom_range(99) < 80)};
      #1;
      if (out_valid) begin total++; ones += out_bit; end
    end
    check(total > 5000, "too few output bits");
    check(ones * 100 / total >= 47 && ones * 100 / total <= 53,
          $sformatf("output ones %0d of %0d", ones, total));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
