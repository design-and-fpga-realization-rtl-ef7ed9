// tb_ecc_engine: scalar multiplication k*P against a repeated-addition
// reference, for every 8-bit scalar on the base point and for random
// scalars on other curve points; checks that results lie on the curve,
// the compressed y bit, and reports the latency range. The mean latency
// over the full 8-bit scalars 128..255 must be near 160 clocks (120..200).
module tb_ecc_engine;
  import crypto_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1, start = 0;
  logic [7:0] scalar = 0, px = 0, py = 0, qx, qy;
  logic q_inf, q_ybit, busy, done;
  int checks = 0, failures = 0;
  int min_cyc = 1 << 30, max_cyc = 0;
  int sum_top = 0, n_top = 0;   // full 8-bit scalars on G

  always #5 clk = ~clk;

  ecc_engine dut (.clk, .rst, .start, .scalar, .px, .py, .qx, .qy, .q_inf, .q_ybit, .busy, .done);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int k, pt_t p);
    pt_t e;
    int cyc;
    e = ref_mul(k, p);
    @(posedge clk);
    scalar <= 8'(k); px <= 8'(p.x); py <= 8'(p.y); start <= 1;
    @(posedge clk);
    start <= 0;
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!done && cyc < 1000);
    if (k != 0 && cyc < min_cyc) min_cyc = cyc;
    if (cyc > max_cyc) max_cyc = cyc;
    if (k >= 128 && p.x == 0 && p.y == 2) begin sum_top += cyc; n_top++; end
    checks++;
    if (q_inf !== e.inf || (!e.inf && (int'(qx) != e.x || int'(qy) != e.y))) begin
      failures++;
      $display("FAIL k=%0d P=(%0d,%0d): got (%0d,%0d,inf=%0b) exp (%0d,%0d,inf=%0b)",
               k, p.x, p.y, qx, qy, q_inf, e.x, e.y, e.inf);
    end
    if (!e.inf) begin
      checks += 2;
      if (!ref_on_curve(int'(qx), int'(qy))) begin failures++; $display("FAIL not on curve"); end
      if (q_ybit !== qy[0]) begin failures++; $display("FAIL ybit"); end
    end
  endtask

  initial begin
    pt_t g, p;
    int ordr;
    g.x = 0; g.y = 2; g.inf = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // order of G is 271 (prime): 271*G must be the point at infinity
    ordr = 0;
    p = g;
    do begin p = ref_add(p, g); ordr++; end while (!p.inf && ordr < 400);
    checks++;
    if (ordr + 1 != 271) begin failures++; $display("FAIL order %0d", ordr + 1); end
    for (int k = 0; k < 256; k++) run(k, g);
    // other base points, including ones whose multiples hit y = 0 or -P
    for (int n = 0; n < 40; n++) begin
      int x, y;
      do begin x = $urandom_range(250); y = $urandom_range(250); end while (!ref_on_curve(x, y));
      p.x = x; p.y = y; p.inf = 0;
      run($urandom_range(255), p);
    end
    $display("latency over nonzero scalars: %0d..%0d cycles", min_cyc, max_cyc);
    $display("mean latency over scalars 128..255: %0d cycles", sum_top / n_top);
    // the expected figure is about 160 clocks for an 8-bit scalar
    checks++;
    if (sum_top / n_top < 120 || sum_top / n_top > 200) begin
      failures++;
      $display("FAIL mean latency %0d, expected about 160", sum_top / n_top);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
