// tb_hybrid_rng: the complete generator with randomly toggling oscillator
// taps. Checks one mixer byte every 4 clocks, that bytes leave the FIFO in
// the order they were produced, that a full FIFO drops bytes and reports
// overflow, and runs six NIST SP 800-22 tests at the 0.01 level on 20,000
// output bits: frequency (monobit), block frequency (M = 128), runs,
// serial (m = 3), approximate entropy (m = 2) and cumulative sums (both
// directions; for n this large the 0.01 limit on the largest excursion of
// the +/-1 walk is 2.807 * sqrt(n), the 0.99 quantile of the maximum
// absolute value of Brownian motion on [0, 1]). A p-value above 0.01 is
// checked as the statistic staying below the matching critical value:
// erfc(x) > 0.01 for x < 1.8214 and chi-square quantiles at 0.99 (df 2:
// 9.2103, df 4: 13.2767, df 156 by the Wilson-Hilferty formula).
module tb_hybrid_rng;
  logic clk = 0, rst = 1, pop = 0;
  logic [2:0] ro_taps = 0;
  logic [7:0] key_out;
  logic key_avail, byte_valid, overflow;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hybrid_rng #(.NTAPS(3), .FIFO_DEPTH(4)) dut (
    .clk, .rst, .ro_taps, .pop, .key_out, .key_avail, .byte_valid, .overflow);

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

  // taps change asynchronously to the clock
  initial forever begin
    #($urandom_range(2, 4));
    ro_taps[$urandom_range(2)] ^= 1'b1;
  end

  bit seq [20000];

  // overlapping m-bit pattern counts with wrap-around, as the serial and
  // approximate entropy tests define them; returns psi^2 or phi
  function automatic real psi_sq(int m, int n);
    int cnt [int];
    real sum = 0;
    if (m == 0) return 0.0;
    for (int i = 0; i < n; i++) begin
      int v = 0;
      for (int j = 0; j < m; j++) v = (v << 1) | int'(seq[(i + j) % n]);
      cnt[v] = cnt.exists(v) ? cnt[v] + 1 : 1;
    end
    foreach (cnt[v]) sum += real'(cnt[v]) * cnt[v];
    return sum * (2.0 ** m) / n - n;
  endfunction

  function automatic real phi(int m, int n);
    int cnt [int];
    real sum = 0;
    for (int i = 0; i < n; i++) begin
      int v = 0;
      for (int j = 0; j < m; j++) v = (v << 1) | int'(seq[(i + j) % n]);
      cnt[v] = cnt.exists(v) ? cnt[v] + 1 : 1;
    end
    foreach (cnt[v]) sum += (real'(cnt[v]) / n) * $ln(real'(cnt[v]) / n);
    return sum;
  endfunction

  function automatic real chi2_crit99(int df);
    real h = 2.0 / (9.0 * df);
    real t = 1.0 - h + 2.3263 * $sqrt(h);
    return df * t * t * t;
  endfunction

  initial begin
    logic [7:0] produced[$];
    real chi_bf, d1, d2, apen, chi_ap, crit_bf;
    int walk, zmax_fwd, zmax_bwd;
    int last = -1, n_ovf = 0, ones = 0, nbits = 0, runs = 0, n_bal = 0, nbytes = 0;
    logic prev_bit;
    real pi, s_obs, v_obs;
    repeat (3) @(posedge clk);
    rst <= 0;
    // phase 1: no pops: FIFO fills, then overflows
    for (int cyc = 0; cyc < 100; cyc++) begin
      @(posedge clk); #1;
      if (byte_valid) begin
        if (last >= 0) check(cyc - last == 4, $sformatf("byte spacing %0d", cyc - last));
        last = cyc;
        if (produced.size() < 4) produced.push_back(dut.mix_byte);
      end
      if (overflow) n_ovf++;
    end
    check(n_ovf > 10, "no overflow with a full FIFO");
    // phase 2: pop the four buffered bytes, in order
    for (int i = 0; i < 4; i++) begin
      check(key_avail && key_out == produced[i], $sformatf("FIFO order %0d", i));
      pop <= 1; @(posedge clk); pop <= 0; #1;
    end
    // phase 3: pop every byte as it comes; collect 20,000 bits
    while (nbits < 20000) begin
      @(posedge clk); #1;
      if (key_avail && !pop) begin
        nbytes++;
        if ($countones(key_out) >= 3 && $countones(key_out) <= 5) n_bal++;
        for (int b = 7; b >= 0; b--) begin
          if (nbits > 0 && key_out[b] != prev_bit) runs++;
          prev_bit = key_out[b];
          ones += key_out[b];
          seq[nbits] = key_out[b];
          nbits++;
        end
        pop <= 1;
      end else begin
        pop <= 0;
      end
    end
    pi = real'(ones) / nbits;
    s_obs = (2.0 * ones - nbits) / $sqrt(real'(nbits));
    if (s_obs < 0) s_obs = -s_obs;
    v_obs = (runs + 1 - 2.0 * nbits * pi * (1 - pi)) / (2.0 * $sqrt(2.0 * nbits) * pi * (1 - pi));
    if (v_obs < 0) v_obs = -v_obs;
    $display("monobit: %0d ones in %0d bits, S_obs=%f; runs z=%f; balanced keys %0d of %0d",
             ones, nbits, s_obs, v_obs, n_bal, nbytes);
    check(s_obs <= 2.5758, "frequency test fails at 0.01");
    check(v_obs <= 1.8214, "runs test fails at 0.01");
    // block frequency, M = 128: 156 blocks
    chi_bf = 0;
    for (int blk = 0; blk < nbits / 128; blk++) begin
      int c;
      c = 0;
      for (int j = 0; j < 128; j++) c += seq[blk * 128 + j];
      chi_bf += 4.0 * 128 * (real'(c) / 128 - 0.5) ** 2;
    end
    crit_bf = chi2_crit99(nbits / 128);
    // serial, m = 3
    d1 = psi_sq(3, nbits) - psi_sq(2, nbits);
    d2 = psi_sq(3, nbits) - 2.0 * psi_sq(2, nbits) + psi_sq(1, nbits);
    // approximate entropy, m = 2
    apen = phi(2, nbits) - phi(3, nbits);
    chi_ap = 2.0 * nbits * ($ln(2.0) - apen);
    $display("block frequency chi2=%f (limit %f); serial d1=%f d2=%f; approximate entropy chi2=%f",
             chi_bf, crit_bf, d1, d2, chi_ap);
    check(crit_bf > 199.0 && crit_bf < 201.0, "critical value of chi-square, df 156");
    check(chi_bf < crit_bf, "block frequency test fails at 0.01");
    check(d1 < 13.2767, "serial test (first statistic) fails at 0.01");
    check(d2 < 9.2103, "serial test (second statistic) fails at 0.01");
    check(chi_ap < 13.2767, "approximate entropy test fails at 0.01");
    // cumulative sums, forward and backward
    walk = 0; zmax_fwd = 0;
    for (int i = 0; i < nbits; i++) begin
      walk += seq[i] ? 1 : -1;
      if (walk > zmax_fwd) zmax_fwd = walk;
      if (-walk > zmax_fwd) zmax_fwd = -walk;
    end
    walk = 0; zmax_bwd = 0;
    for (int i = nbits - 1; i >= 0; i--) begin
      walk += seq[i] ? 1 : -1;
      if (walk > zmax_bwd) zmax_bwd = walk;
      if (-walk > zmax_bwd) zmax_bwd = -walk;
    end
    $display("cumulative sums: max excursion %0d forward, %0d backward (limit %f)",
             zmax_fwd, zmax_bwd, 2.807 * $sqrt(real'(nbits)));
    check(zmax_fwd < 2.807 * $sqrt(real'(nbits)), "cumulative sums (forward) fails at 0.01");
    check(zmax_bwd < 2.807 * $sqrt(real'(nbits)), "cumulative sums (backward) fails at 0.01");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
