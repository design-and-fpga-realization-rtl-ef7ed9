// tb_chacha_mixer: runs the mixer with random Von Neumann bits and LFSR
// bytes against a reference quarter-round model; checks every output byte
// and that one byte leaves exactly every 4 clocks.
module tb_chacha_mixer;
  logic clk = 0, rst = 1, vn_valid = 0, vn_bit = 0;
  logic [7:0] lfsr_byte = 0, out_byte;
  logic out_valid;

  always #5 clk = ~clk;

  chacha_mixer dut (.clk, .rst, .vn_valid, .vn_bit, .lfsr_byte, .out_byte, .out_valid);

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

  function automatic logic [7:0] rl(logic [7:0] v, int n);
    return 8'((v << n) | (v >> (8 - n)));
  endfunction

  initial begin
    logic [7:0] a, b, c, d, ent, exp_b;
    logic [7:0] expq[$];
    int step, last_out, nbytes;
    a = 8'h65; b = 8'h78; c = 8'h70; d = 8'h61; ent = 0; step = 0;
    last_out = -1; nbytes = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      logic v, bt;
      logic [7:0] lb;
      v = 1'($urandom); bt = 1'($urandom); lb = 8'($urandom);
      vn_valid <= v; vn_bit <= bt; lfsr_byte <= lb;
      // model of the clock edge that samples these inputs
      case (step)
        0: begin a = a + b; d = rl((d ^ ent) ^ a, 4); c = c ^ lb; end
        1: begin c = c + d; b = rl(b ^ c, 3); end
        2: begin a = a + b; d = rl(d ^ a, 2); end
        3: begin c = c + d; b = rl(b ^ c, 1); expq.push_back(a ^ b); end
      endcase
      if (step == 0) ent = v ? {7'h0, bt} : 8'h0;
      else if (v) ent = {ent[6:0], bt};
      step = (step + 1) % 4;
      @(posedge clk);
      #1;
      if (out_valid) begin
        if (last_out >= 0) check(cyc - last_out == 4, $sformatf("spacing %0d", cyc - last_out));
        last_out = cyc;
        nbytes++;
        check(expq.size() > 0 && out_byte == expq[0],
              $sformatf("byte %0d: got %02h exp %02h", nbytes, out_byte, expq.size() ? expq[0] : 8'h0));
        if (expq.size() > 0) void'(expq.pop_front());
      end
    end
    check(nbytes == 1000, $sformatf("bytes %0d", nbytes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
