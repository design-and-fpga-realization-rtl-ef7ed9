// tb_gf_arith: exhaustive check of add, subtract and move, and of the
// Montgomery product a*b*256^-1 mod 251, over all reduced operand pairs,
// and of the Montgomery-form inverse v^-1 * 256^2 mod 251 for every v,
// with the inverse found by search.
module tb_gf_arith;
  import crypto_pkg::*;

  gf_op_e op;
  logic [7:0] a, b, y;
  int checks = 0, failures = 0;
  int rinv;

  gf_arith dut (.op, .a, .b, .y);

  task automatic check(int exp);
    checks++;
    if (int'(y) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL op %s a=%0d b=%0d: got %0d exp %0d", op.name(), a, b, y, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 256^-1 mod 251 by search
    for (int c = 1; c < 251; c++) if ((256 * c) % 251 == 1) rinv = c;
    for (int i = 0; i < 251; i++) begin
      for (int j = 0; j < 251; j++) begin
        a = 8'(i); b = 8'(j);
        op = GF_ADD; #1 check((i + j) % 251);
        op = GF_SUB; #1 check((i - j + 251) % 251);
        op = GF_MUL; #1 check((i * j % 251) * rinv % 251);
      end
      a = 8'(i); b = 8'(250 - i);
      op = GF_MOV; #1 check(i);
      op = GF_INV; #1 begin
        int vinv;
        vinv = 0;
        for (int c = 1; c < 251; c++) if ((i * c) % 251 == 1) vinv = c;
        check((vinv * (65536 % 251)) % 251);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
