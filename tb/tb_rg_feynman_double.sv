// tb_rg_feynman_double: exhaustive check of the Feynman double-gate against
// its truth table (P = A, Q = A xor B, R = A xor C), that it is a permutation
// of the 8 input values, that input and output parity agree, and that it is
// its own inverse.
module tb_rg_feynman_double;
  logic a, b, c, p, q, r, p2, q2, r2;
  logic [7:0] seen;
  int checks = 0, failures = 0;

  rg_feynman_double dut  (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  rg_feynman_double dut2 (.a(p), .b(q), .c(r), .p(p2), .q(q2), .r(r2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s in=%b%b%b out=%b%b%b", what, a, b, c, p, q, r);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      check(p == a && q == (a ^ b) && r == (a ^ c), "truth table");
      check((a ^ b ^ c) == (p ^ q ^ r), "parity");
      check({p2, q2, r2} == {a, b, c}, "self-inverse");
      seen[{p, q, r}] = 1'b1;
    end
    check(seen == 8'hFF, "permutation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
