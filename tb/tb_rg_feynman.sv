// tb_rg_feynman: exhaustive check of the Feynman gate against its truth
// table (P = A, Q = A xor B), plus the self-inverse property: feeding the
// outputs through a second gate must give the inputs back.
module tb_rg_feynman;
  logic a, b, p, q, p2, q2;
  int checks = 0, failures = 0;

  rg_feynman dut  (.a(a), .b(b), .p(p), .q(q));
  rg_feynman dut2 (.a(p), .b(q), .p(p2), .q(q2));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (p !== a || q !== (a != b)) begin
        failures++;
        $display("FAIL in=%b%b out=%b%b", a, b, p, q);
      end
      checks++;
      if ({p2, q2} !== {a, b}) begin
        failures++;
        $display("FAIL not self-inverse for in=%b%b", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
