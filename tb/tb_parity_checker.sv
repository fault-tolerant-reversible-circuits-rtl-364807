// tb_parity_checker: drives the checker with random line vectors and
// compares err with a parity computed by counting ones. Two instances are
// used, the default 3x3 size and a 10x10 size as a full adder needs.
module tb_parity_checker;
  logic [2:0] in3, out3;
  logic [9:0] in10, out10;
  logic err3, err10;
  int checks = 0, failures = 0;

  parity_checker dut3 (.in_lines(in3), .out_lines(out3), .err(err3));
  parity_checker #(.IN_W(10), .OUT_W(10)) dut10 (
    .in_lines(in10), .out_lines(out10), .err(err10));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_err = 0;
    for (int i = 0; i < 64; i++) begin
      {in3, out3} = 6'(i);
      in10  = 10'($urandom);
      out10 = 10'($urandom);
      #1;
      checks++;
      if (err3 != 1'(($countones(in3) + $countones(out3)) % 2)) begin
        failures++;
        $display("FAIL 3x3 in=%b out=%b err=%b", in3, out3, err3);
      end
      checks++;
      if (err10 != 1'(($countones(in10) + $countones(out10)) % 2)) begin
        failures++;
        $display("FAIL 10x10 in=%b out=%b err=%b", in10, out10, err10);
      end
      n_err += int'(err3);
    end
    // Half of all 6-bit patterns have odd weight.
    checks++;
    if (n_err != 32) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
