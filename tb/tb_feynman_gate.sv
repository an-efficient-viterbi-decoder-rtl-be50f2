// tb_feynman_gate: exhaustive check of the 2x2 Feynman gate against its
// truth table (Q is 1 when exactly one input is 1).
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

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
      if (p !== a || q !== ((int'(a) + int'(b)) == 1)) begin
        failures++;
        $display("FAIL a=%b b=%b p=%b q=%b", a, b, p, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
