// tb_peres_gate: exhaustive check of the 3x3 Peres gate. Expected values come
// from counting: Q is the parity of A and B, R flips C when both A and B are 1.
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic exp_r;
      {a, b, c} = 3'(i);
      #1;
      exp_r = (int'(a) + int'(b) == 2) ? !c : c;
      checks++;
      if (p !== a || q !== ((int'(a) + int'(b)) % 2 == 1) || r !== exp_r) begin
        failures++;
        $display("FAIL abc=%b%b%b pqr=%b%b%b", a, b, c, p, q, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
