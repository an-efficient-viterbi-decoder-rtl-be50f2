// tb_hn_gate: exhaustive check of the 4x4 HN gate. With D = 0 it must be a
// full adder (R = sum bit, S = carry of A+B+C); D flips S.
module tb_hn_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;

  hn_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      int total;
      {a, b, c, d} = 4'(i);
      #1;
      total = int'(a) + int'(b) + int'(c);
      checks++;
      if (p !== a || q !== b || r !== (total % 2 == 1) || s !== ((total >= 2) ^ d)) begin
        failures++;
        $display("FAIL abcd=%b%b%b%b pqrs=%b%b%b%b", a, b, c, d, p, q, r, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
