// tb_subtract_unit: exhaustive check of the 3-bit subtractor against integer
// subtraction modulo 8.
module tb_subtract_unit;
  logic [2:0] a, b, s;
  int checks = 0, failures = 0;

  subtract_unit dut (.a(a), .b(b), .s(s));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        a = 3'(i); b = 3'(j);
        #1;
        checks++;
        if (int'(s) != (i - j + 8) % 8) begin
          failures++;
          $display("FAIL %0d - %0d gave %0d", i, j, s);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
