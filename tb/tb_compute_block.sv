// tb_compute_block: exhaustive check of the 3-bit + 2-bit adder against
// integer addition.
module tb_compute_block;
  logic [2:0] a;
  logic [1:0] b;
  logic [3:0] s;
  int checks = 0, failures = 0;

  compute_block dut (.a(a), .b(b), .s(s));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 4; j++) begin
        a = 3'(i); b = 2'(j);
        #1;
        checks++;
        if (int'(s) != i + j) begin
          failures++;
          $display("FAIL %0d + %0d gave %0d", i, j, s);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
