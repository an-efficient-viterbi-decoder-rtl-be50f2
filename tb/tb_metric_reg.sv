// tb_metric_reg: random data through the 3-bit register. Each rising edge must
// load the value present before it; an asynchronous reset pulse between edges
// must clear the output at once, without a clock.
module tb_metric_reg;
  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [2:0] d, q, expect_q;
  int checks = 0, failures = 0;

  metric_reg dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    #12;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL not cleared by reset"); end
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      d = 3'($urandom);
      expect_q = d;
      @(posedge clk);
      #1;
      checks++;
      if (q !== expect_q) begin
        failures++;
        $display("FAIL cycle %0d q=%h expected %h", n, q, expect_q);
      end
      if (n % 50 == 25) begin
        #1 rst_n = 1'b0;
        #1;
        checks++;
        if (q !== '0) begin failures++; $display("FAIL async clear"); end
        rst_n = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
