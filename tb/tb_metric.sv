// tb_metric: the four path metric registers load independently on each
// rising edge and clear together on reset.
module tb_metric;
  import viterbi_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  pm_t  m_in  [NUM_STATES];
  pm_t  m_out [NUM_STATES];
  pm_t  expect_m [NUM_STATES];
  int checks = 0, failures = 0;

  metric dut (.clk(clk), .rst_n(rst_n), .m_in(m_in), .m_out(m_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NUM_STATES; i++) m_in[i] = PM_W'(i + 1);
    #12;
    for (int i = 0; i < NUM_STATES; i++) begin
      checks++;
      if (m_out[i] != '0) begin failures++; $display("FAIL reset of metric%0d", i); end
    end
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      for (int i = 0; i < NUM_STATES; i++) begin
        m_in[i] = PM_W'($urandom);
        expect_m[i] = m_in[i];
      end
      @(posedge clk);
      #1;
      for (int i = 0; i < NUM_STATES; i++) begin
        checks++;
        if (m_out[i] != expect_m[i]) begin
          failures++;
          $display("FAIL cycle %0d metric%0d=%0d expected %0d", n, i, m_out[i], expect_m[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
