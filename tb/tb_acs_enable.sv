// tb_acs_enable: after each reset release res_3 must stay low for exactly
// ENABLE_DELAY-1 rising edges, go high on edge ENABLE_DELAY and stay high;
// reset must clear it at once. Repeated for several reset pulses.
module tb_acs_enable;
  localparam int unsigned DELAY = 3;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic res_3;
  int checks = 0, failures = 0;

  acs_enable #(.ENABLE_DELAY(DELAY)) dut (.clk(clk), .rst_n(rst_n), .res_3(res_3));

  always #5 clk = ~clk;

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 5; rep++) begin
      rst_n = 1'b0;
      #3;
      checks++;
      if (res_3 !== 1'b0) begin failures++; $display("FAIL not cleared by reset"); end
      @(negedge clk);
      rst_n = 1'b1;
      for (int e = 1; e <= DELAY + 4 + rep; e++) begin
        @(posedge clk);
        #1;
        checks++;
        if (res_3 !== (e >= DELAY)) begin
          failures++;
          $display("FAIL edge %0d after reset: res_3=%b", e, res_3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
