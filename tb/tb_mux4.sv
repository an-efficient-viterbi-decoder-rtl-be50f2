// tb_mux4: exhaustive check of the trace-back step: out must be
// {state[0], survival_data[state]}.
module tb_mux4;
  logic [3:0] survival_data;
  logic [1:0] state, out;
  int checks = 0, failures = 0;

  mux4 dut (.survival_data(survival_data), .state(state), .out(out));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++)
      for (int st = 0; st < 4; st++) begin
        int exp_out;
        survival_data = 4'(d); state = 2'(st);
        #1;
        exp_out = (st % 2) * 2 + ((d >> st) & 1);
        checks++;
        if (int'(out) != exp_out) begin
          failures++;
          $display("FAIL data=%b state=%0d out=%0d expected %0d", d[3:0], st, out, exp_out);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
