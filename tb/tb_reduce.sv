// tb_reduce: all 4096 combinations of four 3-bit metrics. The smallest value
// and its lowest index are found by a linear scan; each output must be the
// input minus that smallest value.
module tb_reduce;
  import viterbi_pkg::*;
  pm_t    pm_in  [NUM_STATES];
  pm_t    pm_out [NUM_STATES];
  state_t min_state;
  int checks = 0, failures = 0;

  reduce dut (.pm_in(pm_in), .pm_out(pm_out), .min_state(min_state));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      int mn, idx;
      for (int i = 0; i < NUM_STATES; i++) pm_in[i] = PM_W'(v >> (3 * i));
      #1;
      mn = 8; idx = 0;
      for (int i = 0; i < NUM_STATES; i++)
        if (int'(pm_in[i]) < mn) begin mn = int'(pm_in[i]); idx = i; end
      checks++;
      if (int'(min_state) != idx) begin
        failures++;
        $display("FAIL v=%0h min_state=%0d expected %0d", v, min_state, idx);
      end
      for (int i = 0; i < NUM_STATES; i++) begin
        checks++;
        if (int'(pm_out[i]) != int'(pm_in[i]) - mn) begin
          failures++;
          $display("FAIL v=%0h pm_out[%0d]=%0d expected %0d", v, i, pm_out[i],
                   int'(pm_in[i]) - mn);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
