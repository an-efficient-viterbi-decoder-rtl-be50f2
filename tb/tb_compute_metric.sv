// tb_compute_metric: random path and branch metrics; every candidate must be
// pm[pred] + bm[codeword], where the predecessor and codeword are found by
// running a model (7,5) encoder from each state with each input bit.
module tb_compute_metric;
  import viterbi_pkg::*;
  pm_t  pm   [NUM_STATES];
  bm_t  bm   [NUM_STATES];
  sum_t cand [NUM_STATES][2];
  int checks = 0, failures = 0;

  compute_metric dut (.pm(pm), .bm(bm), .cand(cand));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < NUM_STATES; i++) begin
        pm[i] = PM_W'($urandom);
        bm[i] = BM_W'($urandom);
      end
      #1;
      // Enumerate encoder transitions: state {s1,s0}, input u.
      for (int st = 0; st < 4; st++)
        for (int u = 0; u < 2; u++) begin
          int s1, s0, nxt, g0, g1, exp_sum;
          s1 = st / 2; s0 = st % 2;
          nxt = u * 2 + s1;
          g0 = (u + s1 + s0) % 2;
          g1 = (u + s0) % 2;
          exp_sum = int'(pm[st]) + int'(bm[g0 * 2 + g1]);
          checks++;
          if (int'(cand[nxt][s0]) != exp_sum) begin
            failures++;
            $display("FAIL state %0d input %0d: cand[%0d][%0d]=%0d expected %0d",
                     st, u, nxt, s0, cand[nxt][s0], exp_sum);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
