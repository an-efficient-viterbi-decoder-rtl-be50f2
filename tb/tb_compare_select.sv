// tb_compare_select: random candidate pairs (kept so that the smaller one
// fits in three bits). With en high each state must get the smaller sum and
// decision 1 only when candidate 1 is strictly smaller; with en low every
// metric and decision must be 0.
module tb_compare_select;
  import viterbi_pkg::*;
  logic                  en;
  sum_t                  cand   [NUM_STATES][2];
  pm_t                   pm_sel [NUM_STATES];
  logic [NUM_STATES-1:0] dec;
  int checks = 0, failures = 0;

  compare_select dut (.en(en), .cand(cand), .pm_sel(pm_sel), .dec(dec));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      en = (n % 10) != 0;
      for (int s = 0; s < NUM_STATES; s++) begin
        int c0, c1;
        c0 = $urandom_range(12);
        c1 = $urandom_range(12);
        if (c0 > 7 && c1 > 7) c0 = $urandom_range(7);
        cand[s][0] = SUM_W'(c0);
        cand[s][1] = SUM_W'(c1);
      end
      #1;
      for (int s = 0; s < NUM_STATES; s++) begin
        int c0, c1, exp_pm, exp_dec;
        c0 = int'(cand[s][0]); c1 = int'(cand[s][1]);
        exp_dec = (c1 < c0) ? 1 : 0;
        exp_pm  = (c1 < c0) ? c1 : c0;
        if (!en) begin exp_dec = 0; exp_pm = 0; end
        checks++;
        if (int'(pm_sel[s]) != exp_pm || int'(dec[s]) != exp_dec) begin
          failures++;
          $display("FAIL en=%b state %0d cand %0d/%0d: pm=%0d dec=%b", en, s, c0, c1,
                   pm_sel[s], dec[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
