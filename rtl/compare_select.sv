// compare_select: the "compare-select" half of add-compare-select.
//
// For each next state ns it compares the two candidate sums cand[ns][0] and
// cand[ns][1] (4 bits) with a reversible less-than comparator and passes the
// smaller on through a reversible 2:1 multiplexer. dec[ns] is 1 when the path
// from predecessor {ns[0], 1} wins; a tie keeps predecessor {ns[0], 0}.
// The selected sum leaves as a 3-bit metric, the width the reduce unit takes;
// with Hamming branch metrics and per-step normalisation the selected sum
// never exceeds 3, so no information is dropped (an assertion checks this).
// While en is low (start-up, see acs_enable) metrics and decisions are forced
// to 0. Combinational. The forcing and the tie rule are this design's choice.
module compare_select
  import viterbi_pkg::*;
(
  input  logic                  en,
  input  sum_t                  cand   [NUM_STATES][2],
  output pm_t                   pm_sel [NUM_STATES],
  output logic [NUM_STATES-1:0] dec
);
  for (genvar ns = 0; ns < NUM_STATES; ns++) begin : g_state
    logic lt;
    sum_t best;
    logic [PM_W:0] gated;

    rev_less_than #(.W(SUM_W)) u_cmp (
      .a(cand[ns][1]), .b(cand[ns][0]), .lt(lt));
    rev_mux2 #(.W(SUM_W)) u_sel (
      .sel(lt), .d0(cand[ns][0]), .d1(cand[ns][1]), .y(best));
    // Enable gating: select between zero and {decision, metric}.
    rev_mux2 #(.W(PM_W + 1)) u_en (
      .sel(en), .d0('0), .d1({lt, best[PM_W-1:0]}), .y(gated));

    assign pm_sel[ns] = gated[PM_W-1:0];
    assign dec[ns]    = gated[PM_W];

    always_comb begin
      assert (!en || best[SUM_W-1:PM_W] == '0)
        else $error("selected metric of state %0d does not fit in %0d bits", ns, PM_W);
    end
  end
endmodule
