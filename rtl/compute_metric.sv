// compute_metric: the "add" half of add-compare-select for all four states.
//
// For every next state ns and each of its two predecessors p = {ns[0], x} it
// adds the stored path metric pm[p] to the branch metric of the codeword the
// encoder emits on that transition, giving cand[ns][x]. Eight compute blocks
// do the eight additions in parallel, as in the document's compute metric
// unit; which metric pairs with which branch metric follows the (7,5) trellis
// fixed in viterbi_pkg. Combinational.
module compute_metric
  import viterbi_pkg::*;
(
  input  pm_t  pm   [NUM_STATES],
  input  bm_t  bm   [NUM_STATES],   // bm[c] = distance to codeword c
  output sum_t cand [NUM_STATES][2]
);
  for (genvar ns = 0; ns < NUM_STATES; ns++) begin : g_state
    for (genvar x = 0; x < 2; x++) begin : g_pred
      localparam int unsigned PRED = ((ns & 1) << 1) | x;
      localparam int unsigned CODE =
        int'(branch_code(ns[1], ns[0], x[0]));
      compute_block #(.A_W(PM_W), .B_W(BM_W)) u_add (
        .a(pm[PRED]), .b(bm[CODE]), .s(cand[ns][x]));
    end
  end
endmodule
