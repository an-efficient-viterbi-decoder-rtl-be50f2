// reduce: path metric normalisation.
//
// Finds the smallest of the four selected metrics with a tree of reversible
// comparators and multiplexers (state 0 against 1, state 2 against 3, then
// the two winners) and subtracts it from every metric with four subtract
// units, so the stored metrics keep their differences but stay within 3 bits.
// min_state is the index of that smallest metric (ties go to the lower
// index) and is where the trace-back starts. Combinational.
module reduce
  import viterbi_pkg::*;
(
  input  pm_t    pm_in  [NUM_STATES],
  output pm_t    pm_out [NUM_STATES],
  output state_t min_state
);
  logic lt01, lt23, lt_hi;
  pm_t  m01, m23, m_min;
  logic i_min;

  rev_less_than #(.W(PM_W)) u_cmp01 (.a(pm_in[1]), .b(pm_in[0]), .lt(lt01));
  rev_mux2      #(.W(PM_W)) u_sel01 (.sel(lt01), .d0(pm_in[0]), .d1(pm_in[1]), .y(m01));
  rev_less_than #(.W(PM_W)) u_cmp23 (.a(pm_in[3]), .b(pm_in[2]), .lt(lt23));
  rev_mux2      #(.W(PM_W)) u_sel23 (.sel(lt23), .d0(pm_in[2]), .d1(pm_in[3]), .y(m23));
  rev_less_than #(.W(PM_W)) u_cmp   (.a(m23), .b(m01), .lt(lt_hi));
  rev_mux2      #(.W(PM_W)) u_sel   (.sel(lt_hi), .d0(m01), .d1(m23), .y(m_min));
  rev_mux2      #(.W(1))    u_idx   (.sel(lt_hi), .d0(lt01), .d1(lt23), .y(i_min));

  assign min_state = {lt_hi, i_min};

  for (genvar i = 0; i < NUM_STATES; i++) begin : g_sub
    subtract_unit #(.W(PM_W)) u_sub (.a(pm_in[i]), .b(m_min), .s(pm_out[i]));
  end
endmodule
