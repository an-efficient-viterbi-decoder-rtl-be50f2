// mux4: one trace-back step.
//
// Picks the survivor decision of the current state, survival_data[state],
// with a 4:1 multiplexer (three reversible 2:1 multiplexers) and returns the
// predecessor state out = {state[0], survival_data[state]}: in the shift-
// register trellis the predecessor's high bit is the current state's low bit
// and its low bit is the decision. Combinational.
module mux4
  import viterbi_pkg::*;
(
  input  logic [NUM_STATES-1:0] survival_data,
  input  state_t                state,
  output state_t                out
);
  logic lo, hi, bit_sel;

  rev_mux2 #(.W(1)) u_lo  (.sel(state[0]), .d0(survival_data[0]), .d1(survival_data[1]), .y(lo));
  rev_mux2 #(.W(1)) u_hi  (.sel(state[0]), .d0(survival_data[2]), .d1(survival_data[3]), .y(hi));
  rev_mux2 #(.W(1)) u_top (.sel(state[1]), .d0(lo), .d1(hi), .y(bit_sel));

  assign out = {state[0], bit_sel};
endmodule
