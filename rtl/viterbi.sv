// viterbi: decoder core, from branch metrics to decoded bits.
//
// The add-compare-select loop is metric (stored path metrics) ->
// compute_metric (eight candidate sums) -> compare_select (survivor per
// state) -> reduce (subtract the smallest metric) -> back into metric, one
// trellis step per clock. The four survivor decisions and the minimum-metric
// state go to path_memory, which traces back TB_DEPTH steps and gives one
// decoded bit per clock. acs_enable holds the loop idle for ENABLE_DELAY
// clocks after reset. This is the partition and wiring of the document's
// top-level schematic (units U1-U6).
//
// Timing: bm is sampled at a rising edge; after that edge, with this symbol
// counted as step t, decode_out = {u[t-TB_DEPTH], u[t-TB_DEPTH-1]} and
// bit_out = u[t-TB_DEPTH] (once the survivors have merged). Symbols presented
// while acs_en is low are ignored.
module viterbi
  import viterbi_pkg::*;
#(
  parameter int unsigned TB_DEPTH     = 12,
  parameter int unsigned ENABLE_DELAY = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  input  bm_t    bm [NUM_STATES],
  output logic   acs_en,
  output state_t decode_out,
  output logic   bit_out
);
  pm_t                   pm_q    [NUM_STATES];
  pm_t                   pm_sel  [NUM_STATES];
  pm_t                   pm_norm [NUM_STATES];
  sum_t                  cand    [NUM_STATES][2];
  logic [NUM_STATES-1:0] dec;
  state_t                min_state;

  compute_metric u1 (.pm(pm_q), .bm(bm), .cand(cand));

  metric u2 (.clk(clk), .rst_n(rst_n), .m_in(pm_norm), .m_out(pm_q));

  acs_enable #(.ENABLE_DELAY(ENABLE_DELAY)) u3 (
    .clk(clk), .rst_n(rst_n), .res_3(acs_en));

  compare_select u4 (.en(acs_en), .cand(cand), .pm_sel(pm_sel), .dec(dec));

  reduce u5 (.pm_in(pm_sel), .pm_out(pm_norm), .min_state(min_state));

  path_memory #(.TB_DEPTH(TB_DEPTH)) u6 (
    .clk(clk), .rst_n(rst_n), .dec_in(dec), .start_in(min_state),
    .decode_out(decode_out));

  assign bit_out = decode_out[1];
endmodule
