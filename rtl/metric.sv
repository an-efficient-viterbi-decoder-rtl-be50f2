// metric: path metric memory, four 3-bit registers metric0..metric3.
//
// m_out[i] is the stored path metric of state i; m_in[i] is loaded on every
// rising clock edge. rst_n (active low, asynchronous) clears all four to 0,
// so the decoder starts with every state equally likely; that reset value is
// this design's choice. One clock of latency, the only storage in the
// add-compare-select loop.
module metric
  import viterbi_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  pm_t  m_in  [NUM_STATES],
  output pm_t  m_out [NUM_STATES]
);
  for (genvar i = 0; i < NUM_STATES; i++) begin : g_metric
    metric_reg #(.W(PM_W)) u_metric (
      .clk(clk), .rst_n(rst_n), .d(m_in[i]), .q(m_out[i]));
  end
endmodule
