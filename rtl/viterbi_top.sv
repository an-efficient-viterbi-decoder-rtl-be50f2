// viterbi_top: complete hard-decision Viterbi decoder for the rate-1/2,
// constraint-length-3 (7,5) convolutional code.
//
// One received symbol rx = {g0, g1} per clock goes through the branch metric
// unit (Hamming distance to each codeword) into the decoder core, which keeps
// four path metrics, selects survivors and traces back to give one decoded
// bit per clock. Reset is asynchronous and active low. After reset, acs_en
// rises on the ENABLE_DELAY-th clock edge; only symbols sampled while acs_en
// is high are decoded. The bit of the symbol sampled at step t appears on
// bit_out right after the edge of step t + TB_DEPTH, i.e. a latency of
// TB_DEPTH clocks from capture. The chain BMU -> add-compare-select with path
// metric memory -> survivor memory follows the document's block diagram;
// code polynomials, trace-back depth and reset behaviour are this design's.
module viterbi_top
  import viterbi_pkg::*;
#(
  parameter int unsigned TB_DEPTH     = 12,
  parameter int unsigned ENABLE_DELAY = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SYM_W-1:0] rx,
  output logic             acs_en,
  output state_t           decode_out,
  output logic             bit_out
);
  bm_t bm [NUM_STATES];

  bmu u_bmu (.rx(rx), .bm(bm));

  viterbi #(.TB_DEPTH(TB_DEPTH), .ENABLE_DELAY(ENABLE_DELAY)) u_core (
    .clk(clk), .rst_n(rst_n), .bm(bm), .acs_en(acs_en),
    .decode_out(decode_out), .bit_out(bit_out));
endmodule
