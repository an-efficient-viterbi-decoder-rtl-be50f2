// path_memory: survivor memory with trace-back.
//
// Every clock the new decision vector dec_in enters a chain of TB_DEPTH
// buffer units (stage 0 newest), and start_in, the state with the smallest
// metric, is registered beside it. A chain of TB_DEPTH mux4 steps then walks
// back combinationally from the registered start state through the stored
// decisions, newest first. decode_out is the state reached after TB_DEPTH
// steps, {u[t-TB_DEPTH], u[t-TB_DEPTH-1]} in terms of the encoder's input
// bits when the last registered vector belongs to step t; decode_out[1] is
// the decoded bit. One decoded bit per clock. The document draws the buffer
// and multiplexer chains but prints no depth; 12 is this design's choice.
module path_memory
  import viterbi_pkg::*;
#(
  parameter int unsigned TB_DEPTH = 12
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NUM_STATES-1:0] dec_in,
  input  state_t                start_in,
  output state_t                decode_out
);
  logic [NUM_STATES-1:0] dec_q [TB_DEPTH];
  state_t                start_q;
  state_t                trace [TB_DEPTH+1];

  for (genvar k = 0; k < TB_DEPTH; k++) begin : g_stage
    if (k == 0) begin : g_first
      buffer_unit #(.W(NUM_STATES)) u_buf (
        .clk(clk), .rst_n(rst_n), .d(dec_in), .q(dec_q[0]));
    end else begin : g_next
      buffer_unit #(.W(NUM_STATES)) u_buf (
        .clk(clk), .rst_n(rst_n), .d(dec_q[k-1]), .q(dec_q[k]));
    end
    mux4 u_tb (.survival_data(dec_q[k]), .state(trace[k]), .out(trace[k+1]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) start_q <= '0;
    else        start_q <= start_in;
  end

  assign trace[0]   = start_q;
  assign decode_out = trace[TB_DEPTH];
endmodule
