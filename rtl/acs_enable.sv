// acs_enable: start-up delay for the add-compare-select loop.
//
// A chain of ENABLE_DELAY flip-flops (dff_0, dff_1, dff_2 in the document)
// cleared by the active-low reset; the first one samples a constant 1. The
// output res_3 therefore rises on the ENABLE_DELAY-th rising clock edge after
// reset is released and stays high until the next reset. ENABLE_DELAY must
// be at least 2. The constant's value
// and the use of res_3 (it gates compare_select) are this design's reading.
module acs_enable #(
  parameter int unsigned ENABLE_DELAY = 3
) (
  input  logic clk,
  input  logic rst_n,
  output logic res_3
);
  logic [ENABLE_DELAY-1:0] dff_q;

  if (ENABLE_DELAY < 2) begin : g_bad_delay
    $error("acs_enable: ENABLE_DELAY must be at least 2");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dff_q <= '0;
    else        dff_q <= {dff_q[ENABLE_DELAY-2:0], 1'b1};
  end
  assign res_3 = dff_q[ENABLE_DELAY-1];
endmodule
