// metric_reg: W-bit register of D flip-flops with asynchronous clear.
//
// Captures d on the rising clock edge. rst_n low clears q to 0 at once; the
// document's cells are clear-low (CN) flip-flops, hence the active-low reset.
// Used for each of the four path metrics (W = 3).
module metric_reg #(
  parameter int unsigned W = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end
endmodule
