// buffer_unit: W-bit register of D flip-flops with asynchronous clear.
//
// One stage of the survivor memory: holds one 4-bit decision vector for one
// clock. Captures d on the rising clock edge; rst_n low clears q to 0 at
// once (clear-low flip-flops, as in the document's buffer unit).
module buffer_unit #(
  parameter int unsigned W = 4
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
