// compute_block: adds a path metric and a branch metric, s = a + b.
//
// A ripple chain of full adders U_FA_0..U_FA_(A_W-1), each an HN gate with
// D = 0 (R = sum, S = carry), as in the document's compute block where
// a[2:0] + b[1:0] gives s[3:0]. b is zero-extended to A_W bits and the carry
// out of the last adder is the top sum bit. Combinational, no clock.
// Gate outputs that carry no needed value (the garbage outputs of the
// reversible gates) are left unconnected.
module compute_block #(
  parameter int unsigned A_W = 3,
  parameter int unsigned B_W = 2
) (
  input  logic [A_W-1:0] a,
  input  logic [B_W-1:0] b,
  output logic [A_W:0]   s
);
  logic [A_W-1:0] b_ext;
  logic [A_W:0]   carry;

  assign b_ext    = A_W'(b);
  assign carry[0] = 1'b0;
  for (genvar i = 0; i < A_W; i++) begin : g_fa
    hn_gate u_fa (.a(a[i]), .b(b_ext[i]), .c(carry[i]), .d(1'b0),
                  .p(), .q(), .r(s[i]), .s(carry[i+1]));
  end
  assign s[A_W] = carry[A_W];
endmodule
