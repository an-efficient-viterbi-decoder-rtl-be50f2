// subtract_unit: the two-input cell of the reduce unit, s = a - b (mod 2^W).
//
// b is inverted bit by bit (Feynman gates with A = 1) and added to a by a
// ripple chain of HN-gate full adders U_FA_0..U_FA_(W-1) whose first carry-in
// is 1. The document's schematic shows the inverters, three adders and a
// constant carry-in; the constant's value (1) is read from the function the
// unit must perform. The result keeps W bits: in the decoder b is the smallest
// metric, so a - b never goes below zero. Combinational.
// Gate outputs that carry no needed value (the garbage outputs of the
// reversible gates) are left unconnected.
module subtract_unit #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);
  logic [W-1:0] b_n;
  logic [W:0]   carry;

  assign carry[0] = 1'b1;
  for (genvar i = 0; i < W; i++) begin : g_fa
    feynman_gate u_inv (.a(1'b1), .b(b[i]), .p(), .q(b_n[i]));
    hn_gate      u_fa  (.a(a[i]), .b(b_n[i]), .c(carry[i]), .d(1'b0),
                        .p(), .q(), .r(s[i]), .s(carry[i+1]));
  end
endmodule
