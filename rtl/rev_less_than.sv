// rev_less_than: unsigned W-bit comparison, lt = (a < b).
//
// Forms a + ~b + 1 with a ripple chain of HN gates used as full adders; b is
// inverted by Feynman gates with A = 1. The final carry is 1 exactly when
// a >= b, and one more Feynman inverter turns it into lt. Combinational.
// The gate mapping is this design's own.
// Gate outputs that carry no needed value (the garbage outputs of the
// reversible gates) are left unconnected.
module rev_less_than #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         lt
);
  logic [W-1:0] b_n;
  logic [W:0]   carry;

  assign carry[0] = 1'b1;
  for (genvar i = 0; i < W; i++) begin : g_bit
    feynman_gate u_inv (.a(1'b1), .b(b[i]), .p(), .q(b_n[i]));
    hn_gate      u_fa  (.a(a[i]), .b(b_n[i]), .c(carry[i]), .d(1'b0),
                        .p(), .q(), .r(), .s(carry[i+1]));
  end
  feynman_gate u_out (.a(1'b1), .b(carry[W]), .p(), .q(lt));
endmodule
