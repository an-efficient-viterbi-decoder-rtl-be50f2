// rev_mux2: W-bit 2:1 multiplexer built from reversible gates.
//
// Per bit, a Feynman gate forms d0 xor d1 and a Peres gate with A = sel,
// B = d0 xor d1, C = d0 gives R = sel.(d0 xor d1) xor d0, which is d1 when sel
// is 1 and d0 when sel is 0. Combinational. The document lists the gates; this
// way of forming a multiplexer from them is this design's own.
// Gate outputs that carry no needed value (the garbage outputs of the
// reversible gates) are left unconnected.
module rev_mux2 #(
  parameter int unsigned W = 1
) (
  input  logic         sel,
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  output logic [W-1:0] y
);
  logic [W-1:0] diff;

  for (genvar i = 0; i < W; i++) begin : g_bit
    feynman_gate u_fg (.a(d0[i]), .b(d1[i]), .p(), .q(diff[i]));
    peres_gate   u_pg (.a(sel), .b(diff[i]), .c(d0[i]), .p(), .q(), .r(y[i]));
  end
endmodule
