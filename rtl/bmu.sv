// bmu: branch metric unit for hard-decision decoding.
//
// For each codeword c (0..3) it gives bm[c], the Hamming distance between the
// received 2-bit symbol rx and c. Per codeword, two Feynman gates with the
// codeword bit as control form rx ^ c, and a Peres gate with C = 0 acts as a
// half adder whose carry and sum are the 2-bit count of differing bits.
// Combinational. The document names the unit and allows Hamming distance;
// the gate mapping is this design's own.
// Gate outputs that carry no needed value (the garbage outputs of the
// reversible gates) are left unconnected.
module bmu
  import viterbi_pkg::*;
(
  input  logic [SYM_W-1:0] rx,
  output bm_t              bm [NUM_STATES]
);
  for (genvar c = 0; c < NUM_STATES; c++) begin : g_code
    logic [SYM_W-1:0] diff;
    logic             dist_sum, dist_carry;
    localparam logic [SYM_W-1:0] CW = SYM_W'(c);

    feynman_gate u_x0 (.a(CW[0]), .b(rx[0]), .p(), .q(diff[0]));
    feynman_gate u_x1 (.a(CW[1]), .b(rx[1]), .p(), .q(diff[1]));
    peres_gate   u_ha (.a(diff[1]), .b(diff[0]), .c(1'b0),
                       .p(), .q(dist_sum), .r(dist_carry));
    assign bm[c] = {dist_carry, dist_sum};
  end
endmodule
