// peres_gate: 3x3 reversible Peres gate.
//
// Outputs P = A, Q = A xor B, R = (A and B) xor C. With C tied to 0 it is a
// half adder (Q = sum, R = carry) and R alone is an AND. Purely combinational.
// The function is the one the document defines for its Peres gate.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
