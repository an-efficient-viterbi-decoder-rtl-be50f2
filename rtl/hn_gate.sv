// hn_gate: 4x4 reversible HNG gate.
//
// Outputs P = A, Q = B, R = A xor B xor C and S = ((A xor B) and C) xor
// (A and B) xor D. With D tied to 0, R is the sum and S the carry of a full
// adder of A, B and carry-in C; every adder in the decoder is built this way.
// Purely combinational. The function is the one the document defines.
module hn_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = a;
  assign q = b;
  assign r = a ^ b ^ c;
  assign s = ((a ^ b) & c) ^ (a & b) ^ d;
endmodule
