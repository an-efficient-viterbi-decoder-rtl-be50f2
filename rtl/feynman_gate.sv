// feynman_gate: 2x2 reversible controlled-NOT gate.
//
// Outputs P = A and Q = A xor B. With A tied to 1 it inverts B; with B tied to
// 0 it copies A (fan-out). Purely combinational. The function is the one the
// document defines for its Feynman gate.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
