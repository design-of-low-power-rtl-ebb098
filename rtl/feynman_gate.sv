// feynman_gate: 2x2 reversible Feynman (controlled-NOT) gate.
//
// One-through gate: P passes A unchanged, Q = A xor B, i.e. B is inverted when
// A is 1. The mapping (A,B) -> (P,Q) is a bijection and its own inverse, so
// the same gate also performs the backward computation A = P, B = P xor Q.
// Purely combinational; no clock, no reset. The equations are those of the
// standard Feynman gate; only the logic function is modelled, not the
// bidirectional pass-transistor cell it is drawn with.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,   // P = A
  output logic q    // Q = A xor B
);
  assign p = a;
  assign q = a ^ b;
endmodule
