// peres_gate: 3x3 reversible Peres gate.
//
// P = A, Q = A xor B, R = (A and B) xor C. With C tied to 0 the R output is the
// AND of A and B and P, Q are garbage outputs; this is the partial-product
// cell of the multiplier. Unlike the Feynman, Toffoli and Fredkin gates it is
// not its own inverse: the backward computation is A = P, B = P xor Q,
// C = R xor (P and B). Combinational only; the transistor cell is represented
// by its logic function.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,   // P = A
  output logic q,   // Q = A xor B
  output logic r    // R = AB xor C
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
