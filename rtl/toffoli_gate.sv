// toffoli_gate: 3x3 reversible Toffoli (controlled-controlled-NOT) gate.
//
// Two-through gate: P = A, Q = B, R = (A and B) xor C. With C tied to 0 the R
// output is the AND of A and B, which makes it usable as a partial-product
// cell. The gate is its own inverse. Combinational only; the transistor
// implementation is represented by its logic function.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,   // P = A
  output logic q,   // Q = B
  output logic r    // R = AB xor C
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
