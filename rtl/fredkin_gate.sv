// fredkin_gate: 3x3 reversible Fredkin (controlled-swap) gate.
//
// P = A; when A is 0, Q = B and R = C; when A is 1, B and C are swapped
// (Q = C, R = B). Equivalently Q = A'B + AC and R = AB + A'C. The gate is
// conservative (it preserves the number of ones) and its own inverse. With C
// tied to 0, R = A and B, which is how it serves as a partial-product cell.
// Combinational only.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,   // P = A
  output logic q,   // Q = A'B + AC
  output logic r    // R = AB + A'C
);
  assign p = a;
  assign q = a ? c : b;
  assign r = a ? b : c;
endmodule
