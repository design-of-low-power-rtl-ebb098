// tsg_gate: 4x4 reversible TSG gate, used with C = 0 as a full adder.
//
// Outputs (standard TSG definition):
//   P = A
//   Q = (A' and C') xor B'
//   R = Q xor D
//   S = (Q and D) xor ((A and B) xor C)
// With C tied to 0, Q reduces to A xor B, R = A xor B xor D is the sum and
// S = (A xor B)D xor AB is the carry of A, B and D; P and Q are the garbage
// outputs. The gate equations are the commonly published ones, since the
// design description gives only the gate's role as a full adder.
// Combinational only.
module tsg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic t;
  assign t = (~a & ~c) ^ ~b;
  assign p = a;
  assign q = t;
  assign r = t ^ d;
  assign s = (t & d) ^ ((a & b) ^ c);
endmodule
