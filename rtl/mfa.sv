// mfa: modified full adder (MFA), the adder cell of the proposed multiplier.
//
// The cell splits the full adder into its propagate/generate form:
//   Pi    = Ai xor Bi          (first XOR stage)
//   Si    = Pi xor Ci          (second XOR stage, the sum)
//   GiBar = not (Ai and Bi)    (inverted generate)
//   Cout  = not GiBar or (Pi and Ci)
// The two XOR stages follow the cell's drawing and are built from Feynman
// gates. The drawing names GiBar and Cout but does not mark the type of the
// gates that make them; taking GiBar as the inverted generate and Cout as the
// ordinary full-adder carry is this design's reading. Pi and GiBar are
// brought out as side outputs. Combinational only.
module mfa (
  input  logic a,      // Ai
  input  logic b,      // Bi
  input  logic c,      // Ci, carry in
  output logic s,      // Si, sum
  output logic cout,   // carry out
  output logic pr,     // Pi, propagate
  output logic gbar    // GiBar, inverted generate
);
  logic p_thru;

  // The first gate's P output is only a copy of Ai and is left open.
  feynman_gate u_fg_p (.a(a),  .b(b), .p(),       .q(pr));
  feynman_gate u_fg_s (.a(pr), .b(c), .p(p_thru), .q(s));

  assign gbar = ~(a & b);
  assign cout = ~gbar | (p_thru & c);
endmodule
