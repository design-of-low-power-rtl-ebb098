// rev_mult4x4: 4x4-bit unsigned reversible multiplier (top level).
//
// p = x * y, computed in two combinational stages:
//   1. rev_ppg4x4 forms the 16 partial products x[j] & y[i] in parallel, one
//      Peres gate per bit with its third input tied to 0;
//   2. rev_sum_net4x4 adds them with twelve modified full adders (MFA) in a
//      carry-ripple array into the 8-bit product.
// Every gate output that the product does not use is brought out, as a
// reversible netlist keeps it: 2 garbage bits per partial-product gate and 2
// side outputs per adder cell.
//
// PPG_GATE and ADDER select the gates of the two stages. The defaults are the
// proposed configuration (Peres + MFA); ADDER_TSG gives the TSG-adder
// multiplier it is compared against, and PPG_TOFFOLI / PPG_FREDKIN the other
// partial-product gates that were considered. N is the operand width; the
// structure is written for any N >= 2, but only N = 4 is the specified size.
// There is no clock and no reset: the product is valid one combinational
// delay after the operands change. The gate, constant-input and side-output
// counts of a configuration are given by the functions in rev_pkg.
module rev_mult4x4
  import rev_pkg::*;
#(
  parameter int unsigned N        = MULT_N,
  parameter adder_e      ADDER    = ADDER_MFA,
  parameter ppg_gate_e   PPG_GATE = PPG_PERES
) (
  input  logic [N-1:0]                 x,              // multiplicand X
  input  logic [N-1:0]                 y,              // multiplier Y
  output logic [2*N-1:0]               p,              // product P = X * Y
  output logic [N-1:0][N-1:0][1:0]     ppg_garbage,    // {Q, P} of each PPG gate
  output logic [(N-1)*N-1:0][1:0]      adder_garbage   // side outputs of each adder
);
  logic [N-1:0][N-1:0] pp;

  rev_ppg4x4 #(.N(N), .GATE(PPG_GATE)) u_ppg (
    .x       (x),
    .y       (y),
    .pp      (pp),
    .garbage (ppg_garbage)
  );

  rev_sum_net4x4 #(.N(N), .ADDER(ADDER)) u_sum (
    .pp      (pp),
    .p       (p),
    .garbage (adder_garbage)
  );
endmodule
