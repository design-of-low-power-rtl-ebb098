// rev_pkg: shared types of the reversible 4x4 multiplier.
//
// The multiplier is built from two stages, a partial-product generator and a
// summation network, and each stage can be realised with more than one kind
// of reversible gate. The two enums below pick the gate of each stage. The
// defaults used throughout are the proposed configuration: Peres gates for the
// partial products and the modified full adder (MFA) for the summation.
// Toffoli/Fredkin partial products and the TSG adder are the alternatives the
// design is compared against. The encodings are this design's own choice.
package rev_pkg;

  // Gate used to form each partial product x[j] & y[i] (third input tied to 0).
  typedef enum logic [1:0] {
    PPG_PERES   = 2'd0,
    PPG_TOFFOLI = 2'd1,
    PPG_FREDKIN = 2'd2
  } ppg_gate_e;

  // Full-adder cell of the summation network.
  typedef enum logic {
    ADDER_MFA = 1'b0,
    ADDER_TSG = 1'b1
  } adder_e;

  // Operand width of the multiplier.
  localparam int unsigned MULT_N = 4;

  // Cost figures of an N x N multiplier, counted as rev_mult4x4 is built.
  // Gates: one per partial product plus one per adder cell.
  function automatic int unsigned mult_num_gates(int unsigned n);
    return n*n + (n-1)*n;
  endfunction

  // Constant inputs: the tied-0 C input of every partial-product gate, the
  // n tied-0 cell inputs of the summation array and, for TSG cells, the
  // tied-0 C input of every cell.
  function automatic int unsigned mult_num_const_in(int unsigned n, adder_e adder);
    return n*n + n + ((adder == ADDER_TSG) ? (n-1)*n : 0);
  endfunction

  // Gate outputs that do not reach the product: two per partial-product
  // gate and two per adder cell.
  function automatic int unsigned mult_num_side_out(int unsigned n);
    return 2*n*n + 2*(n-1)*n;
  endfunction

endpackage
