// rev_ppg4x4: reversible partial-product generator of the 4x4 multiplier.
//
// All N*N partial products pp[i][j] = x[j] and y[i] are formed in parallel,
// one 3x3 reversible gate per bit: A = x[j], B = y[i], C = 0, and the product
// appears on the R output. The other two outputs of each gate are garbage and
// are returned on `garbage` as {Q, P}. Row i of pp is the partial-product row
// weighted by 2**i, bit j of the row by 2**j.
//
// GATE selects the gate: Peres (default, the proposed choice since it needs
// the fewest gates), Toffoli or Fredkin, the alternatives it was compared
// with. With C = 0 all three give R = A and B. Tying C to 0 and the A/B
// assignment are as described for the Peres cell; applying the same
// connection to the other two gates is this design's choice.
// Combinational only, no clock or reset.
module rev_ppg4x4
  import rev_pkg::*;
#(
  parameter int unsigned N    = MULT_N,
  parameter ppg_gate_e   GATE = PPG_PERES
) (
  input  logic [N-1:0]                   x,
  input  logic [N-1:0]                   y,
  output logic [N-1:0][N-1:0]            pp,       // pp[i][j] = x[j] & y[i]
  output logic [N-1:0][N-1:0][1:0]       garbage   // {Q, P} of gate (i, j)
);
  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      if (GATE == PPG_TOFFOLI) begin : g_tg
        toffoli_gate u_gate (.a(x[j]), .b(y[i]), .c(1'b0),
                             .p(garbage[i][j][0]), .q(garbage[i][j][1]), .r(pp[i][j]));
      end else if (GATE == PPG_FREDKIN) begin : g_frg
        fredkin_gate u_gate (.a(x[j]), .b(y[i]), .c(1'b0),
                             .p(garbage[i][j][0]), .q(garbage[i][j][1]), .r(pp[i][j]));
      end else begin : g_pg
        peres_gate   u_gate (.a(x[j]), .b(y[i]), .c(1'b0),
                             .p(garbage[i][j][0]), .q(garbage[i][j][1]), .r(pp[i][j]));
      end
    end
  end
endmodule
