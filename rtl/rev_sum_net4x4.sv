// rev_sum_net4x4: summation network of the reversible 4x4 multiplier.
//
// Adds the N rows of partial products into the 2N-bit product with
// (N-1)*N full-adder cells, twelve for N = 4. The cells form the classic
// carry-ripple array: row r (r = 1..N-1) adds partial-product row r to the
// running sum acc[r-1] shifted down by one bit. Cell j of row r takes
//   A = acc[r-1][j+1], B = pp[r][j], Cin = carry of cell j-1 (0 for j = 0)
// and its sum becomes acc[r][j]; the carry of the last cell becomes
// acc[r][N]. Bit 0 of each row's sum is a finished product bit:
//   p[0] = pp[0][0], p[r] = acc[r][0], p[N-1+k] = acc[N-1][k] for k = 1..N.
// Four cell inputs are tied to 0 (the first carry-in of every row and the top
// A input of row 1); these cells act as half adders. The count of twelve cells
// is as specified; the array arrangement is this design's choice.
//
// ADDER selects the cell: the modified full adder (MFA, default) or the TSG
// gate with its C input tied to 0 (A = A, B = B, D = Cin, sum on R, carry on
// S). The two side outputs of every cell are returned on `garbage`: {GiBar, Pi}
// for the MFA, {Q, P} for the TSG gate; index r*N+j-N is cell j of row r.
// Combinational only; the critical path ripples through about 2N-1 cells.
module rev_sum_net4x4
  import rev_pkg::*;
#(
  parameter int unsigned N     = MULT_N,
  parameter adder_e      ADDER = ADDER_MFA
) (
  input  logic [N-1:0][N-1:0]       pp,       // pp[i][j] = x[j] & y[i]
  output logic [2*N-1:0]            p,        // product
  output logic [(N-1)*N-1:0][1:0]   garbage   // side outputs of each cell
);
  // acc[r][k]: running sum after row r, bit k has weight 2**(r+k).
  logic [N-1:0][N:0]   acc;
  // carry[r][j]: carry out of cell j of row r.
  logic [N-1:1][N-1:0] carry;

  assign acc[0] = {1'b0, pp[0]};

  for (genvar r = 1; r < N; r++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_cell
      logic cin;
      if (j == 0) begin : g_cin0
        assign cin = 1'b0;
      end else begin : g_cinj
        assign cin = carry[r][j-1];
      end

      if (ADDER == ADDER_TSG) begin : g_tsg
        tsg_gate u_cell (.a(acc[r-1][j+1]), .b(pp[r][j]), .c(1'b0), .d(cin),
                         .p(garbage[(r-1)*N+j][0]), .q(garbage[(r-1)*N+j][1]),
                         .r(acc[r][j]), .s(carry[r][j]));
      end else begin : g_mfa
        mfa u_cell (.a(acc[r-1][j+1]), .b(pp[r][j]), .c(cin),
                    .s(acc[r][j]), .cout(carry[r][j]),
                    .pr(garbage[(r-1)*N+j][0]), .gbar(garbage[(r-1)*N+j][1]));
      end
    end
    assign acc[r][N] = carry[r][N-1];
  end

  assign p[0] = acc[0][0];
  for (genvar r = 1; r < N - 1; r++) begin : g_low
    assign p[r] = acc[r][0];
  end
  assign p[2*N-1:N-1] = acc[N-1];
endmodule
