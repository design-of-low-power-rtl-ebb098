// tb_rev_ppg4x4: exhaustive test of the partial-product generator.
//
// Three instances, one per gate choice (Peres, Toffoli, Fredkin), see all 256
// operand pairs. Every partial product must be x[j] & y[i]; the garbage
// outputs must be the gate's other two outputs for A = x[j], B = y[i], C = 0:
// Peres {A^B, A}, Toffoli {B, A}, Fredkin {A'B, A}.
`timescale 1ns/1ps
module tb_rev_ppg4x4;
  import rev_pkg::*;
  localparam int unsigned N = 4;

  logic [N-1:0] x, y;
  logic [N-1:0][N-1:0]      pp_pg, pp_tg, pp_frg;
  logic [N-1:0][N-1:0][1:0] g_pg, g_tg, g_frg;
  int checks = 0, failures = 0;

  rev_ppg4x4 #(.N(N), .GATE(PPG_PERES))   u_pg  (.x(x), .y(y), .pp(pp_pg),  .garbage(g_pg));
  rev_ppg4x4 #(.N(N), .GATE(PPG_TOFFOLI)) u_tg  (.x(x), .y(y), .pp(pp_tg),  .garbage(g_tg));
  rev_ppg4x4 #(.N(N), .GATE(PPG_FREDKIN)) u_frg (.x(x), .y(y), .pp(pp_frg), .garbage(g_frg));

  task automatic check(input bit ok, input string what, input int i, input int j);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s x=%h y=%h i=%0d j=%0d", what, x, y, i, j);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic xa, yb, want;
    for (int v = 0; v < 256; v++) begin
      {x, y} = 8'(v);
      #1;
      for (int i = 0; i < N; i++) begin
        for (int j = 0; j < N; j++) begin
          xa = x[j];
          yb = y[i];
          want = xa & yb;
          check(pp_pg[i][j]  == want, "peres pp",   i, j);
          check(pp_tg[i][j]  == want, "toffoli pp", i, j);
          check(pp_frg[i][j] == want, "fredkin pp", i, j);
          check(g_pg[i][j]  == {xa ^ yb, xa},   "peres garbage",   i, j);
          check(g_tg[i][j]  == {yb, xa},        "toffoli garbage", i, j);
          check(g_frg[i][j] == {~xa & yb, xa},  "fredkin garbage", i, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
