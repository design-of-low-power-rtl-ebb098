// tb_feynman_gate: exhaustive self-checking test of the Feynman gate.
//
// Applies all four input pairs and checks P = A, Q = A xor B against values
// computed here. It also checks the two reversibility properties of the gate:
// the four output pairs are all different (one-to-one mapping), and a second
// gate fed with the outputs restores the inputs (backward computation
// A = P, B = Q when P = 0 else not Q). A time watchdog ends a hung run.
`timescale 1ns/1ps
module tb_feynman_gate;
  logic a, b, p, q, a2, b2;
  int checks = 0, failures = 0;
  logic [3:0] seen;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));
  feynman_gate inv (.a(p), .b(q), .p(a2), .q(b2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s a=%0b b=%0b p=%0b q=%0b", what, a, b, p, q);
    end
  endtask

  initial begin
    #100us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      check(p == a, "P=A");
      check(q == (a != b), "Q=A^B");
      check(!seen[{p, q}], "one-to-one");
      seen[{p, q}] = 1'b1;
      check(a2 == a && b2 == (p ? ~q : q), "backward");
      check({a2, b2} == {a, b}, "self-inverse");
    end
    check(seen == 4'hF, "all outputs reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
