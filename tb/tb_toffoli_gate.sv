// tb_toffoli_gate: exhaustive self-checking test of the Toffoli gate.
//
// All eight inputs: P = A, Q = B, R = C when A and B is 0, else not C. Checks
// that the outputs are a permutation of the inputs (reversible), that a
// second gate on the outputs restores the inputs, and that with C = 0 the R
// output is A and B (its use as a partial-product cell).
`timescale 1ns/1ps
module tb_toffoli_gate;
  logic a, b, c, p, q, r, a2, b2, c2;
  int checks = 0, failures = 0;
  logic [7:0] seen;

  toffoli_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  toffoli_gate inv (.a(p), .b(q), .c(r), .p(a2), .q(b2), .r(c2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s abc=%0b%0b%0b pqr=%0b%0b%0b", what, a, b, c, p, q, r);
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
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check(p == a && q == b, "P=A Q=B");
      check(r == ((a && b) ? ~c : c), "R");
      if (!c) check(r == (a & b), "AND with C=0");
      check(!seen[{p, q, r}], "one-to-one");
      seen[{p, q, r}] = 1'b1;
      check({a2, b2, c2} == {a, b, c}, "backward");
    end
    check(seen == 8'hFF, "all outputs reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
