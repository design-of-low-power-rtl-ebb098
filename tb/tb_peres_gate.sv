// tb_peres_gate: exhaustive self-checking test of the Peres gate.
//
// All eight inputs: P = A, Q = A xor B, R = AB xor C. Checks the one-to-one
// mapping, that the inputs can be recovered from the outputs with the
// backward equations A = P, B = P xor Q, C = R xor (A and B), and that with
// C = 0 the R output is A and B (partial-product use).
`timescale 1ns/1ps
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  logic [7:0] seen;

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

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
    logic ra, rb, rc;
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check(p == a, "P=A");
      check(q == (a ^ b), "Q=A^B");
      check(r == ((a & b) ^ c), "R=AB^C");
      if (!c) check(r == (a & b), "AND with C=0");
      check(!seen[{p, q, r}], "one-to-one");
      seen[{p, q, r}] = 1'b1;
      ra = p;
      rb = p ^ q;
      rc = r ^ (ra & rb);
      check({ra, rb, rc} == {a, b, c}, "backward");
    end
    check(seen == 8'hFF, "all outputs reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
