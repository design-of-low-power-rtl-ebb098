// tb_fredkin_gate: exhaustive self-checking test of the Fredkin gate.
//
// All eight inputs: P = A; B and C pass straight when A = 0 and are swapped
// when A = 1. Checks the conservative property (same number of ones in and
// out), the one-to-one mapping, backward computation through a second gate,
// and R = A and B when C = 0.
`timescale 1ns/1ps
module tb_fredkin_gate;
  logic a, b, c, p, q, r, a2, b2, c2;
  int checks = 0, failures = 0;
  logic [7:0] seen;

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  fredkin_gate inv (.a(p), .b(q), .c(r), .p(a2), .q(b2), .r(c2));

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
      check(p == a, "P=A");
      check(q == (a ? c : b) && r == (a ? b : c), "swap");
      check((int'(p) + int'(q) + int'(r)) == (int'(a) + int'(b) + int'(c)), "conservative");
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
