// tb_tsg_gate: exhaustive self-checking test of the TSG gate.
//
// All sixteen inputs are compared with the TSG equations written out here;
// the sixteen output words must all differ (reversible). For the eight inputs
// with C = 0 the gate must act as a full adder of A, B and D: sum on R, carry
// on S, checked against integer addition.
`timescale 1ns/1ps
module tb_tsg_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  logic [15:0] seen;

  tsg_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s abcd=%0b%0b%0b%0b pqrs=%0b%0b%0b%0b", what, a, b, c, d, p, q, r, s);
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
    logic eq;
    int total;
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      eq = ((!a) && (!c)) != (!b);
      check(p == a, "P");
      check(q == eq, "Q");
      check(r == (eq ^ d), "R");
      check(s == ((eq & d) ^ ((a & b) ^ c)), "S");
      check(!seen[{p, q, r, s}], "one-to-one");
      seen[{p, q, r, s}] = 1'b1;
      if (!c) begin
        total = int'(a) + int'(b) + int'(d);
        check(r == total[0] && s == total[1], "full adder");
      end
    end
    check(seen == 16'hFFFF, "all outputs reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
