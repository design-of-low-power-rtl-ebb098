// tb_mfa: exhaustive self-checking test of the modified full adder.
//
// All eight input combinations: {Cout, Si} must equal Ai + Bi + Ci computed
// as integers, Pi must be Ai xor Bi and GiBar the complement of Ai and Bi.
`timescale 1ns/1ps
module tb_mfa;
  logic a, b, c, s, cout, pr, gbar;
  int checks = 0, failures = 0;

  mfa dut (.a(a), .b(b), .c(c), .s(s), .cout(cout), .pr(pr), .gbar(gbar));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s abc=%0b%0b%0b s=%0b cout=%0b pr=%0b gbar=%0b",
               what, a, b, c, s, cout, pr, gbar);
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
    int total;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(c);
      check(s == total[0], "sum");
      check(cout == total[1], "carry");
      check(pr == (a != b), "propagate");
      check(gbar == !(a && b), "generate bar");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
