// tb_rev_sum_net4x4: exhaustive test of the summation network.
//
// The network adds its four partial-product rows, row i weighted by 2**i, for
// any pattern of the 16 input bits, so all 65536 patterns are applied to an
// MFA-cell instance and a TSG-cell instance and the product is compared with
// sum(pp[i] << i) computed here. The MFA side outputs are also checked: the
// propagate output of the first cell of row r must be the XOR of its two
// operand bits. Patterns where the top product bit P7 is set (a carry out of
// the last cell) are counted and must occur.
`timescale 1ns/1ps
module tb_rev_sum_net4x4;
  import rev_pkg::*;
  localparam int unsigned N = 4;

  logic [N-1:0][N-1:0]     pp;
  logic [2*N-1:0]          p_mfa, p_tsg;
  logic [(N-1)*N-1:0][1:0] g_mfa, g_tsg;
  int checks = 0, failures = 0, top_carry = 0;

  rev_sum_net4x4 #(.N(N), .ADDER(ADDER_MFA)) u_mfa (.pp(pp), .p(p_mfa), .garbage(g_mfa));
  rev_sum_net4x4 #(.N(N), .ADDER(ADDER_TSG)) u_tsg (.pp(pp), .p(p_tsg), .garbage(g_tsg));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s pp=%h mfa=%0d tsg=%0d", what, pp, p_mfa, p_tsg);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want;
    for (int v = 0; v < 65536; v++) begin
      pp = 16'(v);
      #1;
      want = 0;
      for (int i = 0; i < N; i++) want += int'(pp[i]) << i;
      check(int'(p_mfa) == want, "mfa sum");
      check(int'(p_tsg) == want, "tsg sum");
      // First cell of row 1 adds pp[0][1] and pp[1][0] with carry-in 0.
      check(g_mfa[0][0] == (pp[0][1] ^ pp[1][0]), "mfa propagate");
      if (p_mfa[2*N-1]) top_carry++;
    end
    $display("top carry patterns: %0d", top_carry);
    check(top_carry > 0, "top carry exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
