// tb_rev_mult4x4: end-to-end test of the reversible 4x4 multiplier.
//
// Six multiplier instances cover every combination of partial-product gate
// (Peres, Toffoli, Fredkin) and adder cell (MFA, TSG); the first is the
// default configuration. All 256 operand pairs are applied and each product
// is compared with x * y computed here. The garbage outputs of the
// partial-product gates of the default instance are checked against the Peres
// equations, and the cost functions of rev_pkg against the counts of a 4x4
// multiplier (28 gates; 20 constant inputs with MFA cells, 32 with TSG). The test counts, per instance, how often the product needs the
// top bit P7 (a carry out of the last adder) and how often an operand is zero
// (all partial products 0); each must happen at least once. The design is
// combinational, so each vector is checked 1 ns after it is applied.
`timescale 1ns/1ps
module tb_rev_mult4x4;
  import rev_pkg::*;
  localparam int unsigned N  = 4;
  localparam int unsigned NC = 6;

  logic [N-1:0] x, y;
  logic [NC-1:0][2*N-1:0]            p;
  logic [NC-1:0][N-1:0][N-1:0][1:0]  ppg_g;
  logic [NC-1:0][(N-1)*N-1:0][1:0]   add_g;
  int checks = 0, failures = 0;
  int top_bit [NC];
  int zero_op [NC];

  localparam string NAMES [NC] = '{"PG+MFA", "PG+TSG", "TG+MFA", "TG+TSG", "FRG+MFA", "FRG+TSG"};

  rev_mult4x4 #(.N(N), .ADDER(ADDER_MFA), .PPG_GATE(PPG_PERES))
    u_pg_mfa  (.x(x), .y(y), .p(p[0]), .ppg_garbage(ppg_g[0]), .adder_garbage(add_g[0]));
  rev_mult4x4 #(.N(N), .ADDER(ADDER_TSG), .PPG_GATE(PPG_PERES))
    u_pg_tsg  (.x(x), .y(y), .p(p[1]), .ppg_garbage(ppg_g[1]), .adder_garbage(add_g[1]));
  rev_mult4x4 #(.N(N), .ADDER(ADDER_MFA), .PPG_GATE(PPG_TOFFOLI))
    u_tg_mfa  (.x(x), .y(y), .p(p[2]), .ppg_garbage(ppg_g[2]), .adder_garbage(add_g[2]));
  rev_mult4x4 #(.N(N), .ADDER(ADDER_TSG), .PPG_GATE(PPG_TOFFOLI))
    u_tg_tsg  (.x(x), .y(y), .p(p[3]), .ppg_garbage(ppg_g[3]), .adder_garbage(add_g[3]));
  rev_mult4x4 #(.N(N), .ADDER(ADDER_MFA), .PPG_GATE(PPG_FREDKIN))
    u_frg_mfa (.x(x), .y(y), .p(p[4]), .ppg_garbage(ppg_g[4]), .adder_garbage(add_g[4]));
  rev_mult4x4 #(.N(N), .ADDER(ADDER_TSG), .PPG_GATE(PPG_FREDKIN))
    u_frg_tsg (.x(x), .y(y), .p(p[5]), .ppg_garbage(ppg_g[5]), .adder_garbage(add_g[5]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s x=%0d y=%0d", what, x, y);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("FAIL watchdog");
    // Cost figures of the default and the TSG configuration (4x4 bits).
    check(mult_num_gates(N) == 28, "28 gates");
    check(mult_num_const_in(N, ADDER_MFA) == 20, "MFA multiplier: 20 constant inputs");
    check(mult_num_const_in(N, ADDER_TSG) == 32, "TSG multiplier: 32 constant inputs");
    check(mult_num_side_out(N) == 56, "56 side outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want;
    for (int k = 0; k < NC; k++) begin
      top_bit[k] = 0;
      zero_op[k] = 0;
    end
    for (int v = 0; v < 256; v++) begin
      {x, y} = 8'(v);
      #1;
      want = int'(x) * int'(y);
      for (int k = 0; k < NC; k++) begin
        check(int'(p[k]) == want, NAMES[k]);
        if (p[k][2*N-1]) top_bit[k]++;
        if (x == 0 || y == 0) zero_op[k]++;
      end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          check(ppg_g[0][i][j] == {x[j] ^ y[i], x[j]}, "PG garbage");
    end
    for (int k = 0; k < NC; k++) begin
      $display("%-8s products using P7: %0d, zero operand: %0d", NAMES[k], top_bit[k], zero_op[k]);
      check(top_bit[k] > 0, "P7 exercised");
      check(zero_op[k] > 0, "zero operand exercised");
    end
    // Cost figures of the default and the TSG configuration (4x4 bits).
    check(mult_num_gates(N) == 28, "28 gates");
    check(mult_num_const_in(N, ADDER_MFA) == 20, "MFA multiplier: 20 constant inputs");
    check(mult_num_const_in(N, ADDER_TSG) == 32, "TSG multiplier: 32 constant inputs");
    check(mult_num_side_out(N) == 56, "56 side outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
