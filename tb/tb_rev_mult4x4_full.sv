// tb_rev_mult4x4_full: the multiplier at its default configuration.
//
// Instantiates the top with no parameter overrides (4x4 bits, Peres partial
// products, MFA adders) and multiplies all 256 operand pairs, comparing each
// product with x * y. The maximum product 15 * 15 = 225 is checked by name.
`timescale 1ns/1ps
module tb_rev_mult4x4_full;
  logic [3:0] x, y;
  logic [7:0] p;
  logic [3:0][3:0][1:0] ppg_g;
  logic [11:0][1:0]     add_g;
  int checks = 0, failures = 0;

  rev_mult4x4 dut (.x(x), .y(y), .p(p), .ppg_garbage(ppg_g), .adder_garbage(add_g));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s x=%0d y=%0d p=%0d", what, x, y, p);
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
    for (int v = 0; v < 256; v++) begin
      {x, y} = 8'(v);
      #1;
      check(int'(p) == int'(x) * int'(y), "product");
    end
    x = 4'd15;
    y = 4'd15;
    #1;
    check(p == 8'd225, "15*15");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
