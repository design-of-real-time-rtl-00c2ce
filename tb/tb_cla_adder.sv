// tb_cla_adder: self-checking test of the carry lookahead adder.
// Compares sum and carry-out with the integer sum a + b + cin for all
// 8-bit operand pairs with both carry-in values.
module tb_cla_adder;
  logic [7:0] a, b, sum;
  logic       cin, cout;
  int checks = 0, failures = 0;

  cla_adder #(.W(8)) dut (.a, .b, .cin, .sum, .cout);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ci = 0; ci < 2; ci++)
      for (int x = 0; x < 256; x++)
        for (int y = 0; y < 256; y++) begin
          int exp;
          a = 8'(x); b = 8'(y); cin = 1'(ci);
          #1;
          exp = x + y + ci;
          checks++;
          if ({cout, sum} != 9'(exp)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d+%0d+%0d -> %0d", x, y, ci, {cout, sum});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
