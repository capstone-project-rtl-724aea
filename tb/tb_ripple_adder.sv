// tb_ripple_adder: exhaustive self-checking test of the 8-bit ripple-carry
// adder: every operand pair with carry in 0 and 1, sum and carry out against
// integer addition; also the subtraction use (b inverted, carry in 1).
module tb_ripple_adder;
  logic [7:0] a, b, sum;
  logic       cin, cout;
  int checks = 0, failures = 0;

  ripple_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int c = 0; c < 2; c++) begin
          a = 8'(x); b = 8'(y); cin = 1'(c);
          #1;
          checks++;
          if ({cout, sum} !== 9'(x + y + c)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d+%0d+%0d = %0d", x, y, c, {cout, sum});
          end
        end
    // subtraction by two's complement
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y += 7) begin
        a = 8'(x); b = ~8'(y); cin = 1'b1;
        #1;
        checks++;
        if (sum !== 8'((x - y) & 255)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d-%0d = %0d", x, y, sum);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
