// tb_shift_add_mul: exhaustive self-checking test of the 8-bit shift-and-
// add/subtract multiplier against the low 8 bits of the integer product.
module tb_shift_add_mul;
  logic [7:0] a, b, p;
  int checks = 0, failures = 0;

  shift_add_mul dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a = 8'(x); b = 8'(y);
        #1;
        checks++;
        if (p !== 8'((x * y) % 256)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d = %0d", x, y, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
