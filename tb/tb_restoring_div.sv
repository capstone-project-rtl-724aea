// tb_restoring_div: exhaustive self-checking test of the 8-bit divider.
// For b > 0 quotient and remainder are compared with integer / and %; for
// b = 0 the defined result is quotient 255 and remainder a.
module tb_restoring_div;
  logic [7:0] a, b, q, r;
  int checks = 0, failures = 0;

  restoring_div dut (.a(a), .b(b), .q(q), .r(r));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int eq, er;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a = 8'(x); b = 8'(y);
        #1;
        if (y == 0) begin eq = 255; er = x; end
        else begin eq = x / y; er = x % y; end
        checks++;
        if (q !== 8'(eq) || r !== 8'(er)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d/%0d = %0d r %0d", x, y, q, r);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
