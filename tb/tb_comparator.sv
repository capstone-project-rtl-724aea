// tb_comparator: exhaustive self-checking test of the unsigned A > B and
// A = B comparator against integer comparison.
module tb_comparator;
  logic [7:0] a, b;
  logic       gt, eq;
  int checks = 0, failures = 0;

  comparator dut (.a(a), .b(b), .gt(gt), .eq(eq));

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
        if (gt !== (x > y) || eq !== (x == y)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d vs %0d gt=%0b eq=%0b", x, y, gt, eq);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
