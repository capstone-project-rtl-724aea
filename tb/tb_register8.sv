// tb_register8: self-checking test of the operand register (a latch).
// Checks that the output follows the input while s and e are 1, holds when
// s drops, holds while e is 0 even with s at 1, and follows again.
module tb_register8;
  logic [7:0] i, o, held;
  logic       s, e;
  int checks = 0, failures = 0;

  register8 dut (.i(i), .s(s), .e(e), .o(o));

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (o !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: o=%h exp %h", what, o, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e = 1'b1; s = 1'b0; i = 8'h00;
    #1;
    for (int n = 0; n < 200; n++) begin
      // store
      s = 1'b1; e = 1'b1; i = 8'($urandom);
      #1; check(i, "transparent");
      i = 8'($urandom);
      #1; check(i, "follows while stored");
      held = i;
      s = 1'b0;
      #1;
      for (int k = 0; k < 3; k++) begin
        i = 8'($urandom);
        #1; check(held, "hold with s=0");
      end
      e = 1'b0; s = 1'b1;
      for (int k = 0; k < 3; k++) begin
        i = ~held ^ 8'(k);
        #1; check(held, "hold with e=0");
      end
      s = 1'b0; e = 1'b1;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
