// tb_logic_unit: exhaustive self-checking test of the six bitwise logic
// operations. The expected bits come from each operation's truth table,
// looked up bit by bit.
module tb_logic_unit;
  logic [7:0] a, b, y_and, y_or, y_xor, y_nor, y_nand, y_xnor;
  int checks = 0, failures = 0;

  logic_unit dut (.a(a), .b(b), .y_and(y_and), .y_or(y_or), .y_xor(y_xor),
                  .y_nor(y_nor), .y_nand(y_nand), .y_xnor(y_xnor));

  // truth tables, indexed by {a_bit, b_bit}: rows 00 01 10 11
  localparam logic [3:0] TT_AND  = 4'b1000;
  localparam logic [3:0] TT_OR   = 4'b1110;
  localparam logic [3:0] TT_XOR  = 4'b0110;
  localparam logic [3:0] TT_NOR  = 4'b0001;
  localparam logic [3:0] TT_NAND = 4'b0111;
  localparam logic [3:0] TT_XNOR = 4'b1001;

  function automatic logic [7:0] apply(input logic [3:0] tt, input logic [7:0] x, input logic [7:0] y);
    logic [7:0] res;
    for (int i = 0; i < 8; i++) res[i] = tt[{x[i], y[i]}];
    return res;
  endfunction

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
        if (y_and  !== apply(TT_AND,  a, b) || y_or   !== apply(TT_OR,   a, b) ||
            y_xor  !== apply(TT_XOR,  a, b) || y_nor  !== apply(TT_NOR,  a, b) ||
            y_nand !== apply(TT_NAND, a, b) || y_xnor !== apply(TT_XNOR, a, b)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%h b=%h", a, b);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
