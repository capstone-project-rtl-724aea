// tb_mux16: self-checking test of the 16-to-1 AND-OR multiplexer.
// For both the single-bit default and an 8-bit instance it applies random
// data to all 16 inputs and checks, for every select value, that the output
// equals the input whose index is the select value.
module tb_mux16;
  logic       d1 [16];
  logic [7:0] d8 [16];
  logic [3:0] s;
  logic       y1;
  logic [7:0] y8;
  int checks = 0, failures = 0;

  mux16             dut1 (.d(d1), .s(s), .y(y1));
  mux16 #(.WIDTH(8)) dut8 (.d(d8), .s(s), .y(y8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 200; round++) begin
      for (int k = 0; k < 16; k++) begin
        d1[k] = 1'($urandom);
        d8[k] = 8'($urandom);
      end
      // one round with a single hot input to catch stray enables
      if (round == 0) for (int k = 0; k < 16; k++) begin d1[k] = (k == 5); d8[k] = (k == 5) ? 8'hA5 : 8'h00; end
      for (int sel = 0; sel < 16; sel++) begin
        s = 4'(sel);
        #1;
        checks++;
        if (y1 !== d1[sel] || y8 !== d8[sel]) begin
          failures++;
          if (failures < 10) $display("FAIL s=%0d y1=%0b exp %0b y8=%h exp %h", sel, y1, d1[sel], y8, d8[sel]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
