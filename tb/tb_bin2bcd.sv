// tb_bin2bcd: exhaustive self-checking test of the binary-to-BCD decoder:
// every value 0-255 against its ones, tens and hundreds digits.
module tb_bin2bcd;
  logic [7:0] bin;
  logic [3:0] bcd1, bcd2, bcd3;
  int checks = 0, failures = 0;

  bin2bcd dut (.bin(bin), .bcd1(bcd1), .bcd2(bcd2), .bcd3(bcd3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      bin = 8'(v);
      #1;
      checks++;
      if (bcd1 !== 4'(v % 10) || bcd2 !== 4'((v / 10) % 10) || bcd3 !== 4'(v / 100)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d -> %0d %0d %0d", v, bcd3, bcd2, bcd1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
