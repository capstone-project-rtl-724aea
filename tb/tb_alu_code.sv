// tb_alu_code: exhaustive self-checking test of the ALU-CU. Every opcode is
// applied with every pair of 8-bit operands (16 x 65536 cases), and the
// result is compared with an integer reference model of the instruction set.
// Each opcode is counted and must have been exercised.
module tb_alu_code;
  import cpu_pkg::*;
  logic [7:0] A, B, O;
  logic [3:0] OP;
  int checks = 0, failures = 0;
  int op_seen [16];

  alu_code dut (.A(A), .B(B), .OP(OP), .O(O));

  function automatic logic [7:0] ref_alu(input int op, input int a, input int b);
    case (op)
      0:  return 8'((a + b) % 256);
      1:  return 8'((a - b + 256) % 256);
      2:  return 8'((a * b) % 256);
      3:  return (b == 0) ? 8'd255 : 8'(a / b);
      4:  return 8'((a * 2) % 256);
      5:  return 8'(a / 2);
      6:  return 8'(((a * 2) % 256) + a / 128);
      7:  return 8'(a / 2 + (a % 2) * 128);
      8:  return 8'(a & b);
      9:  return 8'(a | b);
      10: return 8'(a ^ b);
      11: return 8'(255 - (a | b));
      12: return 8'(255 - (a & b));
      13: return 8'(255 - (a ^ b));
      14: return 8'(a > b);
      default: return 8'(a == b);
    endcase
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) op_seen[k] = 0;
    for (int op = 0; op < 16; op++)
      for (int x = 0; x < 256; x++)
        for (int y = 0; y < 256; y++) begin
          A = 8'(x); B = 8'(y); OP = 4'(op);
          #1;
          checks++;
          op_seen[op]++;
          if (O !== ref_alu(op, x, y)) begin
            failures++;
            if (failures < 10) $display("FAIL op=%s A=%0d B=%0d O=%0d exp %0d",
                                        opcode_e'(OP), x, y, O, ref_alu(op, x, y));
          end
        end
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (op_seen[k] == 0) begin
        failures++;
        $display("FAIL opcode %0d never exercised", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
