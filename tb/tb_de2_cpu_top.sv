// tb_de2_cpu_top: end-to-end test of the whole CPU at its default
// parameters, driven only through the board switches and checked only on the
// LEDs and the seven-segment displays.
//
// Each round stores operand A (switches 7..0, then switch 10 up and down)
// and operand B (switch 11), then scrambles switches 7..0 and checks that
// both registers held their values. It then steps the opcode switches 17..14
// through all 16 operations and checks the green LEDs against a reference
// model of the instruction set and the three result digits against the
// decimal value of the result. The red LEDs and the two digits of each
// operand are checked in every round. Directed rounds cover the display of
// 123 as 1-2-3, operands above 99, division by zero and the largest values.
// Every mechanism (stores, holds, each opcode, three-digit results, operands
// over 99, division by zero, both comparison outcomes) is counted and must
// have happened at least once.
module tb_de2_cpu_top;
  logic [17:0] SW;
  logic [17:0] LEDR;
  logic [7:0]  LEDG;
  logic [0:6]  HEX0, HEX1, HEX2, HEX4, HEX5, HEX6, HEX7;
  int checks = 0, failures = 0;

  de2_cpu_top dut (.SW(SW), .LEDR(LEDR), .LEDG(LEDG), .HEX0(HEX0), .HEX1(HEX1),
                   .HEX2(HEX2), .HEX4(HEX4), .HEX5(HEX5), .HEX6(HEX6), .HEX7(HEX7));

  // mechanism counters
  int n_store_a = 0, n_store_b = 0, n_hold = 0, n_follow = 0;
  int n_op [16];
  int n_three_digit = 0, n_big_operand = 0, n_div_zero = 0, n_gt_true = 0, n_eq_true = 0;

  string digits [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                         "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};

  // active-low segment pattern of a decimal digit, from its lit segments
  function automatic logic [0:6] seg_of(input int d);
    logic [0:6] v;
    v = '1;
    for (int k = 0; k < digits[d].len(); k++) v[digits[d][k] - "a"] = 1'b0;
    return v;
  endfunction

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

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (SW=%h LEDR=%h LEDG=%h)", what, SW, LEDR, LEDG);
    end
  endtask

  task automatic store(input int v, input int which);  // which: 0 = A, 1 = B
    SW[7:0] = 8'($urandom);
    SW[10 + which] = 1'b1;
    #1;
    SW[7:0] = 8'(v);  // switches change while stored: register follows
    #1;
    if (which == 0) begin check(LEDR[7:0] == 8'(v), "A follows while stored"); n_store_a++; end
    else            begin check(LEDR[17:10] == 8'(v), "B follows while stored"); n_store_b++; end
    n_follow++;
    SW[10 + which] = 1'b0;
    #1;
  endtask

  task automatic check_operands(input int a, input int b);
    check(LEDR[7:0] == 8'(a), "LEDR[7:0] shows A");
    check(LEDR[17:10] == 8'(b), "LEDR[17:10] shows B");
    check(LEDR[9:8] == 2'b00, "LEDR[9:8] dark");
    check(HEX4 == seg_of(a % 10) && HEX5 == seg_of((a / 10) % 10), "HEX5/HEX4 show A");
    check(HEX6 == seg_of(b % 10) && HEX7 == seg_of((b / 10) % 10), "HEX7/HEX6 show B");
    if (a > 99 || b > 99) n_big_operand++;
  endtask

  task automatic run_round(input int a, input int b);
    int exp;
    store(a, 0);
    store(b, 1);
    // operand switches move on, registers must hold
    SW[7:0] = ~8'(b);
    #1;
    check(LEDR[7:0] == 8'(a) && LEDR[17:10] == 8'(b), "registers hold");
    n_hold++;
    check_operands(a, b);
    for (int op = 0; op < 16; op++) begin
      SW[17:14] = 4'(op);
      #1;
      exp = int'(ref_alu(op, a, b));
      check(LEDG == 8'(exp), $sformatf("op %0d A=%0d B=%0d result %0d exp %0d", op, a, b, LEDG, exp));
      check(HEX0 == seg_of(exp % 10) && HEX1 == seg_of((exp / 10) % 10) &&
            HEX2 == seg_of(exp / 100), $sformatf("result digits for %0d", exp));
      n_op[op]++;
      if (exp > 99) n_three_digit++;
      if (op == 3 && b == 0) n_div_zero++;
      if (op == 14 && exp == 1) n_gt_true++;
      if (op == 15 && exp == 1) n_eq_true++;
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hex2_one;
    for (int k = 0; k < 16; k++) n_op[k] = 0;
    SW = '0;
    #1;
    // the display example: 100 + 23 = 123 shows 1-2-3
    run_round(100, 23);
    SW[17:14] = 4'b0000;
    #1;
    check(HEX2 == seg_of(1) && HEX1 == seg_of(2) && HEX0 == seg_of(3), "123 shown as 1-2-3");
    run_round(200, 0);    // division by zero, operand over 99
    run_round(255, 255);  // largest values, A = B
    run_round(7, 11);
    run_round(11, 5);
    for (int n = 0; n < 300; n++) run_round(int'($urandom_range(255)), int'($urandom_range(255)));

    // every mechanism must have happened
    check(n_store_a > 0, "store A never happened");
    check(n_store_b > 0, "store B never happened");
    check(n_follow > 0, "transparent store never happened");
    check(n_hold > 0, "hold never happened");
    for (int k = 0; k < 16; k++) check(n_op[k] > 0, $sformatf("opcode %0d never exercised", k));
    check(n_three_digit > 0, "three-digit result never happened");
    check(n_big_operand > 0, "operand over 99 never happened");
    check(n_div_zero > 0, "division by zero never happened");
    check(n_gt_true > 0, "A > B true never happened");
    check(n_eq_true > 0, "A = B true never happened");
    $display("mechanisms: storeA=%0d storeB=%0d hold=%0d three_digit=%0d big_operand=%0d div0=%0d gt=%0d eq=%0d",
             n_store_a, n_store_b, n_hold, n_three_digit, n_big_operand, n_div_zero, n_gt_true, n_eq_true);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
