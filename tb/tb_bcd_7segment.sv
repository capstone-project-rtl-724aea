// tb_bcd_7segment: self-checking test of the seven-segment driver. The
// expected pattern of each digit is given as the letters of its lit segments
// (a..g), turned into an active-low vector; codes 10-15 must be dark.
module tb_bcd_7segment;
  logic [3:0] BCDin;
  logic [0:6] seg;
  int checks = 0, failures = 0;

  bcd_7segment dut (.BCDin(BCDin), .Seven_Segment(seg));

  function automatic logic [0:6] from_letters(input string lit);
    logic [0:6] v;
    v = '1;  // all dark
    for (int k = 0; k < lit.len(); k++) v[lit[k] - "a"] = 1'b0;
    return v;
  endfunction

  string digits [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                         "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [0:6] exp;
    for (int v = 0; v < 16; v++) begin
      BCDin = 4'(v);
      #1;
      exp = (v < 10) ? from_letters(digits[v]) : 7'b1111111;
      checks++;
      if (seg !== exp) begin
        failures++;
        $display("FAIL %0d -> %b exp %b", v, seg, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
