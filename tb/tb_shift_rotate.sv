// tb_shift_rotate: exhaustive self-checking test of the shift/rotate unit at
// the default distance N = 1 and at N = 3. Expected values are built by
// moving bits one position at a time, N times.
module tb_shift_rotate;
  logic [7:0] a;
  logic [7:0] shl1, shr1, rol1, ror1;
  logic [7:0] shl3, shr3, rol3, ror3;
  int checks = 0, failures = 0;

  shift_rotate           dut1 (.a(a), .shl(shl1), .shr(shr1), .rol(rol1), .ror(ror1));
  shift_rotate #(.N(3))  dut3 (.a(a), .shl(shl3), .shr(shr3), .rol(rol3), .ror(ror3));

  function automatic logic [31:0] model(input logic [7:0] v, input int n);
    logic [7:0] l, r, rl, rr;
    l = v; r = v; rl = v; rr = v;
    for (int k = 0; k < n; k++) begin
      l  = {l[6:0], 1'b0};
      r  = {1'b0, r[7:1]};
      rl = {rl[6:0], rl[7]};
      rr = {rr[0], rr[7:1]};
    end
    return {l, r, rl, rr};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      a = 8'(x);
      #1;
      checks++;
      if ({shl1, shr1, rol1, ror1} !== model(a, 1)) begin
        failures++;
        if (failures < 10) $display("FAIL N=1 a=%h got %h %h %h %h", a, shl1, shr1, rol1, ror1);
      end
      checks++;
      if ({shl3, shr3, rol3, ror3} !== model(a, 3)) begin
        failures++;
        if (failures < 10) $display("FAIL N=3 a=%h got %h %h %h %h", a, shl3, shr3, rol3, ror3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
