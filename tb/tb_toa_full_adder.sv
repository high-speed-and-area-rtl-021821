// tb_toa_full_adder: exhaustive self-check of the full-adder cell.
// All 8 input combinations are applied; the expected sum and carry are the two bits of the
// integer count a+b+c. A watchdog ends the run with a failure if it ever hangs.
module tb_toa_full_adder;
  logic a, b, c, s, cy;
  int   checks = 0, failures = 0;

  toa_full_adder dut (.a(a), .b(b), .c(c), .s(s), .cy(cy));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int unsigned cnt;
      {a, b, c} = 3'(v);
      #1;
      cnt = int'(a) + int'(b) + int'(c);
      checks++;
      if ({cy, s} != 2'(cnt)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b -> cy=%0b s=%0b, want %0d", a, b, c, cy, s, cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
