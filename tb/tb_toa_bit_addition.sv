// tb_toa_bit_addition: exhaustive self-check of the bit-addition stage at N = 4.
// Every combination of the three 4-bit operands is applied. Each bit pair (cy_i, S'_i) must
// equal the count of ones among a_i, b_i, c_i, and the whole must satisfy
// a + b + c == S' + 2*cy. Watchdog as in the other testbenches.
module tb_toa_bit_addition;
  localparam int unsigned N = 4;
  logic [N-1:0] a, b, c, sp, cy;
  int checks = 0, failures = 0;

  toa_bit_addition #(.N(N)) dut (.a(a), .b(b), .c(c), .sp(sp), .cy(cy));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (3 * N)); v++) begin
      {a, b, c} = (3 * N)'(v);
      #1;
      for (int i = 0; i < N; i++) begin
        int unsigned cnt;
        cnt = int'(a[i]) + int'(b[i]) + int'(c[i]);
        checks++;
        if ({cy[i], sp[i]} != 2'(cnt)) begin
          failures++;
          $display("FAIL bit %0d a=%h b=%h c=%h sp=%h cy=%h", i, a, b, c, sp, cy);
        end
      end
      checks++;
      if (int'(a) + int'(b) + int'(c) != int'(sp) + 2 * int'(cy)) begin
        failures++;
        $display("FAIL total a=%h b=%h c=%h sp=%h cy=%h", a, b, c, sp, cy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
