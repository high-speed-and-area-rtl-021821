// tb_toa_sum_logic: exhaustive self-check of the sum stage at N = 4.
// For every P and carry vector, bit i of the result must be P_i flipped by the carry into
// bit i (none into bit 0), and Cout must be the carry out of bit N.
module tb_toa_sum_logic;
  localparam int unsigned N = 4;
  logic [N:0] p, gg, s;
  logic       cout;
  int checks = 0, failures = 0;

  toa_sum_logic #(.N(N)) dut (.p(p), .gg(gg), .s(s), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * N + 2)); v++) begin
      {p, gg} = (2 * N + 2)'(v);
      #1;
      for (int i = 0; i <= N; i++) begin
        logic carry_in, e;
        carry_in = (i == 0) ? 1'b0 : gg[i-1];
        e = (p[i] != carry_in);
        checks++;
        if (s[i] !== e) begin
          failures++;
          $display("FAIL bit %0d p=%b gg=%b s=%b", i, p, gg, s);
        end
      end
      checks++;
      if (cout !== gg[N]) begin
        failures++;
        $display("FAIL cout p=%b gg=%b cout=%0b", p, gg, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
