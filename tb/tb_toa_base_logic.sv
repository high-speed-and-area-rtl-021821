// tb_toa_base_logic: exhaustive self-check of the base-logic stage at N = 4.
// Every S', cy and cin is applied. Each position must give {G_i, P_i} equal to the count of
// the two bits of weight 2**i (S'_i and cy_(i-1), cin at 0, nothing but cy_(N-1) at N), and
// the arithmetic value S' + 2*cy + cin must equal P + 2*G.
module tb_toa_base_logic;
  localparam int unsigned N = 4;
  logic [N-1:0] sp, cy;
  logic         cin;
  logic [N:0]   g, p;
  int checks = 0, failures = 0;

  toa_base_logic #(.N(N)) dut (.sp(sp), .cy(cy), .cin(cin), .g(g), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * N + 1)); v++) begin
      {sp, cy, cin} = (2 * N + 1)'(v);
      #1;
      for (int i = 0; i <= N; i++) begin
        int unsigned cnt;
        cnt = ((i < N) ? int'(sp[i]) : 0) + ((i == 0) ? int'(cin) : int'(cy[i-1]));
        checks++;
        if ({g[i], p[i]} != 2'(cnt)) begin
          failures++;
          $display("FAIL pos %0d sp=%h cy=%h cin=%0b g=%h p=%h", i, sp, cy, cin, g, p);
        end
      end
      checks++;
      if (int'(sp) + 2 * int'(cy) + int'(cin) != int'(p) + 2 * int'(g)) begin
        failures++;
        $display("FAIL total sp=%h cy=%h cin=%0b g=%h p=%h", sp, cy, cin, g, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
