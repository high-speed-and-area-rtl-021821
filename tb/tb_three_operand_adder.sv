// tb_three_operand_adder: end-to-end self-check of the three-operand adder at its default
// width (4 bits, no parameter override).
// Every combination of a, b, c and cin (2**13 vectors) is applied and {cout, s} is compared
// with the integer a + b + c + cin. The run also counts how often each mechanism of the
// design was exercised and fails if one never was:
//   cin      - the external carry input entering base cell 0 as a 1,
//   cout     - a carry out of the top position (result >= 2**(N+1)),
//   top_cell - the extra base cell N receiving a carry cy_(N-1) = 1,
//   chain    - a carry generated at bit 0 and propagated through every bit up to N,
//   black    - the black cell (G3:2) producing a generate through its propagate path.
// The adder is combinational; each vector is sampled 1 time unit after it is applied.
module tb_three_operand_adder;
  localparam int unsigned N = toa_pkg::TOA_DEFAULT_N;
  logic [N-1:0] a, b, c;
  logic         cin;
  logic [N:0]   s;
  logic         cout;
  int checks = 0, failures = 0;
  logic [N:0]   bg, bp;
  int n_cin = 0, n_cout = 0, n_top = 0, n_chain = 0, n_black = 0;

  three_operand_adder dut (.a(a), .b(b), .c(c), .cin(cin), .s(s), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (3 * N + 1)); v++) begin
      int unsigned want;
      {a, b, c, cin} = (3 * N + 1)'(v);
      #1;
      want = int'(a) + int'(b) + int'(c) + int'(cin);
      checks++;
      if ({cout, s} != (N + 2)'(want)) begin
        failures++;
        $display("FAIL a=%0d b=%0d c=%0d cin=%0d -> %0d, want %0d", a, b, c, cin,
                 {cout, s}, want);
      end
      if (cin) n_cin++;
      if (want >= (1 << (N + 1))) n_cout++;
      // Majority of the top operand bits: carry into the extra base cell.
      if (int'(a[N-1]) + int'(b[N-1]) + int'(c[N-1]) >= 2) n_top++;
      // Bit-level generate/propagate worked out from the operands, one weight at a time.
      for (int i = 0; i <= N; i++) begin
        int unsigned lo, hi;
        lo = (i < N) ? (int'(a[i]) + int'(b[i]) + int'(c[i])) % 2 : 0;
        hi = (i == 0) ? int'(cin) : (int'(a[i-1]) + int'(b[i-1]) + int'(c[i-1])) / 2;
        bg[i] = (lo + hi == 2);
        bp[i] = (lo + hi == 1);
      end
      if (bg[0] && (bp[N:1] == '1)) n_chain++;
      if (!bg[3] && bp[3] && bg[2]) n_black++;
    end
    $display("mechanisms: cin=%0d cout=%0d top_cell=%0d chain=%0d black=%0d",
             n_cin, n_cout, n_top, n_chain, n_black);
    checks += 5;
    if (n_cin == 0)   begin failures++; $display("FAIL cin never used"); end
    if (n_cout == 0)  begin failures++; $display("FAIL cout never set"); end
    if (n_top == 0)   begin failures++; $display("FAIL top base cell never fed"); end
    if (n_chain == 0) begin failures++; $display("FAIL no full-length carry chain"); end
    if (n_black == 0) begin failures++; $display("FAIL black cell propagate path unused"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
