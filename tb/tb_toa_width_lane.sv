// tb_toa_width_lane: one width of the adder check, used by tb_three_operand_adder_widths.
// Instantiates three_operand_adder at width N (1..32) and applies NVEC random operand sets,
// every eighth one forced to all-ones operands with cin = 1 (the largest possible sum), and
// compares {cout, s} with the 64-bit integer sum. Results come out on checks/failures/done.
module tb_toa_width_lane #(
  parameter int unsigned N    = 8,
  parameter int unsigned NVEC = 3000
) (
  output int   checks,
  output int   failures,
  output int   couts,
  output logic done
);
  logic [N-1:0] a, b, c;
  logic         cin;
  logic [N:0]   s;
  logic         cout;

  three_operand_adder #(.N(N)) dut (.a(a), .b(b), .c(c), .cin(cin), .s(s), .cout(cout));

  initial begin
    checks = 0;
    failures = 0;
    couts = 0;
    done = 1'b0;
    for (int unsigned v = 0; v < NVEC; v++) begin
      longint unsigned want, got;
      a   = N'($urandom());
      b   = N'($urandom());
      c   = N'($urandom());
      cin = 1'($urandom());
      if (v % 8 == 0) begin
        a = '1;
        b = '1;
        c = '1;
        cin = 1'b1;
      end
      #1;
      want = longint'(a) + longint'(b) + longint'(c) + longint'(cin);
      got  = longint'({cout, s});
      if (cout) couts++;
      checks++;
      if (got != want) begin
        failures++;
        $display("FAIL N=%0d a=%h b=%h c=%h cin=%0b -> %h, want %h", N, a, b, c, cin, got, want);
      end
    end
    done = 1'b1;
  end
endmodule
