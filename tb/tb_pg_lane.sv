// tb_pg_lane: one width of the prefix-network check, used by tb_toa_pg_logic.
// Instantiates toa_pg_logic at width N and applies either every (G, P) input (when
// 2*(N+1) <= 12) or NRAND random ones. The expected carries come from a bit-serial ripple:
// carry_i = G_i | (P_i & carry_(i-1)). It also counts vectors whose carry is generated at
// bit 0 and rippled through every position to bit N (the longest path of the network).
// Results are reported through checks, failures, chains and done.
module tb_pg_lane #(
  parameter int unsigned N     = 4,
  parameter int unsigned NRAND = 2000
) (
  output int   checks,
  output int   failures,
  output int   chains,
  output logic done
);
  logic [N:0] g, p, gg;

  toa_pg_logic #(.N(N)) dut (.g(g), .p(p), .gg(gg));

  localparam bit EXHAUSTIVE = (2 * (N + 1) <= 12);
  localparam int unsigned NVEC = EXHAUSTIVE ? (1 << (2 * (N + 1))) : NRAND;

  initial begin
    checks = 0;
    failures = 0;
    chains = 0;
    done = 1'b0;
    for (int unsigned v = 0; v < NVEC; v++) begin
      logic carry;
      logic [N:0] exp_gg;
      if (EXHAUSTIVE) begin
        {g, p} = (2 * N + 2)'(v);
      end else begin
        g = (N + 1)'({$urandom(), $urandom()});
        p = (N + 1)'({$urandom(), $urandom()});
        // Bias every fourth vector to a long propagate run.
        if (v % 4 == 0) begin
          p = '1;
          g = (N + 1)'(1);
        end
      end
      #1;
      carry = 1'b0;
      for (int i = 0; i <= N; i++) begin
        carry = g[i] | (p[i] & carry);
        exp_gg[i] = carry;
      end
      if (g[0] && (p[N:1] == '1) && (g[N:1] == '0)) chains++;
      checks++;
      if (gg !== exp_gg) begin
        failures++;
        $display("FAIL N=%0d g=%b p=%b gg=%b want %b", N, g, p, gg, exp_gg);
      end
    end
    done = 1'b1;
  end
endmodule
