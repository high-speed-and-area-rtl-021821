// tb_toa_pg_logic: self-check of the Han-Carlson style prefix network.
// The 4-bit adder's network (N = 4, five positions) is checked exhaustively, and other widths
// (1, 2, 3, 7, 8, 16, 31) exhaustively or with random vectors, against a ripple reference.
// This exercises every shape of the tree: no odd levels, one, and up to five. It also checks
// that at least one full-length carry chain (generated at bit 0, propagated to bit N) was
// applied at each width.
module tb_toa_pg_logic;
  localparam int NL = 8;
  int   l_checks [NL];
  int   l_fail   [NL];
  int   l_chains [NL];
  logic l_done   [NL];
  int   checks = 0, failures = 0;

  tb_pg_lane #(.N(4))  u_n4  (.checks(l_checks[0]), .failures(l_fail[0]), .chains(l_chains[0]), .done(l_done[0]));
  tb_pg_lane #(.N(1))  u_n1  (.checks(l_checks[1]), .failures(l_fail[1]), .chains(l_chains[1]), .done(l_done[1]));
  tb_pg_lane #(.N(2))  u_n2  (.checks(l_checks[2]), .failures(l_fail[2]), .chains(l_chains[2]), .done(l_done[2]));
  tb_pg_lane #(.N(3))  u_n3  (.checks(l_checks[3]), .failures(l_fail[3]), .chains(l_chains[3]), .done(l_done[3]));
  tb_pg_lane #(.N(7))  u_n7  (.checks(l_checks[4]), .failures(l_fail[4]), .chains(l_chains[4]), .done(l_done[4]));
  tb_pg_lane #(.N(8))  u_n8  (.checks(l_checks[5]), .failures(l_fail[5]), .chains(l_chains[5]), .done(l_done[5]));
  tb_pg_lane #(.N(16)) u_n16 (.checks(l_checks[6]), .failures(l_fail[6]), .chains(l_chains[6]), .done(l_done[6]));
  tb_pg_lane #(.N(31)) u_n31 (.checks(l_checks[7]), .failures(l_fail[7]), .chains(l_chains[7]), .done(l_done[7]));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int k = 0; k < NL; k++) wait (l_done[k]);
    for (int k = 0; k < NL; k++) begin
      checks   += l_checks[k];
      failures += l_fail[k];
      checks++;
      if (l_chains[k] == 0) begin
        failures++;
        $display("FAIL lane %0d never saw a full-length carry chain", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
