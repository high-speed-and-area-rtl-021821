// tb_three_operand_adder_widths: the three-operand adder at widths other than the default.
// Widths 1, 2, 3, 5, 8, 16, 31 and 32 each get random and worst-case operands (see
// tb_toa_width_lane), covering prefix trees from one to six levels. Each width must also have
// produced a carry out at least once.
module tb_three_operand_adder_widths;
  localparam int NL = 8;
  int   l_checks [NL];
  int   l_fail   [NL];
  int   l_couts  [NL];
  logic l_done   [NL];
  int   checks = 0, failures = 0;

  tb_toa_width_lane #(.N(1))  u_n1  (.checks(l_checks[0]), .failures(l_fail[0]), .couts(l_couts[0]), .done(l_done[0]));
  tb_toa_width_lane #(.N(2))  u_n2  (.checks(l_checks[1]), .failures(l_fail[1]), .couts(l_couts[1]), .done(l_done[1]));
  tb_toa_width_lane #(.N(3))  u_n3  (.checks(l_checks[2]), .failures(l_fail[2]), .couts(l_couts[2]), .done(l_done[2]));
  tb_toa_width_lane #(.N(5))  u_n5  (.checks(l_checks[3]), .failures(l_fail[3]), .couts(l_couts[3]), .done(l_done[3]));
  tb_toa_width_lane #(.N(8))  u_n8  (.checks(l_checks[4]), .failures(l_fail[4]), .couts(l_couts[4]), .done(l_done[4]));
  tb_toa_width_lane #(.N(16)) u_n16 (.checks(l_checks[5]), .failures(l_fail[5]), .couts(l_couts[5]), .done(l_done[5]));
  tb_toa_width_lane #(.N(31)) u_n31 (.checks(l_checks[6]), .failures(l_fail[6]), .couts(l_couts[6]), .done(l_done[6]));
  tb_toa_width_lane #(.N(32)) u_n32 (.checks(l_checks[7]), .failures(l_fail[7]), .couts(l_couts[7]), .done(l_done[7]));

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
      if (l_couts[k] == 0) begin
        failures++;
        $display("FAIL lane %0d never produced a carry out", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
