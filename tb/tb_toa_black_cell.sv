// tb_toa_black_cell: exhaustive self-check of the black prefix cell.
// The expected group values are derived from what a group means: the merged group generates a
// carry if the upper part generates one, or passes on one generated by the lower part; it
// propagates only if both parts propagate.
module tb_toa_black_cell;
  logic g_hi, p_hi, g_lo, p_lo, g_out, p_out;
  int checks = 0, failures = 0;

  toa_black_cell dut (
    .g_hi(g_hi), .p_hi(p_hi), .g_lo(g_lo), .p_lo(p_lo), .g_out(g_out), .p_out(p_out)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic eg, ep;
      {g_hi, p_hi, g_lo, p_lo} = 4'(v);
      #1;
      if (g_hi)      eg = 1'b1;
      else if (p_hi) eg = g_lo;
      else           eg = 1'b0;
      ep = (p_hi && p_lo) ? 1'b1 : 1'b0;
      checks += 2;
      if (g_out !== eg) begin
        failures++;
        $display("FAIL G: in=%b g_out=%0b want %0b", 4'(v), g_out, eg);
      end
      if (p_out !== ep) begin
        failures++;
        $display("FAIL P: in=%b p_out=%0b want %0b", 4'(v), p_out, ep);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
