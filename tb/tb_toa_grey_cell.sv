// tb_toa_grey_cell: exhaustive self-check of the grey prefix cell.
// The carry out of the merged group is expected when the upper part generates one, or when it
// propagates a carry generated by the lower part.
module tb_toa_grey_cell;
  logic g_hi, p_hi, g_lo, g_out;
  int checks = 0, failures = 0;

  toa_grey_cell dut (.g_hi(g_hi), .p_hi(p_hi), .g_lo(g_lo), .g_out(g_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic eg;
      {g_hi, p_hi, g_lo} = 3'(v);
      #1;
      if (g_hi)      eg = 1'b1;
      else if (p_hi) eg = g_lo;
      else           eg = 1'b0;
      checks++;
      if (g_out !== eg) begin
        failures++;
        $display("FAIL in=%b g_out=%0b want %0b", 3'(v), g_out, eg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
