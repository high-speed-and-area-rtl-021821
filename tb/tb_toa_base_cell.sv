// tb_toa_base_cell: exhaustive self-check of the saltire (base) cell.
// For the 4 input pairs, {G, P} must equal the integer sum S' + cy.
module tb_toa_base_cell;
  logic s, cy, p, g;
  int checks = 0, failures = 0;

  toa_base_cell dut (.s(s), .cy(cy), .p(p), .g(g));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {s, cy} = 2'(v);
      #1;
      checks++;
      if ({g, p} != 2'(int'(s) + int'(cy))) begin
        failures++;
        $display("FAIL s=%0b cy=%0b -> g=%0b p=%0b", s, cy, g, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
