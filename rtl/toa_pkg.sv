// toa_pkg: shared constants and elaboration-time helpers for the three-operand adder.
//
// The carry network of the adder is a Han-Carlson style parallel prefix tree over W = N+1
// (generate, propagate) pairs. The odd bit positions are combined Kogge-Stone fashion, with
// the span doubling at each level (distance 1, 2, 4, ...); the even positions are completed by
// one final row of grey cells. The functions below give the shape of that tree so that the
// prefix module, its testbench and the reader agree on it. Nothing here is hardware.
package toa_pkg;

  // Operand width of the adder as built in the reference design (4-bit, three operands).
  localparam int unsigned TOA_DEFAULT_N = 4;

  // Number of Kogge-Stone levels needed on the odd positions of a W-wide prefix tree:
  // the highest odd index m must be covered down to bit 0, i.e. 2**levels >= m+1.
  function automatic int unsigned hc_odd_levels(input int unsigned w);
    int unsigned m;
    if (w < 2) return 0;
    m = ((w - 1) % 2 == 1) ? (w - 1) : (w - 2);
    return $clog2(m + 1);
  endfunction

  // Total prefix levels: the odd levels plus the final even row (present once W >= 3).
  function automatic int unsigned hc_levels(input int unsigned w);
    return hc_odd_levels(w) + ((w >= 3) ? 1 : 0);
  endfunction

endpackage
