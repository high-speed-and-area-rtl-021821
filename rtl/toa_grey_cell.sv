// toa_grey_cell: grey prefix cell of the PG stage.
//
// Used where the merged group reaches bit 0, so that only its generate (the carry into the
// next bit) is ever needed:  G_i:0 = G_i:k + P_i:k . G_(k-1):0.
// It is a black cell without the propagate AND. Combinational.
module toa_grey_cell (
  input  logic g_hi,   // G_i:k
  input  logic p_hi,   // P_i:k
  input  logic g_lo,   // G_(k-1):0
  output logic g_out   // G_i:0
);
  always_comb g_out = g_hi | (p_hi & g_lo);
endmodule
