// toa_black_cell: black prefix cell of the PG stage.
//
// Merges a more significant group (i:k) with the adjoining less significant group (k-1:j):
//   G_i:j = G_i:k + P_i:k . G_(k-1):j
//   P_i:j = P_i:k . P_(k-1):j
// Two ANDs and an OR, as in the reference cell drawing. Combinational.
module toa_black_cell (
  input  logic g_hi,   // G_i:k
  input  logic p_hi,   // P_i:k
  input  logic g_lo,   // G_(k-1):j
  input  logic p_lo,   // P_(k-1):j
  output logic g_out,  // G_i:j
  output logic p_out   // P_i:j
);
  always_comb begin
    g_out = g_hi | (p_hi & g_lo);
    p_out = p_hi & p_lo;
  end
endmodule
