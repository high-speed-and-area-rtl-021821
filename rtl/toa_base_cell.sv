// toa_base_cell: the saltire cell of the base-logic stage.
//
// Takes the bitwise sum S'_i of full adder i and the carry cy_(i-1) of full adder i-1 (both of
// weight 2**i) and forms the bit-level propagate and generate of their two-operand sum:
//   P_i = S'_i ^ cy_(i-1),   G_i = S'_i & cy_(i-1).
// One XOR and one AND, combinational.
module toa_base_cell (
  input  logic s,    // S'_i
  input  logic cy,   // cy_(i-1), or the external carry input for cell 0
  output logic p,    // P_i
  output logic g     // G_i
);
  always_comb begin
    p = s ^ cy;
    g = s & cy;
  end
endmodule
