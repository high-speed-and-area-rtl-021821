// toa_full_adder: the "F" cell of the bit-addition stage.
//
// Adds three bits of equal weight and returns a sum bit S' and a carry bit cy of twice that
// weight:  S' = a ^ b ^ c,  cy = a.b + b.c + c.a.
// It is built as the cell drawing of the reference design shows it: b and c first meet in an
// XOR and an AND, the XOR result then meets a in a second XOR (giving S') and a second AND, and
// the two AND terms are merged into the carry. The merge is an OR, which is what the majority
// equation requires. Purely combinational, no clock.
module toa_full_adder (
  input  logic a,   // operand A bit
  input  logic b,   // operand B bit
  input  logic c,   // operand C bit
  output logic s,   // S'_i, same weight as the inputs
  output logic cy   // cy_i, weight of the next bit
);
  logic bc_x, bc_a, abc_a;

  always_comb begin
    bc_x  = b ^ c;
    bc_a  = b & c;
    abc_a = bc_x & a;
    s     = bc_x ^ a;
    cy    = bc_a | abc_a;
  end
endmodule
