// toa_bit_addition: stage 1 of the three-operand adder (bit-addition logic).
//
// A row of N independent full adders (toa_full_adder) reduces three N-bit operands to a sum
// vector S' and a carry vector cy, with a + b + c == S' + 2*cy. There is no carry chain
// between the cells, so the stage costs one full-adder delay whatever N is.
// Combinational; N defaults to the 4-bit width of the reference design.
module toa_bit_addition #(
  parameter int unsigned N = toa_pkg::TOA_DEFAULT_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] sp,   // S'_i
  output logic [N-1:0] cy    // cy_i, weight 2**(i+1)
);
  for (genvar i = 0; i < N; i++) begin : g_fa
    toa_full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .c (c[i]),
      .s (sp[i]),
      .cy(cy[i])
    );
  end
endmodule
