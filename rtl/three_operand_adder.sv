// three_operand_adder: combinational adder of three N-bit operands and a carry input.
//
// Result {cout, s} = a + b + c + cin, N+2 bits wide. Four stages in cascade:
//   1. bit-addition logic (toa_bit_addition): N full adders reduce a, b, c to S' and cy with
//      no carry chain;
//   2. base logic (toa_base_logic): N+1 saltire cells pair S'_i with cy_(i-1) (cin at bit 0)
//      into bit generate/propagate;
//   3. PG logic (toa_pg_logic): a Han-Carlson style prefix tree of black and grey cells gives
//      the carry G_i:0 into every bit in about log2(N) levels;
//   4. sum logic (toa_sum_logic): S_i = P_i ^ G_(i-1):0, Cout = G_N:0.
// The stage structure, the cell equations and the 4-bit default follow the reference design.
// There is no clock or register: the result is valid one combinational delay after the inputs.
module three_operand_adder #(
  parameter int unsigned N = toa_pkg::TOA_DEFAULT_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  input  logic         cin,
  output logic [N:0]   s,
  output logic         cout
);
  logic [N-1:0] sp, cy;
  logic [N:0]   g, p, gg;

  toa_bit_addition #(.N(N)) u_bit_add (
    .a (a),
    .b (b),
    .c (c),
    .sp(sp),
    .cy(cy)
  );

  toa_base_logic #(.N(N)) u_base (
    .sp (sp),
    .cy (cy),
    .cin(cin),
    .g  (g),
    .p  (p)
  );

  toa_pg_logic #(.N(N)) u_pg (
    .g (g),
    .p (p),
    .gg(gg)
  );

  toa_sum_logic #(.N(N)) u_sum (
    .p   (p),
    .gg  (gg),
    .s   (s),
    .cout(cout)
  );
endmodule
