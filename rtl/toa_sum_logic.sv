// toa_sum_logic: stage 4 of the three-operand adder (sum logic).
//
// Each result bit is the bit propagate XORed with the carry into that bit:
//   S_0 = P_0,   S_i = P_i ^ G_(i-1):0 (i = 1..N),   Cout = G_N:0.
// N+1 sum bits plus Cout make the N+2 bits that the sum of three N-bit operands and a carry
// input can need. The equations follow the reference design; its 4-bit drawing shows only
// S0..S3 and Cout, but S_N is kept here because the result is wrong without it (three 4-bit
// operands and a carry reach 46). S_0 and Cout are plain wires. One XOR per bit, combinational.
module toa_sum_logic #(
  parameter int unsigned N = toa_pkg::TOA_DEFAULT_N
) (
  input  logic [N:0] p,    // P_i from the base logic
  input  logic [N:0] gg,   // G_i:0 from the PG network
  output logic [N:0] s,    // S_i
  output logic       cout  // G_N:0
);
  always_comb begin
    s    = p ^ {gg[N-1:0], 1'b0};
    cout = gg[N];
  end
endmodule
