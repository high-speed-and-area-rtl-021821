// toa_base_logic: stage 2 of the three-operand adder (base logic).
//
// N+1 saltire cells (toa_base_cell) turn the carry-save pair (S', cy) from stage 1 into
// bit-level (G, P) pairs of a two-operand addition. Cell i pairs S'_i with cy_(i-1), which has
// the same weight; cell 0 pairs S'_0 with the external carry input cin; the extra cell N has
// no S' bit (its S' input is tied to 0), so it gives P_N = cy_(N-1) and G_N = 0. The N+1 cells
// and the use of cin in cell 0 follow the reference design; the tie-off of cell N is the
// reading of a cell that only receives cy_(N-1); hence G_N is a constant 0 and P_N a plain
// copy of cy_(N-1). Combinational.
module toa_base_logic #(
  parameter int unsigned N = toa_pkg::TOA_DEFAULT_N
) (
  input  logic [N-1:0] sp,   // S'_i from stage 1
  input  logic [N-1:0] cy,   // cy_i from stage 1
  input  logic         cin,  // external carry input
  output logic [N:0]   g,    // G_i, i = 0..N
  output logic [N:0]   p     // P_i, i = 0..N
);
  logic [N:0] s_ext;   // S' extended with a 0 at position N
  logic [N:0] c_ext;   // carries shifted to their weight, cin at position 0

  assign s_ext = {1'b0, sp};
  assign c_ext = {cy, cin};

  for (genvar i = 0; i <= N; i++) begin : g_cell
    toa_base_cell u_cell (
      .s (s_ext[i]),
      .cy(c_ext[i]),
      .p (p[i]),
      .g (g[i])
    );
  end
endmodule
