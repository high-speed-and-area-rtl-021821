// toa_pg_logic: stage 3 of the three-operand adder, the carry-prefix (PG) network.
//
// Input: W = N+1 bit-level (G_i, P_i) pairs from the base logic. Output: the group generate
// G_i:0 of every position, i.e. the carry out of bit i.
//
// The network has the Han-Carlson shape of the reference 4-bit design:
//   * Odd positions only, levels k = 1..K with distance D = 2**(k-1): odd position i merges
//     with position i-D as long as its own group has not yet reached bit 0 (i >= D). A merge
//     whose lower group already reaches bit 0 is a grey cell (generate only); the others are
//     black cells. K = toa_pkg::hc_odd_levels(W).
//   * One final row: every even position i >= 2 merges with the finished G_(i-1):0 of its odd
//     neighbour in a grey cell. Position 0 is G_0 itself.
// For N = 4 (W = 5) this gives exactly one black cell (G3:2, P3:2) and four grey cells (G1:0,
// G3:0, G2:0 and G4:0) in three levels, as drawn in the reference block diagram. The reference
// only draws the 4-bit tree; the rule above, which extends it to any N, is this design's own
// generalisation along the Han-Carlson pattern. The buffers of the reference drawing carry no
// logic and are left out.
// Positions whose group already reaches bit 0 have no further use for their propagate, so
// that signal is held at 0 from there on. Combinational; the depth is K+1 cell delays.
module toa_pg_logic #(
  parameter int unsigned N = toa_pkg::TOA_DEFAULT_N
) (
  input  logic [N:0] g,    // G_i:i
  input  logic [N:0] p,    // P_i:i
  output logic [N:0] gg    // G_i:0
);
  localparam int unsigned W = N + 1;
  localparam int unsigned K = toa_pkg::hc_odd_levels(W);

  // Level k values of every position; level 0 is the input.
  logic [N:0] gl [K+1];
  logic [N:0] pl [K+1];

  assign gl[0] = g;
  assign pl[0] = p;

  for (genvar k = 1; k <= K; k++) begin : g_lvl
    localparam int unsigned D = 2 ** (k - 1);
    for (genvar i = 0; i < W; i++) begin : g_pos
      if ((i % 2 == 1) && (i >= D)) begin : g_merge
        // Lower group i-D covers down to max(0, i-2D+1) after level k-1.
        if (i + 1 <= 2 * D) begin : g_grey
          toa_grey_cell u_grey (
            .g_hi (gl[k-1][i]),
            .p_hi (pl[k-1][i]),
            .g_lo (gl[k-1][i-D]),
            .g_out(gl[k][i])
          );
          assign pl[k][i] = 1'b0;
        end else begin : g_black
          toa_black_cell u_black (
            .g_hi (gl[k-1][i]),
            .p_hi (pl[k-1][i]),
            .g_lo (gl[k-1][i-D]),
            .p_lo (pl[k-1][i-D]),
            .g_out(gl[k][i]),
            .p_out(pl[k][i])
          );
        end
      end else begin : g_pass
        assign gl[k][i] = gl[k-1][i];
        assign pl[k][i] = pl[k-1][i];
      end
    end
  end

  // Final row: even positions take the carry from their finished odd neighbour.
  for (genvar i = 0; i < W; i++) begin : g_out
    if (i % 2 == 0 && i >= 2) begin : g_even
      toa_grey_cell u_grey (
        .g_hi (gl[K][i]),
        .p_hi (pl[K][i]),
        .g_lo (gl[K][i-1]),
        .g_out(gg[i])
      );
    end else begin : g_done
      assign gg[i] = gl[K][i];
    end
  end
endmodule
