// Modified prefix tree: carries and flag bits of the flagged binary adder.
//
// The operand is cut into two-bit pairs. Each pair first gets its own carry
// out (pair_carry, from g and the pair OR r) and its own propagate
// p[2k+1] & p[2k]. These pair signals are then combined by a prefix network
// that works on pairs rather than bits: at level l every pair whose index has
// bit l-1 set merges with the last pair of the block below it, as
//   G = G_hi | P_hi & G_lo,   P = P_hi & P_lo.
// This gives the carry into every even bit position (c[2k+2]) and the group
// propagate of all bits below it, which is the flag f[2k+2]. The odd
// positions are then finished with one more step from the even carry below:
//   c[2k+1] = g[2k] | p[2k] & c[2k],   f[2k+1] = p[2k] & f[2k].
// At N = 4 this is the circuit of the 4-bit tree: C1 = g0, F1 = p0,
// C2 = pair carry of bits 1..0, F2 = p1 p0, C3 = g2 | p2 C2,
// F3 = p2 F2, C4 = G32 | P32 C2, F4 = P32 P10.
// How the pairs are combined for more than two pairs (here the block-doubling
// order above, depth ceil(log2(N/2))) is this design's choice.
//
// Interface: c[i] is the carry into bit i and f[i] the flag of bit i, for
// i = 0..N; c[0] = 0 (no carry in) and f[0] = 1 (an increment always flips
// bit 0). c[N] is the carry out and f[N] the propagate of the whole word.
// Combinational. N must be even and at least 2.
module mod_prefix_tree #(
  parameter int unsigned N = flagged_adder_pkg::FA_WIDTH
) (
  input  logic [N-1:0]   p,
  input  logic [N-1:0]   g,
  input  logic [N/2-1:0] r,
  output logic [N:0]     c,
  output logic [N:0]     f
);

  localparam int unsigned M = N / 2;              // number of pairs
  localparam int unsigned L = (M > 1) ? $clog2(M) : 0;

  if (N < 2 || (N % 2) != 0) begin : g_bad_width
    $error("mod_prefix_tree: N must be even and at least 2");
  end

  // Level 0: one generate/propagate per pair.
  logic [M-1:0] pair_g;
  logic [M-1:0] pair_p;

  for (genvar k = 0; k < M; k++) begin : g_pair
    pair_carry u_pair_carry (
      .g_hi (g[2*k+1]),
      .r_hi (r[k]),
      .g_lo (g[2*k]),
      .c    (pair_g[k])
    );
    assign pair_p[k] = p[2*k+1] & p[2*k];
  end

  // Prefix levels over the pairs.
  for (genvar l = 0; l <= L; l++) begin : g_lvl
    logic [M-1:0] gg;
    logic [M-1:0] pp;
    if (l == 0) begin : g_first
      assign gg = pair_g;
      assign pp = pair_p;
    end else begin : g_merge
      for (genvar k = 0; k < M; k++) begin : g_node
        localparam int unsigned J = ((k >> (l - 1)) << (l - 1)) - 1;
        if (((k >> (l - 1)) & 1) == 1) begin : g_op
          assign gg[k] = g_lvl[l-1].gg[k] | (g_lvl[l-1].pp[k] & g_lvl[l-1].gg[J]);
          assign pp[k] = g_lvl[l-1].pp[k] & g_lvl[l-1].pp[J];
        end else begin : g_pass
          assign gg[k] = g_lvl[l-1].gg[k];
          assign pp[k] = g_lvl[l-1].pp[k];
        end
      end
    end
  end

  // Even positions from the prefix network, odd positions one step later.
  assign c[0] = 1'b0;
  assign f[0] = 1'b1;
  for (genvar k = 0; k < M; k++) begin : g_out
    assign c[2*k+2] = g_lvl[L].gg[k];
    assign f[2*k+2] = g_lvl[L].pp[k];
    assign c[2*k+1] = g[2*k] | (p[2*k] & c[2*k]);
    assign f[2*k+1] = p[2*k] & f[2*k];
  end

endmodule
