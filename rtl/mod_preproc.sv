// Modified preprocessing stage of the flagged binary adder.
//
// Computes, from the operands, the three bit-level signals the modified
// prefix tree needs:
//   p[i] = a[i] ^ b[i]          half-sum / propagate
//   g[i] = a[i] & b[i]          generate
//   r[k] = a[2k+1] | b[2k+1]    OR of the upper bit of pair k
// The OR term exists only for the upper bit of each two-bit pair, because
// it is used solely by the pair carry (carry of a pair = g_hi | r_hi & g_lo).
// The three equations are those of the reference design; reading its pair
// OR as one signal per pair (rather than per bit) is this design's choice.
// Purely combinational, no clock. N must be even.
module mod_preproc #(
  parameter int unsigned N = flagged_adder_pkg::FA_WIDTH
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [N-1:0]   p,
  output logic [N-1:0]   g,
  output logic [N/2-1:0] r
);

  always_comb begin
    p = a ^ b;
    g = a & b;
    for (int k = 0; k < N / 2; k++) begin
      r[k] = a[2*k+1] | b[2*k+1];
    end
  end

endmodule
