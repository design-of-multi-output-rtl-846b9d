// Carry generation for one pair of operand bits.
//
// Produces the carry out of a two-bit group (bits i+1 and i) when no carry
// enters it:  c = a[i+1]&b[i+1] | a[i]&b[i] & (a[i+1] | b[i+1]).
// The full circuit is five gates: an OR and an AND on bit i+1, an AND on
// bit i, then an AND and an OR. The three input gates are shared with the
// preprocessing stage, which already forms g = a&b and r = a|b, so this
// module holds the last two gates and takes g_hi = a[i+1]&b[i+1],
// r_hi = a[i+1]|b[i+1] and g_lo = a[i]&b[i]. The equation and the five-gate
// circuit are the reference design's; splitting it across the two modules
// is this design's choice. Combinational.
module pair_carry (
  input  logic g_hi,
  input  logic r_hi,
  input  logic g_lo,
  output logic c
);

  logic lo_through;

  always_comb begin
    lo_through = r_hi & g_lo;
    c          = g_hi | lo_through;
  end

endmodule
