// Modified flagged inversion cell, one slice per sum bit.
//
// For every bit position i:
//   carry'  = c[i] | (f[i] & incr)   forced to 1 where the flag is set and an
//                                    increment is asked for
//   prop'   = p[i] ^ comp            the half-sum, inverted when comp = 1
//   s[i]    = carry' ^ prop'
// The flag f[i] is 1 when every bit below i propagates, which is exactly
// where adding one more unit changes the carry into bit i. Inverting the
// half-sum inverts the whole result, giving -(A+B+incr)-1 in two's
// complement. Four gates per bit, combinational. The cell and its selection
// rules are taken unchanged from the reference design.
module flag_inv_cell #(
  parameter int unsigned N = flagged_adder_pkg::FA_WIDTH
) (
  input  logic [N-1:0] p,
  input  logic [N-1:0] c,
  input  logic [N-1:0] f,
  input  logic         incr,
  input  logic         comp,
  output logic [N-1:0] s
);

  logic [N-1:0] carry_sel;
  logic [N-1:0] prop_sel;

  always_comb begin
    carry_sel = c | (f & {N{incr}});
    prop_sel  = p ^ {N{comp}};
    s         = carry_sel ^ prop_sel;
  end

endmodule
