// Modified flagged binary adder (combinational core).
//
// One carry-propagate adder that delivers, under control of two bits, four
// related results of the operands A and B:
//   {comp,incr} = 00 : A+B          01 : A+B+1
//                 10 : -(A+B+1)     11 : -(A+B+2)       (all modulo 2^N)
// Feeding ~B instead of B turns these into A-B-1, A-B, B-A and B-A-1.
// Three stages: mod_preproc forms p, g and the pair OR r; mod_prefix_tree
// forms the carry c[i] of A+B into every bit and the flag f[i] (all bits
// below i propagate); flag_inv_cell selects the result per bit as
// (c | f&incr) ^ (p ^ comp). The increment therefore costs no second carry
// chain: the flags mark the bits that a +1 would flip.
//
// The three stages and the four results follow the reference design.
// cout is the carry out of A+B+incr (c[N] | f[N]&incr); it does not depend
// on comp. That definition is this design's choice.
// Purely combinational; N must be even.
module flagged_adder #(
  parameter int unsigned N = flagged_adder_pkg::FA_WIDTH
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         incr,
  input  logic         comp,
  output logic [N-1:0] s,
  output logic         cout
);

  logic [N-1:0]   p;
  logic [N-1:0]   g;
  logic [N/2-1:0] r;
  logic [N:0]     c;
  logic [N:0]     f;

  mod_preproc #(.N(N)) u_preproc (
    .a (a),
    .b (b),
    .p (p),
    .g (g),
    .r (r)
  );

  mod_prefix_tree #(.N(N)) u_tree (
    .p (p),
    .g (g),
    .r (r),
    .c (c),
    .f (f)
  );

  flag_inv_cell #(.N(N)) u_inv (
    .p    (p),
    .c    (c[N-1:0]),
    .f    (f[N-1:0]),
    .incr (incr),
    .comp (comp),
    .s    (s)
  );

  assign cout = c[N] | (f[N] & incr);

endmodule
