// Majority prefix operator on (x, y) pairs.
//
// A group of bits [i:j] acts on its carry-in c as the function
// f(c) = M(x, y, c). Two adjacent groups, hi above lo, compose as
// f_hi(f_lo(c)) = M(xh, yh, M(xl, yl, c)), and because a majority gate with
// two fixed inputs is monotone and self-dual, this equals
// M(M(xh, yh, xl), M(xh, yh, yl), c). The merged group's pair is therefore
//   res = (M(xh, yh, xl), M(xh, yh, yl)),
// two majority gates working in parallel: one gate delay per prefix stage,
// the same in every stage, with no generate or propagate terms. That the
// operator costs two gates and one delay in all stages follows the source
// design; the explicit pair equations are derived here from its formulation
// of the carry, in which the group [n-1:0] is described by the two nested
// majority chains M(a_{n-1}, b_{n-1}, ... M(a_1, b_1, a_0)) and the same chain
// ending in b_0. When the lower group already reaches bit 0 its pair is a
// carry (C, C), both gates compute the same value, and the carry networks use
// a single maj_gate instead of this module.
//
// Interface: hi and lo are the pairs of the more and the less significant
// group, res the pair of their union. Combinational.
module maj_prefix_op
  import maj_pkg::*;
(
  input  maj_pair_t hi,
  input  maj_pair_t lo,
  output maj_pair_t res
);

  logic mx, my;

  maj_gate u_mx (.x(hi.x), .y(hi.y), .z(lo.x), .m(mx));
  maj_gate u_my (.x(hi.x), .y(hi.y), .z(lo.y), .m(my));

  assign res.x = mx;
  assign res.y = my;

endmodule
