// mispq_cmp3: compares the larger of two slice tops with a third metric.
//
// In the second phase of a type II queue the metric that moves left out of
// slice i+1 is max(T[i+1,0], B[i+1,0]), and it has to be compared with each
// side processor of slice i. Rather than a three-input comparator (a maximum
// followed by a comparison, which lengthens the path), two ordinary
// comparators work in parallel, one on T vs z and one on B vs z, and the
// result of the one whose operand is the larger top is passed on. The choice
// is made by t_sel, which the slice drives from the T-versus-B comparison of
// slice i+1 (or forces to the own-subslice operand in the first phase).
//
// Result code: 00 chosen top equals z, 01 chosen top larger, 10 smaller.
// Purely combinational.
module mispq_cmp3
  import mispq_pkg::*;
(
  input  metric_t t,      // T[i+1,0]
  input  metric_t b,      // B[i+1,0]
  input  logic    t_sel,  // 1: t is the operand, 0: b is
  input  metric_t z,      // side processor metric
  output cmp_t    code
);

  cmp_t code_t, code_b;

  mispq_cmp u_cmp_t (.x(t), .y(z), .code(code_t));
  mispq_cmp u_cmp_b (.x(b), .y(z), .code(code_b));

  assign code = t_sel ? code_t : code_b;

endmodule
