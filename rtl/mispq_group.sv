// mispq_group: comparison network and control logic of one (sub)slice group.
//
// A group is the K side processors of a (sub)slice together with one "top"
// candidate: the top processor of the next slice. Every pair is compared in
// parallel (K*(K-1)/2 side-side comparators, K top-side comparators) and the
// comparison results are ANDed into one select line per member that says
// "this member is the best of the group". The selects are one-hot; ties go to
// the lower-numbered side processor, and the top candidate wins only when it
// is strictly larger than every side processor. This is the ordering fixed by
// the condition signals a..f of the four-input slice (a: S1>=S2>=TOP,
// b: S1>=TOP>S2, c: S2>S1>=TOP, d: S2>=TOP>S1, e: TOP>S1>=S2, f: TOP>S2>S1),
// generalised to K side processors.
//
// The same group serves both clock phases. In phase 1 its winner becomes the
// top of the next slice and the displaced top takes the winner's side slot;
// in phase 2 its winner becomes the top of this slice and the incoming top
// takes the winner's side slot. The slice modules apply the selects.
//
// With DUAL_TOP = 1 (type II queue) the top candidate is either top_a or
// top_b, picked by top_sel_a, and each top-side comparison is made by a
// mispq_cmp3 (two comparators, result chosen afterwards). With DUAL_TOP = 0
// (type I queue and queue front ends) top_b and top_sel_a are unused.
//
// Purely combinational. sel[j], j < K: side j is best; sel[K]: top is best.
module mispq_group
  import mispq_pkg::*;
#(
  parameter int K        = 2,
  parameter bit DUAL_TOP = 1'b1
) (
  input  entry_t       side [K],
  input  entry_t       top_a,
  input  entry_t       top_b,
  input  logic         top_sel_a,
  output logic [K:0]   sel,
  output entry_t       top,     // the top candidate actually used
  output entry_t       best
);

  // pair[j][k] (j < k): relation of side j to side k
  cmp_t pair [K][K];
  // tcode[j]: relation of the top candidate to side j
  cmp_t tcode [K];

  for (genvar j = 0; j < K; j++) begin : g_row
    for (genvar k = 0; k < K; k++) begin : g_col
      if (j < k) begin : g_cmp
        mispq_cmp u_cmp (.x(side[j].metric), .y(side[k].metric), .code(pair[j][k]));
      end else begin : g_none
        assign pair[j][k] = CMP_EQ;
      end
    end
    if (DUAL_TOP) begin : g_dual
      mispq_cmp3 u_cmp3 (
        .t    (top_a.metric),
        .b    (top_b.metric),
        .t_sel(top_sel_a),
        .z    (side[j].metric),
        .code (tcode[j])
      );
    end else begin : g_single
      mispq_cmp u_cmpt (.x(top_a.metric), .y(side[j].metric), .code(tcode[j]));
    end
  end

  assign top = (DUAL_TOP && !top_sel_a) ? top_b : top_a;

  // Control signals: AND of the comparison results of one member with all
  // the others.
  always_comb begin
    for (int j = 0; j < K; j++) begin
      sel[j] = (tcode[j] != CMP_GT);              // side j >= top
      for (int k = 0; k < K; k++) begin
        if (k < j) sel[j] &= (pair[k][j] == CMP_LT);  // side j > side k
        if (k > j) sel[j] &= (pair[j][k] != CMP_LT);  // side j >= side k
      end
    end
    sel[K] = 1'b1;
    for (int j = 0; j < K; j++) sel[K] &= (tcode[j] == CMP_GT);
  end

  // The tie-break order makes exactly one member the winner.
  always_comb begin
    assert (sel != '0 && (sel & (sel - 1'b1)) == '0)
      else $error("mispq_group: winner select is not one-hot");
  end

  always_comb begin
    best = top;
    for (int j = 0; j < K; j++)
      if (sel[j]) best = side[j];
  end

endmodule
