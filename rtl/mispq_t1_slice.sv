// mispq_t1_slice: one slice of the modified type I MISPQ.
//
// A slice holds N+1 processors: the top P0, which always holds the slice's
// best metric once the slice has been sorted, and the side processors
// P1..PN. The slice also owns the comparison group formed by its side
// processors and the top of the next slice (mispq_group, K = N).
//
// Phase 1 (insert, shift right, sort): the previous slice's group (or the
// queue's input group for slice 1) has compared its side processors with this
// slice's P0. Its winner is written to P0; every other side metric Pj of the
// previous slice moves to this slice's Pj, and if the winner came from side j
// the old P0 takes slot j instead. So each processor is written either from
// the winner or from one fixed source, which is what keeps the slice at 3N+1
// switches.
// Phase 2 (shift tops left, sort): P0 has just been taken by the previous
// slice (or extracted). This slice's own group compares P1..PN with the next
// slice's top; the winner is written to P0, and if it was side j the next
// slice's top moves into Pj. The other side processors keep their metric.
//
// All processors change on the rising clock edge of their phase; phase is
// supplied by the queue. Reset empties the slice. Metrics shifted right out of
// the last slice are dropped by the queue (right_top of the last slice is
// EMPTY).
module mispq_t1_slice
  import mispq_pkg::*;
#(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  phase_t       phase,
  // from the previous slice / input port (phase 1)
  input  entry_t       left_side [N],
  input  logic [N:0]   left_sel,
  input  entry_t       left_best,
  // from the next slice (phase 2)
  input  entry_t       right_top,
  // to the neighbours
  output entry_t       top_q,
  output entry_t       side_q [N],
  output logic [N:0]   grp_sel,
  output entry_t       grp_best
);

  entry_t grp_top_unused;

  mispq_group #(.K(N), .DUAL_TOP(1'b0)) u_group (
    .side     (side_q),
    .top_a    (right_top),
    .top_b    (right_top),
    .top_sel_a(1'b1),
    .sel      (grp_sel),
    .top      (grp_top_unused),
    .best     (grp_best)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      top_q <= EMPTY;
      for (int j = 0; j < N; j++) side_q[j] <= EMPTY;
    end else if (phase == PH1) begin
      top_q <= left_best;
      for (int j = 0; j < N; j++)
        side_q[j] <= left_sel[j] ? top_q : left_side[j];
    end else begin
      top_q <= grp_best;
      for (int j = 0; j < N; j++)
        if (grp_sel[j]) side_q[j] <= right_top;
    end
  end

endmodule
