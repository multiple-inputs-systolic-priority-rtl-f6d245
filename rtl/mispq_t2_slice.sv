// mispq_t2_slice: one slice of the type II MISPQ.
//
// The slice is split into a top and a bottom subslice of K = N/2 side
// processors and one top processor each (T0, T1..TK and B0, B1..BK). In
// phase 1 the two subslices behave as two independent modified type I
// slices: the top subslice takes the winner of the previous slice's top group
// and the bottom subslice that of its bottom group, exactly as in
// mispq_t1_slice. In phase 2 they are coupled:
//
//   * A T0-versus-B0 comparator (mispq_cmp, with an output stage that forces
//     both flags low in phase 1) gives tle_o = (T0 >= B0) and bl_o = (B0 > T0).
//     The pseudo top of the slice is the better of T0 and B0, T0 on a tie.
//   * The pseudo top leaves the slice to the left (or is extracted, slice 1).
//     Only the subslice it came from is refilled: its group (side processors
//     plus the pseudo top of the next slice, max(T0,B0) of slice i+1, chosen
//     by that slice's tle/bl flags through mispq_cmp3) puts its winner in the
//     subslice's top, and if the winner was side j the incoming metric takes
//     side j. The other subslice keeps all its metrics.
//   * Whether the incoming metric came from the next slice's top or bottom
//     subslice, and whether it goes to this slice's top or bottom subslice,
//     gives the four cases of the shift-left rule; the cross cases are the
//     paths between subslices.
//
// The top group's top candidate is T0 of the next slice in phase 1 and
// max(T0,B0) of the next slice in phase 2; likewise for the bottom group.
// Registers change on the rising edge of their phase (phase from the queue);
// reset empties the slice.
module mispq_t2_slice
  import mispq_pkg::*;
#(
  parameter int N = 4,
  localparam int K = N / 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  phase_t       phase,
  // from the previous slice / input port (phase 1)
  input  entry_t       left_t_side [K],
  input  logic [K:0]   left_t_sel,
  input  entry_t       left_t_best,
  input  entry_t       left_b_side [K],
  input  logic [K:0]   left_b_sel,
  input  entry_t       left_b_best,
  // from the next slice
  input  entry_t       right_t0,
  input  entry_t       right_b0,
  input  logic         right_tle,
  input  logic         right_bl,
  // to the neighbours
  output entry_t       t0_q,
  output entry_t       b0_q,
  output entry_t       t_side_q [K],
  output entry_t       b_side_q [K],
  output logic         tle_o,
  output logic         bl_o,
  output logic [K:0]   t_grp_sel,
  output entry_t       t_grp_best,
  output logic [K:0]   b_grp_sel,
  output entry_t       b_grp_best
);

  logic   phi1;
  cmp_t   tb_code;
  entry_t t_grp_top, b_grp_top;

  assign phi1 = (phase == PH1);

  // T0 versus B0; the output stage forces 00 (no flag) in phase 1 so that the
  // paths between the two subslices stay open.
  mispq_cmp u_cmp_tb (.x(t0_q.metric), .y(b0_q.metric), .code(tb_code));
  assign tle_o = !phi1 && (tb_code != CMP_LT);
  assign bl_o  = !phi1 && (tb_code == CMP_LT);

  // Phase 1 keeps the subslices apart; phase 2 refills exactly one of them.
  assert property (@(posedge clk) disable iff (!rst_n) phi1 |-> !tle_o && !bl_o)
    else $error("mispq_t2_slice: TLE/BL set in phase 1");
  assert property (@(posedge clk) disable iff (!rst_n) !phi1 |-> tle_o != bl_o)
    else $error("mispq_t2_slice: TLE/BL not exclusive in phase 2");

  mispq_group #(.K(K), .DUAL_TOP(1'b1)) u_t_group (
    .side     (t_side_q),
    .top_a    (right_t0),
    .top_b    (right_b0),
    .top_sel_a(phi1 || right_tle),
    .sel      (t_grp_sel),
    .top      (t_grp_top),
    .best     (t_grp_best)
  );

  mispq_group #(.K(K), .DUAL_TOP(1'b1)) u_b_group (
    .side     (b_side_q),
    .top_a    (right_b0),
    .top_b    (right_t0),
    .top_sel_a(phi1 || right_bl),
    .sel      (b_grp_sel),
    .top      (b_grp_top),
    .best     (b_grp_best)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t0_q <= EMPTY;
      b0_q <= EMPTY;
      for (int j = 0; j < K; j++) begin
        t_side_q[j] <= EMPTY;
        b_side_q[j] <= EMPTY;
      end
    end else if (phi1) begin
      t0_q <= left_t_best;
      b0_q <= left_b_best;
      for (int j = 0; j < K; j++) begin
        t_side_q[j] <= left_t_sel[j] ? t0_q : left_t_side[j];
        b_side_q[j] <= left_b_sel[j] ? b0_q : left_b_side[j];
      end
    end else if (tle_o) begin
      t0_q <= t_grp_best;
      for (int j = 0; j < K; j++)
        if (t_grp_sel[j]) t_side_q[j] <= t_grp_top;
    end else begin
      b0_q <= b_grp_best;
      for (int j = 0; j < K; j++)
        if (b_grp_sel[j]) b_side_q[j] <= b_grp_top;
    end
  end

endmodule
