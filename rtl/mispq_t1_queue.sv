// mispq_t1_queue: modified type I multiple-input systolic priority queue.
//
// Every queue cycle takes N new entries and delivers the best entry the queue
// holds, the new ones included. The queue is a row of SLICES slices of N+1
// processors (mispq_t1_slice). Its invariant is that the k-th best entry is
// always within the first k slices, and in slice k only at its top, so the
// best entry is always at the top of slice 1 and no search is ever needed.
//
// One queue cycle is two clock cycles, one per phase:
//   phase 1 edge: in[0..N-1] is sampled. An input group (mispq_group, the
//     input port in place of slice 0's side processors) compares the inputs
//     with slice 1's top; every slice's side metrics move one slice to the
//     right and every slice is sorted so that its best sits at its top. The
//     side metrics of the last slice are dropped.
//   phase 2 edge: the top of slice 1 is extracted to best_o, every other
//     slice top moves one slice to the left, and each slice is sorted again.
// phi1_o is high in the clock cycle whose rising edge is a phase-1 edge, i.e.
// when in must be valid. best_o/best_valid_o are registered: best_valid_o is
// high for the one clock cycle after the phase-2 edge, and best_o holds the
// extracted entry until the next extraction. Latency from sampling an input
// to seeing it extracted is therefore two clock cycles at best.
//
// Unused inputs carry EMPTY. The queue runs continuously after reset; the
// phases alternate from the first edge after reset (phase 1 first). Reset
// fills the queue with EMPTY. Mapping the two non-overlapping clock phases to
// alternate edges of one clock is this design's choice.
module mispq_t1_queue
  import mispq_pkg::*;
#(
  parameter int N      = 4,
  parameter int SLICES = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  entry_t in_i [N],
  output logic   phi1_o,
  output entry_t best_o,
  output logic   best_valid_o
);

  phase_t phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= PH1;
    else        phase <= (phase == PH1) ? PH2 : PH1;
  end

  assign phi1_o = (phase == PH1);

  // Slice s (0-based) is slice s+1 of the queue.
  entry_t     top_q   [SLICES];
  entry_t     side_q  [SLICES][N];
  logic [N:0] grp_sel [SLICES+1];   // index 0: input group
  entry_t     grp_best[SLICES+1];

  entry_t in_top_unused;

  // Input port: the new metrics stand where slice 0's side processors would.
  mispq_group #(.K(N), .DUAL_TOP(1'b0)) u_in_group (
    .side     (in_i),
    .top_a    (top_q[0]),
    .top_b    (top_q[0]),
    .top_sel_a(1'b1),
    .sel      (grp_sel[0]),
    .top      (in_top_unused),
    .best     (grp_best[0])
  );

  for (genvar s = 0; s < SLICES; s++) begin : g_slice
    entry_t right_top;
    entry_t left_side [N];
    if (s == SLICES - 1) begin : g_last
      assign right_top = EMPTY;
    end else begin : g_mid
      assign right_top = top_q[s+1];
    end
    if (s == 0) begin : g_first
      assign left_side = in_i;
    end else begin : g_rest
      assign left_side = side_q[s-1];
    end

    mispq_t1_slice #(.N(N)) u_slice (
      .clk      (clk),
      .rst_n    (rst_n),
      .phase    (phase),
      .left_side(left_side),
      .left_sel (grp_sel[s]),
      .left_best(grp_best[s]),
      .right_top(right_top),
      .top_q    (top_q[s]),
      .side_q   (side_q[s]),
      .grp_sel  (grp_sel[s+1]),
      .grp_best (grp_best[s+1])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_o       <= EMPTY;
      best_valid_o <= 1'b0;
    end else begin
      best_valid_o <= (phase == PH2);
      if (phase == PH2) best_o <= top_q[0];
    end
  end

endmodule
