// mispq_t2_queue: type II multiple-input systolic priority queue.
//
// Every queue cycle takes N new entries and delivers the best entry the queue
// holds, the new ones included. The queue is a row of SLICES slices
// (mispq_t2_slice), each split into a top and a bottom subslice of N/2 side
// processors plus a top processor. Inputs in[0..N/2-1] enter the top
// subslices and in[N/2..N-1] the bottom ones, so each half of the queue sorts
// only N/2+1 metrics per slice; the two halves exchange metrics only in
// phase 2, when the better of a slice's two tops moves left. Taken together
// (the two tops as one pseudo top, the side processors as one group) the
// queue keeps the same invariant as the type I queue: the k-th best entry is
// within the first k slices, so the best is in T0 or B0 of slice 1.
//
// One queue cycle is two clock cycles, one per phase:
//   phase 1 edge: in is sampled; each half inserts its N/2 inputs, shifts
//     side metrics right one slice and sorts every subslice. The side metrics
//     of the last slice are dropped.
//   phase 2 edge: the better of T0 and B0 of slice 1 (T0 on a tie) is
//     extracted to best_o, the pseudo top of every other slice moves one slice
//     to the left into the subslice that just lost its top, and those
//     subslices are sorted again.
// phi1_o is high in the clock cycle whose rising edge is a phase-1 edge.
// best_valid_o is high for the clock cycle after each phase-2 edge and best_o
// holds the extracted entry until the next extraction. The input port is the
// comparison group of slice 0 (inputs in place of its side processors); the
// output port is a selector switched by slice 1's T0/B0 comparison.
//
// Unused inputs carry EMPTY; reset fills the queue with EMPTY and starts in
// phase 1. Mapping the two clock phases onto alternate edges of one clock is
// this design's choice. N must be even.
module mispq_t2_queue
  import mispq_pkg::*;
#(
  parameter int N      = 4,
  parameter int SLICES = 16,
  localparam int K     = N / 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  entry_t in_i [N],
  output logic   phi1_o,
  output entry_t best_o,
  output logic   best_valid_o
);

  if (N % 2 != 0 || N < 2) begin : g_bad_n
    $error("mispq_t2_queue: N must be even and at least 2");
  end

  phase_t phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= PH1;
    else        phase <= (phase == PH1) ? PH2 : PH1;
  end

  assign phi1_o = (phase == PH1);

  entry_t     t0_q      [SLICES];
  entry_t     b0_q      [SLICES];
  entry_t     t_side_q  [SLICES][K];
  entry_t     b_side_q  [SLICES][K];
  logic       tle       [SLICES];
  logic       bl        [SLICES];
  logic [K:0] t_grp_sel [SLICES+1];   // index 0: input port groups
  entry_t     t_grp_best[SLICES+1];
  logic [K:0] b_grp_sel [SLICES+1];
  entry_t     b_grp_best[SLICES+1];

  entry_t in_t [K];
  entry_t in_b [K];
  entry_t in_t_top_unused, in_b_top_unused;

  for (genvar j = 0; j < K; j++) begin : g_split
    assign in_t[j] = in_i[j];
    assign in_b[j] = in_i[K+j];
  end

  // Input port: only used in phase 1, so one comparator per pair suffices.
  mispq_group #(.K(K), .DUAL_TOP(1'b0)) u_in_t_group (
    .side     (in_t),
    .top_a    (t0_q[0]),
    .top_b    (t0_q[0]),
    .top_sel_a(1'b1),
    .sel      (t_grp_sel[0]),
    .top      (in_t_top_unused),
    .best     (t_grp_best[0])
  );

  mispq_group #(.K(K), .DUAL_TOP(1'b0)) u_in_b_group (
    .side     (in_b),
    .top_a    (b0_q[0]),
    .top_b    (b0_q[0]),
    .top_sel_a(1'b1),
    .sel      (b_grp_sel[0]),
    .top      (in_b_top_unused),
    .best     (b_grp_best[0])
  );

  for (genvar s = 0; s < SLICES; s++) begin : g_slice
    entry_t right_t0, right_b0;
    logic   right_tle, right_bl;
    entry_t left_t_side [K];
    entry_t left_b_side [K];

    if (s == SLICES - 1) begin : g_last
      assign right_t0  = EMPTY;
      assign right_b0  = EMPTY;
      assign right_tle = 1'b1;
      assign right_bl  = 1'b0;
    end else begin : g_mid
      assign right_t0  = t0_q[s+1];
      assign right_b0  = b0_q[s+1];
      assign right_tle = tle[s+1];
      assign right_bl  = bl[s+1];
    end
    if (s == 0) begin : g_first
      assign left_t_side = in_t;
      assign left_b_side = in_b;
    end else begin : g_rest
      assign left_t_side = t_side_q[s-1];
      assign left_b_side = b_side_q[s-1];
    end

    mispq_t2_slice #(.N(N)) u_slice (
      .clk        (clk),
      .rst_n      (rst_n),
      .phase      (phase),
      .left_t_side(left_t_side),
      .left_t_sel (t_grp_sel[s]),
      .left_t_best(t_grp_best[s]),
      .left_b_side(left_b_side),
      .left_b_sel (b_grp_sel[s]),
      .left_b_best(b_grp_best[s]),
      .right_t0   (right_t0),
      .right_b0   (right_b0),
      .right_tle  (right_tle),
      .right_bl   (right_bl),
      .t0_q       (t0_q[s]),
      .b0_q       (b0_q[s]),
      .t_side_q   (t_side_q[s]),
      .b_side_q   (b_side_q[s]),
      .tle_o      (tle[s]),
      .bl_o       (bl[s]),
      .t_grp_sel  (t_grp_sel[s+1]),
      .t_grp_best (t_grp_best[s+1]),
      .b_grp_sel  (b_grp_sel[s+1]),
      .b_grp_best (b_grp_best[s+1])
    );
  end

  // Output switch: the better of T0 and B0 of slice 1 (tle is valid in
  // phase 2, when it is used).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_o       <= EMPTY;
      best_valid_o <= 1'b0;
    end else begin
      best_valid_o <= (phase == PH2);
      if (phase == PH2) best_o <= tle[0] ? t0_q[0] : b0_q[0];
    end
  end

endmodule
