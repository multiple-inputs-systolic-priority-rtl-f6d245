// tb_mispq_top: end-to-end test of mispq_top at its default sizes (both
// queues with four inputs and 16 slices).
//
// Both queues get independent random node metrics, as a sequential decoder
// extending a quaternary tree would insert them, and each is checked by its
// own priority-queue reference model (tb_pq_scoreboard): every extraction
// must be the best entry held, every entry dropped off the tail must have had
// at least 16 entries as good. The run goes through light load, heavy load
// (the queues overflow and drop entries) and a drain with EMPTY inputs.
//
// It counts how often each mechanism of the design happened and fails if one
// never did: extraction from the top and from the bottom subslice of the
// type II queue, a T0 = B0 tie at extraction, transfers between subslices,
// an input winning its input group (inserted and extracted in the same
// queue cycle) and the resident top keeping its place, tail drops and
// extractions from an empty queue, for the type I queue too where they apply.
module tb_mispq_top;
  import mispq_pkg::*;

  localparam int N      = 4;
  localparam int SLICES = 16;
  localparam metric_t E = METRIC_MIN;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  entry_t t2_in [N], t1_in [N];
  logic   t2_phi1, t1_phi1, t2_valid, t1_valid;
  entry_t t2_best, t1_best;
  entry_t t2_drop [N], t1_drop [N];

  int checks = 0, failures = 0;
  int c2, f2, d2, x2, e2, l2;
  int c1, f1, d1, x1, e1, l1;
  // mechanism counters
  int m_top = 0, m_bottom = 0, m_tie = 0, m_cross = 0;
  int m2_in_wins = 0, m2_top_stays = 0, m1_in_wins = 0, m1_top_stays = 0;

  mispq_top dut (
    .clk(clk), .rst_n(rst_n),
    .t2_in_i(t2_in), .t2_phi1_o(t2_phi1), .t2_best_o(t2_best), .t2_best_valid_o(t2_valid),
    .t1_in_i(t1_in), .t1_phi1_o(t1_phi1), .t1_best_o(t1_best), .t1_best_valid_o(t1_valid));

  for (genvar j = 0; j < N / 2; j++) begin : g_drop2
    assign t2_drop[j]         = dut.u_t2.g_slice[SLICES-1].u_slice.t_side_q[j];
    assign t2_drop[N / 2 + j] = dut.u_t2.g_slice[SLICES-1].u_slice.b_side_q[j];
  end
  assign t1_drop = dut.u_t1.g_slice[SLICES-1].u_slice.side_q;

  tb_pq_scoreboard #(.N(N), .SLICES(SLICES), .NDROP(N)) sb2 (
    .clk(clk), .rst_n(rst_n), .phi1(t2_phi1), .in_i(t2_in), .drop_i(t2_drop),
    .best_i(t2_best), .best_valid_i(t2_valid),
    .checks(c2), .failures(f2), .drops(d2), .extracts(x2), .empty_extracts(e2), .live(l2));

  tb_pq_scoreboard #(.N(N), .SLICES(SLICES), .NDROP(N)) sb1 (
    .clk(clk), .rst_n(rst_n), .phi1(t1_phi1), .in_i(t1_in), .drop_i(t1_drop),
    .best_i(t1_best), .best_valid_i(t1_valid),
    .checks(c1), .failures(f1), .drops(d1), .extracts(x1), .empty_extracts(e1), .live(l1));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n) begin
      if (!t2_phi1) begin
        if (dut.u_t2.tle[0] && dut.u_t2.t0_q[0].metric != E) m_top++;
        if (dut.u_t2.bl[0]) m_bottom++;
        if (dut.u_t2.t0_q[0].metric == dut.u_t2.b0_q[0].metric && dut.u_t2.t0_q[0].metric != E) m_tie++;
        for (int s = 0; s < SLICES - 1; s++)
          if ((dut.u_t2.tle[s] && dut.u_t2.bl[s+1]) || (dut.u_t2.bl[s] && dut.u_t2.tle[s+1])) m_cross++;
      end else if (t2_in[0].metric != E) begin
        if (dut.u_t2.t_grp_sel[0][N/2]) m2_top_stays++;
        else                            m2_in_wins++;
      end
      if (t1_phi1 && t1_in[0].metric != E) begin
        if (dut.u_t1.grp_sel[0][N]) m1_top_stays++;
        else                        m1_in_wins++;
      end
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic finish_tb();
    $display("type II: extracts=%0d empty=%0d drops=%0d top=%0d bottom=%0d tie=%0d cross=%0d in_wins=%0d top_stays=%0d",
             x2, e2, d2, m_top, m_bottom, m_tie, m_cross, m2_in_wins, m2_top_stays);
    $display("type I : extracts=%0d empty=%0d drops=%0d in_wins=%0d top_stays=%0d",
             x1, e1, d1, m1_in_wins, m1_top_stays);
    $display("TB_RESULT checks=%0d failures=%0d", checks + c1 + c2, failures + f1 + f2);
    $finish;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end

  int tagc = 1;

  function automatic entry_t node(int pct);
    entry_t e;
    if ($urandom_range(1, 100) <= pct) begin
      e.metric = metric_t'($signed($urandom_range(0, 200)) - 100);
      e.tag    = tag_t'(tagc++);
    end else begin
      e = EMPTY;
    end
    return e;
  endfunction

  // both queues start in phase 1 after reset and stay in step
  task automatic queue_cycle(int pct);
    while (!t2_phi1) @(negedge clk);
    chk(t1_phi1, "queues in step");
    foreach (t2_in[j]) t2_in[j] = node(pct);
    foreach (t1_in[j]) t1_in[j] = node(pct);
    @(negedge clk);
    foreach (t2_in[j]) begin t2_in[j] = EMPTY; t1_in[j] = EMPTY; end
    @(negedge clk);
  endtask

  initial begin
    foreach (t2_in[j]) begin t2_in[j] = EMPTY; t1_in[j] = EMPTY; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    repeat (500)  queue_cycle(12);
    chk(d1 == 0 && d2 == 0, "no drops under light load");
    repeat (500)  queue_cycle(90);
    repeat (200)  queue_cycle(40);
    repeat (150)  queue_cycle(0);
    chk(l1 == 0 && l2 == 0, "queues drained");
    chk(x1 == x2 && x2 > 1000, "one extraction per queue cycle");
    chk(m_top > 0,        "type II: extraction from top subslice");
    chk(m_bottom > 0,     "type II: extraction from bottom subslice");
    chk(m_tie > 0,        "type II: T0 = B0 tie at extraction");
    chk(m_cross > 0,      "type II: transfer between subslices");
    chk(m2_in_wins > 0 && m2_top_stays > 0, "type II: input group both ways");
    chk(m1_in_wins > 0 && m1_top_stays > 0, "type I: input group both ways");
    chk(d2 > 0 && d1 > 0, "tail drops in both queues");
    chk(e2 > 0 && e1 > 0, "empty extractions in both queues");
    finish_tb();
  end
endmodule
