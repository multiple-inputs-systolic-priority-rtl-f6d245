// tb_mispq_t2_queue: checks the type II queue (N = 4).
//
// Part 1 replays the three-cycle example of a sequential search on a
// quaternary tree: four node metrics enter per cycle (top inputs first, then
// bottom inputs), the queue starts empty, and after every phase the contents
// of slice 1 (T0,T1,T2,B0,B1,B2) and, where it is determined, the tops of
// slice 2 are compared with the hand-worked trace; the extracted metrics must
// be 5, 7 and 8. EMPTY stands for the -1 fill of the hand trace.
// Part 2 runs a 4-slice queue against the priority-queue reference model
// under light, heavy (tail drops) and drain loads, as for the type I queue,
// and checks that both subslices delivered extractions and that metrics
// crossed between the subslices.
module tb_mispq_t2_queue;
  import mispq_pkg::*;

  localparam int N      = 4;
  localparam int SLICES = 4;
  localparam metric_t E = METRIC_MIN;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // ---------------------------------------------------------------- example
  entry_t ex_in [N];
  logic   ex_phi1, ex_valid;
  entry_t ex_best;

  mispq_t2_queue #(.N(N), .SLICES(3)) ex (
    .clk(clk), .rst_n(rst_n), .in_i(ex_in), .phi1_o(ex_phi1),
    .best_o(ex_best), .best_valid_o(ex_valid));

  task automatic slice1(string when, metric_t t0, metric_t t1, metric_t t2,
                        metric_t b0, metric_t b1, metric_t b2);
    metric_t got [6];
    metric_t exp [6];
    got = '{ex.t0_q[0].metric, ex.t_side_q[0][0].metric, ex.t_side_q[0][1].metric,
            ex.b0_q[0].metric, ex.b_side_q[0][0].metric, ex.b_side_q[0][1].metric};
    exp = '{t0, t1, t2, b0, b1, b2};
    chk(got == exp, $sformatf("%s: slice 1 = %0d %0d %0d / %0d %0d %0d", when,
        got[0], got[1], got[2], got[3], got[4], got[5]));
  endtask

  task automatic ex_cycle(metric_t m0, metric_t m1, metric_t m2, metric_t m3);
    while (!ex_phi1) @(negedge clk);
    ex_in[0] = '{metric: m0, tag: 16'(m0)};
    ex_in[1] = '{metric: m1, tag: 16'(m1)};
    ex_in[2] = '{metric: m2, tag: 16'(m2)};
    ex_in[3] = '{metric: m3, tag: 16'(m3)};
    @(posedge clk); #1;
    foreach (ex_in[j]) ex_in[j] = EMPTY;
  endtask

  task automatic run_example();
    // clock 1
    ex_cycle(5, 2, 3, 1);
    slice1("clock1 phase1", 5, E, 2, 3, E, 1);
    @(posedge clk); #1;
    chk(ex_valid && ex_best.metric == 5, "clock1 extracts 5");
    slice1("clock1 phase2", 2, E, E, 3, E, 1);
    // clock 2
    ex_cycle(4, 2, 3, 7);
    slice1("clock2 phase1", 4, 2, 2, 7, 3, 3);
    chk(ex.b0_q[1].metric == 1, "clock2 phase1: B0 of slice 2 = 1");
    @(posedge clk); #1;
    chk(ex_valid && ex_best.metric == 7, "clock2 extracts 7");
    slice1("clock2 phase2", 4, 2, 2, 3, 1, 3);
    // clock 3
    ex_cycle(2, 4, 5, 8);
    slice1("clock3 phase1", 4, 2, 4, 8, 5, 3);
    chk(ex.t0_q[1].metric == 2 && ex.b0_q[1].metric == 3, "clock3 phase1: slice 2 tops 2 / 3");
    // tie among the inputs: the 4 from the second top input must win over the
    // resident 4 (tag tells them apart)
    chk(ex.t0_q[0].tag == 16'd4 && ex.t_side_q[0][1].tag == 16'd4, "clock3 tie placement");
    @(posedge clk); #1;
    chk(ex_valid && ex_best.metric == 8, "clock3 extracts 8");
    slice1("clock3 phase2", 4, 2, 4, 5, 3, 3);
    chk(ex.t0_q[1].metric == 2, "clock3 phase2: T0 of slice 2 holds 2");
  endtask

  // ----------------------------------------------------------------- random
  entry_t in_i [N];
  logic   phi1, best_valid;
  entry_t best;
  entry_t drop [N];
  int sb_checks, sb_failures, drops, extracts, empty_extracts, live;
  int from_top = 0, from_bottom = 0, n_cross = 0;

  mispq_t2_queue #(.N(N), .SLICES(SLICES)) dut (
    .clk(clk), .rst_n(rst_n), .in_i(in_i), .phi1_o(phi1),
    .best_o(best), .best_valid_o(best_valid));

  for (genvar j = 0; j < N / 2; j++) begin : g_drop
    assign drop[j]         = dut.g_slice[SLICES-1].u_slice.t_side_q[j];
    assign drop[N / 2 + j] = dut.g_slice[SLICES-1].u_slice.b_side_q[j];
  end

  tb_pq_scoreboard #(.N(N), .SLICES(SLICES), .NDROP(N)) sb (
    .clk(clk), .rst_n(rst_n), .phi1(phi1), .in_i(in_i), .drop_i(drop),
    .best_i(best), .best_valid_i(best_valid),
    .checks(sb_checks), .failures(sb_failures), .drops(drops),
    .extracts(extracts), .empty_extracts(empty_extracts), .live(live));

  // phase-2 activity: which subslice the best came from, and transfers
  // between subslices (next slice's best moving into the other half)
  always @(posedge clk) begin
    if (rst_n && !phi1) begin
      if (dut.tle[0] && dut.t0_q[0].metric != E) from_top++;
      if (dut.bl[0]) from_bottom++;
      for (int s = 0; s < SLICES - 1; s++)
        if ((dut.tle[s] && dut.bl[s+1]) || (dut.bl[s] && dut.tle[s+1])) n_cross++;
    end
  end

  int tagc = 1000;

  task automatic queue_cycle(int pct);
    while (!phi1) @(negedge clk);
    foreach (in_i[j]) begin
      if ($urandom_range(1, 100) <= pct) begin
        in_i[j].metric = metric_t'($urandom_range(0, 30));
        in_i[j].tag    = tag_t'(tagc++);
      end else begin
        in_i[j] = EMPTY;
      end
    end
    @(negedge clk);
    foreach (in_i[j]) in_i[j] = EMPTY;
    @(negedge clk);
  endtask

  task automatic finish_tb();
    $display("extracts=%0d empty=%0d drops=%0d from_top=%0d from_bottom=%0d n_cross=%0d",
             extracts, empty_extracts, drops, from_top, from_bottom, n_cross);
    $display("TB_RESULT checks=%0d failures=%0d", checks + sb_checks, failures + sb_failures);
    $finish;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end

  initial begin
    int d0;
    foreach (in_i[j]) begin in_i[j] = EMPTY; ex_in[j] = EMPTY; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run_example();
    repeat (300) queue_cycle(12);
    chk(drops == 0, "no drops under light load");
    d0 = drops;
    repeat (300) queue_cycle(100);
    chk(drops > d0, "tail drops under heavy load");
    repeat (40) queue_cycle(0);
    chk(live == 0, "queue drained");
    chk(from_top > 0 && from_bottom > 0, "extractions from both subslices");
    chk(n_cross > 0, "transfers between subslices");
    finish_tb();
  end
endmodule
