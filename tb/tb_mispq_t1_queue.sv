// tb_mispq_t1_queue: runs the modified type I queue (N = 4, 4 slices) against
// the priority-queue reference model (tb_pq_scoreboard).
//
// First a directed check of timing: a single entry inserted at a phase-1 edge
// into an empty queue must come out at the next phase-2 edge, with
// best_valid_o high in the following clock cycle. Then random traffic in
// three loads: light (mostly EMPTY inputs, nothing should be dropped), heavy
// (all inputs real, so entries fall off the tail), and drain (only EMPTY
// inputs until the queue returns EMPTY). Metrics are drawn from a narrow range
// so that ties are frequent. The scoreboard checks every extraction and every
// drop; the testbench also checks that drops happened only under heavy load
// and that the drained queue was empty.
module tb_mispq_t1_queue;
  import mispq_pkg::*;

  localparam int N      = 4;
  localparam int SLICES = 4;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  entry_t in_i [N];
  logic   phi1;
  entry_t best;
  logic   best_valid;
  entry_t drop [N];

  int checks = 0, failures = 0;
  int sb_checks, sb_failures, drops, extracts, empty_extracts, live;

  mispq_t1_queue #(.N(N), .SLICES(SLICES)) dut (
    .clk(clk), .rst_n(rst_n), .in_i(in_i), .phi1_o(phi1),
    .best_o(best), .best_valid_o(best_valid));

  assign drop = dut.g_slice[SLICES-1].u_slice.side_q;

  tb_pq_scoreboard #(.N(N), .SLICES(SLICES), .NDROP(N)) sb (
    .clk(clk), .rst_n(rst_n), .phi1(phi1), .in_i(in_i), .drop_i(drop),
    .best_i(best), .best_valid_i(best_valid),
    .checks(sb_checks), .failures(sb_failures), .drops(drops),
    .extracts(extracts), .empty_extracts(empty_extracts), .live(live));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  task automatic finish_tb();
    $display("extracts=%0d empty=%0d drops=%0d", extracts, empty_extracts, drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks + sb_checks, failures + sb_failures);
    $finish;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end

  int tagc = 1;

  // one queue cycle of inputs, each real with probability pct %
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

  initial begin
    int d0;
    foreach (in_i[j]) in_i[j] = EMPTY;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // directed: latency of one entry through an empty queue
    while (!phi1) @(negedge clk);
    in_i[2] = '{metric: 7, tag: 16'hbeef};
    @(posedge clk); #1;           // phase-1 edge
    in_i[2] = EMPTY;
    chk(!best_valid, "no extraction on the phase-1 edge");
    @(posedge clk); #1;           // phase-2 edge
    chk(best_valid && best.metric == 7 && best.tag == 16'hbeef,
        "entry extracted one clock after insertion");
    @(negedge clk);
    // light load: at most one real input per cycle on average
    repeat (300) queue_cycle(12);
    chk(drops == 0, "no drops under light load");
    d0 = drops;
    repeat (300) queue_cycle(100);
    chk(drops > d0, "tail drops under heavy load");
    repeat (40) queue_cycle(0);
    chk(live == 0, "queue drained");
    chk(empty_extracts > 0, "empty extractions seen");
    finish_tb();
  end
endmodule
