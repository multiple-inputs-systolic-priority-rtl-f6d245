// tb_queue_harness: one queue (type I or type II, chosen by TYPE) driven with
// random node metrics and checked by tb_pq_scoreboard, for use by testbenches
// that compare several sizes. Load profile: light (12 % of inputs real),
// heavy (90 %, the queue overflows), then a drain with EMPTY inputs. done goes
// high at the end; checks/failures include the scoreboard's and the harness's
// own (no drop under light load, drops under heavy load, queue drained).
module tb_queue_harness
  import mispq_pkg::*;
#(
  parameter int TYPE   = 2,
  parameter int N      = 8,
  parameter int SLICES = 8,
  parameter int CYCLES = 200,
  parameter int SEED   = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);

  entry_t in_i [N];
  entry_t drop [N];
  logic   phi1, best_valid;
  entry_t best;
  int sb_checks, sb_failures, drops, extracts, empty_extracts, live;
  int own_checks, own_failures;

  if (TYPE == 2) begin : g_t2
    mispq_t2_queue #(.N(N), .SLICES(SLICES)) dut (
      .clk(clk), .rst_n(rst_n), .in_i(in_i), .phi1_o(phi1),
      .best_o(best), .best_valid_o(best_valid));
    for (genvar j = 0; j < N / 2; j++) begin : g_drop
      assign drop[j]         = dut.g_slice[SLICES-1].u_slice.t_side_q[j];
      assign drop[N / 2 + j] = dut.g_slice[SLICES-1].u_slice.b_side_q[j];
    end
  end else begin : g_t1
    mispq_t1_queue #(.N(N), .SLICES(SLICES)) dut (
      .clk(clk), .rst_n(rst_n), .in_i(in_i), .phi1_o(phi1),
      .best_o(best), .best_valid_o(best_valid));
    assign drop = dut.g_slice[SLICES-1].u_slice.side_q;
  end

  tb_pq_scoreboard #(.N(N), .SLICES(SLICES), .NDROP(N)) sb (
    .clk(clk), .rst_n(rst_n), .phi1(phi1), .in_i(in_i), .drop_i(drop),
    .best_i(best), .best_valid_i(best_valid),
    .checks(sb_checks), .failures(sb_failures), .drops(drops),
    .extracts(extracts), .empty_extracts(empty_extracts), .live(live));

  assign checks   = sb_checks + own_checks;
  assign failures = sb_failures + own_failures;

  int tagc;

  task automatic own(bit ok, string what);
    own_checks++;
    if (!ok) begin
      own_failures++;
      $display("FAIL type %0d N=%0d: %s", TYPE, N, what);
    end
  endtask

  task automatic queue_cycle(int pct);
    while (!phi1) @(negedge clk);
    foreach (in_i[j]) begin
      if ($urandom_range(1, 100) <= pct) begin
        in_i[j].metric = metric_t'($signed($urandom_range(0, 60)) - 30);
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
    done = 1'b0; own_checks = 0; own_failures = 0;
    tagc = SEED * 10000;
    foreach (in_i[j]) in_i[j] = EMPTY;
    @(posedge rst_n);
    @(negedge clk);
    repeat (CYCLES) queue_cycle(100 / (4 * N));
    own(drops == 0, "no drops under light load");
    d0 = drops;
    repeat (CYCLES) queue_cycle(90);
    own(drops > d0, "drops under heavy load");
    repeat (SLICES * 3 + 10) queue_cycle(0);
    own(live == 0, "queue drained");
    $display("type %0d N=%0d SLICES=%0d: extracts=%0d drops=%0d", TYPE, N, SLICES, extracts, drops);
    done = 1'b1;
  end

endmodule
