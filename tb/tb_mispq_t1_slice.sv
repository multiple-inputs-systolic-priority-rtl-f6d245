// tb_mispq_t1_slice: checks one modified type I slice (N = 3) in isolation.
//
// The testbench plays both neighbours. In phase 1 it offers a random group
// winner and one-hot select from the "previous slice" together with that
// slice's side metrics; in phase 2 a random top from the "next slice". A model
// of the slice's registers predicts each update: phase 1 puts the winner in
// the top and every side metric in its own slot, except that the winner's
// slot gets the old top; phase 2 puts the best of the side metrics and the
// next slice's top into the top (first side on ties, the incoming top only
// if strictly larger) and the incoming top into the winner's slot. The
// slice's own group outputs are checked in every cycle.
module tb_mispq_t1_slice;
  import mispq_pkg::*;

  localparam int N = 3;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  phase_t     phase;
  entry_t     left_side [N];
  logic [N:0] left_sel;
  entry_t     left_best;
  entry_t     right_top;
  entry_t     top_q;
  entry_t     side_q [N];
  logic [N:0] grp_sel;
  entry_t     grp_best;

  entry_t     e_top;
  entry_t     e_side [N];
  int         checks = 0, failures = 0, cycles = 0;

  mispq_t1_slice #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .phase(phase),
    .left_side(left_side), .left_sel(left_sel), .left_best(left_best),
    .right_top(right_top), .top_q(top_q), .side_q(side_q),
    .grp_sel(grp_sel), .grp_best(grp_best));

  always #5 clk = ~clk;

  function automatic entry_t rnd(int tagv);
    entry_t e;
    e.metric = metric_t'($signed($urandom_range(0, 6)) - 3);
    e.tag    = tag_t'(tagv);
    return e;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tagc = 1;
    phase = PH1;
    foreach (left_side[j]) left_side[j] = EMPTY;
    left_sel = '0; left_best = EMPTY; right_top = EMPTY;
    e_top = EMPTY;
    foreach (e_side[j]) e_side[j] = EMPTY;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      int w;
      // drive at the falling edge
      @(negedge clk);
      phase = (n % 2 == 0) ? PH1 : PH2;
      foreach (left_side[j]) left_side[j] = rnd(tagc++);
      left_sel  = (N+1)'(1) << $urandom_range(0, N);
      left_best = rnd(tagc++);
      right_top = rnd(tagc++);
      #1;
      // own group outputs (combinational)
      w = 0;
      for (int j = 1; j < N; j++) if (e_side[j].metric > e_side[w].metric) w = j;
      if (right_top.metric > e_side[w].metric) w = N;
      chk(grp_sel == (N+1)'(1) << w, $sformatf("grp_sel=%b expected %0d", grp_sel, w));
      chk(grp_best == ((w == N) ? right_top : e_side[w]), "grp_best");
      // model update
      if (phase == PH1) begin
        for (int j = 0; j < N; j++) e_side[j] = left_sel[j] ? e_top : left_side[j];
        e_top = left_best;
      end else begin
        e_top = (w == N) ? right_top : e_side[w];
        if (w < N) e_side[w] = right_top;
      end
      @(posedge clk);
      #1;
      cycles++;
      chk(top_q == e_top, $sformatf("top %0d expected %0d", top_q.metric, e_top.metric));
      for (int j = 0; j < N; j++)
        chk(side_q[j] == e_side[j], $sformatf("side %0d", j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
