// tb_mispq_t2_slice: checks one type II slice (N = 4, two side processors per
// subslice) in isolation.
//
// The testbench plays both neighbours with random metrics (narrow range, so
// ties are common). A model of the six processors predicts each update:
//   phase 1: each subslice independently takes the winner of the previous
//     slice's group in its top, and every side metric moves into its slot
//     except the winner's slot, which gets the old top. tle_o and bl_o must
//     both be low.
//   phase 2: tle_o must equal T0 >= B0 and bl_o its complement. Only the
//     subslice holding the better top is refilled: its top gets the best of
//     its side metrics and the next slice's pseudo top (the next slice's T0
//     if its tle is set, otherwise its B0), and the incoming metric takes the
//     winner's slot. The other subslice holds.
module tb_mispq_t2_slice;
  import mispq_pkg::*;

  localparam int N = 4;
  localparam int K = N / 2;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  phase_t     phase;
  entry_t     lts [K], lbs [K];
  logic [K:0] lt_sel, lb_sel;
  entry_t     lt_best, lb_best;
  entry_t     r_t0, r_b0;
  logic       r_tle, r_bl;
  entry_t     t0_q, b0_q;
  entry_t     ts_q [K], bs_q [K];
  logic       tle, bl;
  logic [K:0] t_sel, b_sel;
  entry_t     t_best, b_best;

  entry_t e_t0, e_b0;
  entry_t e_ts [K], e_bs [K];
  int     checks = 0, failures = 0;
  int     n_tle = 0, n_bl = 0, n_cross = 0;

  mispq_t2_slice #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .phase(phase),
    .left_t_side(lts), .left_t_sel(lt_sel), .left_t_best(lt_best),
    .left_b_side(lbs), .left_b_sel(lb_sel), .left_b_best(lb_best),
    .right_t0(r_t0), .right_b0(r_b0), .right_tle(r_tle), .right_bl(r_bl),
    .t0_q(t0_q), .b0_q(b0_q), .t_side_q(ts_q), .b_side_q(bs_q),
    .tle_o(tle), .bl_o(bl),
    .t_grp_sel(t_sel), .t_grp_best(t_best), .b_grp_sel(b_sel), .b_grp_best(b_best));

  always #5 clk = ~clk;

  function automatic entry_t rnd(int tagv);
    entry_t e;
    e.metric = metric_t'($signed($urandom_range(0, 5)) - 2);
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

  // refill one subslice in phase 2
  task automatic refill(inout entry_t top, inout entry_t s [K], input entry_t inc);
    int w;
    w = 0;
    for (int j = 1; j < K; j++) if (s[j].metric > s[w].metric) w = j;
    if (inc.metric > s[w].metric) w = K;
    top = (w == K) ? inc : s[w];
    if (w < K) s[w] = inc;
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
    foreach (lts[j]) begin lts[j] = EMPTY; lbs[j] = EMPTY; end
    lt_sel = '0; lb_sel = '0; lt_best = EMPTY; lb_best = EMPTY;
    r_t0 = EMPTY; r_b0 = EMPTY; r_tle = 1'b0; r_bl = 1'b0;
    e_t0 = EMPTY; e_b0 = EMPTY;
    foreach (e_ts[j]) begin e_ts[j] = EMPTY; e_bs[j] = EMPTY; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      phase = (n % 2 == 0) ? PH1 : PH2;
      foreach (lts[j]) begin lts[j] = rnd(tagc++); lbs[j] = rnd(tagc++); end
      lt_sel  = (K+1)'(1) << $urandom_range(0, K);
      lb_sel  = (K+1)'(1) << $urandom_range(0, K);
      lt_best = rnd(tagc++);
      lb_best = rnd(tagc++);
      r_t0    = rnd(tagc++);
      r_b0    = rnd(tagc++);
      // the next slice's flags, as it would drive them
      r_tle   = (phase == PH2) && (r_t0.metric >= r_b0.metric);
      r_bl    = (phase == PH2) && (r_t0.metric <  r_b0.metric);
      #1;
      if (phase == PH1) begin
        chk(!tle && !bl, "flags low in phase 1");
        for (int j = 0; j < K; j++) begin
          e_ts[j] = lt_sel[j] ? e_t0 : lts[j];
          e_bs[j] = lb_sel[j] ? e_b0 : lbs[j];
        end
        e_t0 = lt_best;
        e_b0 = lb_best;
      end else begin
        entry_t inc;
        bit     t_wins;
        t_wins = (e_t0.metric >= e_b0.metric);
        chk(tle == t_wins && bl == !t_wins, "tle/bl in phase 2");
        inc = r_tle ? r_t0 : r_b0;
        if (t_wins) begin refill(e_t0, e_ts, inc); n_tle++; end
        else        begin refill(e_b0, e_bs, inc); n_bl++;  end
        if (t_wins != r_tle) n_cross++;
      end
      @(posedge clk);
      #1;
      chk(t0_q == e_t0, $sformatf("T0 %0d expected %0d", t0_q.metric, e_t0.metric));
      chk(b0_q == e_b0, $sformatf("B0 %0d expected %0d", b0_q.metric, e_b0.metric));
      for (int j = 0; j < K; j++) begin
        chk(ts_q[j] == e_ts[j], $sformatf("T%0d", j + 1));
        chk(bs_q[j] == e_bs[j], $sformatf("B%0d", j + 1));
      end
    end
    chk(n_tle > 0 && n_bl > 0 && n_cross > 0, "both subslices and cross transfers exercised");
    $display("refills top=%0d bottom=%0d cross=%0d", n_tle, n_bl, n_cross);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
