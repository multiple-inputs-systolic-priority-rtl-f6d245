// tb_mispq_group: checks the group selection logic, for a three-side group
// with two top candidates and a two-side group with one. Metrics come from a
// narrow range so that ties are frequent. The expected winner is found by a
// scan: the first side processor holding the largest side metric, unless the
// top candidate is strictly larger. sel must be one-hot on that member and
// best must be its entry; top must be the selected candidate.
module tb_mispq_group;
  import mispq_pkg::*;

  localparam int K3 = 3;
  localparam int K2 = 2;

  entry_t     side3 [K3];
  entry_t     side2 [K2];
  entry_t     ta, tb_;
  logic       sel_a;
  logic [K3:0] sel3;
  logic [K2:0] sel2;
  entry_t     top3, best3, top2, best2;
  int         checks = 0, failures = 0;
  int         top_wins = 0, ties = 0;

  mispq_group #(.K(K3), .DUAL_TOP(1'b1)) dut3 (
    .side(side3), .top_a(ta), .top_b(tb_), .top_sel_a(sel_a),
    .sel(sel3), .top(top3), .best(best3));

  mispq_group #(.K(K2), .DUAL_TOP(1'b0)) dut2 (
    .side(side2), .top_a(ta), .top_b(tb_), .top_sel_a(1'b0),
    .sel(sel2), .top(top2), .best(best2));

  function automatic entry_t rnd(int tagv);
    entry_t e;
    e.metric = metric_t'($signed($urandom_range(0, 4)) - 2);
    e.tag    = tag_t'(tagv);
    return e;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int     w;
      entry_t cand;
      for (int j = 0; j < K3; j++) side3[j] = rnd(j + 1);
      for (int j = 0; j < K2; j++) side2[j] = rnd(j + 11);
      ta    = rnd(20);
      tb_   = rnd(21);
      sel_a = 1'($urandom);
      #1;
      // three-side, dual top
      cand = sel_a ? ta : tb_;
      w = 0;
      for (int j = 1; j < K3; j++) if (side3[j].metric > side3[w].metric) w = j;
      if (cand.metric > side3[w].metric) w = K3;
      if (cand.metric == side3[w].metric && w < K3) ties++;
      if (w == K3) top_wins++;
      chk(top3 == cand, "dual top candidate");
      chk(sel3 == (K3+1)'(1) << w, $sformatf("sel3=%b expected member %0d", sel3, w));
      chk(best3 == ((w == K3) ? cand : side3[w]), "best3");
      // two-side, single top (top_a only)
      w = 0;
      for (int j = 1; j < K2; j++) if (side2[j].metric > side2[w].metric) w = j;
      if (ta.metric > side2[w].metric) w = K2;
      chk(top2 == ta, "single top candidate");
      chk(sel2 == (K2+1)'(1) << w, $sformatf("sel2=%b expected member %0d", sel2, w));
      chk(best2 == ((w == K2) ? ta : side2[w]), "best2");
    end
    chk(top_wins > 0 && ties > 0, "top wins and ties both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
