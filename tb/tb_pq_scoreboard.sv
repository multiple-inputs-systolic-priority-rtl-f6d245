// tb_pq_scoreboard: reference model of a priority queue with N inputs and
// one extraction per queue cycle, used by the queue testbenches.
//
// It keeps every entry inserted and not yet extracted in a plain list. On
// each extraction (best_valid high) it checks that the extracted metric is
// the largest metric in the list (or EMPTY when the list holds no real entry)
// and that the extracted tag names a listed entry with that metric, which it
// then removes. Entries the queue drops off its tail are shown to it on
// drop_i at the phase-1 edge that drops them: it removes them too, and checks
// that each was allowed to go, i.e. that at least SLICES other entries were at
// least as good (the k-th best entry must stay within the first k slices).
// It also checks that extractions come exactly once per two clock cycles.
// Real entries must have a metric above EMPTY and unique tags.
module tb_pq_scoreboard
  import mispq_pkg::*;
#(
  parameter int N      = 4,
  parameter int SLICES = 4,
  parameter int NDROP  = 4,
  parameter int MAXM   = 1024
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   phi1,
  input  entry_t in_i   [N],
  input  entry_t drop_i [NDROP],
  input  entry_t best_i,
  input  logic   best_valid_i,
  output int     checks,
  output int     failures,
  output int     drops,
  output int     extracts,
  output int     empty_extracts,
  output int     live
);

  metric_t m_metric [MAXM];
  tag_t    m_tag    [MAXM];
  bit      m_used   [MAXM];
  int      since_extract;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("SCOREBOARD FAIL t=%0t: %s", $time, what);
    end
  endfunction

  function automatic int find_tag(tag_t t);
    for (int i = 0; i < MAXM; i++)
      if (m_used[i] && m_tag[i] == t) return i;
    return -1;
  endfunction

  function automatic void add(entry_t e);
    for (int i = 0; i < MAXM; i++)
      if (!m_used[i]) begin
        m_used[i] = 1'b1; m_metric[i] = e.metric; m_tag[i] = e.tag; live++;
        return;
      end
    check(1'b0, "reference model full: entries are not leaving the queue");
  endfunction

  initial begin
    checks = 0; failures = 0; drops = 0; extracts = 0; empty_extracts = 0;
    live = 0; since_extract = 0;
    for (int i = 0; i < MAXM; i++) m_used[i] = 1'b0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      // 1. extraction made at the previous (phase-2) edge
      since_extract++;
      if (best_valid_i) begin
        int  idx;
        bit  any;
        metric_t mx;
        any = 1'b0; mx = METRIC_MIN;
        for (int i = 0; i < MAXM; i++)
          if (m_used[i] && (!any || m_metric[i] > mx)) begin any = 1'b1; mx = m_metric[i]; end
        check(since_extract == 2 || extracts == 0, "one extraction per two clocks");
        since_extract = 0;
        extracts++;
        if (!any) begin
          empty_extracts++;
          check(best_i.metric == METRIC_MIN, $sformatf("empty queue gave %0d", best_i.metric));
        end else begin
          check(best_i.metric == mx,
                $sformatf("extracted %0d, best held %0d", best_i.metric, mx));
          idx = find_tag(best_i.tag);
          check(idx >= 0 && m_metric[idx] == best_i.metric,
                $sformatf("extracted tag %0d not held with metric %0d", best_i.tag, best_i.metric));
          if (idx >= 0) begin m_used[idx] = 1'b0; live--; end
        end
      end
      // 2. phase-1 edge: tail drops, then the new inputs
      if (phi1) begin
        for (int d = 0; d < NDROP; d++) begin
          if (drop_i[d].metric != METRIC_MIN) begin
            int idx, better;
            idx = find_tag(drop_i[d].tag);
            check(idx >= 0, $sformatf("dropped tag %0d unknown", drop_i[d].tag));
            better = 0;
            for (int i = 0; i < MAXM; i++)
              if (m_used[i] && i != idx && m_metric[i] >= drop_i[d].metric) better++;
            for (int j = 0; j < N; j++)
              if (in_i[j].metric != METRIC_MIN && in_i[j].metric >= drop_i[d].metric) better++;
            check(better >= SLICES,
                  $sformatf("dropped metric %0d with only %0d as good", drop_i[d].metric, better));
          end
        end
        for (int d = 0; d < NDROP; d++) begin
          if (drop_i[d].metric != METRIC_MIN) begin
            int idx;
            idx = find_tag(drop_i[d].tag);
            if (idx >= 0) begin m_used[idx] = 1'b0; live--; end
            drops++;
          end
        end
        for (int j = 0; j < N; j++)
          if (in_i[j].metric != METRIC_MIN) add(in_i[j]);
      end
    end
  end

endmodule
