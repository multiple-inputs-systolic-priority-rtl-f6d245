// mispq_cmp: bit-serial (ripple) magnitude comparator for two metrics.
//
// A chain of one-bit cells runs from the most significant bit to the least.
// Each cell carries a two-bit state (cmp_t): while the state is 00 (equal so
// far) the cell looks at its bit pair x,y and moves to 01 (x larger) on 10 or
// to 10 (x smaller) on 01; once the state is 01 or 10 it is passed on
// unchanged. The state leaving the last cell is the result. This is the
// comparator cell and truth table of the queue's slice comparators.
//
// Metrics are two's complement; the sign bit is inverted on entry to the chain
// so that the unsigned chain orders signed numbers (this design's choice, the
// cells themselves compare unsigned bits).
//
// Purely combinational: code = relation of x to y.
module mispq_cmp
  import mispq_pkg::*;
(
  input  metric_t x,
  input  metric_t y,
  output cmp_t    code
);

  // state[k] is the state entering the cell of bit METRIC_W-1-k
  cmp_t state [METRIC_W+1];

  function automatic cmp_t bit_cell(cmp_t s, logic xb, logic yb);
    if (s != CMP_EQ) return s;
    if (xb && !yb)   return CMP_GT;
    if (!xb && yb)   return CMP_LT;
    return CMP_EQ;
  endfunction

  assign state[0] = CMP_EQ;

  for (genvar k = 0; k < METRIC_W; k++) begin : g_cell
    localparam int B = METRIC_W - 1 - k;
    logic xb, yb;
    if (B == METRIC_W - 1) begin : g_sign
      assign xb = ~x[B];
      assign yb = ~y[B];
    end else begin : g_mag
      assign xb = x[B];
      assign yb = y[B];
    end
    assign state[k+1] = bit_cell(state[k], xb, yb);
  end

  assign code = state[METRIC_W];

endmodule
