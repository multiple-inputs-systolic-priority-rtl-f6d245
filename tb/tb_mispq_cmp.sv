// tb_mispq_cmp: checks the ripple comparator against the simulator's signed
// comparison, on corner values (both extremes, zero, +-1, equal pairs) and on
// random pairs, half of them sharing their upper bits so that the decision
// falls late in the chain.
module tb_mispq_cmp;
  import mispq_pkg::*;

  metric_t x, y;
  cmp_t    code;
  int      checks = 0, failures = 0;

  mispq_cmp dut (.x(x), .y(y), .code(code));

  localparam metric_t CORNER [6] = '{METRIC_MIN, -1, 0, 1, 2, {1'b0, {(METRIC_W-1){1'b1}}}};

  task automatic try(metric_t a, metric_t b);
    cmp_t exp;
    x = a; y = b;
    #1;
    exp = (a > b) ? CMP_GT : (a < b) ? CMP_LT : CMP_EQ;
    checks++;
    if (code !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d y=%0d code=%b exp=%b", a, b, code, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (CORNER[i]) foreach (CORNER[j]) try(CORNER[i], CORNER[j]);
    for (int n = 0; n < 2000; n++) begin
      metric_t a, b;
      a = metric_t'($urandom);
      b = (n % 2 == 1) ? metric_t'({a[METRIC_W-1:4], 4'($urandom)}) : metric_t'($urandom);
      try(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
