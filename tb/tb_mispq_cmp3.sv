// tb_mispq_cmp3: checks the max-versus-third comparator. For random metrics
// (drawn from a narrow range so that equal values are common) the result
// must be the relation of the selected operand (t when t_sel, else b) to z.
module tb_mispq_cmp3;
  import mispq_pkg::*;

  metric_t t, b, z;
  logic    t_sel;
  cmp_t    code;
  int      checks = 0, failures = 0;

  mispq_cmp3 dut (.t(t), .b(b), .t_sel(t_sel), .z(z), .code(code));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      metric_t opnd;
      cmp_t    exp;
      t     = metric_t'($signed($urandom_range(0, 8)) - 4);
      b     = metric_t'($signed($urandom_range(0, 8)) - 4);
      z     = metric_t'($signed($urandom_range(0, 8)) - 4);
      t_sel = 1'($urandom);
      #1;
      opnd = t_sel ? t : b;
      exp  = (opnd > z) ? CMP_GT : (opnd < z) ? CMP_LT : CMP_EQ;
      checks++;
      if (code !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d b=%0d sel=%0b z=%0d code=%b", t, b, t_sel, z, code);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
