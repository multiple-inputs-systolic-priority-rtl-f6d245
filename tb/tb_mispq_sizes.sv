// tb_mispq_sizes: the input counts the architectures are compared at. The
// type II queue with 8 and 16 inputs and the modified type I queue with 8
// inputs run random traffic against the priority-queue reference model (see
// tb_queue_harness), each with 8 slices.
module tb_mispq_sizes;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic d0, d1, d2;
  int   c0, c1, c2, f0, f1, f2;
  int   extra_fail = 0;

  always #5 clk = ~clk;

  tb_queue_harness #(.TYPE(2), .N(8),  .SLICES(8), .SEED(1)) h_t2_n8  (.clk(clk), .rst_n(rst_n), .done(d0), .checks(c0), .failures(f0));
  tb_queue_harness #(.TYPE(2), .N(16), .SLICES(8), .SEED(2)) h_t2_n16 (.clk(clk), .rst_n(rst_n), .done(d1), .checks(c1), .failures(f1));
  tb_queue_harness #(.TYPE(1), .N(8),  .SLICES(8), .SEED(3)) h_t1_n8  (.clk(clk), .rst_n(rst_n), .done(d2), .checks(c2), .failures(f2));

  initial begin
    repeat (20000) @(posedge clk);
    extra_fail++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + extra_fail);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (d0 && d1 && d2);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + extra_fail);
    $finish;
  end
endmodule
