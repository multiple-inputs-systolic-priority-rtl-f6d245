// mispq_top: the two multiple-input systolic priority queues side by side.
//
// The type II queue (mispq_t2_queue) is the architecture meant for many
// inputs: two half-width queues that exchange metrics only when slice tops
// move left. The modified type I queue (mispq_t1_queue) is the single-group
// architecture preferred for up to eight inputs. They are alternatives for
// different input counts, not parts of one datapath, so each has its own
// ports here and they share only the clock and reset. Both run the same
// two-phase cycle: inputs sampled on the phase-1 edge (phi1 high before it),
// best entry extracted on the phase-2 edge and shown with a one-cycle valid
// pulse.
module mispq_top
  import mispq_pkg::*;
#(
  parameter int N2      = 4,   // inputs of the type II queue
  parameter int SLICES2 = 16,
  parameter int N1      = 4,   // inputs of the type I queue
  parameter int SLICES1 = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  // type II queue
  input  entry_t t2_in_i [N2],
  output logic   t2_phi1_o,
  output entry_t t2_best_o,
  output logic   t2_best_valid_o,
  // modified type I queue
  input  entry_t t1_in_i [N1],
  output logic   t1_phi1_o,
  output entry_t t1_best_o,
  output logic   t1_best_valid_o
);

  mispq_t2_queue #(.N(N2), .SLICES(SLICES2)) u_t2 (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_i        (t2_in_i),
    .phi1_o      (t2_phi1_o),
    .best_o      (t2_best_o),
    .best_valid_o(t2_best_valid_o)
  );

  mispq_t1_queue #(.N(N1), .SLICES(SLICES1)) u_t1 (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_i        (t1_in_i),
    .phi1_o      (t1_phi1_o),
    .best_o      (t1_best_o),
    .best_valid_o(t1_best_valid_o)
  );

endmodule
