// mispq_pkg: types and constants shared by the multiple-input systolic
// priority queue (MISPQ).
//
// An entry held by a queue processor is a signed path metric plus a tag. The
// tag is meant for the address of the node's information bits in an external
// RAM, so that only the metric and a pointer travel through the queue; its
// width, like the metric width, is a choice of this design. A larger metric is
// a better metric. EMPTY (the most negative metric) is what an idle processor
// holds after reset and what an unused input carries: it plays the role of the
// "smallest metric" the queue is filled with before a search starts.
//
// cmp_t is the two-bit result code of the bit-serial comparator: 00 equal,
// 01 first operand larger, 10 first operand smaller.
package mispq_pkg;

  localparam int METRIC_W = 16;
  localparam int TAG_W    = 16;

  typedef logic signed [METRIC_W-1:0] metric_t;
  typedef logic [TAG_W-1:0]           tag_t;

  typedef struct packed {
    metric_t metric;
    tag_t    tag;
  } entry_t;

  localparam metric_t METRIC_MIN = {1'b1, {(METRIC_W-1){1'b0}}};
  localparam entry_t  EMPTY      = '{metric: METRIC_MIN, tag: '0};

  typedef enum logic [1:0] {
    CMP_EQ = 2'b00,
    CMP_GT = 2'b01,
    CMP_LT = 2'b10
  } cmp_t;

  // The two phases of one queue cycle. PH1: insert and shift right, sort each
  // (sub)slice. PH2: shift the slice tops left, extract, sort again.
  typedef enum logic {
    PH1 = 1'b0,
    PH2 = 1'b1
  } phase_t;

endpackage
