// One-bit Razor flip-flop: detects and corrects a late-arriving data bit.
//
// The main flip-flop samples d on the rising edge of clk. A shadow copy
// samples the same d on the rising edge of clk_del, a delayed version of
// clk, so it sees data that arrived after the main edge but before the
// delayed one. err is the XOR of the two: when they differ, the path was
// slower than the clock period and the main flip-flop holds a wrong value.
// A multiplexer in front of the main flip-flop then loads the shadow value
// at the next clk edge when restore is 1.
//
// Interface: clk, clk_del (delayed clock, rising edge after clk's and before
// the next one), rst_n (asynchronous, active low), d, restore, q, err.
// Timing: err is meaningful from the clk_del edge to the next clk edge; the
// decision whether to act on it (restore) is taken outside, because a
// mismatch also appears while a legitimate two-cycle operation is still
// settling. The main flip-flop, delayed-clock shadow, XOR and multiplexer
// follow the described Razor cell; sampling the shadow on an edge rather
// than with a transparent latch is this design's choice, so no latch is
// inferred.
module razor_ff (
  input  logic clk,
  input  logic clk_del,
  input  logic rst_n,
  input  logic d,
  input  logic restore,
  output logic q,
  output logic err
);
  logic shadow;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= 1'b0;
    else if (restore) q <= shadow;
    else              q <= d;
  end

  always_ff @(posedge clk_del or negedge rst_n) begin
    if (!rst_n) shadow <= 1'b0;
    else        shadow <= d;
  end

  assign err = q ^ shadow;
endmodule
