// Adaptive hold logic (AHL): decides, per operand pair, whether the
// multiplier gets one clock cycle or two, and adapts that decision to aging.
//
// Two judging blocks examine the multiplicand held in the input flip-flops:
// block 1 says "one cycle" when it has more than THRESH zeros, block 2 when
// it has more than THRESH+1. A multiplexer steered by the aging indicator
// picks block 1 while the circuit is fresh and the stricter block 2 once it
// has aged, so fewer patterns are trusted to finish in one cycle. The
// multiplexer output is ORed with Q' of a D flip-flop; the OR output is the
// active-high !gating signal (load enable of the input flip-flops) and is
// also stored in the D flip-flop. A 0 therefore lasts exactly one cycle:
// a two-cycle pattern holds the inputs for one extra cycle, after which Q'
// forces a load. A Razor error (err) forces the same one-cycle hold, which
// gives the operation behind the failed one two cycles while the Razor
// register restores the failed result.
//
// Interface: clk, rst_n (asynchronous, active low), a[N] (multiplicand in the
// input flip-flops), op_done (a result was checked this cycle), err (that
// result had a timing error), gating_n (1: input flip-flops load at the next
// edge), q (the last edge completed an operation), aged.
// Timing: gating_n is combinational from a, err and the D flip-flop. The
// judging blocks, multiplexer, OR gate with Q' and the D flip-flop follow
// the described AHL; letting err force a hold, and the threshold and
// window values, are this design's choices.
module ahl #(
  parameter int unsigned N      = aam_pkg::WIDTH,
  parameter int unsigned THRESH = aam_pkg::ZERO_TH,
  parameter int unsigned WINDOW = aam_pkg::ERR_WINDOW,
  parameter int unsigned ERR_TH = aam_pkg::ERR_TH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] a,
  input  logic         op_done,
  input  logic         err,
  output logic         gating_n,
  output logic         q,
  output logic         aged
);
  logic judge1, judge2, mux_out;

  judging_block #(.N(N), .THRESH(THRESH))     u_judge1 (.a(a), .one_cycle(judge1));
  judging_block #(.N(N), .THRESH(THRESH + 1)) u_judge2 (.a(a), .one_cycle(judge2));

  aging_indicator #(.WINDOW(WINDOW), .ERR_TH(ERR_TH)) u_aging (
    .clk    (clk),
    .rst_n  (rst_n),
    .op_done(op_done),
    .err    (err),
    .aged   (aged)
  );

  assign mux_out  = aged ? judge2 : judge1;
  assign gating_n = (mux_out & !err) | !q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= gating_n;
  end
endmodule
