// Aging indicator of the adaptive hold logic.
//
// Two counters: one counts checked operations (op_done), the other counts
// those that raised a Razor error (op_done with err). After WINDOW operations
// both are cleared and a new window starts. When the error count goes above
// ERR_TH the output aged is set: errors are frequent enough that the circuit
// has slowed down through transistor aging, and the AHL switches to its
// stricter judging block. aged stays 1 until reset, since aging does not
// undo itself.
//
// Interface: clk, rst_n (asynchronous, active low), op_done, err, aged.
// Timing: aged rises on the clock edge that counts the (ERR_TH+1)-th error of
// a window. The windowed error counter and threshold follow the described
// design; the window length, the threshold and the sticky output are this
// design's choices.
module aging_indicator #(
  parameter int unsigned WINDOW = aam_pkg::ERR_WINDOW,
  parameter int unsigned ERR_TH = aam_pkg::ERR_TH
) (
  input  logic clk,
  input  logic rst_n,
  input  logic op_done,
  input  logic err,
  output logic aged
);
  localparam int unsigned OW = $clog2(WINDOW + 1);
  localparam int unsigned EW = $clog2(WINDOW + 1);

  logic [OW-1:0] ops;
  logic [EW-1:0] errs;
  logic [EW-1:0] errs_next;

  assign errs_next = errs + EW'(err);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ops  <= '0;
      errs <= '0;
      aged <= 1'b0;
    end else if (op_done) begin
      if (32'(errs_next) > ERR_TH) aged <= 1'b1;
      if (32'(ops) == WINDOW - 1) begin
        ops  <= '0;
        errs <= '0;
      end else begin
        ops  <= ops + 1'b1;
        errs <= errs_next;
      end
    end
  end
endmodule
