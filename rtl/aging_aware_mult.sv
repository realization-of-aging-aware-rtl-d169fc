// Aging-aware variable-latency multiplier (top level).
//
// An N x N Vedic multiplier sits between input flip-flops and a 2N-bit Razor
// register. Instead of sizing the clock for the slowest pattern and for the
// slow-down that transistor aging (NBTI/PBTI) brings over the years, the
// clock is sized for typical patterns: the adaptive hold logic (AHL) gives a
// pattern one cycle when its multiplicand has many zeros and two otherwise,
// and the Razor register catches the patterns that still miss the clock edge.
// A caught error restores the correct value from the Razor shadow copies one
// cycle later and gives the next operation two cycles. When errors become
// frequent, the AHL's aging indicator switches to a stricter judging rule.
//
// Interface: clk; clk_del, a delayed clk for the Razor shadow copies (rising
// after clk's rising edge and before the next one); rst_n, asynchronous,
// active low; a, b, load: an operation, taken at a clk edge where ready is 1;
// result, done: done is 1 in each cycle where result holds the correct
// product of the next operation in order; razor_err: a timing error was
// detected (result is then wrong and done is 0); aged: aging indicator.
// Timing, counted in clk edges after the edge that takes an operation: a
// one-cycle pattern's product appears after 1 edge, a two-cycle pattern's
// after 2, and a product that raises a Razor error after 2 (one more than
// the pattern was given). A new operation is taken at the edge where the
// previous one completes, so the multiplier is busy every cycle under a
// steady stream.
// The datapath, the Razor register of 2n one-bit cells and the AHL follow
// the described design; the load/ready/done handshake and the error
// qualification are this design's choices.
module aging_aware_mult #(
  parameter int unsigned N      = aam_pkg::WIDTH,
  parameter int unsigned THRESH = aam_pkg::ZERO_TH,
  parameter int unsigned WINDOW = aam_pkg::ERR_WINDOW,
  parameter int unsigned ERR_TH = aam_pkg::ERR_TH
) (
  input  logic           clk,
  input  logic           clk_del,
  input  logic           rst_n,
  input  logic           load,
  output logic           ready,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] result,
  output logic           done,
  output logic           razor_err,
  output logic           aged
);
  logic [N-1:0]   a_r, b_r;  // input flip-flops
  logic           v_r;       // input flip-flops hold a valid operation
  logic           res_v;     // Razor register holds a valid operation
  logic           gating_n;  // AHL load enable of the input flip-flops
  logic           ahl_q;     // last edge completed an operation
  logic           raw_err;   // any Razor bit mismatches
  logic           err_q;     // qualified error
  logic           restored;  // Razor register was restored at the last edge
  logic [2*N-1:0] prod;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_r   <= '0;
      b_r   <= '0;
      v_r   <= 1'b0;
      res_v <= 1'b0;
    end else if (gating_n) begin
      a_r   <= a;
      b_r   <= b;
      v_r   <= load;
      res_v <= v_r;
    end
  end

  vedic_mult #(.N(N)) u_mult (.a(a_r), .b(b_r), .p(prod));

  razor_reg #(.W(2 * N)) u_razor (
    .clk    (clk),
    .clk_del(clk_del),
    .rst_n  (rst_n),
    .d      (prod),
    .restore(err_q),
    .q      (result),
    .err    (raw_err)
  );

  // A mismatch counts only right after an edge that completed a valid
  // operation; during the first cycle of a two-cycle operation or right
  // after a restore the shadow and main copies legitimately differ.
  assign err_q = raw_err & ahl_q & res_v;

  ahl #(.N(N), .THRESH(THRESH), .WINDOW(WINDOW), .ERR_TH(ERR_TH)) u_ahl (
    .clk     (clk),
    .rst_n   (rst_n),
    .a       (a_r),
    .op_done (ahl_q & res_v),
    .err     (err_q),
    .gating_n(gating_n),
    .q       (ahl_q),
    .aged    (aged)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) restored <= 1'b0;
    else        restored <= err_q;
  end

  assign ready     = gating_n;
  assign done      = res_v & ((ahl_q & !err_q) | restored);
  assign razor_err = err_q;
endmodule
