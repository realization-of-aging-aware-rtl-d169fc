// Razor output register: W one-bit Razor flip-flops side by side.
//
// Holds the 2n-bit product of the multiplier. Every bit has its own shadow
// copy and XOR; the bit errors are ORed into a single err for the adaptive
// hold logic, and one restore signal makes every bit reload its shadow value
// at the next clk edge.
//
// Interface: clk, clk_del, rst_n, d[W], restore, q[W], err.
// Timing: as razor_ff; err is valid between the clk_del edge and the next
// clk edge. The bank of 2n Razor flip-flops follows the described design;
// the single ORed error and shared restore are this design's choice.
module razor_reg #(
  parameter int unsigned W = 2 * aam_pkg::WIDTH
) (
  input  logic         clk,
  input  logic         clk_del,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  input  logic         restore,
  output logic [W-1:0] q,
  output logic         err
);
  logic [W-1:0] bit_err;

  for (genvar i = 0; i < W; i++) begin : g_bit
    razor_ff u_ff (
      .clk    (clk),
      .clk_del(clk_del),
      .rst_n  (rst_n),
      .d      (d[i]),
      .restore(restore),
      .q      (q[i]),
      .err    (bit_err[i])
    );
  end

  assign err = |bit_err;
endmodule
