// Judging block of the adaptive hold logic.
//
// Counts the zero bits of the multiplicand and outputs one_cycle = 1 when the
// count is greater than THRESH. Many zeros mean few partial products that
// matter and a short carry path, so the pattern is expected to finish in one
// clock cycle; otherwise it is given two. The AHL holds two of these blocks,
// with thresholds n and n+1, and picks one by the aging state.
//
// Interface: a[N] (multiplicand), one_cycle.
// Timing: combinational. Counting the multiplicand's zeros against a
// threshold follows the described design; the threshold value (N/2 by
// default) is this design's choice.
module judging_block #(
  parameter int unsigned N      = aam_pkg::WIDTH,
  parameter int unsigned THRESH = aam_pkg::ZERO_TH
) (
  input  logic [N-1:0] a,
  output logic         one_cycle
);
  localparam int unsigned CW = $clog2(N + 1);

  logic [CW-1:0] zeros;

  always_comb begin
    zeros = '0;
    for (int i = 0; i < N; i++) zeros = zeros + CW'(!a[i]);
    one_cycle = (32'(zeros) > THRESH);
  end
endmodule
