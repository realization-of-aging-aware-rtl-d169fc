// 2 x 2 Urdhva Tiryakbhyam multiplier, the leaf of vedic_mult.
//
// Vertical products a0b0 and a1b1 and the crosswise products a1b0, a0b1 are
// formed with AND gates and combined with two half adders:
//   p0 = a0b0, {c1,p1} = a1b0 + a0b1, {p3,p2} = a1b1 + c1.
// Purely combinational.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic c1;

  always_comb begin
    p[0]      = a[0] & b[0];
    p[1]      = (a[1] & b[0]) ^ (a[0] & b[1]);
    c1        = (a[1] & b[0]) & (a[0] & b[1]);
    p[2]      = (a[1] & b[1]) ^ c1;
    p[3]      = (a[1] & b[1]) & c1;
  end
endmodule
