// 2x2-bit unsigned multiplier, the base case of the Karatsuba recursion.
//
// Four AND gates form the partial products a[i]&b[j]; two half adders sum the
// middle column and its carry into the top column:
//   p0 = a0b0, p1 = a1b0 ^ a0b1, p2 = a1b1 ^ (a1b0 & a0b1), p3 = a1b1 & a1b0 & a0b1.
// Interface: a, b in; p = a*b out. Purely combinational.
// The 2-bit base and the AND/half-adder construction follow the multiplier's
// description.
module mult2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic pp00, pp01, pp10, pp11;  // pp_ij = a[i] & b[j]
  logic c1;                      // carry out of the middle column

  assign pp00 = a[0] & b[0];
  assign pp01 = a[0] & b[1];
  assign pp10 = a[1] & b[0];
  assign pp11 = a[1] & b[1];

  // half adder on column 1
  assign p[0] = pp00;
  assign p[1] = pp10 ^ pp01;
  assign c1   = pp10 & pp01;
  // half adder on column 2
  assign p[2] = pp11 ^ c1;
  assign p[3] = pp11 & c1;

endmodule
