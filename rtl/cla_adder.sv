// W-bit carry look-ahead adder: sum = a + b + cin, with carry out.
//
// The word is cut into look-ahead groups of karatsuba_pkg::CLA_GROUP bits
// (the last group takes whatever is left when W is not a multiple of it).
// Inside a group all carries are looked ahead at once (cla_group); the group
// carries ripple from one group to the next.
// Interface: a, b, cin in; sum, cout out. Purely combinational.
// Carry look-ahead adders are the adder of this multiplier; the block-ripple
// organisation and the group size are this design's choices.
module cla_adder
  import karatsuba_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned NGROUPS = (W + CLA_GROUP - 1) / CLA_GROUP;

  logic [NGROUPS:0] gc;  // carry into each group

  assign gc[0] = cin;

  for (genvar k = 0; k < NGROUPS; k++) begin : g_group
    localparam int unsigned LO = k * CLA_GROUP;
    localparam int unsigned GW = (W - LO < CLA_GROUP) ? (W - LO) : CLA_GROUP;
    cla_group #(.G(GW)) u_group (
      .a   (a[LO+GW-1:LO]),
      .b   (b[LO+GW-1:LO]),
      .cin (gc[k]),
      .sum (sum[LO+GW-1:LO]),
      .cout(gc[k+1])
    );
  end

  assign cout = gc[NGROUPS];

endmodule
