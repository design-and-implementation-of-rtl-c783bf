// 16x16-bit unsigned recursive adaptive Karatsuba multiplier.
//
// p = a * b. The product comes from a Karatsuba stage that splits each
// operand in halves and recurses 16 -> 8 -> 4 -> 2 bits, ending in 2x2 AND/
// half-adder multipliers. At each level the third product, of the two half
// sums, goes through the adaptive multiplier that handles the half sums'
// carry bits by gating, and every addition and subtraction is a carry
// look-ahead adder.
// Interface: a, b (N bits) in; p (2N bits) out. Purely combinational: the
// product is valid one propagation delay after the operands, with no clock,
// registers or handshake.
// The operand width of 16 and the structure follow the multiplier's
// description; having no registers is this design's choice.
module karatsuba_top #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  karatsuba_stage #(.N(N)) u_mult (.a(a), .b(b), .p(p));

endmodule
