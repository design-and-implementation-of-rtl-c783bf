// Adaptive multiplier for the third Karatsuba product (XH+XL)(YH+YL).
//
// Its operands are M-bit half sums with a carry bit on top, a = a1*2^M + a0
// and b = b1*2^M + b0. Rather than recurse on M+1 bits, which would break the
// power-of-two halving, the carry bits are handled apart:
//   a*b = a0*b0 + (a1 ? b0 : 0)*2^M + (b1 ? a0 : 0)*2^M + (a1 & b1)*2^(2M).
// a0*b0 is an ordinary M-bit Karatsuba stage, instantiated next to this block
// by the enclosing stage and passed in as q (keeping the recursion inside
// karatsuba_stage alone); the two gated words are added
// by an M-bit CLA, and that (M+1)-bit correction is added to the top M bits of
// a0*b0, with a1&b1 as their bit 2M, by an (M+1)-bit CLA. The low M bits of
// a0*b0 are the low bits of the product.
// The low M bits of q are the low M bits of p unchanged.
// Interface: a, b ((M+1) bits) and q = a0*b0 (2M bits) in; p ((2M+2) bits)
// out. Purely combinational.
// An adaptive treatment of the third product at every stage is part of the
// multiplier's description; this gating of the carry bits is this design's
// reading of it.
module karatsuba_adaptive_mult
  import karatsuba_pkg::*;
#(
  parameter int unsigned M = 8
) (
  input  logic [M:0]     a,
  input  logic [M:0]     b,
  input  logic [2*M-1:0] q,      // a[M-1:0] * b[M-1:0]
  output logic [2*M+1:0] p
);

  if (!valid_width(M)) begin : g_bad_width
    $error("karatsuba_adaptive_mult: M must be a power of two and at least 2");
  end

  logic           a1, b1;
  logic [M-1:0]   a0, b0;
  logic [M-1:0]   ga, gb;     // carry-gated words
  logic [M:0]     corr;       // ga + gb
  logic [M:0]     top;        // bits 2M..M of the product
  logic           top_c;      // bit 2M+1

  assign {a1, a0} = a;
  assign {b1, b0} = b;

  assign ga = {M{a1}} & b0;
  assign gb = {M{b1}} & a0;

  cla_adder #(.W(M)) u_corr (
    .a(ga), .b(gb), .cin(1'b0), .sum(corr[M-1:0]), .cout(corr[M])
  );

  cla_adder #(.W(M+1)) u_top (
    .a({a1 & b1, q[2*M-1:M]}), .b(corr), .cin(1'b0), .sum(top), .cout(top_c)
  );

  assign p = {top_c, top, q[M-1:0]};

endmodule
