// One stage of the recursive Karatsuba multiplier: p = a * b for N-bit
// unsigned operands, N a power of two.
//
// The operands are split into halves of H = N/2 bits, a = XH*2^H + XL and
// b = YH*2^H + YL. Three products are formed instead of four:
//   hi  = XH*YH          (an H-bit stage, recursively)
//   lo  = XL*YL          (an H-bit stage, recursively)
//   sum = (XH+XL)(YH+YL) (the adaptive third-term multiplier: the (H+1)-bit
//                         half sums come from two H-bit CLAs, a third H-bit
//                         stage multiplies their low H bits, and
//                         karatsuba_adaptive_mult adds the carry-bit terms)
// The cross term is mid = sum - hi - lo (two two's-complement subtractions on
// (N+2)-bit CLAs), and the product is hi*2^N + mid*2^H + lo. Because lo < 2^N,
// hi and lo are simply concatenated and mid is added in one 3H-bit CLA over all
// but the low H bits, which lo supplies unchanged.
// At N = 2 the recursion ends in the AND/half-adder multiplier mult2x2, so the
// 16-bit default recurses 16 -> 8 -> 4 -> 2.
// Interface: a, b in; p out. Purely combinational, no clock.
// When this module is linted on its own, as the top of its own hierarchy, the
// lint of the Verilator tool reports hi, lo and ls as undriven: it does not
// follow the recursive self-instantiation there. Instantiated under any
// parent (as in karatsuba_top) the nets are driven and no warning appears.
// The split, the three products, the subtraction and the 2-bit base follow the
// multiplier's description; the way the three terms are summed is this
// design's own.
module karatsuba_stage
  import karatsuba_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  if (!valid_width(N)) begin : g_bad_width
    $error("karatsuba_stage: N must be a power of two and at least 2");
  end

  if (N == BASE_WIDTH) begin : g_base
    mult2x2 u_base (.a(a), .b(b), .p(p));
  end else begin : g_split
    localparam int unsigned H = N / 2;

    logic [H-1:0]   xh, xl, yh, yl;
    logic [H:0]     sx, sy;        // XH+XL and YH+YL with their carries
    logic [N-1:0]   hi, lo;
    logic [N-1:0]   ls;            // low H bits of XH+XL times those of YH+YL
    logic [N+1:0]   sp;            // (XH+XL)(YH+YL)
    logic [N+1:0]   t1, mid;       // sp - hi, then sp - hi - lo
    logic           t1_c, mid_c;   // subtraction carries (1 = no borrow)
    logic [3*H-1:0] upper;         // bits 2N-1..H of the product
    logic           upper_c;

    assign {xh, xl} = a;
    assign {yh, yl} = b;

    cla_adder #(.W(H)) u_sum_x (.a(xh), .b(xl), .cin(1'b0), .sum(sx[H-1:0]), .cout(sx[H]));
    cla_adder #(.W(H)) u_sum_y (.a(yh), .b(yl), .cin(1'b0), .sum(sy[H-1:0]), .cout(sy[H]));

    karatsuba_stage #(.N(H)) u_hi (.a(xh), .b(yh), .p(hi));
    karatsuba_stage #(.N(H)) u_lo (.a(xl), .b(yl), .p(lo));
    karatsuba_stage #(.N(H)) u_ls (.a(sx[H-1:0]), .b(sy[H-1:0]), .p(ls));
    karatsuba_adaptive_mult #(.M(H)) u_mid (.a(sx), .b(sy), .q(ls), .p(sp));

    // mid = sp - hi - lo, each subtraction as sp + ~x + 1
    cla_adder #(.W(N+2)) u_sub_hi (
      .a(sp), .b(~{2'b00, hi}), .cin(1'b1), .sum(t1), .cout(t1_c)
    );
    cla_adder #(.W(N+2)) u_sub_lo (
      .a(t1), .b(~{2'b00, lo}), .cin(1'b1), .sum(mid), .cout(mid_c)
    );

    // {hi, lo} + mid * 2^H, the low H bits of lo pass through
    cla_adder #(.W(3*H)) u_final (
      .a   ({hi, lo[N-1:H]}),
      .b   ({{(3*H-N-2){1'b0}}, mid}),
      .cin (1'b0),
      .sum (upper),
      .cout(upper_c)
    );

    assign p = {upper, lo[H-1:0]};

    // The cross term XH*YL + XL*YH is never negative and fits N+1 bits, so
    // neither subtraction borrows and the final sum cannot carry out.
    always_comb begin
      assert (t1_c && mid_c && !mid[N+1] && !upper_c)
        else $error("karatsuba_stage N=%0d: middle term out of range", N);
    end
  end

endmodule
