// Carry look-ahead group: adds two G-bit words and a carry in.
//
// Every bit forms generate g = a & b and propagate p = a ^ b. The carry into
// bit i is computed directly, not rippled, as the two-level sum of products
//   c[i] = g[i-1] | p[i-1]g[i-2] | ... | p[i-1]..p[0]cin,
// so all carries of the group settle after one AND-OR level. The group carry
// out is the same expression for i = G. The sum is p ^ c.
// Interface: a, b, cin in; sum, cout out. Purely combinational.
// The look-ahead principle is the multiplier's; the group size (default 4) and
// the flat sum-of-products form are this design's choices.
module cla_group #(
  parameter int unsigned G = 4
) (
  input  logic [G-1:0] a,
  input  logic [G-1:0] b,
  input  logic         cin,
  output logic [G-1:0] sum,
  output logic         cout
);

  logic [G-1:0] g, p;
  logic [G:0]   c;

  assign g = a & b;
  assign p = a ^ b;

  // c[i]: OR over j < i of (g[j] AND all p above j), plus the all-propagate
  // term with the carry in.
  always_comb begin
    for (int i = 0; i <= G; i++) begin
      logic term;
      logic any;
      any = 1'b0;
      for (int j = 0; j < i; j++) begin
        term = g[j];
        for (int k = j + 1; k < i; k++) term = term & p[k];
        any = any | term;
      end
      term = cin;
      for (int k = 0; k < i; k++) term = term & p[k];
      c[i] = any | term;
    end
  end

  assign sum  = p ^ c[G-1:0];
  assign cout = c[G];

endmodule
