// Shared constants of the recursive adaptive Karatsuba multiplier.
//
// CLA_GROUP is the width of one carry look-ahead group inside every adder;
// BASE_WIDTH is the operand width at which the recursion stops and a plain
// AND-array multiplier is used (the 2-bit multiplier of the recursion
// 16 -> 8 -> 4 -> 2). The base width follows the multiplier's description; the
// group size of 4 is this design's own, textbook choice.
package karatsuba_pkg;

  localparam int unsigned CLA_GROUP  = 4;
  localparam int unsigned BASE_WIDTH = 2;

  // True when n is a power of two and at least BASE_WIDTH, the widths the
  // halving recursion can reach its base from.
  function automatic bit valid_width(int unsigned n);
    return (n >= BASE_WIDTH) && ((n & (n - 1)) == 0);
  endfunction

endpackage
