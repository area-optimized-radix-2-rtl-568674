// rev_booth_pkg: types shared by the reversible radix-2 Booth multiplier.
//
// booth_ctrl_t is the pair of control lines that a C cell produces for one
// row of the array and that every B cell of that row regenerates for its left
// neighbour:
//   h = 1 : the row operates on the multiplicand (add or subtract)
//   h = 0 : the row only passes the partial product through (skip)
//   d = 1 : with h = 1, the row subtracts; d = 0 : with h = 1, it adds
// The encoding follows the function table of the B cell (HD = 0X skip,
// 10 add, 11 subtract).
package rev_booth_pkg;

  typedef struct packed {
    logic h;  // operate (1) or skip (0)
    logic d;  // subtract (1) or add (0); only meaningful when h = 1
  } booth_ctrl_t;

endpackage
