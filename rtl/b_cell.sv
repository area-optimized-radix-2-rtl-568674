// b_cell: multi-function add / subtract / skip cell of the Booth array.
//
// Function (a = partial-product bit from the row above, b = multiplicand
// bit, c = carry or borrow from the right-hand neighbour):
//   Z    = a ^ H(b ^ c)
//   Cout = (a ^ D)(b ^ c) ^ bc
// so that HD = 10 is a full adder (Cout Z = a + b + c), HD = 11 a full
// subtracter (Z = a - b - c, Cout = borrow) and H = 0 leaves Z = a.
//
// Built from three reversible gates with no fan-out:
//   TS-3 (D, a, 0)          -> D (handed on), a, a ^ D
//   MTSG (b, c, a ^ D, 0)   -> b (handed on), b ^ c, garbage, Cout
//   Peres(H, b ^ c, a)      -> H (handed on), garbage, Z
// The regenerated H and D go to the cell on the left in the same row; the
// regenerated b goes diagonally to the next row down and one place left,
// which is how the multiplicand is shifted from row to row without fan-out.
// The two garbage lines are brought out on `garbage`. The gate ordering and
// input assignment are this design's reading of the cell, chosen to give
// exactly the stated equations.
// Purely combinational.
module b_cell
  import rev_booth_pkg::*;
(
  input  logic        a,        // partial-product bit from the row above
  input  logic        b,        // multiplicand bit
  input  logic        c,        // carry / borrow in
  input  booth_ctrl_t ctrl_i,   // H, D of this row
  output logic        z,        // result bit
  output logic        cout,     // carry / borrow out
  output logic        b_o,      // b handed on to the next row
  output booth_ctrl_t ctrl_o,   // H, D handed on to the next cell
  output logic [1:0]  garbage   // {a ^ b ^ c ^ D, H ^ b ^ c}
);

  logic ts_p, ts_q, ts_r;
  logic mt_p, mt_q, mt_r, mt_s;
  logic pg_p, pg_q, pg_r;

  ts3_gate u_ts3 (
    .a(ctrl_i.d), .b(a), .c(1'b0),
    .p(ts_p), .q(ts_q), .r(ts_r)
  );

  mtsg_gate u_mtsg (
    .a(b), .b(c), .c(ts_r), .d(1'b0),
    .p(mt_p), .q(mt_q), .r(mt_r), .s(mt_s)
  );

  peres_gate u_peres (
    .a(ctrl_i.h), .b(mt_q), .c(ts_q),
    .p(pg_p), .q(pg_q), .r(pg_r)
  );

  assign z        = pg_r;
  assign cout     = mt_s;
  assign b_o      = mt_p;
  assign ctrl_o.h = pg_p;
  assign ctrl_o.d = ts_p;
  assign garbage  = {mt_r, pg_q};

  // Skip rule of the function table: with H = 0 the cell passes a unchanged.
  always_comb begin
    if (!ctrl_i.h) assert (z == a) else $error("b_cell: skip did not pass a");
  end

endmodule
