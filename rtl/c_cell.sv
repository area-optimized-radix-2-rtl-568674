// c_cell: Booth recoding control cell, one per row of the multiplier array.
//
// It looks at two adjacent multiplier bits, x_i and x_(i-1) (x_(-1) is the
// implicit 0 appended below the LSB), and produces the row control:
//   H = x_i ^ x_(i-1)        the row adds or subtracts (H = 1) or skips
//   D = x_i & ~x_(i-1)       the row subtracts (pair 10) rather than adds
// giving HD = 10 for pair 01 (add), 11 for pair 10 (subtract) and 0X for
// 00 / 11 (skip), the radix-2 Booth rule.
//
// Built, as described for the design, from a TS-3 gate and a Fredkin gate
// with no fan-out: TS-3(x_i, x_(i-1), 0) gives H on its third output and
// hands both bits on; Fredkin(x_(i-1), x_i, 0) then gives ~x_(i-1) & x_i = D
// on its second output. The Fredkin gate's first and third outputs are
// garbage lines of the reversible circuit and are brought out on `garbage`
// so that the cell keeps every line. Which gate output feeds which input is
// this design's reading of the circuit, chosen so that the stated equations
// come out.
// Purely combinational.
module c_cell
  import rev_booth_pkg::*;
(
  input  logic        x_i,      // multiplier bit i
  input  logic        x_im1,    // multiplier bit i-1 (0 for the first row)
  output booth_ctrl_t ctrl,     // H and D for the row
  output logic [1:0]  garbage   // {x_(i-1), x_i & x_(i-1)}
);

  logic ts_p, ts_q, ts_r;
  logic fr_p, fr_q, fr_r;

  ts3_gate u_ts3 (
    .a(x_i), .b(x_im1), .c(1'b0),
    .p(ts_p), .q(ts_q), .r(ts_r)
  );

  fredkin_gate u_fredkin (
    .a(ts_q), .b(ts_p), .c(1'b0),
    .p(fr_p), .q(fr_q), .r(fr_r)
  );

  assign ctrl.h  = ts_r;
  assign ctrl.d  = fr_q;
  assign garbage = {fr_p, fr_r};

endmodule
