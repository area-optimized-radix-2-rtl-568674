// booth_multiplier: N x N reversible radix-2 Booth array multiplier.
//
// Multiplies two N-bit two's-complement numbers, multiplier x and
// multiplicand y, with a purely combinational trapezoidal array of B cells
// and a column of N C cells; there is no clock, no register and no feedback
// path.
//
// Organisation (row i = 0 at the top, column j = bit weight 2^j, W = 2N-1):
//   * C cell i recodes (x_i, x_(i-1)), with an implicit x_(-1) = 0, into the
//     row control H, D: skip, add or subtract y * 2^i.
//   * Row i holds B cells in columns i .. W-1, so the top row has 2N-1 cells
//     and each lower row one fewer, down to N cells in the bottom row. The
//     columns to the right of a row are already final.
//   * The a input of a cell is the Z output of the cell above (0 in the top
//     row); the carry chain runs right to left with 0 into the rightmost
//     cell; H and D enter at the right from the C cell and are handed left
//     cell to cell.
//   * The top row's b inputs are y, sign-extended to W bits (the left N-1
//     cells see the sign bit). Each B cell hands its b on diagonally, to the
//     row below one column to the left, which multiplies it by 2 per row.
//   * Product bit j is the Z of the rightmost cell of row j for j < N-1, and
//     the Z outputs of the bottom row for j >= N-1.
// Row i therefore computes A(i+1) = A(i) + (x_(i-1) - x_i) * y * 2^i modulo
// 2^W, the radix-2 Booth sum.
//
// The product is W = 2N-1 bits wide, as in the array described for this
// design. That is enough for every pair of operands except
// x = y = -2^(N-1), whose product 2^(2N-2) wraps to -2^(2N-2).
//
// Ports: x, y inputs; p the product; h and d the control lines of each row
// (bit i belongs to row i), brought out for observation. Carry-out, b and
// H/D lines leaving the left edge and the garbage lines of every gate end
// inside the array.
// Timing: combinational; the longest path runs down the rows and along the
// carry chain of the lower rows, about N + W cell delays.
module booth_multiplier
  import rev_booth_pkg::*;
#(
  parameter int unsigned N = 8   // operand width
) (
  input  logic [N-1:0]   x,      // multiplier (two's complement)
  input  logic [N-1:0]   y,      // multiplicand (two's complement)
  output logic [2*N-2:0] p,      // product (two's complement, 2N-1 bits)
  output logic [N-1:0]   h,      // per-row H: row adds or subtracts
  output logic [N-1:0]   d       // per-row D: row subtracts
);

  localparam int unsigned W = 2 * N - 1;

  logic [W-1:0] y_ext;
  assign y_ext = {{(N - 1){y[N-1]}}, y};

  booth_ctrl_t ctrl [N];

  // Control column.
  for (genvar i = 0; i < N; i++) begin : g_ccell
    logic [1:0] garbage;
    c_cell u_c (
      .x_i    (x[i]),
      .x_im1  ((i == 0) ? 1'b0 : x[(i == 0) ? 0 : i - 1]),
      .ctrl   (ctrl[i]),
      .garbage(garbage)
    );
    assign h[i] = ctrl[i].h;
    assign d[i] = ctrl[i].d;
  end

  // Rows of B cells; row i spans columns i .. W-1.
  for (genvar i = 0; i < N; i++) begin : g_row
    logic        [W-1:i] z;      // results of this row
    logic        [W-1:i] co;     // carry / borrow out of each cell
    logic        [W-1:i] bo;     // multiplicand bits handed to the next row
    booth_ctrl_t [W-1:i] cto;    // H, D handed to the left neighbour
    logic  [W-1:i] [1:0] garbage;

    for (genvar j = i; j < W; j++) begin : g_col
      logic        a_in, b_in, c_in;
      booth_ctrl_t ct_in;

      if (i == 0) begin : g_top
        assign a_in = 1'b0;
        assign b_in = y_ext[j];
      end else begin : g_inner
        assign a_in = g_row[i - 1].z[j];
        assign b_in = g_row[i - 1].bo[j - 1];
      end

      if (j == i) begin : g_right
        assign c_in  = 1'b0;
        assign ct_in = ctrl[i];
      end else begin : g_chain
        assign c_in  = co[j - 1];
        assign ct_in = cto[j - 1];
      end

      b_cell u_b (
        .a      (a_in),
        .b      (b_in),
        .c      (c_in),
        .ctrl_i (ct_in),
        .z      (z[j]),
        .cout   (co[j]),
        .b_o    (bo[j]),
        .ctrl_o (cto[j]),
        .garbage(garbage[j])
      );
    end
  end

  // Final product bits.
  for (genvar j = 0; j < N - 1; j++) begin : g_low
    assign p[j] = g_row[j].z[j];
  end
  assign p[W-1:N-1] = g_row[N-1].z[W-1:N-1];

endmodule
