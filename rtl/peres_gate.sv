// peres_gate: 3x3 reversible Peres gate.
//
// Outputs P = A, Q = A ^ B and R = (A & B) ^ C. In the B cell A carries the
// row control H, B carries b ^ c and C carries the incoming partial-product
// bit a, so R is the cell result Z = a ^ H(b ^ c) and P hands H on to the
// next cell. The gate is named by the multiplier description; the equations
// are its standard definition.
// Purely combinational; single-bit ports.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;

endmodule
