// mtsg_gate: 4x4 reversible modified TSG (MTSG) gate.
//
// Outputs P = A, Q = A ^ B, R = A ^ B ^ C and S = ((A ^ B) & C) ^ (A & B) ^ D.
// With D = 0, R is the full-adder sum of A, B, C and S its carry, which is
// why the gate is a full adder on its own (quantum cost 6, against 13 for the
// original TSG). The B cell feeds it b, c and a ^ D_ctrl so that S becomes
// the cell's carry/borrow output. The equations are the standard definition
// of the gate; the multiplier description gives its name, cost and role.
// Purely combinational; single-bit ports.
module mtsg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  logic a_x_b;

  assign a_x_b = a ^ b;
  assign p = a;
  assign q = a_x_b;
  assign r = a_x_b ^ c;
  assign s = (a_x_b & c) ^ (a & b) ^ d;

endmodule
