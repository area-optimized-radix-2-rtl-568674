// fredkin_gate: 3x3 reversible Fredkin (controlled-swap) gate.
//
// A is the control: P = A; when A = 0 the other two lines pass straight
// (Q = B, R = C), when A = 1 they are swapped (Q = C, R = B). Equivalently
// Q = ~A&B | A&C and R = ~A&C | A&B. Tying C to 0 gives Q = ~A & B, the
// product of B with the complement of A; the C cell uses this to form the
// subtract line D. Quantum cost 5.
// Purely combinational; single-bit ports.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  assign p = a;
  assign q = a ? c : b;
  assign r = a ? b : c;

endmodule
