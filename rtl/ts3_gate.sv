// ts3_gate: 3x3 reversible TS-3 gate.
//
// Outputs P = A, Q = B and R = A ^ B ^ C. It is two cascaded CNOT (Feynman)
// operations, quantum cost 2. With C tied to 0 it forms A ^ B while handing
// both A and B on unchanged, which is how the C cell derives H and the B cell
// derives a ^ D without fan-out.
// The gate name and its quantum cost come from the multiplier description;
// the output equations are the standard definition of the gate, which that
// description does not restate.
// Purely combinational; all three inputs and outputs are single bits.
module ts3_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  assign p = a;
  assign q = b;
  assign r = a ^ b ^ c;

endmodule
