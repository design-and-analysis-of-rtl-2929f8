// toffoli_gate: the 3x3 reversible Toffoli (controlled-controlled-NOT) gate.
//
// Outputs P = A, Q = B and R = (A and B) xor C; the mapping is its own
// inverse. With C = 0, R is the AND of A and B. Quantum cost 5. The equations
// are the standard ones, as defined for this multiplier. Purely combinational.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
