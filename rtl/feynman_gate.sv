// feynman_gate: the 2x2 reversible Feynman (controlled-NOT) gate.
//
// Outputs P = A and Q = A xor B; the mapping is its own inverse. With B tied
// to 0 both outputs carry A, which is how reversible circuits copy a signal
// (a wire may not fan out). Quantum cost 1. The equations are the standard
// ones, as defined for this multiplier. Purely combinational.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
