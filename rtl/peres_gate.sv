// peres_gate: the 3x3 reversible Peres gate.
//
// Outputs P = A, Q = A xor B and R = (A and B) xor C, a Toffoli gate followed
// by a Feynman gate on the first two lines (quantum cost 4). With C = 0 the R
// output is the AND of A and B, which is how the multiplier forms each
// partial-product bit; two of them make a full adder. The gate is only named
// where this multiplier is defined; these are its standard published
// equations. Purely combinational.
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
