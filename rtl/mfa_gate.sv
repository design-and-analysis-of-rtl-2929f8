// mfa_gate: a 4x4 reversible full-adder (MFA) gate.
//
// Outputs P = A, Q = A xor B, R = A xor B xor C and S = (A xor B)C xor AB xor D.
// With D = 0, R is the sum and S the carry of A + B + C, so one gate is a full
// adder. It is reversible: A comes back from P, B from P and Q, C from Q and
// R, and D from S once A, B and C are known. The MFA gate is only named where
// the multiplier is defined; this mapping is this design's choice of a 4x4
// full-adder gate with that name's role. Purely combinational.
module mfa_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic t;

  assign t = a ^ b;
  assign p = a;
  assign q = t;
  assign r = t ^ c;
  assign s = (t & c) ^ (a & b) ^ d;
endmodule
