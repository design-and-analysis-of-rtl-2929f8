// tsg_gate: the 4x4 reversible TSG gate.
//
// Outputs P = A, Q = A'C' xor B', R = Q xor D and S = (Q and D) xor (AB xor C),
// where ' is inversion. Its point is that one gate is a whole full adder:
// with C = 0, Q = A xor B, so R = A xor B xor D is the sum and S = (A xor B)D
// xor AB the carry of A + B + D. The gate is introduced by name and by that
// property; the equations are its standard published ones. Purely
// combinational.
module tsg_gate (
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

  assign t = (~a & ~c) ^ ~b;
  assign p = a;
  assign q = t;
  assign r = t ^ d;
  assign s = (t & d) ^ ((a & b) ^ c);
endmodule
