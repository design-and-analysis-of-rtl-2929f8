// fa_mfa: reversible full adder made of a single MFA gate.
//
// The gate is driven as MFA(a, b, cin, 0): R is the sum a xor b xor cin and
// S the carry (a xor b)cin xor ab. One constant input; the garbage outputs are
// P = a and Q = a xor b. The multiplier's MFA version uses this cell. Purely
// combinational.
module fa_mfa
  import rev_pkg::*;
(
  input  logic                  a,
  input  logic                  b,
  input  logic                  cin,
  output logic                  sum,
  output logic                  cout,
  output logic [FA_GARBAGE-1:0] garbage
);
  mfa_gate u_mfa (.a(a), .b(b), .c(cin), .d(1'b0),
                  .p(garbage[0]), .q(garbage[1]), .r(sum), .s(cout));
endmodule
