// fa_peres: reversible full adder built from two Peres gates.
//
// The first gate PG(a, b, 0) gives a, a xor b and ab. The second gate takes
// a xor b, cin and ab: its Q output a xor b xor cin is the sum and its R
// output (a xor b)cin xor ab is the carry. One constant input; the garbage
// outputs are a (first gate's P) and a xor b (second gate's P). This is the
// usual two-gate construction; the multiplier's Peres version uses it for
// every full adder. Purely combinational.
module fa_peres
  import rev_pkg::*;
(
  input  logic                  a,
  input  logic                  b,
  input  logic                  cin,
  output logic                  sum,
  output logic                  cout,
  output logic [FA_GARBAGE-1:0] garbage
);
  logic a_pass, x_ab, and_ab;

  peres_gate u_pg0 (.a(a),    .b(b),   .c(1'b0),   .p(a_pass),     .q(x_ab), .r(and_ab));
  peres_gate u_pg1 (.a(x_ab), .b(cin), .c(and_ab), .p(garbage[1]), .q(sum),  .r(cout));

  assign garbage[0] = a_pass;
endmodule
