// fa_tsg: reversible full adder made of a single TSG gate.
//
// The gate is driven as TSG(a, b, 0, cin): R is the sum a xor b xor cin and
// S the carry (a xor b)cin xor ab. One constant input; the garbage outputs are
// P = a and Q = a xor b. The multiplier's TSG version, the default, uses this
// cell. Purely combinational.
module fa_tsg
  import rev_pkg::*;
(
  input  logic                  a,
  input  logic                  b,
  input  logic                  cin,
  output logic                  sum,
  output logic                  cout,
  output logic [FA_GARBAGE-1:0] garbage
);
  tsg_gate u_tsg (.a(a), .b(b), .c(1'b0), .d(cin),
                  .p(garbage[0]), .q(garbage[1]), .r(sum), .s(cout));
endmodule
