// fa_fgtg: reversible full adder built from Feynman and Toffoli gates.
//
// Four gates in a chain, each fed by the pass-through outputs of the one
// before so that no wire fans out:
//   TG(a, b, 0)         -> a, b, ab
//   FG(a, b)            -> a (garbage), a xor b
//   TG(a xor b, cin, ab) -> a xor b, cin, carry = (a xor b)cin xor ab
//   FG(a xor b, cin)    -> a xor b (garbage), sum = a xor b xor cin
// One constant input, two garbage outputs. The multiplier's FG&TG version is
// built from this cell; the gate order is this design's choice. Purely
// combinational.
module fa_fgtg
  import rev_pkg::*;
(
  input  logic                  a,
  input  logic                  b,
  input  logic                  cin,
  output logic                  sum,
  output logic                  cout,
  output logic [FA_GARBAGE-1:0] garbage
);
  logic a1, b1, and_ab, x_ab, x_ab2, cin2;

  toffoli_gate u_tg0 (.a(a),     .b(b),    .c(1'b0),   .p(a1),         .q(b1),  .r(and_ab));
  feynman_gate u_fg0 (.a(a1),    .b(b1),                .p(garbage[0]), .q(x_ab));
  toffoli_gate u_tg1 (.a(x_ab),  .b(cin),  .c(and_ab), .p(x_ab2),      .q(cin2), .r(cout));
  feynman_gate u_fg1 (.a(x_ab2), .b(cin2),              .p(garbage[1]), .q(sum));
endmodule
