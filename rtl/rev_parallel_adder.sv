// rev_parallel_adder: N-bit reversible ripple-carry adder.
//
// N reversible full-adder cells of kind KIND in a chain: cell k adds a[k],
// b[k] and the carry from cell k-1 (cin for cell 0); the last carry is cout.
// Each cell's two garbage outputs appear on garbage[2k+1:2k]. The adder is a
// reversible parallel adder built from the gates the multiplier compares; the
// ripple-carry organisation is this design's choice. Purely combinational;
// the carry path is N cells long.
module rev_parallel_adder
  import rev_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter fa_kind_e    KIND = FA_TSG
) (
  input  logic [N-1:0]                     a,
  input  logic [N-1:0]                     b,
  input  logic                             cin,
  output logic [N-1:0]                     sum,
  output logic                             cout,
  output logic [adder_garbage_bits(N)-1:0] garbage
);
  logic [N:0] carry;

  assign carry[0] = cin;

  for (genvar k = 0; k < N; k++) begin : g_cell
    rev_full_adder #(.KIND(KIND)) u_fa (
      .a      (a[k]),
      .b      (b[k]),
      .cin    (carry[k]),
      .sum    (sum[k]),
      .cout   (carry[k+1]),
      .garbage(garbage[FA_GARBAGE*k +: FA_GARBAGE])
    );
  end

  assign cout = carry[N];
endmodule
