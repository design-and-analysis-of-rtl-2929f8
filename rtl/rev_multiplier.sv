// rev_multiplier: N x N unsigned reversible array multiplier.
//
// Two stages. The partial-product array (pp_generator) forms all N*N bits
// x[i]y[j] in parallel with Peres gates. Then N-1 reversible ripple-carry
// parallel adders sum the rows: the running sum starts as row 0; for each row
// j = 1..N-1 its top N bits (the bits above product bit j-1) are added to
// row j, product bit j is the new low sum bit, and the adder's carry out
// becomes the new top bit. After row N-1 the remaining N bits are the top
// half of the product.
//
// KIND picks the full-adder cell (Peres, MFA, FG&TG or TSG); the four
// versions are otherwise identical. Each row adder's carry in, and the top
// bit of the first running sum, are constant 0 lines. All garbage outputs
// are brought out: partial-product array first, then the row adders in
// order. Purely combinational: the longest path runs through about 2N-1
// full-adder cells after one Peres gate.
//
// Peres partial products and reversible parallel adders follow the design;
// the linear row-by-row array and unsigned operands are this design's choices.
module rev_multiplier
  import rev_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter fa_kind_e    KIND = FA_TSG
) (
  input  logic [N-1:0]                    x,
  input  logic [N-1:0]                    y,
  output logic [2*N-1:0]                  product,
  output logic [mult_garbage_bits(N)-1:0] garbage
);
  localparam int unsigned PPG = pp_garbage_bits(N);
  localparam int unsigned ADG = adder_garbage_bits(N);

  logic [N-1:0][N-1:0] pp;
  // upper[j]: the N bits of the running sum that row j is added to
  logic [N-1:0][N-1:0] upper;
  // row_sum[j], row_cout[j]: result of the adder of row j (j >= 1)
  logic [N-1:1][N-1:0] row_sum;
  logic [N-1:1]        row_cout;

  pp_generator #(.N(N)) u_ppg (
    .x      (x),
    .y      (y),
    .pp     (pp),
    .garbage(garbage[PPG-1:0])
  );

  assign product[0] = pp[0][0];
  assign upper[0]   = {1'b0, pp[0][N-1:1]};

  for (genvar j = 1; j < N; j++) begin : g_row
    rev_parallel_adder #(.N(N), .KIND(KIND)) u_add (
      .a      (upper[j-1]),
      .b      (pp[j]),
      .cin    (1'b0),
      .sum    (row_sum[j]),
      .cout   (row_cout[j]),
      .garbage(garbage[PPG + (j-1)*ADG +: ADG])
    );
    assign product[j] = row_sum[j][0];
    assign upper[j]   = {row_cout[j], row_sum[j][N-1:1]};
  end

  assign product[2*N-1:N] = upper[N-1];
endmodule
