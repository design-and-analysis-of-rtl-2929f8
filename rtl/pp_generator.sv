// pp_generator: the reversible partial-product array of an N x N multiplier.
//
// Partial-product bit pp[j][i] = x[i] AND y[j] comes from the R output of a
// Peres gate driven with (x[i], y[j], 0); all N*N bits are formed in parallel.
// A reversible circuit may not fan a wire out, so:
//   - each y[j] is copied N times by a chain of N-1 Feynman gates with B = 0
//     (P passes the bit down the chain, Q is one copy);
//   - each x[i] runs through the N Peres gates of its column on their
//     P = A pass-through outputs.
// Garbage: the Q = x xor y output of every Peres gate (bits j*N+i) and each x
// bit as it leaves the end of its chain (bits N*N+i). Peres partial products
// follow the design; the Feynman copy chains are this design's way of meeting
// the no-fan-out rule. Purely combinational.
module pp_generator
  import rev_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]                  x,
  input  logic [N-1:0]                  y,
  output logic [N-1:0][N-1:0]           pp,       // pp[j][i] = x[i] & y[j]
  output logic [pp_garbage_bits(N)-1:0] garbage
);
  // y_chain[j][k]: y[j] after k Feynman copy gates; y_copy[j][i]: copy for column i
  logic [N-1:0][N-1:0] y_chain;
  logic [N-1:0][N-1:0] y_copy;
  // x_chain[i][j]: x[i] entering the Peres gate of row j
  logic [N-1:0][N:0]   x_chain;

  for (genvar j = 0; j < N; j++) begin : g_row
    assign y_chain[j][0] = y[j];
    for (genvar i = 0; i < N - 1; i++) begin : g_copy
      feynman_gate u_fg (.a(y_chain[j][i]), .b(1'b0), .p(y_chain[j][i+1]), .q(y_copy[j][i]));
    end
    assign y_copy[j][N-1] = y_chain[j][N-1];
  end

  for (genvar i = 0; i < N; i++) begin : g_col
    assign x_chain[i][0] = x[i];
    for (genvar j = 0; j < N; j++) begin : g_pg
      peres_gate u_pg (.a(x_chain[i][j]), .b(y_copy[j][i]), .c(1'b0),
                       .p(x_chain[i][j+1]), .q(garbage[j*N+i]), .r(pp[j][i]));
    end
    assign garbage[N*N+i] = x_chain[i][N];
  end
endmodule
