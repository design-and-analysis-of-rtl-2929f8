// rev_mult_top: the four versions of the N x N reversible multiplier.
//
// The multiplier is compared in four versions that differ only in the
// reversible full-adder cell of their parallel adders: two Peres gates, one
// MFA gate, Feynman plus Toffoli gates, and one TSG gate. All four share the
// Peres-gate partial-product array. This top holds one instance of each, side
// by side, each with its own operands, product and garbage outputs; the
// arrays are indexed by rev_pkg::fa_kind_e (0 Peres, 1 MFA, 2 FG&TG, 3 TSG).
// The default N = 8 is the 8 x 8 bit size of the design. Purely combinational.
module rev_mult_top
  import rev_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [NUM_FA_KINDS-1:0][N-1:0]                    x,
  input  logic [NUM_FA_KINDS-1:0][N-1:0]                    y,
  output logic [NUM_FA_KINDS-1:0][2*N-1:0]                  product,
  output logic [NUM_FA_KINDS-1:0][mult_garbage_bits(N)-1:0] garbage
);
  rev_multiplier #(.N(N), .KIND(FA_PERES)) u_mult_peres (
    .x(x[FA_PERES]), .y(y[FA_PERES]), .product(product[FA_PERES]), .garbage(garbage[FA_PERES]));

  rev_multiplier #(.N(N), .KIND(FA_MFA)) u_mult_mfa (
    .x(x[FA_MFA]), .y(y[FA_MFA]), .product(product[FA_MFA]), .garbage(garbage[FA_MFA]));

  rev_multiplier #(.N(N), .KIND(FA_FGTG)) u_mult_fgtg (
    .x(x[FA_FGTG]), .y(y[FA_FGTG]), .product(product[FA_FGTG]), .garbage(garbage[FA_FGTG]));

  rev_multiplier #(.N(N), .KIND(FA_TSG)) u_mult_tsg (
    .x(x[FA_TSG]), .y(y[FA_TSG]), .product(product[FA_TSG]), .garbage(garbage[FA_TSG]));
endmodule
