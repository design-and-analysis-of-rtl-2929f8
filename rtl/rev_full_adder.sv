// rev_full_adder: one reversible full-adder cell, of the kind chosen by KIND.
//
// KIND selects the cell at elaboration: FA_PERES (two Peres gates), FA_MFA
// (one MFA gate), FA_FGTG (two Feynman and two Toffoli gates) or FA_TSG (one
// TSG gate, the default). All four have the same ports: sum and carry of
// a + b + cin, and two garbage outputs. This wrapper lets the adder and the
// multiplier be written once for all four versions compared. Purely
// combinational.
module rev_full_adder
  import rev_pkg::*;
#(
  parameter fa_kind_e KIND = FA_TSG
) (
  input  logic                  a,
  input  logic                  b,
  input  logic                  cin,
  output logic                  sum,
  output logic                  cout,
  output logic [FA_GARBAGE-1:0] garbage
);
  generate
    case (KIND)
      FA_PERES: begin : g_peres
        fa_peres u_fa (.a, .b, .cin, .sum, .cout, .garbage);
      end
      FA_MFA: begin : g_mfa
        fa_mfa u_fa (.a, .b, .cin, .sum, .cout, .garbage);
      end
      FA_FGTG: begin : g_fgtg
        fa_fgtg u_fa (.a, .b, .cin, .sum, .cout, .garbage);
      end
      default: begin : g_tsg
        fa_tsg u_fa (.a, .b, .cin, .sum, .cout, .garbage);
      end
    endcase
  endgenerate
endmodule
