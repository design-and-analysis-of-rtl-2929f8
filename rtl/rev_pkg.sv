// rev_pkg: types and constants shared by the reversible multiplier.
//
// fa_kind_e names the four reversible full-adder cells the multiplier can be
// built from: two Peres gates, one MFA gate, Feynman plus Toffoli gates, or one
// TSG gate. The multiplier is one design compared in these four versions.
// Every full-adder cell leaves two garbage outputs (FA_GARBAGE); the garbage
// width helpers give the size of the garbage buses of the larger blocks so
// that ports can be sized from N alone.
package rev_pkg;

  typedef enum logic [1:0] {
    FA_PERES = 2'd0,  // two Peres gates
    FA_MFA   = 2'd1,  // one MFA gate, D = 0
    FA_FGTG  = 2'd2,  // two Feynman and two Toffoli gates
    FA_TSG   = 2'd3   // one TSG gate, C = 0
  } fa_kind_e;

  localparam int unsigned NUM_FA_KINDS = 4;

  // garbage outputs of one full-adder cell (all four kinds have two)
  localparam int unsigned FA_GARBAGE = 2;

  // garbage of the N x N partial-product array: one Peres Q output per bit,
  // plus each multiplicand bit at the end of its pass-through chain
  function automatic int unsigned pp_garbage_bits(int unsigned n);
    return n * n + n;
  endfunction

  // garbage of an N-bit ripple-carry parallel adder
  function automatic int unsigned adder_garbage_bits(int unsigned n);
    return FA_GARBAGE * n;
  endfunction

  // garbage of the whole N x N multiplier: the partial-product array and
  // N-1 row adders of N cells each
  function automatic int unsigned mult_garbage_bits(int unsigned n);
    return pp_garbage_bits(n) + (n - 1) * adder_garbage_bits(n);
  endfunction

endpackage
