# Reversible 8 x 8 multiplier

An unsigned 8 x 8 bit array multiplier made only of *reversible* gates:
gates whose outputs determine their inputs uniquely, so that no information
is destroyed inside the circuit. Reversible logic is of interest because an
irreversible bit erasure costs at least kT ln 2 of energy, and because it maps
onto quantum, optical and other emerging technologies. The price is paid in
extra lines: constant inputs that feed the gates and *garbage outputs* that
exist only to keep every gate a bijection.

The multiplier comes in four versions that share the partial-product array and
differ only in the reversible full adder used to sum the partial products:

| version    | full-adder cell                         | gates per cell |
|------------|-----------------------------------------|----------------|
| `FA_PERES` | two Peres gates                         | 2              |
| `FA_MFA`   | one 4x4 MFA gate                        | 1              |
| `FA_FGTG`  | two Toffoli and two Feynman gates       | 4              |
| `FA_TSG`   | one 4x4 TSG gate (default)              | 1              |

The point of the design is to compare these cells for area, power and delay
in an otherwise identical multiplier. `rev_mult_top` holds all four side by
side.

Everything is combinational: there is no clock, no reset and no register. A
product is valid one propagation delay after the operands change.

## Two rules that shape every block

1. **No fan-out.** A reversible circuit may not split a wire to two gate
   inputs. A signal needed twice is copied with a Feynman gate whose second
   input is 0, or it rides a gate's pass-through output (most of these gates
   have `P = A`) on to the next gate.
2. **Every gate output goes somewhere.** Outputs that the function does not
   need are garbage. Every block here brings its garbage out on a `garbage`
   port instead of leaving it dangling, so the count is visible and the
   testbenches can check the values.

## The gates

| module         | size | equations                                                   |
|----------------|------|-------------------------------------------------------------|
| `feynman_gate` | 2x2  | P = A, Q = A ^ B                                            |
| `toffoli_gate` | 3x3  | P = A, Q = B, R = AB ^ C                                    |
| `peres_gate`   | 3x3  | P = A, Q = A ^ B, R = AB ^ C                                |
| `tsg_gate`     | 4x4  | P = A, Q = A'C' ^ B', R = Q ^ D, S = QD ^ (AB ^ C)          |
| `mfa_gate`     | 4x4  | P = A, Q = A ^ B, R = A ^ B ^ C, S = (A ^ B)C ^ AB ^ D      |

Feynman, Toffoli, Peres and TSG use their standard published equations. The
MFA gate is known here only by its role, a 4x4 gate that is a full adder on
its own. The mapping above is this design's choice for that role. It is
reversible: A comes back from P, B from P ^ Q, C from Q ^ R, and then D from S.

With one input tied to 0:

* Peres with C = 0 gives R = AB: one partial-product bit.
* TSG with C = 0 gives Q = A ^ B, R = sum and S = carry of A + B + D.
* MFA with D = 0 gives R = sum and S = carry of A + B + C.
* Feynman with B = 0 gives two copies of A.

## Full-adder cells

All four cells (`fa_peres`, `fa_mfa`, `fa_fgtg`, `fa_tsg`) have the same ports
(`a`, `b`, `cin` in; `sum`, `cout`, `garbage[1:0]` out). Each uses one
constant-0 input and leaves exactly two garbage outputs, always
`garbage = {a ^ b, a}`:

* **Peres**: `PG(a, b, 0)` gives `a, a^b, ab`. `PG(a^b, cin, ab)` then gives
  `a^b` (garbage), the sum `a^b^cin` and the carry `(a^b)cin ^ ab`.
* **FG&TG**: a chain of four gates, each fed by the pass-through outputs of
  the one before. `TG(a, b, 0)` gives `ab`. `FG(a, b)` gives `a^b`.
  `TG(a^b, cin, ab)` gives the carry. `FG(a^b, cin)` gives the sum.
* **TSG**: one gate driven as `TSG(a, b, 0, cin)`; R is the sum, S the carry.
* **MFA**: one gate driven as `MFA(a, b, cin, 0)`; R is the sum, S the carry.

`rev_full_adder` picks one of them at elaboration from its `KIND` parameter
(type `rev_pkg::fa_kind_e`).

## Partial-product array (`pp_generator`)

All N x N bits `pp[j][i] = x[i] & y[j]` are formed in parallel, one Peres gate
`PG(x[i], y[j], 0)` per bit, with the product on R. To respect the no-fan-out
rule:

* each `y[j]` is copied N times by a chain of N-1 Feynman gates. Each gate's P
  output passes the bit down the chain and its Q output is one copy;
* each `x[i]` passes through the N Peres gates of its column on their
  `P = A` outputs.

Garbage, N*N + N bits: `garbage[j*N + i] = x[i] ^ y[j]` (each Peres Q), then
`garbage[N*N + i] = x[i]` as it leaves the end of its chain.

For N = 8 this is 64 Peres gates and 56 Feynman gates.

## Summing the rows (`rev_parallel_adder`, `rev_multiplier`)

`rev_parallel_adder` is an N-bit ripple-carry adder of N full-adder cells of
the chosen kind. Cell k's garbage is on `garbage[2k+1:2k]`.

`rev_multiplier` adds the N partial-product rows with N-1 of these adders, a
linear carry-propagate array:

```
running = {0, pp[0][N-1:1]}          product[0] = pp[0][0]
for j = 1 .. N-1:
    {c, s} = running + pp[j]          (N-bit reversible adder, cin = 0)
    product[j] = s[0]
    running    = {c, s[N-1:1]}
product[2N-1:N] = running
```

Row 0 needs no adder. The missing top bit of the first running sum and every
row adder's carry in are constant-0 lines; no separate half-adder gate is used.
The longest path is one Peres gate, then about 2N-1 full-adder cells: down
the first column of adders, then along the carry chain of the last row.

Garbage of the whole multiplier, `mult_garbage_bits(N) = 3N*N - N` bits (184
for N = 8), in this order: the partial-product array's N*N + N bits, then the
adders of rows 1 .. N-1, 2N bits each.

Gate counts for N = 8 (partial products plus 56 full-adder cells):

| version | Peres | Feynman | Toffoli | TSG | MFA | garbage outputs |
|---------|-------|---------|---------|-----|-----|-----------------|
| Peres   | 176   | 56      | 0       | 0   | 0   | 184             |
| MFA     | 64    | 56      | 0       | 0   | 56  | 184             |
| FG&TG   | 64    | 168     | 112     | 0   | 0   | 184             |
| TSG     | 64    | 56      | 0       | 56  | 0   | 184             |

## The top (`rev_mult_top`)

Four `rev_multiplier` instances, one per version, each with its own operands
and outputs. The ports are packed arrays indexed by `fa_kind_e`
(0 Peres, 1 MFA, 2 FG&TG, 3 TSG):

| port      | direction | width                         |
|-----------|-----------|-------------------------------|
| `x`       | in        | `[4][N]`                      |
| `y`       | in        | `[4][N]`                      |
| `product` | out       | `[4][2N]`                     |
| `garbage` | out       | `[4][mult_garbage_bits(N)]`   |

Parameter `N` (default 8) sets the operand width. `rev_multiplier` and
`rev_parallel_adder` also take `KIND` (default `FA_TSG`).

## Choices this design makes

The design fixes the operand size (8 x 8), the Peres-gate partial products,
the gates of the four versions and the reversible parallel adders. The rest
is this implementation's own choice:

* the equations of the MFA gate (see above);
* how the FG&TG and Peres full adders are wired, and the operand order on the
  TSG and MFA gates;
* the Feynman copy chains and pass-through chains in the partial-product array;
* ripple-carry adders in a linear row-by-row array. A tree of adders would
  take log N adder levels instead of N-1, but is not used;
* unsigned operands, TSG as the default version, and no clock or register.

The multiplier is called fault tolerant, but no parity-preserving gates or
error-checking logic are defined for it, and none is built. Area, power and
delay of the four versions depend on a cell library and flow outside this RTL
and are not reproduced.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
prints `TB_RESULT checks=N failures=M` and has a watchdog.

* Gates: every input combination, compared with the equations written out
  again in the testbench, plus a check that no two inputs give the same
  output word (the gate is a bijection).
* Full-adder cells and `rev_full_adder`: all eight inputs. The testbench
  checks the sum, the carry, the garbage values, and that each cell is still
  one-to-one.
* `pp_generator`: all 65,536 operand pairs, for the partial products and the
  garbage.
* `rev_parallel_adder`: all 131,072 (a, b, cin) at N = 8, in all four
  versions. It also checks that a carry rippled through all eight cells.
* `rev_multiplier`: all four versions on the three example operand pairs
  (51 x 255, 255 x 204, 204 x 227), then on all 65,536 pairs.
* `tb_rev_mult_top`: the whole top at default parameters. Each version gets
  a different operand stream, and over the run every version sees every pair.
  It counts the carry outs of every row adder, products that use bit 15, and
  zero operands in every version, and fails if any count is 0.

All of them pass. Each finishes in well under a second.

## Simulating

With Verilator 5, from the folder holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_rev_mult_top \
    rtl/rev_pkg.sv tb/tb_rev_mult_top.sv
./obj_dir/Vtb_rev_mult_top
```

Replace `tb_rev_mult_top` with any other testbench name. `rev_pkg.sv` goes
first; Verilator finds the other modules in `rtl/` by their file names.

To change the size, set `N` on `rev_mult_top` or `rev_multiplier` (N >= 2);
garbage widths follow from the functions in `rev_pkg`. To add a full-adder
cell, give it the common cell ports, add a value to `fa_kind_e` and a branch
in `rev_full_adder`.
