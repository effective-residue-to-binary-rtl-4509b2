# CRT residue-to-binary converter with a power-of-two excess factor

A Residue Number System (RNS) represents an integer X in [0, M) by its
residues x_j = |X|_mj with respect to pairwise coprime moduli m_1 .. m_n,
M = m_1 * ... * m_n. Addition and multiplication then run in n small,
independent channels, but getting X back in binary is expensive. The
Chinese Remainder Theorem gives

    S = sum_j X_j,   X_j = M_j * |M_j^-1 * x_j|_mj,   M_j = M / m_j
    X = |S|_M = S - r*M,   r = floor(S / M),   0 <= r < n

The hard part is r: it needs a comparison of S with multiples of a large,
odd M. This converter never computes r. It divides S by a power of two
M_B = 2^p close to M instead, which is free in binary:

    X_B = S mod 2^p      (the low p bits of S)
    r_B = floor(S / 2^p) (the high bits of S)

If M_B is close enough to M, the true excess factor r differs from r_B by
a correction rho that is only 0 or 1, and X follows from X_B, r_B and the
constant delta = |M_B - M| with one small multiplication and two adders
working in parallel. The whole converter is small look-up tables plus
ordinary binary adders; no modulo-M adder is needed.

## Why rho is 0 or 1, and which M_B to use

There are two cases, depending on which side of M the power of two lies.

**Case 1, M < M_B = 2^p, delta = M_B - M.** Here r_B <= r and

    X = X_B + delta*r_B          if rho = 0
    X = X_B + delta*r_B - M      if rho = 1

rho <= 1 is guaranteed when (n-1)*M > (n-2)*M_B. (With S < n*M, the
largest r is n-1; r - r_B >= 2 would need (r_B+2)*M <= S < (r_B+1)*M_B,
which the condition rules out for every r_B <= n-3.)

**Case 2, M > M_B = 2^p, delta = M - M_B.** Here r_B >= r and

    X = X_B - delta*r_B          if rho = 0
    X = X_B - delta*r_B + M      if rho = 1

rho <= 1 is guaranteed when n*M_B > (n-1)*M.

In both cases exactly one of the two candidates lies in [0, M), and that
is X. The package `crt_pkg` chooses the case at elaboration: it tries
p = ceil(log2 M) with the case-1 condition, then p = ceil(log2 M) - 1 with
the case-2 condition, and stops elaboration with an error if neither
holds. For the three bases below this gives:

| base | moduli | n | M | M_B | case |
|------|--------|---|---|-----|------|
| B1 (default) | 32 31 29 27 19 | 5 | 14 757 984 | 2^24 | 1 |
| B2 | 32 31 29 27 25 23 19 | 7 | 8 485 840 800 | 2^33 | 1 |
| B3 | 32 31 29 27 25 23 19 17 13 11 7 | 11 | 144 403 552 893 600 | 2^47 | 2 |

For B1, delta = 2 019 232. Over the whole range of B1, 4 273 801 of the
14 757 984 inputs need rho = 1.

## Datapath

Widths in brackets are for the default base B1.

1. **Projection ROMs** (`crt_proj_rom`, one per channel). Addressed by the
   residue [5 bits], each returns X_j as a ceil(log2 nM)-bit number [27].
   The table is computed at elaboration from the moduli, so there are no
   data files; it maps to a ROM or to 5-input logic.
2. **n-operand carry-save tree** (`csa_tree`). Reduces the n projections to
   a sum vector and a carry vector. Each layer turns k operands into
   2*floor(k/3) + (k mod 3), so 1..8 layers handle up to
   3, 4, 6, 9, 13, 19, 28, 42 operands; B1 needs 3 layers.
3. **Sum adder** (`cla_adder`, 27 bits). Produces S. Its low p bits [24]
   are X_B and its high bits [3] are r_B.
4. **r_B x delta** (`rb_delta_rom`). r_B has only ceil(log2 n) or so bits,
   so the product is a table of 2^RBW constants [8 entries of 25 bits].
   In case 2 the table holds the one's complement of delta*r_B, so that
   the adders below subtract it with a carry-in of 1.
5. **Correction adders.** The candidates are computed in L = ceil(log2 M)+1
   bits [25], enough for any value in [0, 2M):
   - the *left* path: a carry-save row (`csa_3to2`) adds X_B, the
     r_B x delta output and the constant -M (as 2^L - M) in case 1 or +M
     in case 2; an (L+1)-bit `cla_adder` completes the sum;
   - the *right* path: an L-bit `cla_adder` adds X_B and the r_B x delta
     output.
6. **Selection** (`result_mux`). Takes the candidate in [0, M):
   - case 1: the left adder computes X_B + delta*r_B + 2^L - M. Its carry
     bit (bit L) is set exactly when X_B + delta*r_B >= M, i.e. rho = 1,
     and then the low bits of the left sum are X; otherwise the right sum
     is X.
   - case 2: the right adder computes X_B + ~(delta*r_B) + 1. Its carry out
     is set exactly when X_B >= delta*r_B, i.e. rho = 0, and then the right
     sum is X; otherwise the left sum (corrected by +M) is X. The left
     adder's carry carries no information in this case, which is why the
     select comes from the other adder.

The `rho` output reports which candidate was taken.

## Interface and timing of `crt_r2b_converter`

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk | in | 1 | clock (used when PIPELINED = 1) |
| rst_n | in | 1 | asynchronous active-low reset of the valid bits |
| in_valid | in | 1 | residues valid |
| residues | in | N x AW | packed, element j is |X|_mj; AW = ceil(log2 max m_j) |
| out_valid | out | 1 | x valid |
| x | out | ceil(log2 M) | binary X |
| rho | out | 1 | 1 when the M-corrected candidate was selected |

Parameters: `N` (number of moduli), `MODULI` (a `crt_pkg::moduli_t` array
of up to 16 entries, first N used), `PIPELINED`.

With `PIPELINED = 0` (default) the converter is purely combinational from
`residues` to `x`, and `out_valid` equals `in_valid`. With
`PIPELINED = 1` registers sit after the ROMs, after the sum adder and at
the output: one conversion per clock and a latency of three cycles (inputs
present before rising edge k give `x` and `out_valid` right after edge
k+2); `out_valid` follows `in_valid` with the same delay.
Residue codes at or above their modulus are not valid input; they read as
residue 0 in the ROMs.

To use another base, set `N` and `MODULI`, for example for B3:

```systemverilog
crt_r2b_converter #(
  .N(11),
  .MODULI('{0: 32, 1: 31, 2: 29, 3: 27, 4: 25, 5: 23, 6: 19, 7: 17,
            8: 13, 9: 11, 10: 7, default: 0})
) u_conv ( ... );
```

All constants are 64-bit at elaboration, so n*M must stay below 2^64.
The moduli must be pairwise coprime (each ROM checks that M_j is
invertible modulo m_j).

## What follows the method and what is this design's own

Taken from the method: the M_B = 2^p estimate of the excess factor, the
two cases and their conditions, the block structure (ROMs, carry-save
tree, carry-look-ahead adder, r_B x delta block, carry-save row, two
parallel adders, multiplexer), the ROM width ceil(log2 nM), the layer
counts of the tree, and the case-1 select from the carry of the adder that
subtracts M.

This design's choices:

- the case-2 datapath (one's-complement table, carry-in of 1, select from
  the right adder's carry), since only the case-1 structure is given in
  detail;
- the automatic choice of p and the elaboration-time rejection of bases
  that meet neither condition;
- the Kogge-Stone prefix network inside `cla_adder` (any fast
  carry-look-ahead adder of about W log W area fits);
- the greedy Wallace grouping inside `csa_tree`;
- the correction adder width L = ceil(log2 M)+1;
- the optional three-stage pipeline, the valid bits, the reset and the
  `rho` output. Full-adder-level pipelining, which the method allows
  (throughput limited by one full adder and a latch), is not provided: it
  would need the adders split into bit-level stages that are not
  described here.

No area, delay or power figure was measured for this RTL; the cell
library and ROM models the method's cost estimates rely on are not part
of it.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

- `tb_crt_r2b_full`: the default converter, every X in [0, 14 757 984)
  converted and compared; the number of rho = 1 cases is compared with a
  reference computation of floor(S/M) - floor(S/2^24). About 10 s.
- `tb_crt_r2b_converter`: B1, B2, B3 and a pipelined B1 side by side,
  100 000 random values each plus the range ends; checks that rho = 0 and
  rho = 1 both occur on every converter, that B3 uses case 2, the chosen
  exponents (24, 33, 47), and the 3-cycle latency and full throughput of
  the pipelined converter with gaps in `in_valid`.
- `tb_crt_proj_rom`: all addresses of three ROMs against an independent
  search for the projection.
- `tb_csa_tree`: random sums for 5, 7, 11 and 42 operands, and the layer
  counts against the 3/4/6/9/13/19/28/42 limits.
- `tb_cla_adder`: exhaustive at 8 bits, random and full-carry-chain cases
  at 27 and 49 bits.
- `tb_rb_delta_rom`, `tb_csa_3to2`, `tb_result_mux`: every entry or random
  operands.

Running a testbench with Verilator (from the directory that holds `rtl/`
and `tb/`):

```sh
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
  --top-module tb_crt_r2b_full rtl/crt_pkg.sv tb/tb_crt_r2b_full.sv
./obj_dir/Vtb_crt_r2b_full
```

Lint: `verilator --lint-only -Wall -Irtl -y rtl rtl/crt_pkg.sv rtl/crt_r2b_converter.sv`.
The remaining warnings are unused signals: `clk`/`rst_n` in the
combinational configuration, the top carry bit of the tree's last 3:2
rows (its weight lies above the sum width), the carry out of the (L+1)-bit
left adder (always zero), and the top bit of the right sum (zero whenever
that sum is selected).

## Files

| file | content |
|------|---------|
| `rtl/crt_pkg.sv` | moduli type, elaboration-time arithmetic (M, inverses, projections, choice of p and delta) |
| `rtl/crt_r2b_converter.sv` | top level |
| `rtl/crt_proj_rom.sv` | projection look-up table |
| `rtl/csa_tree.sv` | n-operand carry-save tree |
| `rtl/csa_3to2.sv` | one carry-save row |
| `rtl/cla_adder.sv` | parallel-prefix carry-look-ahead adder |
| `rtl/rb_delta_rom.sv` | r_B x delta table |
| `rtl/result_mux.sv` | final multiplexer |
| `tb/tb_*.sv` | testbenches |
